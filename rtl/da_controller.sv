// da_controller: sequencer of one bit-serial DA filter stage.
//
// In DA_IDLE it accepts a sample when in_valid is high and the result
// register is free (empty, or being read in this cycle): 'load' then shifts
// the sample into the tap line. In DA_BUSY it runs NSTEPS cycles, one per
// group of BPC bits: 'step' enables the accumulator and rotates the tap
// words, 'first' clears the accumulator and 'sign_step' (last step) tells
// the accumulator to subtract the word of the sign bit. After the last step
// out_valid rises and stays high until out_ready takes the result.
//
// Timing: a sample accepted on clock edge E gives out_valid after edge
// E+NSTEPS; with out_ready held high a new sample is accepted every
// NSTEPS+1 cycles. Handshakes are valid/ready: a transfer happens on an
// edge where both are high. Synchronous active-low reset.
//
// The source design names only the add/subtract control; the state machine,
// the step counter and the valid/ready handshakes are choices made here.
module da_controller
  import hbf_pkg::*;
#(
  parameter int NSTEPS = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  output logic out_valid,
  input  logic out_ready,
  output logic load,
  output logic step,
  output logic first,
  output logic sign_step
);

  localparam int CNT_W = (NSTEPS > 1) ? $clog2(NSTEPS) : 1;

  da_state_e        state;
  logic [CNT_W-1:0] cnt;

  assign in_ready  = (state == DA_IDLE) && (!out_valid || out_ready);
  assign load      = in_valid && in_ready;
  assign step      = (state == DA_BUSY);
  assign first     = step && (cnt == '0);
  assign sign_step = step && (cnt == CNT_W'(NSTEPS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= DA_IDLE;
      cnt       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      case (state)
        DA_IDLE: begin
          cnt <= '0;
          if (load) state <= DA_BUSY;
        end
        DA_BUSY: begin
          if (sign_step) begin
            state     <= DA_IDLE;
            out_valid <= 1'b1;
            cnt       <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= DA_IDLE;
      endcase
    end
  end

  // The result register is never full while a result is being computed.
  a_no_valid_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    (state == DA_BUSY) |-> !out_valid);

endmodule
