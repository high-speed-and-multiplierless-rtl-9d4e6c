// da_tap_sreg: tap delay line read out bit-serially for distributed
// arithmetic.
//
// NTAPS registers of X_W bits hold the newest sample (tap 0) and the NTAPS-1
// before it. A 'load' shifts the line by one word: tap 0 takes x_in and tap
// k takes tap k-1. A 'rotate' turns every tap word right by BPC bits, so the
// BPC bits on the 'bits' output walk from the least significant bit upwards.
// After X_W/BPC rotations every word is back where it started, ready for
// the next load; the delay line therefore needs no second copy of the
// samples. BPC = 1 gives the serial DA filter, BPC = 2 the two-bit parallel
// one.
//
// Timing: load and rotate act on the rising clock edge; 'bits' and 'taps'
// are register outputs. load and rotate must not be raised together.
// Synchronous active-low reset clears every tap.
//
// Bit-serial, LSB-first read-out of the taps follows the source design;
// using the tap registers themselves as rotating shift registers is a choice
// made here.
module da_tap_sreg #(
  parameter int X_W   = 8,
  parameter int NTAPS = 5,
  parameter int BPC   = 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           load,
  input  logic [X_W-1:0]                 x_in,
  input  logic                           rotate,
  output logic [NTAPS-1:0][BPC-1:0]      bits,
  output logic [NTAPS-1:0][X_W-1:0]      taps
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      taps <= '0;
    end else if (load) begin
      taps[0] <= x_in;
      for (int k = 1; k < NTAPS; k++) taps[k] <= taps[k-1];
    end else if (rotate) begin
      for (int k = 0; k < NTAPS; k++)
        taps[k] <= {taps[k][BPC-1:0], taps[k][X_W-1:BPC]};
    end
  end

  always_comb begin
    for (int k = 0; k < NTAPS; k++) bits[k] = taps[k][BPC-1:0];
  end

  initial begin
    assert (X_W % BPC == 0) else $error("X_W must be a multiple of BPC");
  end

  a_no_load_and_rotate: assert property (@(posedge clk) disable iff (!rst_n) !(load && rotate));

endmodule
