// hbf_da_filter: one half-band FIR stage built with distributed arithmetic.
//
//   y[n] = sum_k h[k] * x[n-k],   h = COEFFS (default 0, 4, 8, 4, 0)
//
// No multiplier is used. The tap line (da_tap_sreg) holds x[n] .. x[n-NTAPS+1]
// and, after a sample is loaded, rotates its words so that bit b of every tap
// is presented in step b, least significant bit first. The bits of the taps
// whose coefficient is non-zero form the address of the coefficient table
// (da_lut_bank): the zero taps of a half-band filter need no table input, so
// the default filter uses a 2^3-word table for its three non-zero
// coefficients. The table word is shift-accumulated (da_scaling_accumulator);
// in the last step, the sign bit of the two's-complement samples, it is
// subtracted. da_controller sequences the steps.
//
// BPC = 1 is the serial DA filter. BPC = 2 is the parallel form: two bits of
// each tap per cycle, two copies of the table, half the steps. Inputs are
// sign-extended to a multiple of BPC bits. LUT_K below the number of non-zero
// taps splits the table into smaller tables of 2^LUT_K words.
//
// The output is the full-precision integer result, Y_W bits, wide enough that
// it cannot overflow; it is not rescaled by the 2^4 of the coefficients. The
// accumulator carries two bits more than Y_W as headroom for its running
// sums; the final sum always fits Y_W, so those top bits are not brought out.
//
// Interface: valid/ready on both sides. Timing: a sample accepted on clock
// edge E gives out_valid after edge E+NSTEPS (NSTEPS = ceil(X_W/BPC));
// with out_ready high a sample is accepted every NSTEPS+1 cycles. y_out holds
// its value while out_valid is high. Synchronous active-low reset.
//
// The structure (shift registers, table of coefficient sums, shifting
// accumulator with sign control), the coefficients and the two-bit parallel
// variant follow the source design. Input width, dropping zero taps from the
// table address, reset, handshakes and timing are choices made here.
module hbf_da_filter
  import hbf_pkg::*;
#(
  parameter int         X_W    = 8,
  parameter int         NTAPS  = HB5_NTAPS,
  parameter coef_list_t COEFFS = HB5_COEFFS,
  parameter int         BPC    = 1,
  parameter int         LUT_K  = nz_count(COEFFS, NTAPS),
  localparam int        Y_W    = out_width(X_W, COEFFS, NTAPS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [X_W-1:0] x_in,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic signed [Y_W-1:0] y_out
);

  localparam int NZ     = nz_count(COEFFS, NTAPS);
  localparam int NSTEPS = (X_W + BPC - 1) / BPC;
  localparam int XI_W   = NSTEPS * BPC;
  localparam int LUT_W  = lut_width(COEFFS, NTAPS);
  localparam int ACC_W  = XI_W + LUT_W + 1;

  logic                          load, step, first, sign_step;
  logic signed [XI_W-1:0]        x_ext;
  logic [NTAPS-1:0][BPC-1:0]     bits;
  logic [BPC-1:0][NZ-1:0]        addr;
  logic [BPC-1:0][LUT_W-1:0]     partial;
  logic [BPC-1:0]                sub;
  logic signed [ACC_W-1:0]       acc;

  assign x_ext = XI_W'(x_in);

  da_controller #(
    .NSTEPS (NSTEPS)
  ) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .load      (load),
    .step      (step),
    .first     (first),
    .sign_step (sign_step)
  );

  da_tap_sreg #(
    .X_W   (XI_W),
    .NTAPS (NTAPS),
    .BPC   (BPC)
  ) u_taps (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (load),
    .x_in   (x_ext),
    .rotate (step),
    .bits   (bits),
    .taps   ()
  );

  // Table address of bit slot b: one bit of each tap with a non-zero
  // coefficient, the first such tap on the most significant address bit.
  always_comb begin
    for (int b = 0; b < BPC; b++)
      for (int j = 0; j < NZ; j++)
        addr[b][NZ-1-j] = bits[nz_index(COEFFS, NTAPS, j)][b];
  end

  for (genvar b = 0; b < BPC; b++) begin : g_slot
    logic signed [LUT_W-1:0] word;
    da_lut_bank #(
      .NTAPS  (NTAPS),
      .COEFFS (COEFFS),
      .K      (LUT_K),
      .OUT_W  (LUT_W)
    ) u_lut (
      .addr (addr[b]),
      .data (word)
    );
    assign partial[b] = word;
    // Only the most significant bit of the word is the sign bit.
    assign sub[b] = sign_step && (b == BPC - 1);
  end

  da_scaling_accumulator #(
    .IN_W  (LUT_W),
    .X_W   (XI_W),
    .BPC   (BPC),
    .ACC_W (ACC_W)
  ) u_acc (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (step),
    .clear   (first),
    .partial (partial),
    .sub     (sub),
    .acc     (acc)
  );

  assign y_out = acc[Y_W-1:0];

endmodule
