// hbf_cascade: two half-band DA filter stages in series.
//
// Halving the bandwidth more than once is done by chaining half-band
// filters. Stage 1 filters x_in; its full-precision output (y1, Y1_W bits)
// is both brought out and fed to stage 2, which is sized for that wider
// input and therefore needs more bit steps per sample. The stages are joined
// by a valid/ready handshake, so stage 1 holds its result and stops taking
// samples while stage 2 is still busy. No decimation is done: every input
// sample produces one output of each stage.
//
// Interface: x_in with in_valid/in_ready; y_out with out_valid/out_ready;
// y1 with y1_valid, a one-cycle strobe on each transfer from stage 1 to
// stage 2. Timing: with the default 8-bit input, stage 1 takes 8 steps and
// stage 2 13 steps, so in steady state one sample is taken every 14 cycles.
// Synchronous active-low reset.
//
// Two identical stages in series and the brought-out stage-1 output follow
// the source design; the handshake between the stages is a choice made here.
module hbf_cascade
  import hbf_pkg::*;
#(
  parameter int         X_W    = 8,
  parameter int         NTAPS  = HB5_NTAPS,
  parameter coef_list_t COEFFS = HB5_COEFFS,
  parameter int         BPC    = 1,
  parameter int         LUT_K  = nz_count(COEFFS, NTAPS),
  localparam int        Y1_W   = out_width(X_W, COEFFS, NTAPS),
  localparam int        Y_W    = out_width(Y1_W, COEFFS, NTAPS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [X_W-1:0]  x_in,
  output logic                   y1_valid,
  output logic signed [Y1_W-1:0] y1,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic signed [Y_W-1:0]  y_out
);

  logic s1_valid, s2_ready;

  hbf_da_filter #(
    .X_W    (X_W),
    .NTAPS  (NTAPS),
    .COEFFS (COEFFS),
    .BPC    (BPC),
    .LUT_K  (LUT_K)
  ) u_stage1 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .x_in      (x_in),
    .out_valid (s1_valid),
    .out_ready (s2_ready),
    .y_out     (y1)
  );

  hbf_da_filter #(
    .X_W    (Y1_W),
    .NTAPS  (NTAPS),
    .COEFFS (COEFFS),
    .BPC    (BPC),
    .LUT_K  (LUT_K)
  ) u_stage2 (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (s1_valid),
    .in_ready  (s2_ready),
    .x_in      (y1),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .y_out     (y_out)
  );

  assign y1_valid = s1_valid && s2_ready;

endmodule
