// da_lut_bank: DA coefficient table split into smaller tables.
//
// A single DA table over L inputs has 2^L words, which grows too fast for
// long filters. This block splits the L = NZ table inputs into groups of K
// (the last group may be shorter), gives each group its own da_lut of 2^K
// words and adds the group outputs. The sum equals the word the single large
// table would return. With K = NZ (the default) there is one table and no
// adder.
//
// Address bit NZ-1-j belongs to the j-th non-zero coefficient of COEFFS
// (zero coefficients get no table input). Purely combinational.
//
// Splitting one table into m tables of 2^k words follows the source design;
// the shorter last group and the default of a single table are choices made
// here.
module da_lut_bank
  import hbf_pkg::*;
#(
  parameter int         NTAPS  = HB5_NTAPS,
  parameter coef_list_t COEFFS = HB5_COEFFS,
  parameter int         K      = nz_count(COEFFS, NTAPS),
  parameter int         OUT_W  = lut_width(COEFFS, NTAPS)
) (
  input  logic [nz_count(COEFFS, NTAPS)-1:0] addr,
  output logic signed [OUT_W-1:0]            data
);

  localparam int         NZ  = nz_count(COEFFS, NTAPS);
  localparam int         M   = (NZ + K - 1) / K;
  localparam coef_list_t NZC = nz_list(COEFFS, NTAPS);

  logic signed [OUT_W-1:0] part [M];

  for (genvar g = 0; g < M; g++) begin : g_lut
    localparam int KG = ((NZ - g * K) < K) ? (NZ - g * K) : K;
    da_lut #(
      .K      (KG),
      .COEFFS (sub_list(NZC, g * K, KG)),
      .OUT_W  (OUT_W)
    ) u_lut (
      .addr (addr[NZ-1-g*K -: KG]),
      .data (part[g])
    );
  end

  always_comb begin
    data = '0;
    for (int g = 0; g < M; g++) data += part[g];
  end

endmodule
