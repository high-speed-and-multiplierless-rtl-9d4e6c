// da_lut: distributed-arithmetic coefficient table.
//
// Holds all 2^K sums of K filter coefficients. Address bit K-1-i selects
// coefficient i, so address 0...01 returns the last coefficient of the group
// and address 1...1 the sum of all of them; this is the address-to-data
// layout of the classic DA table. In a DA filter the address is one bit of
// each tap word, so the word read out is the partial product of that bit
// position with the whole coefficient vector, and no multiplier is needed.
//
// The table is generated from the COEFFS parameter while the design is
// elaborated (a ROM; a lookup of 2^K words). Read is combinational: data
// follows addr in the same cycle. Default: K = 3 with the non-zero
// half-band coefficients 4, 8, 4, i.e. a 2^3-word table.
//
// The table contents and the address layout (first coefficient on the
// most significant address bit) follow the source design; the word width and
// the combinational read are choices made here.
module da_lut
  import hbf_pkg::*;
#(
  parameter int         K      = 3,
  parameter coef_list_t COEFFS = nz_list(HB5_COEFFS, HB5_NTAPS),
  parameter int         OUT_W  = lut_width(COEFFS, K)
) (
  input  logic [K-1:0]            addr,
  output logic signed [OUT_W-1:0] data
);

  localparam int NWORDS = 1 << K;

  function automatic logic signed [OUT_W-1:0] entry(int a);
    int s;
    s = 0;
    for (int i = 0; i < K; i++)
      if (a[K-1-i]) s += coef_at(COEFFS, i);
    return OUT_W'(s);
  endfunction

  logic signed [OUT_W-1:0] rom [NWORDS];

  for (genvar a = 0; a < NWORDS; a++) begin : g_rom
    assign rom[a] = entry(a);
  end

  assign data = rom[addr];

endmodule
