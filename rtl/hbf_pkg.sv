// hbf_pkg: types and elaboration-time helpers shared by the half-band
// distributed-arithmetic (DA) filter.
//
// A filter is described by a list of integer coefficients (coef_list_t, up to
// MAX_TAPS entries, entry 0 multiplies the newest sample). The default,
// HB5_COEFFS, is the 5-coefficient half-band response 0, 4, 8, 4, 0: the
// values 0, 1/4, 1/2, 1/4, 0 scaled by 2^4 so that they are integers. The
// helper functions pick out the non-zero coefficients (the zero taps of a
// half-band filter need no table input) and size the table words and the
// filter output so that no result can overflow. They are evaluated only
// while the design is elaborated; they produce no hardware of their own.
//
// The coefficient values are those of the source design; the list type,
// its maximum length and the width rules are choices made here.
package hbf_pkg;

  localparam int MAX_TAPS = 32;
  localparam int COEF_W   = 16;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef coef_t [MAX_TAPS-1:0]     coef_list_t;

  // Controller states of one DA filter stage.
  typedef enum logic [0:0] {
    DA_IDLE = 1'b0,   // waiting for a sample
    DA_BUSY = 1'b1    // stepping through the bits of the tap words
  } da_state_e;

  function automatic coef_list_t make_hb5();
    coef_list_t r;
    r    = '0;
    r[1] = 16'sd4;
    r[2] = 16'sd8;
    r[3] = 16'sd4;
    return r;
  endfunction

  // h(n) = 0, 4, 8, 4, 0 for n = 0..4 (scaled by 2^4)
  localparam coef_list_t HB5_COEFFS = make_hb5();
  localparam int         HB5_NTAPS  = 5;

  function automatic int coef_at(coef_list_t c, int i);
    return int'(c[i]);
  endfunction

  // Number of non-zero coefficients among the first n.
  function automatic int nz_count(coef_list_t c, int n);
    int cnt;
    cnt = 0;
    for (int i = 0; i < n; i++)
      if (c[i] != '0) cnt++;
    return cnt;
  endfunction

  // Tap index of the j-th non-zero coefficient (j counts from 0).
  function automatic int nz_index(coef_list_t c, int n, int j);
    int cnt;
    int idx;
    cnt = 0;
    idx = 0;
    for (int i = 0; i < n; i++) begin
      if (c[i] != '0) begin
        if (cnt == j) idx = i;
        cnt++;
      end
    end
    return idx;
  endfunction

  // The non-zero coefficients, packed to the front of the list.
  function automatic coef_list_t nz_list(coef_list_t c, int n);
    coef_list_t r;
    int         cnt;
    r   = '0;
    cnt = 0;
    for (int i = 0; i < n; i++) begin
      if (c[i] != '0) begin
        r[cnt] = c[i];
        cnt++;
      end
    end
    return r;
  endfunction

  // Entries base .. base+k-1 of a list, moved to the front.
  function automatic coef_list_t sub_list(coef_list_t c, int base, int k);
    coef_list_t r;
    r = '0;
    for (int i = 0; i < k; i++)
      if (base + i < MAX_TAPS) r[i] = c[base + i];
    return r;
  endfunction

  // Sum of the magnitudes of the first n coefficients.
  function automatic int abs_sum(coef_list_t c, int n);
    int s;
    s = 0;
    for (int i = 0; i < n; i++)
      s += (coef_at(c, i) < 0) ? -coef_at(c, i) : coef_at(c, i);
    return s;
  endfunction

  // Width of a signed word that holds any sum of the coefficients.
  function automatic int lut_width(coef_list_t c, int n);
    return $clog2(abs_sum(c, n) + 1) + 1;
  endfunction

  // Width of a signed filter output for a signed input of x_w bits:
  // |y| <= abs_sum * 2^(x_w-1).
  function automatic int out_width(int x_w, coef_list_t c, int n);
    return x_w + $clog2(abs_sum(c, n)) + 1;
  endfunction

endpackage
