// tb_da_lut: exhaustive test of the DA coefficient table.
//
// Instance 0 is the default 2^3-word table of the coefficients 4, 8, 4.
// Instance 1 is a 2^4-word table of four distinct coefficients 3, -5, 7, 11,
// which also fixes the address layout: the most significant address bit
// selects the first coefficient, the least significant the last one.
// Every address of both is read and compared with the sum computed here.
module tb_da_lut;
  import hbf_pkg::*;

  localparam int C4 [4] = '{3, -5, 7, 11};

  function automatic coef_list_t mk4();
    coef_list_t r;
    r = '0;
    for (int i = 0; i < 4; i++) r[i] = coef_t'(C4[i]);
    return r;
  endfunction

  int checks = 0;
  int failures = 0;

  logic [2:0]        a3;
  logic signed [5:0] d3;
  logic [3:0]        a4;
  logic signed [7:0] d4;

  da_lut dut3 (.addr(a3), .data(d3));
  da_lut #(.K(4), .COEFFS(mk4()), .OUT_W(8)) dut4 (.addr(a4), .data(d4));

  initial begin
    for (int a = 0; a < 8; a++) begin
      int e;
      a3 = 3'(a);
      #1;
      e = (a[2] ? 4 : 0) + (a[1] ? 8 : 0) + (a[0] ? 4 : 0);
      checks++;
      if (int'(d3) != e) begin
        failures++;
        $display("FAIL 2^3 table: addr %b gives %0d, expected %0d", a3, d3, e);
      end
    end
    for (int a = 0; a < 16; a++) begin
      int e;
      a4 = 4'(a);
      #1;
      e = 0;
      for (int i = 0; i < 4; i++) if (a[3-i]) e += C4[i];
      checks++;
      if (int'(d4) != e) begin
        failures++;
        $display("FAIL 2^4 table: addr %b gives %0d, expected %0d", a4, d4, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
