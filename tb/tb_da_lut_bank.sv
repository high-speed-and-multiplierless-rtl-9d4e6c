// tb_da_lut_bank: exhaustive test of the split coefficient table.
//
// Instance 0: default (5 taps 0, 4, 8, 4, 0; one table over the three
// non-zero coefficients). Instance 1: the same filter with tables of 2 and 1
// inputs. Instance 2: seven taps -1, 0, 9, 16, 9, 0, -1 (five non-zero) split
// into tables of 2, 2 and 1 inputs. Every address is compared with the sum
// of the selected non-zero coefficients computed here.
module tb_da_lut_bank;
  import hbf_pkg::*;

  localparam int C7 [7] = '{-1, 0, 9, 16, 9, 0, -1};
  localparam int NZ7 [5] = '{-1, 9, 16, 9, -1};
  localparam int NZ5 [3] = '{4, 8, 4};

  function automatic coef_list_t mk7();
    coef_list_t r;
    r = '0;
    for (int i = 0; i < 7; i++) r[i] = coef_t'(C7[i]);
    return r;
  endfunction

  int checks = 0;
  int failures = 0;

  logic [2:0]        a0, a1;
  logic signed [5:0] d0, d1;
  logic [4:0]        a2;
  logic signed [7:0] d2;

  da_lut_bank dut0 (.addr(a0), .data(d0));
  da_lut_bank #(.K(2)) dut1 (.addr(a1), .data(d1));
  da_lut_bank #(.NTAPS(7), .COEFFS(mk7()), .K(2), .OUT_W(8)) dut2 (.addr(a2), .data(d2));

  initial begin
    for (int a = 0; a < 8; a++) begin
      int e;
      a0 = 3'(a);
      a1 = 3'(a);
      #1;
      e = 0;
      for (int j = 0; j < 3; j++) if (a[2-j]) e += NZ5[j];
      checks += 2;
      if (int'(d0) != e) begin
        failures++;
        $display("FAIL one table: addr %b gives %0d, expected %0d", a0, d0, e);
      end
      if (int'(d1) != e) begin
        failures++;
        $display("FAIL split table: addr %b gives %0d, expected %0d", a1, d1, e);
      end
    end
    for (int a = 0; a < 32; a++) begin
      int e;
      a2 = 5'(a);
      #1;
      e = 0;
      for (int j = 0; j < 5; j++) if (a[4-j]) e += NZ7[j];
      checks++;
      if (int'(d2) != e) begin
        failures++;
        $display("FAIL 7-tap split table: addr %b gives %0d, expected %0d", a2, d2, e);
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
