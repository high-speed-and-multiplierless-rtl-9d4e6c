// tb_da_scaling_accumulator: test of the shift-and-add accumulator.
//
// Two instances: one word per cycle (default: 6-bit words, 8 bit positions)
// and two words per cycle. For each trial, eight random signed 6-bit words
// w0..w7 are presented, least significant position first, the first cycle
// with 'clear' and the word of position 7 with 'sub'. The result must equal
// w0 + 2 w1 + ... + 64 w6 - 128 w7, computed here. Between trials the
// enable is dropped for a few cycles to check that the sum is held.
module tb_da_scaling_accumulator;

  localparam int IN_W = 6;
  localparam int X_W  = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  logic [1:0] done = '0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int BPC = c + 1;
    logic                     en = 1'b0;
    logic                     clear = 1'b0;
    logic [BPC-1:0][IN_W-1:0] partial = '0;
    logic [BPC-1:0]           sub = '0;
    logic signed [IN_W+X_W:0] acc;

    if (c == 0) begin : g_dut
      da_scaling_accumulator dut (.clk, .rst_n, .en, .clear, .partial, .sub, .acc);
    end else begin : g_dut
      da_scaling_accumulator #(.BPC(2)) dut (.clk, .rst_n, .en, .clear, .partial, .sub, .acc);
    end

    initial begin
      @(posedge rst_n);
      for (int n = 0; n < 200; n++) begin
        logic signed [IN_W-1:0] w [X_W];
        int e;
        e = 0;
        for (int b = 0; b < X_W; b++) begin
          w[b] = IN_W'($urandom);
          if (n == 0) w[b] = -32;
          if (n == 1) w[b] = 31;
          if (b == X_W - 1) e -= int'(w[b]) * (1 << b);
          else              e += int'(w[b]) * (1 << b);
        end
        for (int s = 0; s < X_W / BPC; s++) begin
          @(negedge clk);
          en    = 1'b1;
          clear = (s == 0);
          for (int j = 0; j < BPC; j++) begin
            partial[j] = w[s*BPC + j];
            sub[j]     = (s*BPC + j == X_W - 1);
          end
        end
        @(negedge clk);
        en = 1'b0;
        partial = '1;
        repeat (1 + n % 3) @(negedge clk);
        checks++;
        if (int'(acc) != e) begin
          failures++;
          $display("FAIL bpc%0d: trial %0d sum %0d, expected %0d", BPC, n, acc, e);
        end
      end
      done[c] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    wait (done == 2'b11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
