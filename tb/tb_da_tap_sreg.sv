// tb_da_tap_sreg: test of the rotating tap delay line.
//
// Two instances: one bit per rotation (default, 8-bit words, 5 taps) and two
// bits per rotation. Random samples are loaded; after each load the five
// words must equal the last five samples, newest in tap 0. Then the words are
// rotated X_W/BPC times: at every step the 'bits' output must show the next
// BPC bits of each word, least significant first, and after the last
// rotation every word must be back to its loaded value.
module tb_da_tap_sreg;

  localparam int X_W = 8;
  localparam int NT  = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0;
  int   failures = 0;
  logic [1:0] done = '0;

  always #5 clk = ~clk;

  for (genvar c = 0; c < 2; c++) begin : g_cfg
    localparam int BPC = c + 1;
    logic                       load = 1'b0;
    logic                       rotate = 1'b0;
    logic [X_W-1:0]             x_in = '0;
    logic [NT-1:0][BPC-1:0]     bits;
    logic [NT-1:0][X_W-1:0]     taps;
    logic [X_W-1:0]             model [NT];

    if (c == 0) begin : g_dut
      da_tap_sreg dut (.clk, .rst_n, .load, .x_in, .rotate, .bits, .taps);
    end else begin : g_dut
      da_tap_sreg #(.BPC(2)) dut (.clk, .rst_n, .load, .x_in, .rotate, .bits, .taps);
    end

    initial begin
      for (int k = 0; k < NT; k++) model[k] = '0;
      @(posedge rst_n);
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        load = 1'b1;
        x_in = X_W'($urandom);
        for (int k = NT - 1; k > 0; k--) model[k] = model[k-1];
        model[0] = x_in;
        @(negedge clk);
        load = 1'b0;
        for (int k = 0; k < NT; k++) begin
          checks++;
          if (taps[k] != model[k]) begin
            failures++;
            $display("FAIL bpc%0d: tap %0d is %h, expected %h", BPC, k, taps[k], model[k]);
          end
        end
        for (int s = 0; s < X_W / BPC; s++) begin
          for (int k = 0; k < NT; k++) begin
            checks++;
            if (bits[k] != model[k][s*BPC +: BPC]) begin
              failures++;
              $display("FAIL bpc%0d: step %0d tap %0d bits %b, expected %b", BPC, s, k, bits[k], model[k][s*BPC +: BPC]);
            end
          end
          rotate = 1'b1;
          @(negedge clk);
          rotate = 1'b0;
        end
        for (int k = 0; k < NT; k++) begin
          checks++;
          if (taps[k] != model[k]) begin
            failures++;
            $display("FAIL bpc%0d: tap %0d not restored: %h, expected %h", BPC, k, taps[k], model[k]);
          end
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
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
