// tb_hbf_da_filter: self-checking test of one DA half-band filter stage.
//
// Three stages run side by side: the default configuration (serial, one bit
// per cycle, one 8-word table), a parallel one (two bits per cycle, the
// table split into tables of 2^2 and 2^1 words) and a seven-tap half-band
// filter with negative coefficients -1, 0, 9, 16, 9, 0, -1 (serial). Each is fed first the
// five-sample sequence 39, 19, 8, 5, -33 followed by zeros, whose filtered
// result 0, 156, 388, 340, 160, -60, -244, -132, 0 is known, and then random
// samples with random input gaps and random output back-pressure. Every
// output is compared with y[n] = sum_k h[k] x[n-k], computed here from the
// accepted samples (for the default: 4 x[n-1] + 8 x[n-2] + 4 x[n-3]). The latency (out_valid appears NSTEPS
// cycles after the accepting edge) and the sample period with no stalls
// (NSTEPS+1 cycles) are checked too.
module tb_hbf_da_filter;

  localparam int X_W   = 8;
  localparam int NRAND = 300;
  localparam int H [3][7] = '{'{0, 4, 8, 4, 0, 0, 0}, '{0, 4, 8, 4, 0, 0, 0},
                              '{-1, 0, 9, 16, 9, 0, -1}};
  localparam int PAPER_X [9] = '{39, 19, 8, 5, -33, 0, 0, 0, 0};
  localparam int PAPER_Y [9] = '{0, 156, 388, 340, 160, -60, -244, -132, 0};

  logic clk = 1'b0;
  logic rst_n;
  int   cyc = 0;
  int   checks = 0;
  int   failures = 0;
  logic [2:0] done = '0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic hbf_pkg::coef_list_t mk7();
    hbf_pkg::coef_list_t r;
    r = '0;
    for (int i = 0; i < 7; i++) r[i] = hbf_pkg::coef_t'(H[2][i]);
    return r;
  endfunction

  for (genvar c = 0; c < 3; c++) begin : g_cfg
    localparam int BPC    = (c == 1) ? 2 : 1;
    localparam int Y_W    = (c == 2) ? 15 : 13;
    localparam int NSTEPS = (X_W + BPC - 1) / BPC;

    logic                  in_valid = 1'b0;
    logic                  in_ready;
    logic                  out_valid;
    logic                  out_ready = 1'b1;
    logic signed [X_W-1:0] x_in = '0;
    logic signed [Y_W-1:0] y_out;

    if (c == 0) begin : g_dut
      hbf_da_filter dut (
        .clk, .rst_n, .in_valid, .in_ready, .x_in,
        .out_valid, .out_ready, .y_out
      );
    end else if (c == 1) begin : g_dut
      hbf_da_filter #(.BPC(2), .LUT_K(2)) dut (
        .clk, .rst_n, .in_valid, .in_ready, .x_in,
        .out_valid, .out_ready, .y_out
      );
    end else begin : g_dut
      hbf_da_filter #(.NTAPS(7), .COEFFS(mk7())) dut (
        .clk, .rst_n, .in_valid, .in_ready, .x_in,
        .out_valid, .out_ready, .y_out
      );
    end

    int hist [7] = '{0, 0, 0, 0, 0, 0, 0};
    int exp_q [$];
    int acc_q [$];
    int n_out = 0;
    int last_acc = -1;
    bit phase_a = 1'b1;
    bit head_seen = 1'b0;

    // Reference model and checks, sampled on the rising edge.
    always @(posedge clk) begin
      // out_valid must first appear NSTEPS+1 edges after the accepting edge
      if (rst_n && acc_q.size() != 0) begin
        if (out_valid && !head_seen) begin
          checks++;
          if (cyc - acc_q[0] != NSTEPS + 1) begin
            failures++;
            $display("FAIL cfg%0d: output after %0d cycles, expected %0d", c, cyc - acc_q[0], NSTEPS + 1);
          end
        end
        if (!out_valid && cyc - acc_q[0] >= NSTEPS + 1) begin
          checks++;
          failures++;
          $display("FAIL cfg%0d: no output %0d cycles after the sample", c, cyc - acc_q[0]);
        end
      end
      head_seen = out_valid && !out_ready;
      if (rst_n && in_valid && in_ready) begin
        int y;
        for (int k = 6; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x_in);
        y = 0;
        for (int k = 0; k < 7; k++) y += H[c][k] * hist[k];
        exp_q.push_back(y);
        acc_q.push_back(cyc);
        if (phase_a && last_acc >= 0) begin
          checks++;
          if (cyc - last_acc != NSTEPS + 1) begin
            failures++;
            $display("FAIL cfg%0d: sample period %0d, expected %0d", c, cyc - last_acc, NSTEPS + 1);
          end
        end
        last_acc = cyc;
      end
      if (rst_n && out_valid && out_ready) begin
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL cfg%0d: output with no sample pending", c);
        end else begin
          int e;
          int a;
          e = exp_q.pop_front();
          a = acc_q.pop_front();
          checks++;
          if (int'(y_out) != e) begin
            failures++;
            $display("FAIL cfg%0d: output %0d is %0d, expected %0d", c, n_out, y_out, e);
          end
          if (n_out < 9 && c < 2) begin
            checks++;
            if (int'(y_out) != PAPER_Y[n_out]) begin
              failures++;
              $display("FAIL cfg%0d: sequence output %0d is %0d, expected %0d", c, n_out, y_out, PAPER_Y[n_out]);
            end
          end
          n_out++;
        end
      end
    end

    // Stimulus, changed on the falling edge.
    initial begin
      @(posedge rst_n);
      @(negedge clk);
      for (int i = 0; i < 9; i++) begin
        in_valid = 1'b1;
        x_in     = X_W'(PAPER_X[i]);
        do @(negedge clk); while (!(g_cfg[c].in_ready_q));
      end
      in_valid = 1'b0;
      phase_a  = 1'b0;
      for (int i = 0; i < NRAND; i++) begin
        while ($urandom_range(3) == 0) @(negedge clk);
        in_valid  = 1'b1;
        x_in      = X_W'($urandom);
        if (i < 20) x_in = (i % 2 == 1) ? -128 : 127;
        out_ready = ($urandom_range(3) != 0);
        do begin
          @(negedge clk);
          out_ready = ($urandom_range(3) != 0);
        end while (!in_ready_q);
        in_valid = 1'b0;
      end
      out_ready = 1'b1;
      repeat (3 * (NSTEPS + 2)) @(negedge clk);
      checks++;
      if (exp_q.size() != 0 || n_out != 9 + NRAND) begin
        failures++;
        $display("FAIL cfg%0d: %0d outputs, expected %0d", c, n_out, 9 + NRAND);
      end
      done[c] = 1'b1;
    end

    // in_ready as seen at the last rising edge (whether the sample went in)
    logic in_ready_q = 1'b0;
    always @(posedge clk) in_ready_q <= in_ready && in_valid;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    wait (done == 3'b111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
