// tb_da_controller: test of the DA stage sequencer (NSTEPS = 8).
//
// A cycle-level reference written here predicts in_ready, load, step, first,
// sign_step and out_valid for random in_valid and out_ready, and every output
// is compared on every cycle. Also counted: exactly NSTEPS steps per
// accepted sample, 'first' on the first of them and 'sign_step' on the last,
// and out_valid held until out_ready takes it.
module tb_da_controller;

  localparam int NSTEPS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic out_ready = 1'b0;
  logic in_ready, out_valid, load, step, first, sign_step;
  int   checks = 0;
  int   failures = 0;

  // reference state
  bit m_busy = 1'b0;
  int m_cnt = 0;
  bit m_ov = 1'b0;
  int steps_in_run = 0;
  int n_results = 0;
  int n_blocked = 0;

  always #5 clk = ~clk;

  da_controller dut (.clk, .rst_n, .in_valid, .in_ready, .out_valid, .out_ready,
                     .load, .step, .first, .sign_step);

  task automatic expect_bit(string name, logic got, logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s is %b, expected %b", name, got, want);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      bit e_ready;
      e_ready = !m_busy && (!m_ov || out_ready);
      expect_bit("in_ready", in_ready, e_ready);
      expect_bit("load", load, e_ready && in_valid);
      expect_bit("step", step, m_busy);
      expect_bit("first", first, m_busy && m_cnt == 0);
      expect_bit("sign_step", sign_step, m_busy && m_cnt == NSTEPS - 1);
      expect_bit("out_valid", out_valid, m_ov);
      if (m_ov && !out_ready && in_valid) n_blocked++;
      if (step) steps_in_run++;
      if (m_ov && out_ready) m_ov = 1'b0;
      if (m_busy) begin
        if (m_cnt == NSTEPS - 1) begin
          m_busy = 1'b0;
          m_ov   = 1'b1;
          m_cnt  = 0;
          checks++;
          if (steps_in_run != NSTEPS) begin
            failures++;
            $display("FAIL %0d steps in a run, expected %0d", steps_in_run, NSTEPS);
          end
          steps_in_run = 0;
          n_results++;
        end else begin
          m_cnt++;
        end
      end else if (e_ready && in_valid) begin
        m_busy = 1'b1;
        m_cnt  = 0;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(3) != 0);
      out_ready = (i < 200) ? 1'b1 : ($urandom_range(2) != 0);
    end
    checks++;
    if (n_results < 100 || n_blocked == 0) begin
      failures++;
      $display("FAIL only %0d results, %0d blocked cycles", n_results, n_blocked);
    end
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
