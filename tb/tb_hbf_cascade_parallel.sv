// tb_hbf_cascade_parallel: end-to-end test of the two-stage half-band
// cascade built as two-bit parallel DA (BPC = 2: two table copies per stage,
// two bits of every tap per cycle), otherwise at the default size.
//
// The input is first the sequence 39, 19, 8, 5, -33 followed by zeros, whose
// results are known for both stages (stage 1: 0, 156, 388, 340, 160, -60,
// -244, -132, 0; stage 2: 0, 0, 624, 2800, 5088, 4912, 2400, ...), fed
// back-to-back with the output always ready, so that the steady-state sample
// period of 8 cycles (stage 2's 13-bit input sign-extended to 14 bits, taken
// in 7 two-bit steps, plus one) is checked. Then
// random samples follow with random gaps and random output back-pressure.
// Each stage-1 and stage-2 result is compared with a reference computed here
// from the accepted samples.
//
// Counted, and a failure if never seen: input stalls (in_valid held while
// in_ready is low), stage 1 holding a result while stage 2 is busy, output
// back-pressure, and the sign-bit subtraction with a non-zero table word in
// each stage.
module tb_hbf_cascade_parallel;

  localparam int X_W   = 8;
  localparam int Y1_W  = 13;
  localparam int Y_W   = 18;
  localparam int NRAND = 400;
  localparam int H [5] = '{0, 4, 8, 4, 0};
  localparam int PAPER_X  [9] = '{39, 19, 8, 5, -33, 0, 0, 0, 0};
  localparam int PAPER_Y1 [9] = '{0, 156, 388, 340, 160, -60, -244, -132, 0};
  localparam int PAPER_Y2 [7] = '{0, 0, 624, 2800, 5088, 4912, 2400};
  localparam int PERIOD = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   cyc = 0;
  int   checks = 0;
  int   failures = 0;

  logic                   in_valid = 1'b0;
  logic                   in_ready;
  logic signed [X_W-1:0]  x_in = '0;
  logic                   y1_valid;
  logic signed [Y1_W-1:0] y1;
  logic                   out_valid;
  logic                   out_ready = 1'b1;
  logic signed [Y_W-1:0]  y_out;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  hbf_cascade #(.BPC(2)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .x_in,
    .y1_valid, .y1, .out_valid, .out_ready, .y_out
  );

  int h1 [5] = '{0, 0, 0, 0, 0};
  int h2 [5] = '{0, 0, 0, 0, 0};
  int q1 [$];
  int q2 [$];
  int n1 = 0;
  int n2 = 0;
  int n_in = 0;
  int last_acc = -1;
  bit phase_a = 1'b1;
  bit in_ok = 1'b0;

  int ev_in_stall = 0;
  int ev_s1_hold = 0;
  int ev_out_bp = 0;
  int ev_sign_sub1 = 0;
  int ev_sign_sub2 = 0;

  function automatic int fir(ref int h [5]);
    int y;
    y = 0;
    for (int k = 0; k < 5; k++) y += H[k] * h[k];
    return y;
  endfunction

  always @(posedge clk) begin
    in_ok <= in_valid && in_ready;
    if (rst_n) begin
      if (in_valid && !in_ready) ev_in_stall++;
      if (dut.u_stage1.out_valid && !dut.u_stage1.out_ready) ev_s1_hold++;
      if (out_valid && !out_ready) ev_out_bp++;
      if (dut.u_stage1.sign_step && dut.u_stage1.partial[1] != '0) ev_sign_sub1++;
      if (dut.u_stage2.sign_step && dut.u_stage2.partial[1] != '0) ev_sign_sub2++;

      if (in_valid && in_ready) begin
        for (int k = 4; k > 0; k--) h1[k] = h1[k-1];
        h1[0] = int'(x_in);
        q1.push_back(fir(h1));
        if (phase_a && n_in >= 3) begin
          checks++;
          if (cyc - last_acc != PERIOD) begin
            failures++;
            $display("FAIL: sample period %0d, expected %0d", cyc - last_acc, PERIOD);
          end
        end
        last_acc = cyc;
        n_in++;
      end
      if (y1_valid) begin
        int e;
        e = (q1.size() != 0) ? q1.pop_front() : 0;
        checks++;
        if (int'(y1) != e) begin
          failures++;
          $display("FAIL: stage-1 output %0d is %0d, expected %0d", n1, y1, e);
        end
        if (n1 < 9) begin
          checks++;
          if (int'(y1) != PAPER_Y1[n1]) begin
            failures++;
            $display("FAIL: stage-1 sequence output %0d is %0d, expected %0d", n1, y1, PAPER_Y1[n1]);
          end
        end
        for (int k = 4; k > 0; k--) h2[k] = h2[k-1];
        h2[0] = int'(y1);
        q2.push_back(fir(h2));
        n1++;
      end
      if (out_valid && out_ready) begin
        int e;
        e = (q2.size() != 0) ? q2.pop_front() : 0;
        checks++;
        if (int'(y_out) != e) begin
          failures++;
          $display("FAIL: output %0d is %0d, expected %0d", n2, y_out, e);
        end
        if (n2 < 7) begin
          checks++;
          if (int'(y_out) != PAPER_Y2[n2]) begin
            failures++;
            $display("FAIL: sequence output %0d is %0d, expected %0d", n2, y_out, PAPER_Y2[n2]);
          end
        end
        n2++;
      end
    end
  end

  task automatic send(int x);
    in_valid = 1'b1;
    x_in     = X_W'(x);
    do begin
      @(negedge clk);
      if (!phase_a) out_ready = ($urandom_range(3) != 0);
    end while (!in_ok);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int i = 0; i < 9; i++) begin
      in_valid = 1'b1;
      x_in     = X_W'(PAPER_X[i]);
      do @(negedge clk); while (!in_ok);
    end
    in_valid = 1'b0;
    phase_a  = 1'b0;
    for (int i = 0; i < NRAND; i++) begin
      while ($urandom_range(7) == 0) @(negedge clk);
      out_ready = ($urandom_range(3) != 0);
      if (i < 20) send((i % 2 == 1) ? -128 : 127);
      else        send(int'($signed(X_W'($urandom))));
      out_ready = ($urandom_range(3) != 0);
    end
    out_ready = 1'b1;
    repeat (4 * PERIOD) @(negedge clk);
    checks++;
    if (n1 != 9 + NRAND || n2 != 9 + NRAND) begin
      failures++;
      $display("FAIL: %0d stage-1 and %0d stage-2 outputs, expected %0d", n1, n2, 9 + NRAND);
    end
    $display("events: input stalls %0d, stage-1 holds %0d, output back-pressure %0d, sign subtractions %0d/%0d",
             ev_in_stall, ev_s1_hold, ev_out_bp, ev_sign_sub1, ev_sign_sub2);
    checks += 5;
    if (ev_in_stall == 0)  begin failures++; $display("FAIL: no input stall"); end
    if (ev_s1_hold == 0)   begin failures++; $display("FAIL: stage 1 never held a result"); end
    if (ev_out_bp == 0)    begin failures++; $display("FAIL: no output back-pressure"); end
    if (ev_sign_sub1 == 0) begin failures++; $display("FAIL: no sign subtraction in stage 1"); end
    if (ev_sign_sub2 == 0) begin failures++; $display("FAIL: no sign subtraction in stage 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
