// tb_mont_fir_filter: end-to-end test of the five-tap Montgomery FIR filter at
// its default sizes (W = 6, D = 3, five taps).
//
// Phases, each started from reset so the delay line is empty:
//   1. the example stimulus of the design: x = 10 held, h0..h4 = 5,4,3,2,1,
//      N = 7 (and again with N = 3);
//   2. random samples and coefficients with N = 3 and N = 7, the input valid
//      held high (full rate) or toggled at random;
//   3. random samples with other odd moduli.
// Every output is compared with a reference that keeps the sample history and
// sums mont_ref(x(n-k), h_k) modulo 64. Timing is checked too: a sample
// accepted in cycle t must produce y_valid in cycle t+3, and at full rate
// samples must be accepted exactly every second cycle. The test counts the
// mechanisms it must exercise: input stalls (valid while not ready), adder
// wrap-around, partially reduced products (>= N) and both targeted moduli.
module tb_mont_fir_filter;
  import mont_ref_pkg::*;
  localparam int unsigned W = mont_fir_pkg::DATA_W;
  localparam int unsigned D = mont_fir_pkg::DIGIT_W;
  localparam int unsigned K = mont_fir_pkg::TAPS;

  logic clk = 0, rst_n = 0;
  logic x_valid = 0, x_ready, y_valid, ovf_any;
  logic [W-1:0] x = 0, n = 7, y;
  logic [W-1:0] h [K];

  int checks = 0, failures = 0;
  int n_stall = 0, n_wrap = 0, n_unreduced = 0, n_mod3 = 0, n_mod7 = 0, n_out = 0;
  longint cycle = 0;
  int n_acc = 0;
  bit show = 0;

  // reference state
  int unsigned hist [K];
  int unsigned exp_q [$];
  longint acc_q [$];
  longint last_acc = -1;
  bit full_rate;

  mont_fir_filter dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Reference: on every accepted sample, shift the history and queue y.
  always @(posedge clk) begin
    if (rst_n && x_valid && x_ready) begin
      int unsigned acc, pr;
      for (int k = K - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      acc = 0;
      for (int k = 0; k < K; k++) begin
        pr = mont_ref(hist[k], h[k], n, W, D);
        if (pr >= n) n_unreduced++;
        acc += pr;
      end
      exp_q.push_back(acc % (1 << W));
      if (full_rate && last_acc >= 0) begin
        checks++;
        if (cycle - last_acc != 2) begin
          failures++;
          $display("FAIL full-rate samples %0d cycles apart", cycle - last_acc);
        end
      end
      last_acc = cycle;
      n_acc++;
      acc_q.push_back(cycle);
      if (n == 3) n_mod3++;
      if (n == 7) n_mod7++;
    end
    if (rst_n && x_valid && !x_ready) n_stall++;
  end

  // Checker
  always @(posedge clk) begin
    if (rst_n && y_valid) begin
      int unsigned e;
      longint t;
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", y);
      end else begin
        e = exp_q.pop_front();
        t = acc_q.pop_front();
        if (show) $display("example stimulus, N=%0d: y=%0d", n, y);
        if (int'(y) != e) begin
          failures++;
          if (failures < 20) $display("FAIL y=%0d expected %0d (N=%0d)", y, e, n);
        end
        checks++;
        if (cycle - t != 3) begin
          failures++;
          $display("FAIL latency %0d cycles, expected 3", cycle - t);
        end
      end
      if (ovf_any) n_wrap++;
    end
  end

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0;
    x_valid = 0;
    for (int k = 0; k < K; k++) hist[k] = 0;
    last_acc = -1;
    @(negedge clk);
    rst_n = 1;
  endtask

  task automatic drain();
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
      exp_q.delete();
      acc_q.delete();
    end
  endtask

  // Drive `count` samples; x_valid stays high at full rate or toggles.
  task automatic run(input int count, input bit rate, input bit fixed_x, input int unsigned xv);
    int target = n_acc + count;
    full_rate = rate;
    while (n_acc < target) begin
      @(negedge clk);
      if (n_acc >= target) break;
      x_valid = rate ? 1'b1 : 1'($urandom_range(1));
      if (!(x_valid && !x_ready)) x = fixed_x ? W'(xv) : W'($urandom_range((1 << W) - 1));
    end
    x_valid = 0;
    full_rate = 0;
    drain();
  endtask

  initial begin
    int unsigned nn;
    for (int k = 0; k < K; k++) h[k] = W'(K - k);   // 5, 4, 3, 2, 1
    repeat (3) @(negedge clk);

    // 1. example stimulus
    show = 1;
    n = 7;
    do_reset();
    run(8, 1, 1, 10);
    n = 3;
    do_reset();
    run(8, 1, 1, 10);
    show = 0;

    // 2. random data, targeted moduli
    for (int r = 0; r < 40; r++) begin
      n = (r % 2) ? 7 : 3;
      for (int k = 0; k < K; k++) h[k] = W'($urandom_range((1 << W) - 1));
      do_reset();
      run(50, r % 4 < 2, 0, 0);
    end

    // 3. other odd moduli
    for (int r = 0; r < 40; r++) begin
      nn = 2 * $urandom_range((1 << (W - 1)) - 1) + 1;
      n = W'(nn);
      for (int k = 0; k < K; k++) h[k] = W'($urandom_range((1 << W) - 1));
      do_reset();
      run(50, r % 2, 0, 0);
    end

    $display("outputs=%0d stalls=%0d wraps=%0d unreduced=%0d N3=%0d N7=%0d",
             n_out, n_stall, n_wrap, n_unreduced, n_mod3, n_mod7);
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL no input stall"); end
    checks++; if (n_wrap == 0)      begin failures++; $display("FAIL no adder wrap"); end
    checks++; if (n_unreduced == 0) begin failures++; $display("FAIL no partially reduced product"); end
    checks++; if (n_mod3 == 0)      begin failures++; $display("FAIL N = 3 never used"); end
    checks++; if (n_mod7 == 0)      begin failures++; $display("FAIL N = 7 never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
