// tb_throughput: characters per step against the share m of windows that
// hold the start of a target pattern, the throughput trade-off of the
// alignment scheme. One engine of process width 3 holds "abc". For each m the
// stream is cut into 3-character slots; a slot holds the start of an "abc"
// occurrence with probability m, at a uniformly random offset 0..2, and
// filler otherwise. Whenever an occurrence does not start at the engine's
// window boundary, the engine spends one extra step realigning.
//
// Checked for every m: every occurrence is reported, the step count equals
// a step-by-step count made here, and input arrives every cycle so the step
// rate is one per clock. For m up to 5% the rate must stay within 5% of the
// full n characters per step. The measured rate is printed next to the
// analytical estimate (1-m)*n + m*(n+1)/2 characters per step.
module tb_throughput;
  import match_pkg::*;

  localparam int N = 3;
  localparam int SLOTS = 6000;
  localparam real M_LIST [5] = '{0.0001, 0.01, 0.05, 0.10, 0.50};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  char_t [N-1:0] in_data = '0;
  logic match, stepped, aligned;
  pos_t match_end;

  pattern_engine #(.N(N), .MAX_LEN(3), .PATTERN("abc"), .PAT_LEN(3), .DEPTH(16)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .match, .match_end, .stepped, .aligned);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned s [$];
  int hw_matches = 0, hw_steps = 0, hw_aligns = 0;
  int cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    hw_matches += int'(match);
    hw_steps   += int'(stepped);
    hw_aligns  += int'(aligned);
    cyc++;
  end

  // Steps needed by a single "abc" engine on stream s, counted directly.
  function automatic int count_steps();
    int ptr = 0, steps = 0;
    while (ptr + N <= s.size()) begin
      if (s[ptr] == "a" && s[ptr+1] == "b" && s[ptr+2] == "c") ptr += 3;
      else if (s[ptr+1] == "a" && s[ptr+2] == "b") ptr += 1;
      else if (s[ptr+2] == "a") ptr += 2;
      else ptr += 3;
      steps++;
    end
    return steps;
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (M_LIST[mi]) begin
      automatic real m = M_LIST[mi];
      automatic int events = 0, idx = 0;
      int exp_steps, t0, t1;
      real rate, est, share;
      s = {};
      for (int k = 0; k < SLOTS; k++) begin
        if (real'($urandom_range(999999)) < m * 1000000.0 && k < SLOTS - 2) begin
          automatic int o = $urandom_range(2);
          for (int i = 0; i < o; i++) s.push_back("x");
          s.push_back("a"); s.push_back("b"); s.push_back("c");
          for (int i = o + 3; i < 6; i++) s.push_back("y");
          events++;
          k++;
        end else begin
          s.push_back("x"); s.push_back("y"); s.push_back("z");
        end
      end
      exp_steps = count_steps();
      rst_n = 0;
      hw_matches = 0; hw_steps = 0; hw_aligns = 0;
      repeat (2) @(posedge clk);
      rst_n = 1;
      t0 = cyc;
      while (idx < s.size()) begin
        in_valid <= 1;
        for (int c = 0; c < N; c++) in_data[c] <= s[idx + c];
        @(posedge clk);
        if (in_ready) idx += N;
      end
      in_valid <= 0;
      while (stepped || dut.win_valid) @(posedge clk);
      t1 = cyc;
      rate = real'(s.size()) / real'(hw_steps);
      // An occurrence fills two slots, so the share of slots that start one
      // is somewhat below m; the estimate uses the share actually drawn.
      share = real'(events) / real'(SLOTS);
      est = (1.0 - share) * N + share * (N + 1) / 2.0;
      $display("m=%7.4f%%  share=%6.3f%%  occurrences=%0d  steps=%0d  realignments=%0d  chars/step=%.3f  (%.1f%% of n)  estimate=%.3f",
               m * 100.0, share * 100.0, events, hw_steps, hw_aligns, rate, 100.0 * rate / N, est);
      check(hw_matches == events, $sformatf("m=%f: %0d matches for %0d occurrences", m, hw_matches, events));
      check(hw_steps == exp_steps, $sformatf("m=%f: %0d steps, counted %0d", m, hw_steps, exp_steps));
      check(t1 - t0 <= hw_steps + 4, $sformatf("m=%f: %0d cycles for %0d steps", m, t1 - t0, hw_steps));
      if (m <= 0.05) check(rate >= 0.95 * N, $sformatf("m=%f: rate %.3f below 95%% of n", m, rate));
      if (m >= 0.10) check(hw_aligns > 0, "no realignment at high m");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
