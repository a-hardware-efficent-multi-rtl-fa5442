// tb_string_matcher: end-to-end test of the string matcher at its default
// parameters (process width 3, four patterns, 16-character buffers).
//
// The stream is built from filler characters that occur in no pattern, with
// planted copies of every pattern separated by at least 2N filler characters,
// and with bursts of random characters drawn from the patterns' own alphabet
// that provoke partial matches, realignments and broken chains. A reference
// model written here steps through the same stream window by window and
// predicts, for every pattern, the exact list of match end positions, the
// number of steps and the number of realignments. The test checks:
//   - every reported match equals the model's, in order
//   - every reported match really is an occurrence of the pattern
//   - every planted copy is found
//   - step and realignment counts equal the model's (one step per cycle,
//     N characters per step unless realigned)
//   - a filler-only prefix runs at full rate: N characters per clock, no stall
// Mechanisms that must occur at least once: realignment by 1 and by 2
// characters, a two-suffix tie resolved to the longer suffix, a realignment
// suppressed by a PE hit, a multi-PE chain match, a match in a short last PE,
// and input back-pressure.
module tb_string_matcher;
  import match_pkg::*;

  localparam int N  = 3;
  localparam int NP = 4;
  localparam int STREAM_LEN = 3 * 1400;
  localparam int FULL_RATE_LEN = 3 * 40;
  localparam int WATCHDOG = 200000;

  string pats [NP] = '{"abc", "cmd.exe", "/etc/passwd", "aaab"};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  char_t [N-1:0] in_data = '0;
  logic [NP-1:0] match, aligned, stepped;
  pos_t match_end [NP];

  string_matcher dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .match, .match_end, .aligned, .stepped
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned s [$];
  int planted [NP][$];

  // Observed behaviour.
  int hw_ends [NP][$];
  int hw_steps [NP], hw_aligns [NP];
  int stall_cycles = 0, cycles = 0;

  // Mechanism counters from the model.
  int mech_shift1 = 0, mech_shift2 = 0, mech_tie = 0, mech_suppress = 0;
  int mech_chain = 0, mech_short_last = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference model: windows of N characters at a pointer; PE j of the
  // pattern compares characters j*N.. of the pattern and is enabled by a hit
  // of PE j-1 in the previous window; when no PE hits, the pointer moves to
  // the start of the longest window suffix that equals a pattern prefix.
  task automatic model(input int p, output int ends[$], output int steps, output int aligns);
    string pat = pats[p];
    int len = pat.len();
    int k = (len + N - 1) / N;
    bit en [] = new[k + 1];
    bit hit [] = new[k];
    int ptr = 0;
    steps = 0; aligns = 0; ends = {};
    foreach (en[j]) en[j] = 0;
    while (ptr + N <= s.size()) begin
      bit any = 0;
      int shift = N;
      int nsuf = 0;
      for (int j = 0; j < k; j++) begin
        bit ok = (j == 0) ? 1'b1 : en[j];
        for (int c = 0; c < N; c++)
          if (j * N + c < len && s[ptr + c] != pat[j * N + c]) ok = 0;
        hit[j] = ok;
        any |= ok;
      end
      if (hit[k - 1]) begin
        int last = len - (k - 1) * N;
        ends.push_back(ptr + last - 1);
        if (k > 1) mech_chain++;
        if (last < N) mech_short_last++;
      end
      for (int j = 0; j < k; j++) en[j + 1] = hit[j];
      for (int l = N - 1; l >= 1; l--) begin
        bit ok = 1;
        for (int c = 0; c < l; c++)
          if (c < len && s[ptr + N - l + c] != pat[c]) ok = 0;
        if (ok) begin
          nsuf++;
          if (shift == N) shift = N - l;
        end
      end
      if (any && shift != N) begin
        mech_suppress++;
        shift = N;
      end
      if (shift == 1) mech_shift1++;
      if (shift == 2) mech_shift2++;
      if (shift != N && nsuf > 1) mech_tie++;
      if (shift != N) aligns++;
      ptr += shift;
      steps++;
    end
  endtask

  function automatic byte unsigned filler();
    string f = "xyzXYZ0123456789";
    return f[$urandom_range(f.len() - 1)];
  endfunction

  function automatic byte unsigned noisy();
    string f = "aabcc/etpswdm.xx";
    return f[$urandom_range(f.len() - 1)];
  endfunction

  task automatic build_stream();
    for (int i = 0; i < FULL_RATE_LEN; i++) s.push_back(filler());
    while (s.size() < STREAM_LEN - 40) begin
      int what = $urandom_range(5);
      for (int i = 0; i < 2 * N + $urandom_range(4); i++) s.push_back(filler());
      if (what < NP) begin
        string pat = pats[what];
        planted[what].push_back(s.size() + pat.len() - 1);
        for (int i = 0; i < pat.len(); i++) s.push_back(pat[i]);
      end else begin
        for (int i = 0; i < 4 + $urandom_range(12); i++) s.push_back(noisy());
      end
    end
    while (s.size() < STREAM_LEN) s.push_back(filler());
  endtask

  // Monitor.
  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (in_valid && !in_ready) stall_cycles++;
    for (int p = 0; p < NP; p++) begin
      if (match[p]) hw_ends[p].push_back(int'(match_end[p]));
      if (stepped[p]) hw_steps[p]++;
      if (aligned[p]) hw_aligns[p]++;
    end
  end

  initial begin
    #(WATCHDOG * 10);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_ends [$];
    int m_steps, m_aligns;
    int idx;
    int full_rate_cycles;
    build_stream();
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // Full-rate phase: filler only, valid every cycle.
    idx = 0;
    full_rate_cycles = 0;
    while (idx < FULL_RATE_LEN) begin
      in_valid <= 1;
      for (int c = 0; c < N; c++) in_data[c] <= s[idx + c];
      @(posedge clk);
      full_rate_cycles++;
      if (in_ready) idx += N;
    end
    check(full_rate_cycles == FULL_RATE_LEN / N,
          $sformatf("filler phase took %0d cycles for %0d transfers", full_rate_cycles, FULL_RATE_LEN / N));

    // Mixed phase: valid every cycle for the first half, then 90% of the cycles.
    while (idx < s.size()) begin
      if (idx < s.size() / 2 || $urandom_range(9) != 0) begin
        in_valid <= 1;
        for (int c = 0; c < N; c++) in_data[c] <= s[idx + c];
        @(posedge clk);
        if (in_ready) idx += N;
      end else begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (4 * 16 + 10) @(posedge clk);

    for (int p = 0; p < NP; p++) begin
      automatic string pat = pats[p];
      model(p, m_ends, m_steps, m_aligns);
      check(hw_ends[p].size() == m_ends.size(),
            $sformatf("pattern %0d: %0d matches, model %0d", p, hw_ends[p].size(), m_ends.size()));
      for (int i = 0; i < hw_ends[p].size() && i < m_ends.size(); i++)
        check(hw_ends[p][i] == m_ends[i],
              $sformatf("pattern %0d match %0d ends at %0d, model %0d", p, i, hw_ends[p][i], m_ends[i]));
      foreach (hw_ends[p][i]) begin
        automatic bit ok = hw_ends[p][i] >= pat.len() - 1 && hw_ends[p][i] < s.size();
        if (ok)
          for (int c = 0; c < pat.len(); c++)
            if (s[hw_ends[p][i] - pat.len() + 1 + c] != pat[c]) ok = 0;
        check(ok, $sformatf("pattern %0d reported at %0d is not an occurrence", p, hw_ends[p][i]));
      end
      foreach (planted[p][i]) begin
        automatic bit found = 0;
        foreach (hw_ends[p][j]) if (hw_ends[p][j] == planted[p][i]) found = 1;
        check(found, $sformatf("pattern %0d planted at %0d not found", p, planted[p][i]));
      end
      check(hw_steps[p] == m_steps, $sformatf("pattern %0d: %0d steps, model %0d", p, hw_steps[p], m_steps));
      check(hw_aligns[p] == m_aligns, $sformatf("pattern %0d: %0d realignments, model %0d", p, hw_aligns[p], m_aligns));
      $display("pattern %-12s matches=%0d planted=%0d steps=%0d realignments=%0d chars/step=%.3f",
               pat, hw_ends[p].size(), planted[p].size(), hw_steps[p], hw_aligns[p],
               real'(s.size()) / real'(hw_steps[p]));
    end

    $display("mechanisms: shift1=%0d shift2=%0d tie=%0d suppressed=%0d chain=%0d short_last=%0d stalls=%0d",
             mech_shift1, mech_shift2, mech_tie, mech_suppress, mech_chain, mech_short_last, stall_cycles);
    check(mech_shift1 > 0, "no realignment by 1");
    check(mech_shift2 > 0, "no realignment by 2");
    check(mech_tie > 0, "no two-suffix tie");
    check(mech_suppress > 0, "no realignment suppressed by a PE hit");
    check(mech_chain > 0, "no multi-PE chain match");
    check(mech_short_last > 0, "no match in a short last PE");
    check(stall_cycles > 0, "input never back-pressured");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
