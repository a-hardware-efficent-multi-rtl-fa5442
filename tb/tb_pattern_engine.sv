// tb_pattern_engine: one pattern engine at process width 4 holding
// "abababc" (two PEs, the second comparing three characters), fed a random
// stream over the alphabet {a, b, c, x} with random idle cycles. A reference
// model written here steps through the stream window by window and predicts
// the match end positions, the number of steps and the number of
// realignments. Every reported match is also checked to be a real occurrence,
// and the cycle count is checked: while input arrives every cycle, the engine
// steps every cycle, and realignments add steps.
module tb_pattern_engine;
  import match_pkg::*;

  localparam int N = 4;
  localparam string PAT = "abababc";
  localparam int LEN = 4 * 1500;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  char_t [N-1:0] in_data = '0;
  logic match, stepped, aligned;
  pos_t match_end;

  pattern_engine #(.N(N), .MAX_LEN(8), .PATTERN("abababc"), .PAT_LEN(7), .DEPTH(16)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .match, .match_end, .stepped, .aligned);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned s [$];
  int hw_ends [$];
  int hw_steps = 0, hw_aligns = 0;
  int first_step = -1, last_step = -1, cyc = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic model(output int ends[$], output int steps, output int aligns);
    string pat = PAT;
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
      for (int j = 0; j < k; j++) begin
        bit ok = (j == 0) ? 1'b1 : en[j];
        for (int c = 0; c < N; c++)
          if (j * N + c < len && s[ptr + c] != pat[j * N + c]) ok = 0;
        hit[j] = ok;
        any |= ok;
      end
      if (hit[k - 1]) ends.push_back(ptr + len - (k - 1) * N - 1);
      for (int j = 0; j < k; j++) en[j + 1] = hit[j];
      if (!any)
        for (int l = N - 1; l >= 1 && shift == N; l--) begin
          bit ok = 1;
          for (int c = 0; c < l; c++)
            if (s[ptr + N - l + c] != pat[c]) ok = 0;
          if (ok) shift = N - l;
        end
      if (shift != N) aligns++;
      ptr += shift;
      steps++;
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (match) hw_ends.push_back(int'(match_end));
    if (stepped) begin
      hw_steps++;
      if (first_step < 0) first_step = cyc;
      last_step = cyc;
    end
    if (aligned) hw_aligns++;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic string alpha = "aaabbbcx";
    int m_ends [$];
    int m_steps, m_aligns, idx;
    for (int i = 0; i < LEN; i++) s.push_back(alpha[$urandom_range(alpha.len() - 1)]);
    // Plant a few copies so that matches are certain.
    for (int i = 100; i < LEN - 20; i += 397)
      for (int c = 0; c < 7; c++) s[i + c] = PAT[c];
    repeat (2) @(posedge clk);
    rst_n = 1;
    idx = 0;
    while (idx < s.size()) begin
      in_valid <= 1;
      for (int c = 0; c < N; c++) in_data[c] <= s[idx + c];
      @(posedge clk);
      if (in_ready) idx += N;
    end
    in_valid <= 0;
    repeat (40) @(posedge clk);

    model(m_ends, m_steps, m_aligns);
    check(hw_ends.size() == m_ends.size(), $sformatf("%0d matches, model %0d", hw_ends.size(), m_ends.size()));
    for (int i = 0; i < hw_ends.size() && i < m_ends.size(); i++)
      check(hw_ends[i] == m_ends[i], $sformatf("match %0d at %0d, model %0d", i, hw_ends[i], m_ends[i]));
    foreach (hw_ends[i]) begin
      automatic bit ok = 1;
      for (int c = 0; c < 7; c++) if (s[hw_ends[i] - 6 + c] != PAT[c]) ok = 0;
      check(ok, $sformatf("match at %0d is not an occurrence", hw_ends[i]));
    end
    check(hw_steps == m_steps, $sformatf("%0d steps, model %0d", hw_steps, m_steps));
    check(hw_aligns == m_aligns, $sformatf("%0d realignments, model %0d", hw_aligns, m_aligns));
    // One step per clock from the first to the last step.
    check(last_step - first_step + 1 == hw_steps,
          $sformatf("steps spread over %0d cycles, expected %0d", last_step - first_step + 1, hw_steps));
    // Each realignment adds a step in which fewer than N characters move.
    check(hw_steps > LEN / N - 1 && hw_steps < LEN / N + hw_aligns,
          "step count outside transfers .. transfers + realignments");
    check(hw_ends.size() >= 5 && hw_aligns > 0, "too few matches or realignments");
    $display("matches=%0d steps=%0d realignments=%0d", hw_ends.size(), hw_steps, hw_aligns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
