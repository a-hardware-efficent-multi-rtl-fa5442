// tb_process_element: checks one process element with a full substring
// ("abc", three comparators) and one with a single valid character (a short
// last PE), against an expected hit worked out here: enable & match & every
// valid window character equal to its substring character. Registered
// enable/match must follow the hit on a step, hold without a step and clear
// on reset. Windows are random, biased towards the substring.
module tb_process_element;
  import match_pkg::*;

  localparam int N = 3;

  logic clk = 0, rst_n = 0, step = 0;
  char_t [N-1:0] window = '0;
  logic en_in = 0, m_in = 0;
  logic hit_a, en_a, m_a, hit_b, en_b, m_b;

  process_element #(.N(N), .VALID(3), .SUBSTR("cba")) dut_a (
    .clk, .rst_n, .step, .window, .enable_in(en_in), .match_in(m_in),
    .hit(hit_a), .enable_out(en_a), .match_out(m_a));

  process_element #(.N(N), .VALID(1), .SUBSTR("??e")) dut_b (
    .clk, .rst_n, .step, .window, .enable_in(en_in), .match_in(m_in),
    .hit(hit_b), .enable_out(en_b), .match_out(m_b));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hits_a = 0, hits_b = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic byte unsigned pick(string choices);
    return choices[$urandom_range(choices.len() - 1)];
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_a, exp_b, prev_a, prev_b;
    repeat (2) @(posedge clk);
    check(!en_a && !m_a && !en_b && !m_b, "outputs not cleared by reset");
    rst_n = 1;
    prev_a = 0; prev_b = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if ($urandom_range(3) == 0) window = {8'($urandom), 8'($urandom), 8'($urandom)};
      else window = {pick("cce"), pick("bbe"), pick("aab")};
      if ($urandom_range(1) == 1) begin window[0] = "a"; window[1] = "b"; window[2] = "c"; end
      if ($urandom_range(4) == 0) window[0] = "e";
      en_in = ($urandom_range(7) != 0);
      m_in  = ($urandom_range(7) != 0);
      step  = ($urandom_range(3) != 0);
      #1;
      exp_a = en_in && m_in && window[0] == "a" && window[1] == "b" && window[2] == "c";
      exp_b = en_in && m_in && window[0] == "e";
      check(hit_a == exp_a, $sformatf("full PE hit %0b, expected %0b", hit_a, exp_a));
      check(hit_b == exp_b, $sformatf("short PE hit %0b, expected %0b", hit_b, exp_b));
      hits_a += exp_a; hits_b += exp_b;
      @(posedge clk);
      #1;
      if (step) begin prev_a = exp_a; prev_b = exp_b; end
      check(en_a == prev_a && m_a == prev_a, "full PE registered outputs");
      check(en_b == prev_b && m_b == prev_b, "short PE registered outputs");
    end
    check(hits_a > 50 && hits_b > 50, "too few hits generated");
    rst_n = 0;
    #1;
    check(!en_a && !m_a && !en_b && !m_b, "outputs not cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
