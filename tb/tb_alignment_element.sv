// tb_alignment_element: checks the suffix/prefix comparators of three
// alignment elements, width 3 with first substring "abc" (the cases "**a"
// and "*ab"), width 5 with "abab?" and four real characters, and width 3 with
// a one-character pattern "q". The expectation is computed with string
// operations: align_hit[L] is set when the last L window characters equal the
// first L pattern characters, ignoring pattern positions that do not exist.
module tb_alignment_element;
  import match_pkg::*;

  char_t [2:0] w3;
  char_t [4:0] w5;
  logic [2:0] hit_abc, hit_q;
  logic [4:0] hit_5;

  alignment_element #(.N(3), .PVALID(3), .PREFIX("cba")) dut_abc (.window(w3), .align_hit(hit_abc));
  alignment_element #(.N(3), .PVALID(1), .PREFIX("??q")) dut_q   (.window(w3), .align_hit(hit_q));
  alignment_element #(.N(5), .PVALID(4), .PREFIX("?baba")) dut_5 (.window(w5), .align_hit(hit_5));

  int checks = 0, failures = 0;
  int seen [3][5];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [4:0] expect_hits(string win, string pat);
    logic [4:0] r = '0;
    int n = win.len();
    for (int l = 1; l < n; l++) begin
      bit ok = 1;
      for (int k = 0; k < l; k++)
        if (k < pat.len() && win[n - l + k] != pat[k]) ok = 0;
      r[l] = ok;
    end
    return r;
  endfunction

  function automatic byte unsigned pick(string choices);
    return choices[$urandom_range(choices.len() - 1)];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      automatic string s3 = "...", s5 = ".....";
      logic [4:0] e;
      for (int i = 0; i < 3; i++) s3[i] = pick("abcq");
      for (int i = 0; i < 5; i++) s5[i] = pick("abx");
      for (int i = 0; i < 3; i++) w3[i] = s3[i];
      for (int i = 0; i < 5; i++) w5[i] = s5[i];
      #1;
      e = expect_hits(s3, "abc");
      check(hit_abc == e[2:0], $sformatf("abc window %s: %b expected %b", s3, hit_abc, e[2:0]));
      e = expect_hits(s3, "q");
      check(hit_q == e[2:0], $sformatf("q window %s: %b expected %b", s3, hit_q, e[2:0]));
      e = expect_hits(s5, "abab");
      check(hit_5 == e, $sformatf("abab window %s: %b expected %b", s5, hit_5, e));
      for (int l = 1; l < 3; l++) begin seen[0][l] += hit_abc[l]; seen[1][l] += hit_q[l]; end
      for (int l = 1; l < 5; l++) seen[2][l] += hit_5[l];
    end
    check(seen[0][1] > 0 && seen[0][2] > 0 && seen[1][1] > 0 && seen[1][2] > 0, "width-3 hits not all exercised");
    check(seen[2][1] > 0 && seen[2][2] > 0 && seen[2][3] > 0 && seen[2][4] > 0, "width-5 hits not all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
