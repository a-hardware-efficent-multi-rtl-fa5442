// tb_shift_encoder: exhaustive check of the width-3 encoder against the
// pointer-mux table (code 10 -> move 1, 01 -> move 2, 00 -> move 3), and a
// random check of a width-5 encoder: the code is the longest matching suffix
// length unless some PE of the chain hit, in which case it is 0.
module tb_shift_encoder;

  logic [2:0] a3;
  logic [1:0] p3;
  logic [1:0] c3;
  logic [4:0] a5;
  logic [3:0] p5;
  logic [2:0] c5;

  shift_encoder #(.N(3), .NUM_PE(2)) dut3 (.align_hit(a3), .pe_hit(p3), .code(c3));
  shift_encoder #(.N(5), .NUM_PE(4)) dut5 (.align_hit(a5), .pe_hit(p5), .code(c5));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Width 3: (align "*ab", align "**a", any PE hit) -> pointer move.
    for (int i = 0; i < 32; i++) begin
      int move;
      {a3, p3} = 5'(i);
      #1;
      if (p3 != 0)     move = 3;
      else if (a3[2])  move = 1;
      else if (a3[1])  move = 2;
      else             move = 3;
      check(3 - int'(c3) == move, $sformatf("w3 align=%b pe=%b: code %b", a3, p3, c3));
      check(c3 != 2'b11, "code 11 produced");
    end
    for (int t = 0; t < 2000; t++) begin
      int exp_code;
      a5 = 5'($urandom);
      p5 = ($urandom_range(2) == 0) ? 4'($urandom) : 4'b0;
      #1;
      exp_code = 0;
      if (p5 == 0)
        for (int l = 4; l >= 1; l--) if (exp_code == 0 && a5[l]) exp_code = l;
      check(int'(c5) == exp_code, $sformatf("w5 align=%b pe=%b: code %0d expected %0d", a5, p5, c5, exp_code));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
