// tb_input_window: drives random writes and random steps with random shift
// codes into an 8-entry, width-3 input buffer and compares the window, its
// stream position, win_valid and wr_ready every cycle with a queue model kept
// here. A step moves the pointer by 3 - code characters.
module tb_input_window;
  import match_pkg::*;

  localparam int N = 3, DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_ready, win_valid, step = 0;
  char_t [N-1:0] wr_data = '0, window;
  pos_t win_pos;
  logic [1:0] code = '0;

  input_window #(.N(N), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .wr_valid, .wr_ready, .wr_data, .win_valid, .window, .win_pos, .step, .code);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  byte unsigned q [$];
  int base = 0;
  int full_seen = 0, moves [4];

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // Compare state against the model.
      check(win_valid == (q.size() >= N), $sformatf("win_valid %0b with %0d buffered", win_valid, q.size()));
      check(wr_ready == (DEPTH - q.size() >= N), $sformatf("wr_ready %0b with %0d buffered", wr_ready, q.size()));
      check(int'(win_pos) == base, $sformatf("win_pos %0d expected %0d", win_pos, base));
      if (q.size() >= N)
        for (int i = 0; i < N; i++)
          check(window[i] == q[i], $sformatf("window[%0d]=%h expected %h", i, window[i], q[i]));
      if (!wr_ready) full_seen++;
      // New stimulus.
      wr_valid = ($urandom_range(1) == 1);
      wr_data  = {8'($urandom), 8'($urandom), 8'($urandom)};
      step     = ($urandom_range(2) != 0);
      code     = 2'($urandom_range(2));
      // Model update at the coming edge.
      if (step && q.size() >= N) begin
        for (int i = 0; i < N - int'(code); i++) void'(q.pop_front());
        base += N - int'(code);
        moves[N - int'(code)]++;
      end
      if (wr_valid && wr_ready)
        for (int i = 0; i < N; i++) q.push_back(wr_data[i]);
    end
    check(full_seen > 0 && moves[1] > 0 && moves[2] > 0 && moves[3] > 0, "not all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
