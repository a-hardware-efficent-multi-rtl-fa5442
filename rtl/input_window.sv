// input_window: input string buffer, input pointer and pointer adder.
//
// The buffer receives the input stream N characters per write and presents
// to its pattern engine the N-character window that starts at the input
// pointer. After each step the pointer advances by a shift chosen through a
// multiplexer from the shift encoder's code: N - code characters, i.e. a
// full window when nothing was partially matched, fewer when the window must
// be realigned on a candidate occurrence. Because a realignment consumes
// fewer than N characters, an engine can fall behind the input rate; the
// buffer absorbs that and back-pressures the writer when it is full.
//
// The buffer is a circular array of DEPTH characters (a power of two, at
// least 2N) addressed by the low bits of 32-bit absolute stream positions.
// Buffer depth, the ready/valid write handshake and the position counters
// are this design's choices; the architecture only shows an input string
// register, an input pointer, an adder and the shift mux.
//
// Interface
//   wr_valid/wr_ready/wr_data  N characters per accepted write, wr_data[0]
//                              earliest; wr_ready when N entries are free
//   win_valid                  at least N unconsumed characters buffered
//   window, win_pos            window at the pointer and its stream position
//   step                       consume: pointer += N - code (only with win_valid)
// Timing: a write is visible in the window the cycle after it is accepted;
// one step per clock.
module input_window
  import match_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned CODE_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  char_t [N-1:0]     wr_data,
  output logic              win_valid,
  output char_t [N-1:0]     window,
  output pos_t              win_pos,
  input  logic              step,
  input  logic [CODE_W-1:0] code
);

  localparam int unsigned AW = $clog2(DEPTH);

  char_t mem [DEPTH];
  pos_t  wr_pos;
  pos_t  rd_pos;
  pos_t  fill;
  pos_t  shift;

  assign fill      = wr_pos - rd_pos;
  assign wr_ready  = (fill <= pos_t'(DEPTH - N));
  assign win_valid = (fill >= pos_t'(N));
  assign win_pos   = rd_pos;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      window[i] = mem[AW'(rd_pos + pos_t'(i))];
    end
  end

  // Shift mux: code L selects a move of N - L characters.
  assign shift = pos_t'(N) - pos_t'(code);

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) begin
      for (int i = 0; i < N; i++) begin
        mem[AW'(wr_pos + pos_t'(i))] <= wr_data[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pos <= '0;
      rd_pos <= '0;
    end else begin
      if (wr_valid && wr_ready) wr_pos <= wr_pos + pos_t'(N);
      if (step && win_valid)    rd_pos <= rd_pos + shift;
    end
  end

  initial begin
    assert (DEPTH >= 2 * N && (DEPTH & (DEPTH - 1)) == 0)
      else $error("input_window: DEPTH must be a power of two and at least 2*N");
  end

  // The pointer never passes the written data.
  assert property (@(posedge clk) disable iff (!rst_n) fill <= pos_t'(DEPTH));

endmodule
