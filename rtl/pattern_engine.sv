// pattern_engine: the complete matcher for one target pattern.
//
// The pattern (PAT_LEN characters) is cut into ceil(PAT_LEN/N) substrings of
// N characters, the last one possibly shorter, and each substring is built
// into a process element (PE). The PEs form a chain: PE 0 always has its
// enable and match inputs high, and PE j is enabled in a step only when PE
// j-1 matched in the previous step, so the chain follows an occurrence N
// characters per step. All PEs see the same window. The final PE's hit is
// the pattern match.
//
// Because the PEs only test the window at offset 0, an alignment element
// examines the window's suffixes against the first substring's prefix. When
// one matches and no PE of the chain matched, the shift encoder makes the
// input pointer move by fewer than N characters, so that in the next step
// the candidate occurrence starts the window and PE 0 can test it. A
// realignment costs one step in which fewer than N characters are consumed.
//
// Interface
//   in_valid/in_ready/in_data   N characters per transfer (in_data[0] first)
//   match                       one-cycle pulse: the pattern ended at match_end
//   match_end                   stream position of the last pattern character
//   stepped                     a window was processed this cycle
//   aligned                     that step realigned the pointer (shift < N)
// Timing: a step happens every cycle in which N characters are buffered;
// match and match_end appear the cycle after the step that completed the
// pattern. The pattern is a parameter (right-aligned string literal).
module pattern_engine
  import match_pkg::*;
#(
  parameter int unsigned             N       = 3,
  parameter int unsigned             MAX_LEN = 16,
  parameter logic [8*MAX_LEN-1:0]    PATTERN = "abc",
  parameter int unsigned             PAT_LEN = 3,
  parameter int unsigned             DEPTH   = 16,
  localparam int unsigned            CODE_W  = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  char_t [N-1:0] in_data,
  output logic          match,
  output pos_t          match_end,
  output logic          stepped,
  output logic          aligned
);

  localparam int unsigned NUM_PE = num_pes(PAT_LEN, N);

  // Character I (0 = first) of the pattern.
  function automatic char_t pat_char(int unsigned i);
    return (i < PAT_LEN) ? PATTERN[8*(PAT_LEN-1-i) +: 8] : '0;
  endfunction

  // Substring held by PE j.
  function automatic char_t [N-1:0] substr(int unsigned j);
    char_t [N-1:0] s;
    for (int unsigned k = 0; k < N; k++) s[k] = pat_char(j * N + k);
    return s;
  endfunction

  char_t [N-1:0]     window;
  pos_t              win_pos;
  logic              win_valid;
  logic              step;
  logic [N-1:0]      align_hit;
  logic [CODE_W-1:0] code;
  logic [NUM_PE-1:0] pe_hit;
  logic [NUM_PE:0]   en_chain;
  logic [NUM_PE:0]   m_chain;

  input_window #(.N(N), .DEPTH(DEPTH)) u_window (
    .clk      (clk),
    .rst_n    (rst_n),
    .wr_valid (in_valid),
    .wr_ready (in_ready),
    .wr_data  (in_data),
    .win_valid(win_valid),
    .window   (window),
    .win_pos  (win_pos),
    .step     (step),
    .code     (code)
  );

  assign step = win_valid;

  alignment_element #(
    .N     (N),
    .PVALID(pe_valid(PAT_LEN, N, 0)),
    .PREFIX(substr(0))
  ) u_align (
    .window   (window),
    .align_hit(align_hit)
  );

  // The first PE is always enabled and always sees a match from "before".
  assign en_chain[0] = 1'b1;
  assign m_chain[0]  = 1'b1;

  for (genvar j = 0; j < NUM_PE; j++) begin : g_pe
    process_element #(
      .N     (N),
      .VALID (pe_valid(PAT_LEN, N, j)),
      .SUBSTR(substr(j))
    ) u_pe (
      .clk       (clk),
      .rst_n     (rst_n),
      .step      (step),
      .window    (window),
      .enable_in (en_chain[j]),
      .match_in  (m_chain[j]),
      .hit       (pe_hit[j]),
      .enable_out(en_chain[j+1]),
      .match_out (m_chain[j+1])
    );
  end

  shift_encoder #(.N(N), .NUM_PE(NUM_PE)) u_enc (
    .align_hit(align_hit),
    .pe_hit   (pe_hit),
    .code     (code)
  );

  // Final match report, registered.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      match     <= 1'b0;
      match_end <= '0;
      stepped   <= 1'b0;
      aligned   <= 1'b0;
    end else begin
      match   <= step & pe_hit[NUM_PE-1];
      stepped <= step;
      aligned <= step & (code != '0);
      if (step && pe_hit[NUM_PE-1])
        match_end <= win_pos + pos_t'(pe_valid(PAT_LEN, N, NUM_PE - 1) - 1);
    end
  end

  initial begin
    assert (PAT_LEN >= 1 && PAT_LEN <= MAX_LEN)
      else $error("pattern_engine: PAT_LEN must be 1..MAX_LEN");
  end

endmodule
