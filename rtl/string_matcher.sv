// string_matcher: multi-pattern, multi-character string matching array.
//
// Top of the design. One pattern_engine per target pattern runs in parallel
// on the same input stream (a brute-force matcher: every pattern is compared
// everywhere). The stream enters N characters per clock. Each engine has its
// own input pointer, because realignments make engines consume the stream at
// different rates; each keeps its own small buffer, and the top accepts a
// transfer only when every engine can take it. With no partial matches every
// engine consumes N characters per clock and the input never stalls.
//
// Defaults: process width N = 3 as in the worked example of the architecture,
// and four example patterns; the pattern set, the buffer depth and the
// report format are this design's choices. Patterns are given as string
// literals, right-aligned in MAX_LEN bytes, with their lengths in PAT_LENS.
//
// Interface
//   in_valid/in_ready/in_data  N characters per transfer, in_data[0] first
//   match[p]                   one-cycle pulse: pattern p ended at match_end[p]
//   match_end[p]               stream position of pattern p's last character
//   aligned[p]                 engine p realigned its pointer this cycle
//   stepped[p]                 engine p processed a window this cycle
module string_matcher
  import match_pkg::*;
#(
  parameter int unsigned                         N            = 3,
  parameter int unsigned                         NUM_PATTERNS = 4,
  parameter int unsigned                         MAX_LEN      = 16,
  parameter logic [8*MAX_LEN-1:0]                PATTERNS [NUM_PATTERNS] =
    '{"abc", "cmd.exe", "/etc/passwd", "aaab"},
  parameter int unsigned                         PAT_LENS [NUM_PATTERNS] = '{3, 7, 11, 4},
  parameter int unsigned                         DEPTH        = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  char_t [N-1:0]           in_data,
  output logic [NUM_PATTERNS-1:0] match,
  output pos_t                    match_end [NUM_PATTERNS],
  output logic [NUM_PATTERNS-1:0] aligned,
  output logic [NUM_PATTERNS-1:0] stepped
);

  logic [NUM_PATTERNS-1:0] eng_ready;
  logic                    accept;

  assign in_ready = &eng_ready;
  assign accept   = in_valid & in_ready;

  for (genvar p = 0; p < NUM_PATTERNS; p++) begin : g_eng
    pattern_engine #(
      .N      (N),
      .MAX_LEN(MAX_LEN),
      .PATTERN(PATTERNS[p]),
      .PAT_LEN(PAT_LENS[p]),
      .DEPTH  (DEPTH)
    ) u_eng (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (accept),
      .in_ready (eng_ready[p]),
      .in_data  (in_data),
      .match    (match[p]),
      .match_end(match_end[p]),
      .stepped  (stepped[p]),
      .aligned  (aligned[p])
    );
  end

endmodule
