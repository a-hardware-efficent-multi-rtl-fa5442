// process_element: one link of a process element (PE) chain.
//
// A PE owns one substring of a target pattern, N characters long (the process
// width). Each step it compares the N-character input window with that
// substring using N equality comparators, one per character position, and
// ANDs the comparator results with the enable and match it received from the
// previous PE. The AND is this step's hit. On a step the hit is registered and
// sent to the next PE as its enable and match, so the next PE judges the next
// N characters of the stream. The first PE of a chain has enable_in and
// match_in tied high.
//
// Only aligned occurrences are compared here: the window is checked against
// the substring at offset 0 only, which is what reduces the comparator count
// from n*n to n. Occurrences that start inside a window are handled by the
// alignment element in front of the chain.
//
// VALID (1..N) is how many leading characters of SUBSTR take part; the last
// PE of a pattern whose length is not a multiple of N compares fewer than N
// characters and ignores the rest of the window. VALID and the don't-care
// treatment are choices of this design.
//
// Character i of SUBSTR and of the window sits at index i, so index 0 is the
// earliest character; a string literal therefore lists the substring
// backwards (the default "cba" holds the substring "abc").
//
// Interface
//   window     N characters, window[0] is the earliest in the stream
//   step       the window is valid and is consumed this cycle
//   hit        combinational: enable_in & match_in & all comparators equal
//   enable_out, match_out  registered hit of the last step (next PE inputs)
// Timing: hit is combinational from window; enable_out/match_out change only
// on a cycle with step, reset clears them.
module process_element
  import match_pkg::*;
#(
  parameter int unsigned            N      = 3,
  parameter int unsigned            VALID  = N,
  parameter match_pkg::char_t [N-1:0] SUBSTR = "cba"
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            step,
  input  char_t [N-1:0]   window,
  input  logic            enable_in,
  input  logic            match_in,
  output logic            hit,
  output logic            enable_out,
  output logic            match_out
);

  logic [N-1:0] cmp;

  // One comparator per character position; positions beyond VALID are not
  // built and count as equal.
  always_comb begin
    for (int i = 0; i < N; i++) begin
      cmp[i] = (i < VALID) ? (window[i] == SUBSTR[i]) : 1'b1;
    end
  end

  assign hit = enable_in & match_in & (&cmp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enable_out <= 1'b0;
      match_out  <= 1'b0;
    end else if (step) begin
      enable_out <= hit;
      match_out  <= hit;
    end
  end

endmodule
