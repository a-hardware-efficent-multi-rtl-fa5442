// alignment_element: finds where a pattern may start inside an input window.
//
// The process elements only recognise a substring that starts exactly at the
// first character of the window. When an occurrence of the pattern starts
// later in the window, the last L characters of the window (its suffix)
// equal the first L characters of the pattern's first substring (its
// prefix), for some L in 1..N-1. This block checks every such L at once:
// align_hit[L] is set when window[N-L+k] == PREFIX[k] for k = 0..L-1. With
// process width 3 and first substring "abc" it therefore tests "**a" (L=1)
// and "*ab" (L=2). The comparator count is 1+2+...+(N-1) = N(N-1)/2, the
// recurrence f(n) = (n-1) + f(n-1), f(1) = 0.
//
// One alignment element sits in front of the first PE of every pattern. It
// is purely combinational.
//
// PVALID (1..N) is the number of real characters in PREFIX; prefix
// positions at or beyond it are don't-care. This lets a pattern shorter than
// the process width be found anywhere inside a window (this design's choice).
//
// PREFIX[k] is character k of the first substring, so a string literal
// lists it backwards (the default "cba" is the substring "abc").
//
// Interface
//   window           N characters, window[0] earliest
//   align_hit[L]     suffix of length L matches the prefix of length L
//                    (align_hit[0] is unused and always 0)
module alignment_element
  import match_pkg::*;
#(
  parameter int unsigned              N      = 3,
  parameter int unsigned              PVALID = N,
  parameter match_pkg::char_t [N-1:0] PREFIX = "cba"
) (
  input  char_t [N-1:0] window,
  output logic  [N-1:0] align_hit
);

  always_comb begin
    align_hit = '0;
    for (int l = 1; l < N; l++) begin
      logic all_eq;
      all_eq = 1'b1;
      for (int k = 0; k < l; k++) begin
        if (k < PVALID && window[N-l+k] != PREFIX[k]) all_eq = 1'b0;
      end
      align_hit[l] = all_eq;
    end
  end

endmodule
