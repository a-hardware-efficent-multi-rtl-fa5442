// shift_encoder: turns alignment results into the input-pointer mux control.
//
// The encoder decides how far a pattern engine's input pointer moves after a
// step. Its output code is the length L of the longest window suffix that
// matches a prefix of the pattern (0 when none does), and the pointer then
// moves by N - code characters:
//   code 0          no partial match, or a PE of the chain matched: move N
//   code L (1..N-1) suffix of L characters matched: move N-L so that the
//                   candidate occurrence starts the next window
// For process width 3 this gives code 2'b10 -> move 1 ("*ab" matched),
// 2'b01 -> move 2 ("**a" matched), 2'b00 -> move 3, as in the mux table of the
// architecture; 2'b11 cannot occur.
//
// Any PE hit in the chain (ORed over pe_hit) forces code 0: the chain's
// registered enables expect the next window to start exactly N characters
// later, so no realignment may happen while a match is in progress. When
// several suffix lengths match, the longest wins because it is the earliest
// possible start; shifting further would skip that candidate. The priority
// rule is this design's choice.
//
// Purely combinational.
//   align_hit[L]  from the alignment element, bit 0 unused
//   pe_hit[j]     hit of PE j of the chain this step
//   code          pointer mux control, clog2(N) bits
module shift_encoder #(
  parameter int unsigned N      = 3,
  parameter int unsigned NUM_PE = 1,
  localparam int unsigned CODE_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]      align_hit,
  input  logic [NUM_PE-1:0] pe_hit,
  output logic [CODE_W-1:0] code
);

  logic any_pe;
  assign any_pe = |pe_hit;

  always_comb begin
    code = '0;
    if (!any_pe) begin
      // Ascending scan: the longest matching suffix is written last.
      for (int l = 1; l < N; l++) begin
        if (align_hit[l]) code = CODE_W'(l);
      end
    end
  end

endmodule
