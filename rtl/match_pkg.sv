// match_pkg: types and helpers shared by the multi-character string matcher.
//
// Characters are 8-bit bytes. Stream positions are 32-bit absolute byte
// indices that wrap modulo 2**32; every module that buffers or reports a
// position uses pos_t. Patterns are handed to the hardware as parameters
// (the brute-force matcher builds each pattern into comparator logic rather
// than storing it in memory), packed as a string literal that is
// right-aligned in a vector of 8*MAX_LEN bits, together with its length.
package match_pkg;

  localparam int unsigned CHAR_W = 8;
  localparam int unsigned POS_W  = 32;

  typedef logic [CHAR_W-1:0] char_t;
  typedef logic [POS_W-1:0]  pos_t;

  // Number of process elements needed for a pattern of LEN characters with
  // process width N: ceil(LEN / N).
  function automatic int unsigned num_pes(int unsigned len, int unsigned n);
    return (len + n - 1) / n;
  endfunction

  // Number of characters of a pattern of LEN characters that process element
  // PE (0-based) compares: N for every PE but the last, which may hold fewer.
  function automatic int unsigned pe_valid(int unsigned len, int unsigned n, int unsigned pe);
    int unsigned rest;
    rest = len - pe * n;
    return (rest < n) ? rest : n;
  endfunction

endpackage
