// Shared constants and helpers of the partitioned-TCAM IP lookup engine.
//
// An IPv4 route is a 32-bit prefix with a length of 1 to 32 bits. The TCAM
// stores it as a value plus a care mask (care bit 0 = don't care, "X"), and
// the length memory beside it stores the length in one-cold form: a 32-bit
// word of ones with a single zero in column LEN-1. Both encodings are derived
// here so that the insertion path and the testbenches agree on them.
//
// The 32-bit key, the 32 length columns and the one-cold code follow the
// design described in the literature this RTL implements; the column order
// (column 0 = /1, column 31 = /32) and the value/care split are choices of
// this implementation.
package iplu_pkg;

  localparam int unsigned ADDR_W  = 32;            // IPv4 address width
  localparam int unsigned LEN_W   = 32;            // one column per prefix length 1..32
  localparam int unsigned LENNUM_W = 6;            // binary prefix length, 0..32

  typedef logic [ADDR_W-1:0]   addr_t;
  typedef logic [LEN_W-1:0]    len_lines_t;       // active-low length lines
  typedef logic [LENNUM_W-1:0] len_t;

  // Care mask of a prefix of length len: the top len bits are compared.
  function automatic addr_t len_to_care(len_t len);
    addr_t m;
    for (int unsigned i = 0; i < ADDR_W; i++)
      m[ADDR_W-1-i] = (i < int'(len));
    return m;
  endfunction

  // One-cold length word: all ones except column len-1.
  function automatic len_lines_t len_to_onecold(len_t len);
    len_lines_t w;
    for (int unsigned c = 0; c < LEN_W; c++)
      w[c] = !((c + 1) == int'(len));
    return w;
  endfunction

endpackage
