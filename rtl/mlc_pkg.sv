// mlc_pkg: constants and helper functions shared by the two-level
// (PDLZW + AHAT) lossless compressor.
//
// The dictionary set {256, 64, 32, 16} and the canonical Huffman table
// (code lengths 6, 7, 9, 12 with 35, 13, 160, 160 codewords) are the
// published configuration. The global codeword map (dictionary k occupies the
// codes directly after dictionary k-1, starting with the virtual dictionary 0
// at code 0) is this design's choice; it gives the 368-symbol alphabet that
// the ordered list is sized for.
//
// ch_first_codeword() computes the first canonical codeword of a given length
// from the number of codewords of each length, the same recurrence a software
// canonical-Huffman table builder uses:
//   first[maxlen] = 0;  first[l] = (first[l+1] + count[l+1]) / 2.
package mlc_pkg;

  // ---- PDLZW dictionary set ------------------------------------------------
  localparam int unsigned DICT0_DEPTH = 256;   // virtual, no storage
  localparam int unsigned DICT1_DEPTH = 64;    // 2-byte words
  localparam int unsigned DICT2_DEPTH = 32;    // 3-byte words
  localparam int unsigned DICT3_DEPTH = 16;    // 4-byte words

  // ---- AHAT / canonical Huffman ----------------------------------------------
  localparam int unsigned NUM_SYMBOLS = DICT0_DEPTH + DICT1_DEPTH + DICT2_DEPTH + DICT3_DEPTH; // 368
  localparam int unsigned SYM_W       = $clog2(NUM_SYMBOLS);   // 9
  localparam int unsigned CH_MAX_LEN  = 12;
  localparam int unsigned CH_LEN_W    = $clog2(CH_MAX_LEN + 1); // 4

  // Number of codewords of length l, given four (length, count) groups.
  function automatic int unsigned ch_count_of_len(
      input int unsigned l,
      input int unsigned l0, input int unsigned l1, input int unsigned l2, input int unsigned l3,
      input int unsigned c0, input int unsigned c1, input int unsigned c2, input int unsigned c3);
    int unsigned n;
    n = 0;
    if (l == l0) n += c0;
    if (l == l1) n += c1;
    if (l == l2) n += c2;
    if (l == l3) n += c3;
    return n;
  endfunction

  // First canonical codeword of length 'len'; lmax is the longest length.
  function automatic int unsigned ch_first_codeword(
      input int unsigned len, input int unsigned lmax,
      input int unsigned l0, input int unsigned l1, input int unsigned l2, input int unsigned l3,
      input int unsigned c0, input int unsigned c1, input int unsigned c2, input int unsigned c3);
    int unsigned fc;
    fc = 0;
    for (int i = int'(lmax) - 1; i >= int'(len); i--)
      fc = (fc + ch_count_of_len(unsigned'(i + 1), l0, l1, l2, l3, c0, c1, c2, c3)) / 2;
    return fc;
  endfunction

endpackage
