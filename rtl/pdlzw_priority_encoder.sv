// pdlzw_priority_encoder: picks the longest dictionary match in the PDLZW
// dictionary set.
//
// Dictionary k holds words of k+1 bytes, so the highest-numbered dictionary
// that reports a match holds the longest prefix of the input window. The
// encoder passes that dictionary's codeword on as pdlzw_addr and reports the
// dictionary number, from which the caller knows how many bytes were coded
// (level + 1) and which dictionary is updated next (level + 1).
// Choosing the longest match among several follows the published
// description; the separate 'level' output is this design's choice.
//
// Interface: purely combinational. match[k] and code[k] come from dictionary
// k; the caller drives match[0] high because the virtual dictionary 0 holds
// every single byte. 'any' is low only if no input matches.
module pdlzw_priority_encoder #(
  parameter int unsigned N      = 4,
  parameter int unsigned CODE_W = 9,
  localparam int unsigned LW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]      match,
  input  logic [CODE_W-1:0] code [N],
  output logic              any,
  output logic [LW-1:0]     level,
  output logic [CODE_W-1:0] pdlzw_addr
);

  always_comb begin
    any        = 1'b0;
    level      = '0;
    pdlzw_addr = '0;
    for (int k = 0; k < int'(N); k++) begin
      if (match[k]) begin
        any        = 1'b1;
        level      = LW'(k);
        pdlzw_addr = code[k];
      end
    end
  end

endmodule
