// canonical_huffman_encoder: turns an ordered-list rank (ahat_addr) into a
// canonical Huffman codeword.
//
// Ranks are split into four groups of consecutive ranks; group g has CNTg
// codewords of LENg bits. In the default table ranks 0..34 get 6-bit codes,
// 35..47 7-bit, 48..207 9-bit and 208..367 12-bit. Four comparators test the
// rank against the group boundaries OFF = 35, 48, 208, 368 (the running sums
// of the counts) in parallel; the number of boundaries reached selects the
// group, and the codeword is
//     rank - (start of the group) + FIRSTg,
// where FIRSTg, the first canonical codeword of length LENg, is computed at
// elaboration from the counts (first[maxlen] = 0, first[l] = (first[l+1] +
// count[l+1]) / 2). For the default table FIRST = 29, 45, 20, 0. Codes of the
// same length are consecutive numbers and a shorter code is never a prefix of
// a longer one, which makes the code fast to decode.
//
// The lengths, counts, boundaries, first codewords and the compare-subtract-add
// structure are the published table and encoder. The published worked example
// gives rank 38 a 6-bit code (100000); this design follows the table itself,
// whose first codewords only form a valid prefix code with ranks 0..34 being
// the 6-bit group, so rank 38 gets the 7-bit code 0110000. The fourth
// comparator (rank >= 368) flags a rank outside the table ('range_err'); the
// valid/ready handshake and output register are this design's choice.
//
// Interface: in_valid/in_ready with ahat_addr; out_valid/out_ready with code
// (right-aligned, MAX_LEN bits), len (significant bits) and group (0..3).
// Latency one cycle, one codeword per cycle.
module canonical_huffman_encoder
  import mlc_pkg::*;
#(
  parameter int unsigned AW   = 9,
  parameter int unsigned LEN0 = 6,
  parameter int unsigned LEN1 = 7,
  parameter int unsigned LEN2 = 9,
  parameter int unsigned LEN3 = 12,
  parameter int unsigned CNT0 = 35,
  parameter int unsigned CNT1 = 13,
  parameter int unsigned CNT2 = 160,
  parameter int unsigned CNT3 = 160,
  localparam int unsigned MAX_LEN = LEN3,
  localparam int unsigned LW      = $clog2(MAX_LEN + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [AW-1:0]      ahat_addr,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [MAX_LEN-1:0] code,
  output logic [LW-1:0]      len,
  output logic [1:0]         group,
  output logic               range_err
);

  // Group boundaries (running sums of the counts) and first codewords.
  localparam int unsigned OFF0 = CNT0;
  localparam int unsigned OFF1 = OFF0 + CNT1;
  localparam int unsigned OFF2 = OFF1 + CNT2;
  localparam int unsigned OFF3 = OFF2 + CNT3;
  localparam int unsigned FIRST0 = ch_first_codeword(LEN0, MAX_LEN, LEN0, LEN1, LEN2, LEN3, CNT0, CNT1, CNT2, CNT3);
  localparam int unsigned FIRST1 = ch_first_codeword(LEN1, MAX_LEN, LEN0, LEN1, LEN2, LEN3, CNT0, CNT1, CNT2, CNT3);
  localparam int unsigned FIRST2 = ch_first_codeword(LEN2, MAX_LEN, LEN0, LEN1, LEN2, LEN3, CNT0, CNT1, CNT2, CNT3);
  localparam int unsigned FIRST3 = ch_first_codeword(LEN3, MAX_LEN, LEN0, LEN1, LEN2, LEN3, CNT0, CNT1, CNT2, CNT3);

  // Arithmetic is modulo 2^MAX_LEN: the result always fits in MAX_LEN bits.
  localparam int unsigned CW = MAX_LEN;

  logic [3:0]        ge;          // comparator outputs: rank >= OFFg
  logic [1:0]        grp;
  logic [CW-1:0]     start, first;
  logic [LW-1:0]     clen;
  logic [CW-1:0]     cw;
  logic              fire;

  assign ge[0] = {1'b0, ahat_addr} >= (AW+1)'(OFF0);
  assign ge[1] = {1'b0, ahat_addr} >= (AW+1)'(OFF1);
  assign ge[2] = {1'b0, ahat_addr} >= (AW+1)'(OFF2);
  assign ge[3] = {1'b0, ahat_addr} >= (AW+1)'(OFF3);

  always_comb begin
    unique casez (ge[2:0])
      3'b000:  begin grp = 2'd0; start = '0;           first = CW'(FIRST0); clen = LW'(LEN0); end
      3'b001:  begin grp = 2'd1; start = CW'(OFF0);    first = CW'(FIRST1); clen = LW'(LEN1); end
      3'b011:  begin grp = 2'd2; start = CW'(OFF1);    first = CW'(FIRST2); clen = LW'(LEN2); end
      default: begin grp = 2'd3; start = CW'(OFF2);    first = CW'(FIRST3); clen = LW'(LEN3); end
    endcase
  end

  assign cw       = CW'(ahat_addr) - start + first;
  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      code      <= '0;
      len       <= '0;
      group     <= '0;
      range_err <= 1'b0;
    end else if (in_ready) begin
      out_valid <= fire;
      if (fire) begin
        code      <= cw;
        len       <= clen;
        group     <= grp;
        range_err <= ge[3];
      end
    end
  end

endmodule
