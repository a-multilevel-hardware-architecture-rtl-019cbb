// multilevel_compressor: two-level lossless data compressor, a parallel-
// dictionary LZW (PDLZW) processor followed by an adaptive Huffman coder with
// transposition (AHAT).
//
// The PDLZW level replaces strings of one to four input bytes with 9-bit
// codewords using a small dictionary set {256, 64, 32, 16} (288 bytes of CAM;
// dictionary 0 is virtual). Its codewords are not equally frequent, so the AHAT
// level recodes each one into a 6- to 12-bit canonical Huffman codeword whose
// length depends on the codeword's current rank in a self-organising ordered
// list (368 x 9 bits of CAM). Both levels handle one codeword per clock cycle,
// so the compressor takes one to four input bytes per cycle.
//
// The two-processor structure and its sizes follow the published
// architecture. The byte-source interface, the valid/ready output handshake
// (backpressure stalls all stages together) and the codeword/length output
// format are this design's choices; packing the variable-length codewords into
// a bit stream is left to the consumer (code is right-aligned, len bits valid).
//
// Interface: src_byte[0..3] next input bytes, src_avail how many are valid,
// src_end no more bytes after these, src_take how many are taken at this clock
// edge. out_valid/out_ready with out_code, out_len. Latency from the window
// filling to out_valid: three cycles. Observation outputs report the PDLZW
// string length, dictionary writes, inhibited updates, update-pointer wraps,
// list swaps and the codeword group for each accepted item.
module multilevel_compressor
  import mlc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // byte source
  input  logic [7:0]            src_byte [4],
  input  logic [2:0]            src_avail,
  input  logic                  src_end,
  output logic [2:0]            src_take,
  // compressed output
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [CH_MAX_LEN-1:0] out_code,
  output logic [CH_LEN_W-1:0]   out_len,
  // observation
  output logic                  pdlzw_valid,
  output logic [SYM_W-1:0]      pdlzw_addr,
  output logic [2:0]            pdlzw_nbytes,
  output logic [3:1]            dict_write,
  output logic                  dict_inhibit,
  output logic [3:1]            up_wrap,
  output logic                  swapped,
  output logic                  at_top,
  output logic [1:0]            out_group,
  output logic                  range_err
);

  logic pdlzw_ready;

  pdlzw_processor u_pdlzw (
    .clk          (clk),
    .rst_n        (rst_n),
    .src_byte     (src_byte),
    .src_avail    (src_avail),
    .src_end      (src_end),
    .src_take     (src_take),
    .out_valid    (pdlzw_valid),
    .out_ready    (pdlzw_ready),
    .pdlzw_addr   (pdlzw_addr),
    .out_nbytes   (pdlzw_nbytes),
    .dict_write   (dict_write),
    .dict_inhibit (dict_inhibit),
    .up_wrap      (up_wrap)
  );

  ahat_processor u_ahat (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (pdlzw_valid),
    .in_ready   (pdlzw_ready),
    .pdlzw_addr (pdlzw_addr),
    .out_valid  (out_valid),
    .out_ready  (out_ready),
    .code       (out_code),
    .len        (out_len),
    .group      (out_group),
    .range_err  (range_err),
    .swapped    (swapped),
    .at_top     (at_top)
  );

endmodule
