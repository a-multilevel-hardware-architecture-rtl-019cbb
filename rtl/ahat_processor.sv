// ahat_processor: the second level of the compressor, adaptive Huffman coding
// with transposition (AHAT) followed by a canonical Huffman encoder.
//
// Each PDLZW codeword (pdlzw_addr, the AHAT "symbol") is looked up in the
// ordered list by the swap unit; its rank ahat_addr is passed on and the
// symbol trades places with the one ranked just above it. The canonical
// Huffman encoder then maps the rank to a 6-, 7-, 9- or 12-bit codeword, so
// symbols that keep recurring, having bubbled towards the top, cost few bits.
// The structure (swap unit, 368 x 9-bit ordered list, comparator-based
// canonical encoder) follows the published design; the handshakes and the
// two pipeline registers are this design's.
//
// Interface: in_valid/in_ready with pdlzw_addr; out_valid/out_ready with the
// codeword (code, right-aligned, len bits). Latency two cycles, throughput one
// symbol per cycle. 'swapped', 'at_top' and 'group' are for observation.
module ahat_processor
  import mlc_pkg::*;
#(
  parameter int unsigned N    = NUM_SYMBOLS,
  localparam int unsigned W   = $clog2(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [W-1:0]          pdlzw_addr,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [CH_MAX_LEN-1:0] code,
  output logic [CH_LEN_W-1:0]   len,
  output logic [1:0]            group,
  output logic                  range_err,
  output logic                  swapped,
  output logic                  at_top
);

  logic [W-1:0] list_key;
  logic         list_hit;
  logic [W-1:0] list_index;
  logic         swap_en;
  logic [W-1:0] swap_idx;
  logic         rank_valid, rank_ready;
  logic [W-1:0] ahat_addr;

  ahat_ordered_list #(.N(N), .W(W)) u_list (
    .clk      (clk),
    .rst_n    (rst_n),
    .key      (list_key),
    .hit      (list_hit),
    .index    (list_index),
    .swap_en  (swap_en),
    .swap_idx (swap_idx)
  );

  ahat_swap_unit #(.N(N), .W(W)) u_swap (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .in_sym     (pdlzw_addr),
    .out_valid  (rank_valid),
    .out_ready  (rank_ready),
    .ahat_addr  (ahat_addr),
    .list_key   (list_key),
    .list_hit   (list_hit),
    .list_index (list_index),
    .swap_en    (swap_en),
    .swap_idx   (swap_idx),
    .swapped    (swapped),
    .at_top     (at_top)
  );

  canonical_huffman_encoder #(.AW(W)) u_chenc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (rank_valid),
    .in_ready  (rank_ready),
    .ahat_addr (ahat_addr),
    .out_valid (out_valid),
    .out_ready (out_ready),
    .code      (code),
    .len       (len),
    .group     (group),
    .range_err (range_err)
  );

endmodule
