// ahat_ordered_list: the ordered list of the AHAT (adaptive Huffman with
// transposition) processor, a CAM of N words of W bits.
//
// Word n holds the symbol currently ranked n; rank 0 is the top of the list.
// The list is searched by content: 'key' is compared with all N words at
// once and 'index' returns the rank of the word that matches. A swap
// exchanges the words at ranks swap_idx and swap_idx-1, which moves a symbol
// one place towards the top each time it is used, so frequent symbols
// collect near the top and get short codewords.
//
// Size (368 x 9 bits), content search and neighbour swap follow the published
// design. The initial order after reset (word n holds symbol n, so every
// symbol is present exactly once) is this design's choice.
//
// Interface: search is combinational (key -> hit, index); the swap is done at
// the clock edge with swap_en high and swap_idx >= 1. Reset is synchronous,
// active low.
module ahat_ordered_list #(
  parameter int unsigned N  = 368,
  parameter int unsigned W  = 9,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // search
  input  logic [W-1:0]  key,
  output logic          hit,
  output logic [IW-1:0] index,
  // transposition
  input  logic          swap_en,
  input  logic [IW-1:0] swap_idx
);

  logic [W-1:0] list [N];

  always_comb begin
    hit   = 1'b0;
    index = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (list[i] == key) begin
        hit   = 1'b1;
        index = IW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) list[i] <= W'(i);
    end else if (swap_en) begin
      list[swap_idx]        <= list[swap_idx - 1'b1];
      list[swap_idx - 1'b1] <= list[swap_idx];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) swap_en |-> (swap_idx != '0 && int'(swap_idx) < N));

endmodule
