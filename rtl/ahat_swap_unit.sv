// ahat_swap_unit: the swap unit of the AHAT processor.
//
// For each incoming symbol (pdlzw_addr) it searches the ordered list, outputs
// the symbol's rank n as ahat_addr, and in the same cycle tells the list to
// exchange the words at ranks n and n-1 (nothing to do when n is 0, the top).
// The list is therefore already updated when the next symbol is searched one
// cycle later, so one symbol is handled per cycle.
// The search-output-swap sequence follows the published design; the
// valid/ready handshake and the one-cycle output register are this design's.
//
// Interface: in_valid/in_ready with in_sym; out_valid/out_ready with
// ahat_addr (registered, one cycle latency). list_key/list_hit/list_index
// and swap_en/swap_idx connect to ahat_ordered_list. 'swapped' and 'at_top'
// pulse when a symbol is accepted and moved up, or found already at rank 0.
module ahat_swap_unit #(
  parameter int unsigned N  = 368,
  parameter int unsigned W  = 9,
  localparam int unsigned IW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_sym,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [IW-1:0] ahat_addr,
  // ordered list
  output logic [W-1:0]  list_key,
  input  logic          list_hit,
  input  logic [IW-1:0] list_index,
  output logic          swap_en,
  output logic [IW-1:0] swap_idx,
  // observation
  output logic          swapped,
  output logic          at_top
);

  logic fire;

  assign in_ready = !out_valid || out_ready;
  assign fire     = in_valid && in_ready;
  assign list_key = in_sym;
  assign swap_en  = fire && list_hit && (list_index != '0);
  assign swap_idx = list_index;
  assign swapped  = swap_en;
  assign at_top   = fire && list_hit && (list_index == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      ahat_addr <= '0;
    end else if (in_ready) begin
      out_valid <= fire;
      if (fire) ahat_addr <= list_index;
    end
  end

  // Every symbol of the alphabet is in the list.
  assert property (@(posedge clk) disable iff (!rst_n) fire |-> list_hit);

endmodule
