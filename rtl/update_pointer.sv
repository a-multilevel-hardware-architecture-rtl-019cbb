// update_pointer: the FIFO update pointer (UP) of one PDLZW dictionary.
//
// It always holds the address of the dictionary word that will be written
// next. Each pulse on 'advance' moves it up by one; after the last word
// (DEPTH-1) it wraps back to 0, so the oldest word is always replaced first,
// which is the first-in first-out replacement policy of the dictionary set.
// The count-and-wrap behaviour follows the published description; the
// active-low synchronous reset to 0 is this design's choice.
//
// Interface: clk, rst_n (synchronous, active low), advance (one write done),
// ptr (current write address), wrap (advance while ptr is DEPTH-1).
// Timing: ptr changes on the clock edge at which advance is high.
module update_pointer #(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          advance,
  output logic [AW-1:0] ptr,
  output logic          wrap
);

  localparam logic [AW-1:0] LAST = AW'(DEPTH - 1);

  assign wrap = advance && (ptr == LAST);

  always_ff @(posedge clk) begin
    if (!rst_n)
      ptr <= '0;
    else if (advance)
      ptr <= (ptr == LAST) ? '0 : ptr + 1'b1;
  end

endmodule
