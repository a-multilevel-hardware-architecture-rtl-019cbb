// pdlzw_shift_register: the 4-byte input window of the PDLZW processor.
//
// The window holds the next WIDTH input bytes, win[0] being the oldest (the
// first byte of the string now being coded), and 'count' says how many of
// them are present. In one clock cycle it drops the 'consume' oldest bytes
// (0..WIDTH, the length of the string just coded) and refills the free places
// from the source, so the compressor can take one to four bytes per cycle.
//
// The source is a look-ahead byte stream: src_byte[0..WIDTH-1] are its next
// bytes, src_avail says how many of them are valid, and the window answers
// with src_take, the number it accepts at this clock edge (combinational from
// count, consume and src_avail). A byte FIFO or a memory read port fits this
// directly. The 4-byte width and the shifting of the input string through the
// window follow the published design; the look-ahead source interface and the
// multi-byte refill are this design's choice.
module pdlzw_shift_register #(
  parameter int unsigned WIDTH = 4,
  localparam int unsigned CW   = $clog2(WIDTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // source side
  input  logic [7:0]    src_byte [WIDTH],
  input  logic [CW-1:0] src_avail,
  output logic [CW-1:0] src_take,
  // window side
  input  logic [CW-1:0] consume,
  output logic [7:0]    win [WIDTH],
  output logic [CW-1:0] count
);

  logic [CW-1:0] keep;          // bytes left after consuming
  logic [CW-1:0] room;          // free places after consuming
  logic [7:0]    win_next [WIDTH];

  assign keep     = (consume >= count) ? '0 : count - consume;
  assign room     = CW'(WIDTH) - keep;
  assign src_take = (src_avail < room) ? src_avail : room;

  always_comb begin
    for (int i = 0; i < int'(WIDTH); i++) begin
      if (i < int'(keep))
        win_next[i] = win[(i + int'(consume)) % int'(WIDTH)];
      else
        win_next[i] = src_byte[(i - int'(keep)) % int'(WIDTH)];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      count <= '0;
      for (int i = 0; i < int'(WIDTH); i++) win[i] <= '0;
    end else begin
      count <= keep + src_take;
      for (int i = 0; i < int'(WIDTH); i++) win[i] <= win_next[i];
    end
  end

endmodule
