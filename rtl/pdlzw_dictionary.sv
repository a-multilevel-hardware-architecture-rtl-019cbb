// pdlzw_dictionary: one content-addressable dictionary of the PDLZW
// dictionary set (dictionaries 1..3), holding DEPTH words of BYTES bytes.
//
// Search: the key (the first BYTES bytes of the input window) is compared
// with every valid word in parallel. On a hit, 'match' is high and 'code' is
// the global PDLZW codeword BASE + word address (9 bits in the default
// configuration), which is what the dictionary hands to the priority encoder.
// Update: when 'we' is high the word 'wdata' is written at the address held by
// the dictionary's update pointer, which then moves on and wraps (FIFO
// replacement).
//
// The parallel search, the word widths, the depths and the FIFO update
// pointer follow the published architecture. A valid bit per word (cleared
// by reset, so an empty dictionary never matches) and the choice of the
// lowest address when several words match are this design's own; the
// compressor never writes a word that is already present, so several
// matches do not occur in normal use.
//
// Interface: key/match/code are combinational (search and write share one
// clock cycle); the write takes effect at the clock edge, so the next search
// sees it. Reset is synchronous, active low.
module pdlzw_dictionary #(
  parameter int unsigned BYTES  = 2,
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned BASE   = 256,
  parameter int unsigned CODE_W = 9,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // search port
  input  logic [BYTES*8-1:0]   key,
  output logic                 match,
  output logic [CODE_W-1:0]    code,
  // update port
  input  logic                 we,
  input  logic [BYTES*8-1:0]   wdata,
  output logic [AW-1:0]        up,      // current update pointer
  output logic                 up_wrap  // update pointer wrapped this cycle
);

  logic [BYTES*8-1:0] words [DEPTH];
  logic [DEPTH-1:0]   valid;
  logic [AW-1:0]      hit_addr;

  update_pointer #(.DEPTH(DEPTH)) u_up (
    .clk     (clk),
    .rst_n   (rst_n),
    .advance (we),
    .ptr     (up),
    .wrap    (up_wrap)
  );

  // Parallel compare, lowest matching address wins.
  always_comb begin
    match    = 1'b0;
    hit_addr = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid[i] && words[i] == key) begin
        match    = 1'b1;
        hit_addr = AW'(i);
      end
    end
  end

  assign code = CODE_W'(BASE) + CODE_W'(hit_addr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (we) begin
      valid[up] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we)
      words[up] <= wdata;
  end

endmodule
