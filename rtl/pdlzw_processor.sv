// pdlzw_processor: parallel-dictionary LZW (PDLZW) compressor, the first
// level of the two-level compressor.
//
// How it works. Input bytes enter a 4-byte window (pdlzw_shift_register).
// The dictionary set is {256, 64, 32, 16} words: dictionary 0 is virtual (a
// byte is its own codeword, no storage) and dictionaries 1, 2, 3 are CAMs of
// 2-, 3- and 4-byte words. Every cycle all dictionaries are searched at once
// with the prefix of the window of their own word width; the priority encoder
// takes the longest hit (dictionary 'level', level+1 bytes) and its 9-bit
// codeword becomes pdlzw_addr. In the same cycle the matched string plus the
// byte after it is written into dictionary level+1 at that dictionary's
// update pointer (FIFO replacement), unless level+1 is 4, beyond the last
// dictionary, and the level+1 coded bytes leave the window. One codeword is
// produced per cycle, covering one to four input bytes.
//
// Codeword map: dictionary 0 -> 0..255, dictionary 1 -> 256..319,
// dictionary 2 -> 320..351, dictionary 3 -> 352..367 (368 symbols).
//
// The dictionary set, the parallel search, the longest-match priority
// encoding, the FIFO update into the next dictionary and its inhibition follow
// the published design. This design's choices: the codeword map above, the
// valid/ready handshake on the output, the look-ahead byte source, and the end
// of input: with src_end high and no bytes left, the bytes remaining in the
// window are coded with what fits (a string ending the input is not added to
// the dictionary, as there is no following byte).
//
// Interface. Source: src_byte[0..3] next bytes, src_avail valid count, src_take
// bytes accepted this edge, src_end no bytes beyond the ones offered. Output:
// out_valid/out_ready handshake carrying pdlzw_addr and out_nbytes (string
// length 1..4). Latency: a codeword is registered one cycle after its bytes
// fill the window. Observation outputs dict_write, dict_inhibit and
// up_wrap[1..3] pulse when a dictionary is written, when an update is inhibited
// because the next dictionary does not exist, and when an update pointer wraps.
module pdlzw_processor
  import mlc_pkg::*;
#(
  parameter int unsigned D1_DEPTH = DICT1_DEPTH,
  parameter int unsigned D2_DEPTH = DICT2_DEPTH,
  parameter int unsigned D3_DEPTH = DICT3_DEPTH,
  localparam int unsigned NSYM    = DICT0_DEPTH + D1_DEPTH + D2_DEPTH + D3_DEPTH,
  localparam int unsigned CODE_W  = $clog2(NSYM)
) (
  input  logic              clk,
  input  logic              rst_n,
  // byte source
  input  logic [7:0]        src_byte [4],
  input  logic [2:0]        src_avail,
  input  logic              src_end,
  output logic [2:0]        src_take,
  // codeword output
  output logic              out_valid,
  input  logic              out_ready,
  output logic [CODE_W-1:0] pdlzw_addr,
  output logic [2:0]        out_nbytes,
  // observation
  output logic [3:1]        dict_write,
  output logic              dict_inhibit,
  output logic [3:1]        up_wrap
);

  localparam int unsigned DEPTH [4] = '{DICT0_DEPTH, D1_DEPTH, D2_DEPTH, D3_DEPTH};
  localparam int unsigned BASE  [4] = '{0, DICT0_DEPTH, DICT0_DEPTH + D1_DEPTH,
                                        DICT0_DEPTH + D1_DEPTH + D2_DEPTH};

  logic [7:0]        win [4];
  logic [2:0]        count;
  logic [2:0]        consume;
  logic              advance, can_code, fire;
  logic [3:0]        match;
  logic [CODE_W-1:0] code [4];
  logic              any;
  logic [1:0]        level;
  logic [CODE_W-1:0] sel_code;

  pdlzw_shift_register #(.WIDTH(4)) u_window (
    .clk       (clk),
    .rst_n     (rst_n),
    .src_byte  (src_byte),
    .src_avail (src_avail),
    .src_take  (src_take),
    .consume   (consume),
    .win       (win),
    .count     (count)
  );

  // Code when the window is full, or when the input has ended and the window
  // holds the last bytes.
  assign advance  = !out_valid || out_ready;
  assign can_code = (count == 3'd4) || (src_end && src_avail == 3'd0 && count != 3'd0);
  assign fire     = can_code && advance;

  // Dictionary 0: every byte is present, codeword = byte value.
  assign match[0] = (count != 3'd0);
  assign code[0]  = CODE_W'(win[0]);

  for (genvar k = 1; k < 4; k++) begin : g_dict
    logic [(k+1)*8-1:0] key;
    logic               hit;

    // key = first k+1 window bytes, oldest byte most significant. It is also
    // the word written on update: the k-byte match plus the byte after it.
    always_comb
      for (int b = 0; b <= k; b++) key[(k-b)*8 +: 8] = win[b];

    pdlzw_dictionary #(
      .BYTES  (k + 1),
      .DEPTH  (DEPTH[k]),
      .BASE   (BASE[k]),
      .CODE_W (CODE_W)
    ) u_dict (
      .clk     (clk),
      .rst_n   (rst_n),
      .key     (key),
      .match   (hit),
      .code    (code[k]),
      .we      (dict_write[k]),
      .wdata   (key),
      .up      (),
      .up_wrap (up_wrap[k])
    );

    // A word only counts when the window holds all of its bytes.
    assign match[k]      = hit && (count >= 3'(k + 1));
    assign dict_write[k] = fire && (level == 2'(k - 1)) && (count >= 3'(k + 1));
  end

  pdlzw_priority_encoder #(.N(4), .CODE_W(CODE_W)) u_prio (
    .match      (match),
    .code       (code),
    .any        (any),
    .level      (level),
    .pdlzw_addr (sel_code)
  );

  assign consume      = fire ? 3'(level) + 3'd1 : 3'd0;
  assign dict_inhibit = fire && (level == 2'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      pdlzw_addr <= '0;
      out_nbytes <= '0;
    end else if (advance) begin
      out_valid <= fire;
      if (fire) begin
        pdlzw_addr <= sel_code;
        out_nbytes <= 3'(level) + 3'd1;
      end
    end
  end

  // A codeword is only produced from a non-empty window.
  assert property (@(posedge clk) disable iff (!rst_n) fire |-> any);

endmodule
