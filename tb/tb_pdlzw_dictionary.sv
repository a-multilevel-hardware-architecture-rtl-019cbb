// tb_pdlzw_dictionary: checks one CAM dictionary (dictionary 1: 64 words of
// 2 bytes, codewords 256..319). Writes random 2-byte words in FIFO order,
// keeps a copy of the expected contents, and after every write searches
// for a random mix of stored and absent keys, checking match and codeword
// (base + address of the word). Overwriting the oldest word after the
// pointer wraps is checked too: the evicted word must stop matching.
module tb_pdlzw_dictionary;
  localparam int DEPTH = 64, BASE = 256;
  logic clk = 0, rst_n = 0;
  logic [15:0] key = 0, wdata = 0;
  logic match, we = 0, up_wrap;
  logic [8:0] code;
  logic [5:0] up;
  int checks = 0, failures = 0;
  bit [15:0] mem [DEPTH];
  bit        val [DEPTH];
  int        wp = 0;

  pdlzw_dictionary #(.BYTES(2), .DEPTH(DEPTH), .BASE(BASE), .CODE_W(9)) dut (
    .clk, .rst_n, .key, .match, .code, .we, .wdata, .up, .up_wrap);

  always #5 clk = ~clk;

  function automatic int lookup(bit [15:0] k);
    for (int i = 0; i < DEPTH; i++) if (val[i] && mem[i] == k) return i;
    return -1;
  endfunction

  task automatic search(bit [15:0] k);
    int exp;
    key = k; #1;
    exp = lookup(k);
    checks++;
    if ((exp >= 0) != match || (exp >= 0 && code != 9'(BASE + exp))) begin
      failures++;
      $display("FAIL key=%h match=%b code=%0d expected %0d", k, match, code, exp);
    end
  endtask

  initial begin
    foreach (val[i]) val[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    search(16'h0000);            // empty dictionary never matches
    search(16'h4142);
    for (int n = 0; n < 200; n++) begin
      bit [15:0] w, evicted;
      bit        had_word;
      // draw words from a small set so that some are written twice over time
      do w = {8'($urandom_range(65, 80)), 8'($urandom_range(65, 80))}; while (lookup(w) >= 0);
      had_word = val[wp];
      evicted  = mem[wp];
      @(negedge clk);
      we = 1; wdata = w;
      checks++;
      if (up != 6'(wp)) begin failures++; $display("FAIL up=%0d expected %0d", up, wp); end
      @(posedge clk); #1;
      we = 0;
      mem[wp] = w; val[wp] = 1; wp = (wp + 1) % DEPTH;
      search(w);
      // the oldest word, just replaced, no longer matches
      if (had_word) search(evicted);
      for (int s = 0; s < 4; s++)
        search({8'($urandom_range(65, 80)), 8'($urandom_range(65, 80))});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
