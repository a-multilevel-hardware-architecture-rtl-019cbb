// tb_multilevel_compressor: end-to-end test of the two-level compressor at its
// full default size (dictionaries {256, 64, 32, 16}, 368-entry ordered list).
//
// Generated input (text made of recurring phrases mixed with random letters,
// then a stretch of random binary bytes) is compressed in three runs, each
// after a reset:
//   1. source always full, output always ready: checks that the first
//      codeword appears three clock edges after the window is first filled
//      and that one codeword follows every cycle;
//   2. the source offers 0..4 bytes at random and the output stalls at random;
//   3. a short input (5 bytes) that ends with a partly filled window.
// Every codeword is compared with the reference models in tb_ref_pkg (PDLZW,
// then ordered list, then canonical code). Independently of those models the
// output stream is decoded back into bytes, which must equal the input. The
// testbench counts each mechanism of the design and fails if one never
// happens: matches of 1, 2, 3 and 4 bytes, writes into dictionaries 1..3,
// update-pointer wrap of each, inhibited updates, ordered-list swaps and hits
// at the top, all four codeword lengths, output stalls, source starvation and
// the end-of-input flush. It prints the compression ratio of each run
// (output bits / input bits).
module tb_multilevel_compressor;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] src_byte [4];
  logic [2:0] src_avail, src_take, pdlzw_nbytes;
  logic src_end, out_valid, out_ready;
  logic [11:0] out_code;
  logic [3:0] out_len;
  logic pdlzw_valid, dict_inhibit, swapped, at_top, range_err;
  logic [8:0] pdlzw_addr;
  logic [3:1] dict_write, up_wrap;
  logic [1:0] out_group;

  int checks = 0, failures = 0;
  byte unsigned data[$];
  int src_pos, n_out, out_bits, cyc, first_take_cyc, first_out_cyc;
  bit random_mode;
  // mechanism counters
  int n_level [4];
  int n_write [4];
  int n_wrap  [4];
  int n_group [4];
  int n_inhibit = 0, n_swap = 0, n_top = 0, n_stall = 0, n_starve = 0, n_flush = 0;

  pdlzw_model  m_pdlzw;
  ahat_model   m_ahat;
  mlc_decoder  dec;
  int expq[$];

  multilevel_compressor dut (
    .clk, .rst_n, .src_byte, .src_avail, .src_end, .src_take,
    .out_valid, .out_ready, .out_code, .out_len,
    .pdlzw_valid, .pdlzw_addr, .pdlzw_nbytes, .dict_write, .dict_inhibit, .up_wrap,
    .swapped, .at_top, .out_group, .range_err);

  always #5 clk = ~clk;

  function automatic void make_data(int n_text, int n_bin);
    string phrases [8] = '{"the ", "then ", "data ", "compression ", "abab", "hardware ",
                           "dictionary ", "0000"};
    data.delete();
    while (data.size() < n_text && n_text < 16) data.push_back(8'($urandom_range(97, 99)));
    while (data.size() < n_text) begin
      if ($urandom_range(0, 2) == 0) data.push_back(8'($urandom_range(97, 122)));
      else begin
        string p = phrases[$urandom_range(0, 7)];
        for (int i = 0; i < p.len(); i++) data.push_back(p[i]);
      end
    end
    for (int i = 0; i < n_bin; i++) data.push_back(8'($urandom));
  endfunction

  // byte source, updated after each clock edge
  always @(negedge clk) begin
    int a;
    a = data.size() - src_pos;
    if (a > 4) a = 4;
    if (random_mode && a > 0) a = $urandom_range(0, a);
    src_avail = 3'(a);
    src_end   = (src_pos + a == data.size());
    for (int i = 0; i < 4; i++) src_byte[i] = (i < a) ? data[src_pos + i] : 8'h00;
    if (random_mode) out_ready = ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (src_take != 0 && first_take_cyc < 0) first_take_cyc = cyc;
    src_pos <= src_pos + int'(src_take);
    // window not full while more input is still to come
    if (first_take_cyc >= 0 && dut.u_pdlzw.count < 4 && !src_end) n_starve++;
    // a string coded from a partly filled window at the end of the input
    if (dut.u_pdlzw.fire && dut.u_pdlzw.count < 4) n_flush++;
    for (int k = 1; k < 4; k++) begin
      if (dict_write[k]) n_write[k]++;
      if (up_wrap[k]) n_wrap[k]++;
    end
    if (dict_inhibit) n_inhibit++;
    if (swapped) n_swap++;
    if (at_top) n_top++;
    if (out_valid && !out_ready) n_stall++;
    if (pdlzw_valid && dut.u_ahat.in_ready) n_level[pdlzw_nbytes - 1]++;
    if (out_valid && out_ready) begin
      int e;
      if (first_out_cyc < 0) first_out_cyc = cyc;
      e = expq.pop_front();
      n_out++;
      n_group[out_group]++;
      out_bits += int'(out_len);
      dec.push_code(int'(out_code), int'(out_len));
      checks++;
      if (int'(out_code) != (e & 16'hffff) || int'(out_len) != (e >> 16) || range_err) begin
        failures++;
        if (failures < 10) $display("FAIL codeword %0d: %0d/%0d expected %0d/%0d", n_out,
                                    out_code, out_len, e & 16'hffff, e >> 16);
      end
    end
  end

  // expected codewords from the reference models
  task automatic build_expected();
    int pos = 0;
    expq.delete();
    while (pos < data.size()) begin
      int code, nb, c, l;
      m_pdlzw.step(data, pos, code, nb);
      pos += nb;
      l = ch_encode(m_ahat.rank(code), c);
      expq.push_back((l << 16) | c);
    end
  endtask

  task automatic run(int n_text, int n_bin, bit rnd);
    int n_exp, limit;
    rst_n = 0; random_mode = rnd; out_ready = 1;
    make_data(n_text, n_bin);
    m_pdlzw = new(); m_ahat = new(); dec = new();
    build_expected();
    n_exp = expq.size();
    src_pos = 0; n_out = 0; out_bits = 0; cyc = 0; first_take_cyc = -1; first_out_cyc = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    limit = 20 * data.size() + 100;
    while (n_out < n_exp && cyc < limit) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != n_exp || expq.size() != 0) begin
      failures++; $display("FAIL run ended with %0d of %0d codewords", n_out, n_exp);
    end
    if (!rnd) begin
      // out_valid rises at the third edge after the edge that fills the
      // window; the first handshake is sampled at the edge after that
      checks++;
      if (first_out_cyc - first_take_cyc != 4) begin
        failures++; $display("FAIL latency %0d cycles", first_out_cyc - first_take_cyc);
      end
      // source full and no stalls: one codeword per cycle after the first
      checks++;
      if (cyc - 3 - first_out_cyc != n_exp - 1) begin
        failures++; $display("FAIL rate: %0d codewords in %0d cycles", n_exp, cyc - 3 - first_out_cyc + 1);
      end
    end
    // lossless: decode the stream and compare with the input
    dec.run();
    checks++;
    if (dec.out.size() != data.size()) begin
      failures++; $display("FAIL decoded %0d bytes of %0d", dec.out.size(), data.size());
    end else begin
      int bad = 0;
      foreach (data[i]) if (dec.out[i] != data[i]) bad++;
      if (bad != 0) begin failures++; $display("FAIL %0d decoded bytes differ", bad); end
    end
    $display("run %0d bytes (random=%0d): %0d codewords, %0d bits, ratio %0.3f",
             data.size(), rnd, n_out, out_bits, real'(out_bits) / real'(8 * data.size()));
  endtask

  initial begin
    foreach (n_level[k]) begin n_level[k] = 0; n_write[k] = 0; n_wrap[k] = 0; n_group[k] = 0; end
    run(6000, 2000, 0);
    run(6000, 2000, 1);
    run(5, 0, 0);
    $display("matches by length: %0d %0d %0d %0d", n_level[0], n_level[1], n_level[2], n_level[3]);
    $display("dictionary writes %0d %0d %0d, pointer wraps %0d %0d %0d, inhibited %0d",
             n_write[1], n_write[2], n_write[3], n_wrap[1], n_wrap[2], n_wrap[3], n_inhibit);
    $display("swaps %0d, at top %0d, codeword lengths 6/7/9/12: %0d %0d %0d %0d",
             n_swap, n_top, n_group[0], n_group[1], n_group[2], n_group[3]);
    $display("output stalls %0d, source starved %0d, end-of-input flushes %0d", n_stall, n_starve, n_flush);
    for (int k = 0; k < 4; k++) begin
      checks++; if (n_level[k] == 0) begin failures++; $display("FAIL no %0d-byte match", k + 1); end
      checks++; if (n_group[k] == 0) begin failures++; $display("FAIL codeword group %0d unused", k); end
      if (k > 0) begin
        checks++; if (n_write[k] == 0) begin failures++; $display("FAIL dictionary %0d never written", k); end
        checks++; if (n_wrap[k] == 0) begin failures++; $display("FAIL pointer %0d never wrapped", k); end
      end
    end
    checks++; if (n_inhibit == 0) begin failures++; $display("FAIL no inhibited update"); end
    checks++; if (n_swap == 0 || n_top == 0) begin failures++; $display("FAIL no swap / top hit"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no output stall"); end
    checks++; if (n_starve == 0) begin failures++; $display("FAIL source never starved"); end
    checks++; if (n_flush == 0) begin failures++; $display("FAIL no end-of-input flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
