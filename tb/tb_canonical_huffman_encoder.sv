// tb_canonical_huffman_encoder: feeds every rank 0..367 (then random ranks
// with output stalls) through the encoder and checks code and length against
// the table written out in tb_ref_pkg. Also checks, from the outputs alone,
// that the code is a complete prefix code (no codeword is a prefix of
// another and the Kraft sum is exactly 1), that ranks in one group get
// consecutive codewords, and that one codeword leaves per cycle with a
// one-cycle latency.
module tb_canonical_huffman_encoder;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1, range_err;
  logic [8:0] ahat_addr = 0;
  logic [11:0] code;
  logic [3:0] len;
  logic [1:0] group;
  int checks = 0, failures = 0;
  int got_code [368];
  int got_len  [368];
  int n_group  [4];
  int expq[$];

  canonical_huffman_encoder dut (.clk, .rst_n, .in_valid, .in_ready, .ahat_addr,
    .out_valid, .out_ready, .code, .len, .group, .range_err);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) expq.push_back(int'(ahat_addr));
    if (out_valid && out_ready) begin
      int r, ec, el;
      r = expq.pop_front();
      el = ch_encode(r, ec);
      got_code[r] = int'(code); got_len[r] = int'(len);
      n_group[group]++;
      checks++;
      if (int'(code) != ec || int'(len) != el || range_err) begin
        failures++;
        if (failures < 10) $display("FAIL rank %0d: %0d/%0d expected %0d/%0d", r, code, len, ec, el);
      end
    end
  end

  initial begin
    real kraft;
    int t0;
    foreach (n_group[g]) n_group[g] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // every rank, back to back
    @(negedge clk);
    for (int r = 0; r < 368; r++) begin
      in_valid = 1; ahat_addr = 9'(r);
      @(posedge clk);
      if (r == 0) t0 = $time;
      #1;
      // latency 1: the rank just accepted is on the output after this edge
      checks++;
      if (!out_valid) begin failures++; $display("FAIL no output one cycle after rank %0d", r); end
      @(negedge clk);
    end
    in_valid = 0;
    @(negedge clk);
    // the published worked example: rank 38 lies in the second group
    checks++;
    if (got_len[38] != 7 || got_code[38] != 48) begin failures++; $display("FAIL rank 38"); end
    // group sizes and consecutive codes
    checks++;
    if (n_group[0] != 35 || n_group[1] != 13 || n_group[2] != 160 || n_group[3] != 160) begin
      failures++; $display("FAIL group sizes %0d %0d %0d %0d", n_group[0], n_group[1], n_group[2], n_group[3]);
    end
    for (int r = 1; r < 368; r++) if (got_len[r] == got_len[r-1]) begin
      checks++;
      if (got_code[r] != got_code[r-1] + 1) begin failures++; $display("FAIL not consecutive at %0d", r); end
    end
    // prefix-free and complete
    kraft = 0.0;
    for (int a = 0; a < 368; a++) begin
      kraft += 1.0 / real'(1 << got_len[a]);
      for (int b = 0; b < 368; b++) if (a != b && got_len[a] <= got_len[b]) begin
        if ((got_code[b] >> (got_len[b] - got_len[a])) == got_code[a]) begin
          failures++; $display("FAIL code of %0d is a prefix of %0d", a, b);
        end
      end
    end
    checks++;
    if (kraft != 1.0) begin failures++; $display("FAIL Kraft sum %f", kraft); end
    // random ranks with output stalls
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid = ($urandom_range(0, 3) != 0);
        ahat_addr = 9'($urandom_range(0, 367));
      end
      out_ready = ($urandom_range(0, 2) != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d ranks lost", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
