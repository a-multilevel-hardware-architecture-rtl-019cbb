// tb_ahat_processor: streams PDLZW-like symbols (0..367, a few of them hot)
// through the AHAT processor and compares every codeword and length with the
// reference ordered list plus canonical code in tb_ref_pkg. A first burst with
// no gaps and no stalls checks the timing: two cycles from symbol to codeword,
// one codeword per cycle. Then random input gaps and output stalls are
// applied. All four code lengths, swaps and hits at the top are counted.
module tb_ahat_processor;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [8:0] pdlzw_addr = 0;
  logic [11:0] code;
  logic [3:0] len;
  logic [1:0] group;
  logic range_err, swapped, at_top;
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_swapped = 0, n_top = 0, n_stall = 0;
  int n_group [4];
  int in_time[$];
  int expq[$];
  int cyc = 0;
  ahat_model ref_m;

  ahat_processor dut (.clk, .rst_n, .in_valid, .in_ready, .pdlzw_addr, .out_valid, .out_ready,
                      .code, .len, .group, .range_err, .swapped, .at_top);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (swapped) n_swapped++;
    if (at_top) n_top++;
    if (out_valid && !out_ready) n_stall++;
    if (in_valid && in_ready) begin
      int c, l;
      l = ch_encode(ref_m.rank(int'(pdlzw_addr)), c);
      expq.push_back((l << 16) | c);
      in_time.push_back(cyc);
      n_in++;
    end
    if (out_valid && out_ready) begin
      int e, t;
      e = expq.pop_front();
      t = in_time.pop_front();
      n_out++;
      n_group[group]++;
      checks++;
      if (int'(code) != (e & 16'hffff) || int'(len) != (e >> 16) || range_err) begin
        failures++;
        if (failures < 10) $display("FAIL item %0d: %0d/%0d expected %0d/%0d", n_out, code, len, e & 16'hffff, e >> 16);
      end
      if (n_out <= 200) begin
        // burst phase: latency of exactly two cycles
        checks++;
        if (cyc - t != 2) begin failures++; $display("FAIL latency %0d", cyc - t); end
      end
    end
  end

  initial begin
    foreach (n_group[g]) n_group[g] = 0;
    ref_m = new();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // burst: 200 symbols back to back, always ready
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid = 1;
      pdlzw_addr = ($urandom_range(0, 1) != 0) ? 9'(200 + $urandom_range(0, 15)) : 9'($urandom_range(0, 367));
      checks++;
      if (!in_ready) begin failures++; $display("FAIL not ready during burst"); end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != 200) begin failures++; $display("FAIL burst produced %0d", n_out); end
    // random gaps and stalls
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid = ($urandom_range(0, 4) != 0);
        pdlzw_addr = ($urandom_range(0, 1) != 0) ? 9'(200 + $urandom_range(0, 15)) : 9'($urandom_range(0, 367));
      end
      out_ready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != n_in) begin failures++; $display("FAIL in %0d out %0d", n_in, n_out); end
    checks++;
    if (n_swapped != ref_m.n_swap || n_top != ref_m.n_top) begin failures++; $display("FAIL swap counts"); end
    for (int g = 0; g < 4; g++) begin
      checks++;
      if (n_group[g] == 0) begin failures++; $display("FAIL group %0d never used", g); end
    end
    checks++;
    if (n_top == 0 || n_stall == 0) begin failures++; $display("FAIL top %0d stall %0d", n_top, n_stall); end
    $display("codewords %0d, groups %0d %0d %0d %0d, swaps %0d, at top %0d, stalls %0d",
             n_out, n_group[0], n_group[1], n_group[2], n_group[3], n_swapped, n_top, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
