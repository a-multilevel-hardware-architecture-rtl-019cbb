// tb_pdlzw_processor: runs the PDLZW processor on generated text and compares
// every codeword and string length with the reference model in tb_ref_pkg.
//
// Input is drawn from a small alphabet with repeated phrases so that all four
// dictionaries hit, all update pointers wrap, and updates are inhibited after
// 4-byte matches. Phase 1 keeps the source full and the output ready and
// checks the rate: one codeword every cycle. Phase 2 makes the source offer
// 0..4 bytes and the output stall at random. The end of input with a partly
// filled window is exercised at the end of each phase (each phase is a fresh
// run after reset).
module tb_pdlzw_processor;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] src_byte [4];
  logic [2:0] src_avail, src_take, out_nbytes;
  logic src_end, out_valid, out_ready;
  logic [8:0] pdlzw_addr;
  logic [3:1] dict_write, up_wrap;
  logic dict_inhibit;
  int checks = 0, failures = 0;

  byte unsigned data[$];
  int src_pos, exp_pos, n_codes, n_cycles_busy, n_stall;
  int n_level [4];
  int n_write [4];
  int n_wrap  [4];
  int n_inhibit;
  bit random_mode;
  pdlzw_model ref_m;

  pdlzw_processor dut (.clk, .rst_n, .src_byte, .src_avail, .src_end, .src_take,
                       .out_valid, .out_ready, .pdlzw_addr, .out_nbytes,
                       .dict_write, .dict_inhibit, .up_wrap);

  always #5 clk = ~clk;

  function automatic void make_data(int n);
    string phrases [6] = '{"the ", "then ", "abab", "xyzzy ", "aaaa", "compress "};
    data.delete();
    while (data.size() < n) begin
      if ($urandom_range(0, 3) == 0) data.push_back(8'($urandom_range(97, 104)));
      else begin
        string p = phrases[$urandom_range(0, 5)];
        for (int i = 0; i < p.len(); i++) data.push_back(p[i]);
      end
    end
    while (data.size() > n) void'(data.pop_back());
  endfunction

  // source model: offers up to 4 bytes from data[src_pos], updated after
  // each clock edge
  always @(negedge clk) begin
    int a;
    a = data.size() - src_pos;
    if (a > 4) a = 4;
    if (random_mode && a > 0) a = $urandom_range(0, a);
    src_avail = 3'(a);
    src_end   = (src_pos + a == data.size());
    for (int i = 0; i < 4; i++) src_byte[i] = (i < a) ? data[src_pos + i] : 8'h00;
  end

  always @(posedge clk) if (rst_n) begin
    src_pos <= src_pos + int'(src_take);
    for (int k = 1; k < 4; k++) begin
      if (dict_write[k]) n_write[k]++;
      if (up_wrap[k]) n_wrap[k]++;
    end
    if (dict_inhibit) n_inhibit++;
    if (out_valid && !out_ready) n_stall++;
    if (out_valid && out_ready) begin
      int code, nb;
      ref_m.step(data, exp_pos, code, nb);
      exp_pos += nb;
      n_codes++;
      n_level[nb-1]++;
      checks++;
      if (int'(pdlzw_addr) != code || int'(out_nbytes) != nb) begin
        failures++;
        if (failures < 10)
          $display("FAIL code %0d: got %0d/%0d expected %0d/%0d", n_codes, pdlzw_addr, out_nbytes, code, nb);
      end
    end
    if (random_mode) out_ready <= ($urandom_range(0, 2) != 0);
  end

  task automatic run(int n, bit rnd);
    int cyc = 0;
    rst_n = 0; random_mode = rnd; out_ready = 1;
    make_data(n);
    ref_m = new();
    src_pos = 0; exp_pos = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // wait for the first codeword, then count cycles to the last
    while (!out_valid) @(posedge clk);
    while (exp_pos < data.size() && cyc < 20 * n) begin
      @(posedge clk); cyc++;
    end
    checks++;
    if (exp_pos != data.size()) begin failures++; $display("FAIL run did not finish"); end
    if (!rnd) begin
      // full source, no stalls: one codeword per clock cycle
      checks++;
      if (cyc != ref_m.n_level[0] + ref_m.n_level[1] + ref_m.n_level[2] + ref_m.n_level[3]) begin
        failures++; $display("FAIL rate: %0d cycles for %0d codewords", cyc,
          ref_m.n_level[0] + ref_m.n_level[1] + ref_m.n_level[2] + ref_m.n_level[3]);
      end
    end
    // the RTL's writes, wraps and inhibits equal the model's
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (n_write[k] != ref_m.n_write[k] || n_wrap[k] != ref_m.n_wrap[k]) begin
        failures++; $display("FAIL dict %0d writes %0d/%0d wraps %0d/%0d", k, n_write[k],
                             ref_m.n_write[k], n_wrap[k], ref_m.n_wrap[k]);
      end
    end
    checks++;
    if (n_inhibit != ref_m.n_inhibit) begin failures++; $display("FAIL inhibit count"); end
    $display("run n=%0d random=%0d: levels %0d %0d %0d %0d, wraps %0d %0d %0d, inhibited %0d, stalls %0d",
             n, rnd, ref_m.n_level[0], ref_m.n_level[1], ref_m.n_level[2], ref_m.n_level[3],
             n_wrap[1], n_wrap[2], n_wrap[3], n_inhibit, n_stall);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (ref_m.n_level[k] == 0) begin failures++; $display("FAIL no %0d-byte match", k + 1); end
      if (k > 0) begin
        checks++;
        if (n_wrap[k] == 0) begin failures++; $display("FAIL pointer %0d never wrapped", k); end
      end
      n_write[k] = 0; n_wrap[k] = 0;
    end
    checks++;
    if (n_inhibit == 0) begin failures++; $display("FAIL no inhibited update"); end
    n_inhibit = 0;
  endtask

  initial begin
    n_codes = 0; n_stall = 0; n_inhibit = 0;
    foreach (n_write[k]) begin n_write[k] = 0; n_wrap[k] = 0; n_level[k] = 0; end
    run(3001, 0);
    run(4002, 1);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL no output stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
