// tb_ahat_swap_unit: checks the swap unit against a behavioural ordered list
// kept in the testbench (search returns the rank of the key; a swap request
// exchanges ranks n and n-1 at the clock edge). Symbols with a skewed
// distribution stream in with random gaps and random output stalls; each
// ahat_addr must equal the rank given by a second, independent list model,
// and every symbol found below the top must be moved up by one.
module tb_ahat_swap_unit;
  import tb_ref_pkg::*;
  localparam int N = 368;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 1;
  logic [8:0] in_sym = 0, ahat_addr, list_key, list_index, swap_idx;
  logic list_hit, swap_en, swapped, at_top;
  int checks = 0, failures = 0, n_in = 0, n_out = 0, n_swapped = 0, n_top = 0, n_stall = 0;
  int lst [N];
  int expq[$];
  ahat_model ref_m;

  ahat_swap_unit #(.N(N), .W(9)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_sym,
    .out_valid, .out_ready, .ahat_addr, .list_key, .list_hit, .list_index,
    .swap_en, .swap_idx, .swapped, .at_top);

  // behavioural ordered list
  always_comb begin
    list_hit = 0; list_index = 0;
    for (int i = N - 1; i >= 0; i--)
      if (lst[i] == int'(list_key)) begin list_hit = 1; list_index = 9'(i); end
  end
  always @(posedge clk)
    if (swap_en) begin
      int t;
      t = lst[swap_idx]; lst[swap_idx] = lst[swap_idx - 1]; lst[swap_idx - 1] = t;
    end

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (swapped) n_swapped++;
    if (at_top) n_top++;
    if (out_valid && !out_ready) n_stall++;
    if (in_valid && in_ready) begin
      expq.push_back(ref_m.rank(int'(in_sym)));
      n_in++;
    end
    if (out_valid && out_ready) begin
      int e;
      e = expq.pop_front();
      n_out++;
      checks++;
      if (int'(ahat_addr) != e) begin
        failures++;
        if (failures < 10) $display("FAIL item %0d: ahat_addr=%0d expected %0d", n_out, ahat_addr, e);
      end
    end
  end

  initial begin
    foreach (lst[i]) lst[i] = i;
    ref_m = new();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (!(in_valid && !in_ready)) begin
        in_valid = ($urandom_range(0, 4) != 0);
        // skewed: a few hot symbols, the rest uniform
        in_sym = ($urandom_range(0, 2) != 0) ? 9'(120 + $urandom_range(0, 7)) : 9'($urandom_range(0, N - 1));
      end
      out_ready = ($urandom_range(0, 3) != 0);
    end
    @(negedge clk); in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != n_in || n_out < 1000) begin failures++; $display("FAIL in %0d out %0d", n_in, n_out); end
    checks++;
    if (n_swapped != ref_m.n_swap || n_top != ref_m.n_top || n_top == 0 || n_stall == 0) begin
      failures++; $display("FAIL swaps %0d/%0d top %0d/%0d stalls %0d", n_swapped, ref_m.n_swap, n_top, ref_m.n_top, n_stall);
    end
    // the hot symbols have bubbled to the top
    checks++;
    if (lst[0] < 120 || lst[0] > 127) begin failures++; $display("FAIL top of list is %0d", lst[0]); end
    $display("swaps %0d, found at top %0d, stalls %0d", n_swapped, n_top, n_stall);
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
