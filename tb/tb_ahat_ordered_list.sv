// tb_ahat_ordered_list: checks the 368 x 9-bit ordered list. After reset
// every symbol s must be found at rank s. Then random neighbour swaps are
// applied and, after each, random symbols are searched and their ranks
// compared with a copy of the list kept by the testbench; a full scan of
// all 368 symbols closes the test.
module tb_ahat_ordered_list;
  localparam int N = 368;
  logic clk = 0, rst_n = 0;
  logic [8:0] key = 0, index, swap_idx = 1;
  logic hit, swap_en = 0;
  int checks = 0, failures = 0;
  int model [N];

  ahat_ordered_list #(.N(N), .W(9)) dut (.clk, .rst_n, .key, .hit, .index, .swap_en, .swap_idx);

  always #5 clk = ~clk;

  task automatic search(int s);
    int exp = -1;
    key = 9'(s); #1;
    for (int i = 0; i < N; i++) if (model[i] == s) exp = i;
    checks++;
    if (!hit || int'(index) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL sym %0d: hit=%b index=%0d expected %0d", s, hit, index, exp);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = i;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int s = 0; s < N; s++) search(s);
    for (int n = 0; n < 2000; n++) begin
      int i;
      @(negedge clk);
      // favour the top of the list so that symbols move over long distances
      i = ($urandom_range(0, 1) == 0) ? $urandom_range(1, 20) : $urandom_range(1, N - 1);
      swap_en = 1; swap_idx = 9'(i);
      @(posedge clk); #1;
      swap_en = 0;
      begin int t; t = model[i]; model[i] = model[i-1]; model[i-1] = t; end
      search(model[i]); search(model[i-1]);
      search($urandom_range(0, N - 1));
    end
    for (int s = 0; s < N; s++) search(s);
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
