// tb_update_pointer: checks the FIFO update pointer of one dictionary.
// Drives random advance pulses into a 64-deep pointer (the size of
// dictionary 1) and compares ptr and wrap, cycle by cycle, with a modulo
// counter kept by the testbench. Also checks that ptr holds without advance
// and returns to 0 on reset.
module tb_update_pointer;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0, advance = 0;
  logic [5:0] ptr;
  logic wrap;
  int checks = 0, failures = 0, wraps = 0;
  int model = 0;

  update_pointer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .advance, .ptr, .wrap);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: ptr=%0d model=%0d", what, ptr, model); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ptr == 0, "reset value");
    for (int c = 0; c < 1000; c++) begin
      advance = ($urandom_range(0, 3) != 0);
      #1;
      check(wrap == (advance && model == DEPTH - 1), "wrap flag");
      if (wrap) wraps++;
      @(posedge clk);
      if (advance) model = (model + 1) % DEPTH;
      @(negedge clk);
      check(ptr == 6'(model), "pointer value");
    end
    check(wraps >= 5, "pointer wrapped several times");
    rst_n = 0; advance = 0;
    @(posedge clk); @(negedge clk);
    check(ptr == 0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
