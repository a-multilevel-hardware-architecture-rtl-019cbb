// tb_pdlzw_shift_register: checks the 4-byte input window. A byte source
// offers 0..4 bytes of a counted sequence; the test consumes 0..count bytes
// per cycle at random. The window must always show the oldest unconsumed
// bytes in order, count must match, and the source must be taken up only to
// the free room. Also checks that a full window refills 4 bytes in a cycle
// after consuming 4.
module tb_pdlzw_shift_register;
  logic clk = 0, rst_n = 0;
  logic [7:0] src_byte [4];
  logic [2:0] src_avail = 0, src_take, consume = 0, count;
  logic [7:0] win [4];
  int checks = 0, failures = 0;
  int next_src = 0;   // index of next byte the source offers
  int next_win = 0;   // index of the oldest byte that should be in the window
  int full_refills = 0;

  pdlzw_shift_register #(.WIDTH(4)) dut (.clk, .rst_n, .src_byte, .src_avail, .src_take,
                                         .consume, .win, .count);

  always #5 clk = ~clk;

  initial begin
    foreach (src_byte[i]) src_byte[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // check the window against the byte sequence
      checks++;
      if (int'(count) != next_src - next_win) begin
        failures++; $display("FAIL count=%0d expected %0d", count, next_src - next_win);
      end
      for (int i = 0; i < int'(count); i++) begin
        checks++;
        if (win[i] != 8'(next_win + i)) begin
          failures++; $display("FAIL win[%0d]=%0d expected %0d", i, win[i], 8'(next_win + i));
        end
      end
      consume   = 3'($urandom_range(0, int'(count)));
      src_avail = 3'($urandom_range(0, 4));
      if (c % 7 == 0) begin consume = count; src_avail = 4; end
      for (int i = 0; i < 4; i++) src_byte[i] = 8'(next_src + i);
      #1;
      checks++;
      if (int'(src_take) != (int'(src_avail) < 4 - (int'(count) - int'(consume)) ?
                             int'(src_avail) : 4 - (int'(count) - int'(consume)))) begin
        failures++; $display("FAIL take=%0d", src_take);
      end
      if (count == 4 && consume == 4 && src_take == 4) full_refills++;
      @(posedge clk);
      next_win += int'(consume);
      next_src += int'(src_take);
    end
    checks++;
    if (full_refills == 0) begin failures++; $display("FAIL no 4-byte refill seen"); end
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
