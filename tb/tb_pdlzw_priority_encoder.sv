// tb_pdlzw_priority_encoder: applies every match pattern of the four
// dictionaries (with dictionary 0 both on and off) with random codewords and
// checks that the highest-numbered matching dictionary wins.
module tb_pdlzw_priority_encoder;
  logic [3:0] match;
  logic [8:0] code [4];
  logic any;
  logic [1:0] level;
  logic [8:0] pdlzw_addr;
  int checks = 0, failures = 0;

  pdlzw_priority_encoder #(.N(4), .CODE_W(9)) dut (.match, .code, .any, .level, .pdlzw_addr);

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int m = 0; m < 16; m++) begin
        int exp_level;
        exp_level = -1;
        match = 4'(m);
        foreach (code[k]) code[k] = 9'($urandom);
        for (int k = 0; k < 4; k++) if (m[k]) exp_level = k;
        #1;
        checks++;
        if (any != (exp_level >= 0) ||
            (exp_level >= 0 && (level != 2'(exp_level) || pdlzw_addr != code[exp_level]))) begin
          failures++;
          $display("FAIL match=%b any=%b level=%0d addr=%0d", match, any, level, pdlzw_addr);
        end
      end
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
