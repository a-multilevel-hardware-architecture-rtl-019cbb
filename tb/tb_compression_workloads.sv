// tb_compression_workloads: compresses generated stand-ins for the file
// classes the compressor is meant for (English-like text, executable-like
// binary, raster graphics) with the full-size compressor and prints the
// compression ratio of each (output bits / input bits).
//
// Each stream is checked two ways: every codeword against the reference
// models in tb_ref_pkg, and the whole output decoded back to the input bytes.
// The stand-ins are generated, not real files, so the ratios only show the
// trend (text and graphics compress, random-like code compresses less); the
// test fails if a stream is not reproduced exactly, if a ratio is out of the
// range 0.2..1.6, or if the rate falls below one codeword per cycle.
module tb_compression_workloads;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] src_byte [4];
  logic [2:0] src_avail, src_take, pdlzw_nbytes;
  logic src_end, out_valid, out_ready = 1;
  logic [11:0] out_code;
  logic [3:0] out_len;
  logic pdlzw_valid, dict_inhibit, swapped, at_top, range_err;
  logic [8:0] pdlzw_addr;
  logic [3:1] dict_write, up_wrap;
  logic [1:0] out_group;

  int checks = 0, failures = 0;
  byte unsigned data[$];
  int src_pos, n_out, out_bits, cyc, first_out;
  int expq[$];
  mlc_decoder dec;

  multilevel_compressor dut (
    .clk, .rst_n, .src_byte, .src_avail, .src_end, .src_take,
    .out_valid, .out_ready, .out_code, .out_len,
    .pdlzw_valid, .pdlzw_addr, .pdlzw_nbytes, .dict_write, .dict_inhibit, .up_wrap,
    .swapped, .at_top, .out_group, .range_err);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    int a;
    a = data.size() - src_pos;
    if (a > 4) a = 4;
    src_avail = 3'(a);
    src_end   = (src_pos + a == data.size());
    for (int i = 0; i < 4; i++) src_byte[i] = (i < a) ? data[src_pos + i] : 8'h00;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    src_pos <= src_pos + int'(src_take);
    if (out_valid && out_ready) begin
      int e;
      if (first_out < 0) first_out = cyc;
      e = expq.pop_front();
      n_out++;
      out_bits += int'(out_len);
      dec.push_code(int'(out_code), int'(out_len));
      checks++;
      if (int'(out_code) != (e & 16'hffff) || int'(out_len) != (e >> 16)) failures++;
    end
  end

  // English-like text: words from a small vocabulary, spaces, punctuation
  function automatic void gen_text(int n);
    string w [16] = '{"the", "of", "and", "to", "a", "in", "is", "that", "for", "it",
                      "data", "memory", "with", "as", "was", "on"};
    while (data.size() < n) begin
      string s = w[($urandom_range(0, 15) * $urandom_range(0, 15)) / 15];
      for (int i = 0; i < s.len(); i++) data.push_back(s[i]);
      data.push_back(($urandom_range(0, 11) == 0) ? 8'h2e : 8'h20);
    end
  endfunction

  // executable-like: 4-byte instruction words from a few opcodes with random
  // register fields, zero padding and random constants
  function automatic void gen_exe(int n);
    while (data.size() < n) begin
      case ($urandom_range(0, 5))
        0: repeat (8) data.push_back(8'h00);
        1: repeat (4) data.push_back(8'($urandom));
        default: begin
          data.push_back(8'(8'h8b + $urandom_range(0, 3)));
          data.push_back(8'(8'h40 | $urandom_range(0, 7)));
          data.push_back(8'h24);
          data.push_back(8'($urandom_range(0, 3) * 4));
        end
      endcase
    end
  endfunction

  // graphics-like: scan lines of runs from a 6-colour palette
  function automatic void gen_graphics(int n);
    while (data.size() < n) begin
      byte unsigned c = 8'($urandom_range(0, 5) * 40);
      repeat ($urandom_range(1, 24)) data.push_back(c);
    end
  endfunction

  task automatic run(string name, int kind, int n);
    pdlzw_model mp;
    ahat_model  ma;
    int pos, limit;
    real ratio;
    rst_n = 0;
    data.delete();
    case (kind)
      0: gen_text(n);
      1: gen_exe(n);
      default: gen_graphics(n);
    endcase
    mp = new(); ma = new(); dec = new();
    expq.delete();
    pos = 0;
    while (pos < data.size()) begin
      int code, nb, c, l;
      mp.step(data, pos, code, nb);
      pos += nb;
      l = ch_encode(ma.rank(code), c);
      expq.push_back((l << 16) | c);
    end
    src_pos = 0; n_out = 0; out_bits = 0; cyc = 0; first_out = -1;
    limit = expq.size();
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    while (n_out < limit && cyc < 4 * data.size()) @(posedge clk);
    dec.run();
    checks++;
    if (n_out != limit || dec.out.size() != data.size()) failures++;
    else begin
      int bad = 0;
      foreach (data[i]) if (dec.out[i] != data[i]) bad++;
      if (bad != 0) failures++;
    end
    // one codeword per cycle once the pipeline is full
    checks++;
    if (cyc - first_out + 1 != limit) failures++;
    ratio = real'(out_bits) / real'(8 * data.size());
    checks++;
    if (ratio < 0.2 || ratio > 1.6) failures++;
    $display("%-9s %6d bytes -> %6d codewords, %7d bits, ratio %0.3f, %0.2f bytes/cycle",
             name, data.size(), n_out, out_bits, ratio, real'(data.size()) / real'(cyc - first_out + 1));
  endtask

  initial begin
    run("text", 0, 20000);
    run("exe", 1, 20000);
    run("graphics", 2, 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
