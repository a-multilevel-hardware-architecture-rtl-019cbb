// tb_ref_pkg: software reference models used by the testbenches.
//
// pdlzw_model  - parallel-dictionary LZW on a byte array: dictionaries of
//                {256, 64, 32, 16} words, longest match, FIFO update of the
//                next dictionary with the match plus the following byte.
// ahat_model   - ordered list of 368 symbols with transposition (the used
//                symbol trades places with the one above it).
// mlc_decoder  - the inverse of the whole compressor, used to prove that
//                the output stream is lossless: canonical Huffman decode,
//                inverse transposition list, PDLZW dictionary rebuild.
// ch_encode    - canonical Huffman code written out from the published table
//                (lengths 6/7/9/12, first codewords 29/45/20/0, group starts
//                0/35/48/208), independent of the RTL's computed constants.
// The models are written from the algorithm description, not from the RTL.
package tb_ref_pkg;

  localparam int NSYM = 368;

  class pdlzw_model;
    int          depth [4];
    int          base  [4];
    bit [31:0]   word  [4][256];
    bit          valid [4][256];
    int          up    [4];
    // statistics
    int          n_level  [4];
    int          n_write  [4];
    int          n_wrap   [4];
    int          n_inhibit;

    function new(int d1 = 64, int d2 = 32, int d3 = 16);
      depth = '{256, d1, d2, d3};
      base  = '{0, 256, 256 + d1, 256 + d1 + d2};
      foreach (up[k]) begin
        up[k] = 0; n_level[k] = 0; n_write[k] = 0; n_wrap[k] = 0;
      end
      n_inhibit = 0;
      foreach (valid[k, i]) valid[k][i] = 0;
    endfunction

    static function bit [31:0] key_of(ref byte unsigned data[$], input int pos, input int len);
      bit [31:0] key = 0;
      for (int b = 0; b < len; b++) key = (key << 8) | 32'(data[pos + b]);
      return key;
    endfunction

    // Code the string starting at data[pos]; returns its codeword and length.
    function void step(ref byte unsigned data[$], input int pos, output int code, output int nbytes);
      int avail = data.size() - pos;
      int level = 0;
      if (avail > 4) avail = 4;
      code = int'(data[pos]);
      for (int k = 1; k < 4; k++) begin
        if (k + 1 <= avail) begin
          bit [31:0] key = key_of(data, pos, k + 1);
          for (int i = 0; i < depth[k]; i++)
            if (valid[k][i] && word[k][i] == key) begin
              level = k; code = base[k] + i; break;
            end
        end
      end
      n_level[level]++;
      if (level + 1 <= 3) begin
        if (level + 2 <= avail) begin
          int k = level + 1;
          word[k][up[k]]  = key_of(data, pos, k + 1);
          valid[k][up[k]] = 1;
          n_write[k]++;
          if (up[k] == depth[k] - 1) begin up[k] = 0; n_wrap[k]++; end
          else up[k]++;
        end
      end else begin
        n_inhibit++;
      end
      nbytes = level + 1;
    endfunction
  endclass

  class ahat_model;
    int list [NSYM];
    int n_swap, n_top;
    function new();
      foreach (list[i]) list[i] = i;
      n_swap = 0; n_top = 0;
    endfunction
    function int rank(int sym);
      for (int i = 0; i < NSYM; i++)
        if (list[i] == sym) begin
          if (i > 0) begin
            list[i] = list[i-1]; list[i-1] = sym; n_swap++;
          end else n_top++;
          return i;
        end
      return -1;
    endfunction
  endclass

  // Canonical Huffman code of a rank: returns the length, code in 'code'.
  function automatic int ch_encode(input int r, output int code);
    int start [4] = '{0, 35, 48, 208};
    int first [4] = '{29, 45, 20, 0};
    int len   [4] = '{6, 7, 9, 12};
    int g = (r >= 208) ? 3 : (r >= 48) ? 2 : (r >= 35) ? 1 : 0;
    code = r - start[g] + first[g];
    return len[g];
  endfunction

  class mlc_decoder;
    // bit stream
    bit          bits[$];
    // AHAT
    int          list [NSYM];
    // PDLZW
    int          depth [4];
    int          base  [4];
    byte unsigned word [4][256][$];
    int          up    [4];
    byte unsigned prev[$];
    int          prev_level;
    byte unsigned out[$];

    function new(int d1 = 64, int d2 = 32, int d3 = 16);
      foreach (list[i]) list[i] = i;
      depth = '{256, d1, d2, d3};
      base  = '{0, 256, 256 + d1, 256 + d1 + d2};
      foreach (up[k]) up[k] = 0;
      prev_level = -1;
    endfunction

    function void push_code(int code, int len);
      for (int b = len - 1; b >= 0; b--) bits.push_back(code[b]);
    endfunction

    // Decode as many whole codewords as the buffered bits hold.
    function void run();
      int first [4] = '{29, 45, 20, 0};
      int count [4] = '{35, 13, 160, 160};
      int start [4] = '{0, 35, 48, 208};
      int lens  [4] = '{6, 7, 9, 12};
      forever begin
        int rank = -1, v = 0, used = 0;
        for (int g = 0; g < 4 && rank < 0; g++) begin
          if (bits.size() < lens[g]) return;
          while (used < lens[g]) begin v = (v << 1) | int'(bits[used]); used++; end
          if (v >= first[g] && v < first[g] + count[g]) rank = start[g] + v - first[g];
        end
        if (rank < 0) begin $display("decoder: invalid codeword"); return; end
        for (int i = 0; i < used; i++) void'(bits.pop_front());
        symbol(rank_to_symbol(rank));
      end
    endfunction

    function int rank_to_symbol(int r);
      int s = list[r];
      if (r > 0) begin list[r] = list[r-1]; list[r-1] = s; end
      return s;
    endfunction

    function void symbol(int s);
      int level = 0, addr = 0;
      byte unsigned str[$];
      for (int k = 3; k >= 0; k--) if (s >= base[k]) begin level = k; addr = s - base[k]; break; end
      if (level == 0) str.push_back(byte'(s));
      else if (prev_level + 1 == level && addr == up[level])
        // the word the encoder wrote just before coding this string
        begin str = prev; str.push_back(prev[0]); end
      else str = word[level][addr];
      // complete the previous string's dictionary update
      if (prev_level >= 0 && prev_level + 1 <= 3) begin
        int k = prev_level + 1;
        word[k][up[k]] = prev;
        word[k][up[k]].push_back(str[0]);
        up[k] = (up[k] + 1) % depth[k];
      end
      foreach (str[i]) out.push_back(str[i]);
      prev = str;
      prev_level = level;
    endfunction
  endclass

endpackage
