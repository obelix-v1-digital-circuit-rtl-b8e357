// tb_ref_pkg: reference models used by the testbenches.
//
// Encoding of command words (RD53B symbol tables, written as value-to-symbol
// lists, the inverse of the decoder's tables), and an 8b/10b decoder that
// recovers a byte from a 10-bit symbol by searching all 512 (byte, k)
// candidates of an independent encoder written from the code's definition
// of the 5b/6b and 3b/4b sub-blocks for either disparity.
package tb_ref_pkg;

  function automatic logic [7:0] dsym(input int v);
    logic [7:0] t [32] = '{8'h6A, 8'h6C, 8'h71, 8'h72, 8'h74, 8'h8B, 8'h8D, 8'h8E,
                           8'h93, 8'h95, 8'h96, 8'h99, 8'h9A, 8'h9C, 8'hA3, 8'hA5,
                           8'hA6, 8'hA9, 8'h59, 8'hAC, 8'hB1, 8'hB2, 8'hB4, 8'hC3,
                           8'hC5, 8'hC6, 8'hC9, 8'hCA, 8'hCC, 8'hD1, 8'hD2, 8'hD4};
    return t[v & 31];
  endfunction

  function automatic logic [7:0] tsym(input int pat);
    logic [7:0] t [16] = '{8'h00, 8'h2B, 8'h2D, 8'h2E, 8'h33, 8'h35, 8'h36, 8'h39,
                           8'h3A, 8'h3C, 8'h4B, 8'h4D, 8'h4E, 8'h53, 8'h55, 8'h56};
    return t[pat & 15];
  endfunction

  // Reference 6b and 4b sub-blocks for RD- in transmission order
  // (string index 0 = first bit on the line).
  function automatic string ref6(input int x, input bit k);
    string t [32] = '{"100111","011101","101101","110001","110101","101001","011001","111000",
                      "111001","100101","010101","110100","001101","101100","011100","010111",
                      "011011","100011","010011","110010","001011","101010","011010","111010",
                      "110011","100110","010110","110110","001110","101110","011110","101011"};
    if (k) return "001111";
    return t[x];
  endfunction

  function automatic int ones(input string s);
    int n = 0;
    foreach (s[i]) if (s[i] == "1") n++;
    return n;
  endfunction

  function automatic string inv(input string s);
    string r = s;
    foreach (s[i]) r[i] = (s[i] == "1") ? "0" : "1";
    return r;
  endfunction

  // returns the 10 line bits as string; rd is updated
  function automatic string ref_enc(input logic [7:0] b, input bit k, inout bit rd);
    string s6, s4;
    int x, y;
    x = b[4:0];
    y = b[7:5];
    s6 = ref6(x, k);
    if (rd && (ones(s6) != 3 || x == 7)) s6 = inv(s6);
    if (ones(s6) != 3) rd = (ones(s6) > 3);
    if (k) begin
      string kt [8] = '{"1011","0110","1010","1100","1101","0101","1001","0111"};
      s4 = kt[y];
      if (rd) s4 = inv(s4);
    end else begin
      string dt [8] = '{"1011","1001","0101","1100","1101","1010","0110","1110"};
      s4 = dt[y];
      if (y == 7 && ((!rd && (x == 17 || x == 18 || x == 20)) || (rd && (x == 11 || x == 13 || x == 14))))
        s4 = "0111";
      if (rd && (ones(s4) != 2 || y == 3)) s4 = inv(s4);
    end
    if (ones(s4) != 2) rd = (ones(s4) > 2);
    return {s6, s4};
  endfunction

  // symbol as a 10-bit vector, code[0] = first bit on the line
  function automatic logic [9:0] str2code(input string s);
    logic [9:0] c;
    for (int i = 0; i < 10; i++) c[i] = (s[i] == "1");
    return c;
  endfunction

  // Decode: find (byte, k) whose reference code for either disparity equals c.
  // Returns {found, k, byte}.
  function automatic logic [9:0] ref_dec(input logic [9:0] c);
    for (int kk = 0; kk < 2; kk++) begin
      for (int v = 0; v < 256; v++) begin
        for (int r = 0; r < 2; r++) begin
          bit rd;
          if (kk == 1 && v[4:0] != 28) continue;
          rd = r[0];
          if (str2code(ref_enc(8'(v), kk[0], rd)) == c) return {1'b1, kk[0], 8'(v)};
        end
      end
    end
    return '0;
  endfunction

  // Full decode table: entry c = {found, k, byte}.
  typedef logic [9:0] dec_tab_t [1024];
  function automatic dec_tab_t ref_dec_table();
    dec_tab_t t;
    foreach (t[i]) t[i] = '0;
    for (int kk = 0; kk < 2; kk++) begin
      for (int v = 0; v < 256; v++) begin
        for (int r = 0; r < 2; r++) begin
          bit rd;
          if (kk == 1 && v[4:0] != 28) continue;
          rd = r[0];
          t[str2code(ref_enc(8'(v), kk[0], rd))] = {1'b1, kk[0], 8'(v)};
        end
      end
    end
    return t;
  endfunction

  // Stream monitor: takes 10-bit symbols in line order, checks that each is a
  // valid code with the right running disparity, and rebuilds the packages:
  // IDLE (K28.1) between packages, SOF_C + 3 bytes + EOF_C for a readback
  // word, SOF_H + 5*n bytes + EOF_H for n chained hits.
  class stream_mon;
    dec_tab_t   tab;
    bit         rd, rd_known, need_idle, started;
    int         state;         // 0 between packages, 1 in command, 2 in pixel package
    logic [7:0] buf_q [$];
    logic [23:0] cmds [$];
    logic [39:0] hits [$];
    int n_sym, n_idle, code_err, disp_err, fmt_err, hit_pkts, chained_pkts;
    function new();
      tab = ref_dec_table();
      rd_known = 0; need_idle = 0; state = 0; started = 0;
      n_sym = 0; n_idle = 0; code_err = 0; disp_err = 0; fmt_err = 0; hit_pkts = 0; chained_pkts = 0;
    endfunction
    function void put(logic [9:0] c);
      logic [9:0] d;
      int ones;
      // symbols before the first IDLE (reset value of the line) are ignored
      if (!started) begin
        if (tab[c] != {2'b11, 8'h3C}) return;
        started = 1;
      end
      n_sym++;
      ones = $countones(c);
      if (ones == 6) begin if (rd_known && rd) disp_err++; rd = 1; rd_known = 1; end
      else if (ones == 4) begin if (rd_known && !rd) disp_err++; rd = 0; rd_known = 1; end
      else if (ones != 5) disp_err++;
      d = tab[c];
      if (!d[9]) begin code_err++; return; end
      if (d[8]) begin
        case (d[7:0])
          8'h3C: begin n_idle++; if (state != 0) fmt_err++; need_idle = 0; end
          8'h5C: begin if (state != 0 || need_idle) fmt_err++; state = 1; buf_q.delete(); end
          8'hDC: begin if (state != 0 || need_idle) fmt_err++; state = 2; buf_q.delete(); end
          8'h7C: begin
            if (state != 1 || buf_q.size() != 3) fmt_err++;
            else cmds.push_back({buf_q[0], buf_q[1], buf_q[2]});
            state = 0; need_idle = 1;
          end
          8'h9C: begin
            if (state != 2 || buf_q.size() == 0 || buf_q.size() % 5 != 0) fmt_err++;
            else begin
              for (int i = 0; i < buf_q.size(); i += 5)
                hits.push_back({buf_q[i], buf_q[i+1], buf_q[i+2], buf_q[i+3], buf_q[i+4]});
              hit_pkts++;
              if (buf_q.size() > 5) chained_pkts++;
            end
            state = 0; need_idle = 1;
          end
          default: fmt_err++;
        endcase
      end else begin
        if (state == 0) fmt_err++;
        else buf_q.push_back(d[7:0]);
      end
    endfunction
    function int errors();
      return code_err + disp_err + fmt_err;
    endfunction
  endclass

  // 35-bit pixel word from the 5 transmitted bytes {select, 7 bits};
  // returns -1 in bit 35 when the select bits are wrong.
  function automatic logic [35:0] unpack_hit(input logic [39:0] b);
    logic [34:0] p;
    bit ok;
    ok = 1;
    for (int i = 0; i < 5; i++) begin
      p[34 - 7*i -: 7] = b[38 - 8*i -: 7];
      if (b[39 - 8*i] != (i == 0)) ok = 0;
    end
    return {!ok, p};
  endfunction

  // Symbol alignment of a sampled serial stream: the bit offset (0..9) at
  // which the most 10-bit windows decode as valid codes.
  function automatic int align10(ref bit bits [$], input dec_tab_t tab);
    int best = 0, best_n = -1;
    for (int off = 0; off < 10; off++) begin
      int n = 0;
      for (int i = off; i + 10 <= bits.size(); i += 10) begin
        logic [9:0] c;
        for (int j = 0; j < 10; j++) c[j] = bits[i + j];
        if (tab[c][9]) n++;
      end
      if (n > best_n) begin best_n = n; best = off; end
    end
    return best;
  endfunction

  // Feed a sampled serial stream into a stream monitor from the given offset.
  function automatic void feed10(ref bit bits [$], input int off, stream_mon mon);
    for (int i = off; i + 10 <= bits.size(); i += 10) begin
      logic [9:0] c;
      for (int j = 0; j < 10; j++) c[j] = bits[i + j];
      mon.put(c);
    end
  endfunction

endpackage
