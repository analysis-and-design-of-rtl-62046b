// tb_cavlc_dbtld: checks the double-level decoder. Two levels are encoded
// with the standard's level_prefix/level_suffix rules for a random starting
// suffixLength (including escapes, the suffixLength-0 prefix-14 case and the
// first-level adjustment), followed by random bits. The DUT must always
// return level 1 and its length; when it marks level 2 valid, level 2, the
// total length and the final suffixLength must match; it must mark level 2
// valid whenever two were requested and level 2's prefix is below 15.
// Combinational DUT.
module tb_cavlc_dbtld;
  import entropy_pkg::*;
  logic [63:0] win; logic [2:0] sl; logic adj, want2;
  logic signed [LEVEL_W-1:0] l1, l2; logic l2v; logic [6:0] len; logic [2:0] sln;
  cavlc_dbtld dut (.win, .suffix_length(sl), .first_adj(adj), .want2, .level1(l1), .level2(l2),
                   .level2_valid(l2v), .len, .suffix_length_next(sln));
  int checks = 0, failures = 0, n_two = 0, n_esc = 0;
  bit bits [$];

  initial begin #10000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // encode one level; returns the prefix; updates suffixLength
  function automatic int enc_level(input int lev, inout int s, input bit a);
    int code, pre, suf, ssz, m;
    code = (lev > 0) ? 2 * lev - 2 : -2 * lev - 1;
    if (a) code -= 2;
    if (s == 0) begin
      if (code < 14) begin pre = code; ssz = 0; suf = 0; end
      else if (code < 30) begin pre = 14; ssz = 4; suf = code - 14; end
      else begin pre = 15; ssz = 12; suf = code - 30; end
    end else begin
      if (code < (15 << s)) begin pre = code >> s; ssz = s; suf = code & ((1 << s) - 1); end
      else begin pre = 15; ssz = 12; suf = code - (15 << s); end
    end
    for (int k = 0; k < pre; k++) bits.push_back(0);
    bits.push_back(1);
    for (int k = ssz - 1; k >= 0; k--) bits.push_back(suf[k]);
    m = (lev < 0) ? -lev : lev;
    if (s == 0) s = 1;
    if (m > (3 << (s - 1)) && s < 6) s++;
    return pre;
  endfunction

  function automatic int rlev(input int s, input bit a);
    int m;
    case ($urandom % 6)
      0, 1: m = 1 + $urandom % 3;
      2: m = 1 + $urandom % (8 << s);
      3: m = 1 + $urandom % (16 << s);
      4: m = 20 + $urandom % 40;
      default: m = 1 + $urandom % 1500;
    endcase
    if (a && m == 1) m = 2;      // after fewer than 3 trailing ones the first level is not +-1
    return ($urandom % 2) ? m : -m;
  endfunction

  initial begin
    repeat (30000) begin
      int s0, s, a1, a2, p1, p2, len1, lenall, e1, e2, s1;
      bit a, w;
      bits.delete();
      s0 = $urandom % 7;
      a = (s0 == 0) ? $urandom % 2 : 0;
      w = $urandom % 2;
      s = s0;
      a1 = rlev(s, a);
      p1 = enc_level(a1, s, a);
      len1 = bits.size(); s1 = s;
      a2 = rlev(s, 0);
      p2 = enc_level(a2, s, 0);
      lenall = bits.size();
      win = {$urandom, $urandom};
      for (int k = 0; k < 64 && k < bits.size(); k++) win[63-k] = bits[k];
      sl = 3'(s0); adj = a; want2 = w;
      #1;
      checks++;
      if (l1 != LEVEL_W'(a1)) begin failures++; if (failures < 10) $display("sl %0d adj %0d lev1 got %0d exp %0d", s0, a, l1, a1); end
      checks++;
      if (l2v != (w && p2 < 15)) begin failures++; if (failures < 10) $display("level2_valid %0d, prefix2 %0d want2 %0d", l2v, p2, w); end
      checks++;
      if (l2v) begin
        n_two++;
        if (l2 != LEVEL_W'(a2) || len != 7'(lenall) || sln != 3'(s)) begin
          failures++; if (failures < 10) $display("two levels: got %0d len %0d sl %0d, exp %0d %0d %0d", l2, len, sln, a2, lenall, s);
        end
      end else if (len != 7'(len1) || sln != 3'(s1)) begin
        failures++; if (failures < 10) $display("one level: len %0d sl %0d exp %0d %0d", len, sln, len1, s1);
      end
      if (p1 == 15) n_esc++;
    end
    checks++; if (n_two == 0 || n_esc == 0) failures++;
    $display("two-level vectors %0d escapes %0d", n_two, n_esc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
