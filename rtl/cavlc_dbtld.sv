// cavlc_dbtld: delay balanced two-level decoder. Decodes up to two CAVLC
// level symbols per cycle (combinational).
//
// Level 1 is decoded completely: level_prefix (leading zeros), the suffix
// size (12 for prefix 15, 4 for prefix 14 with suffixLength 0, otherwise
// suffixLength), levelCode = (prefix << suffixLength) + suffix, the +15
// correction (prefix 15, suffixLength 0) and the +2 correction for the first
// level of a block with fewer than three trailing ones.
// The suffixLength for the next level is produced from level_prefix alone
// (suffixLength detector), so it is known as early as the prefix:
//   suffixLength 0 -> 1, or 2 when (first && T1<3 && prefix>3) || prefix>5
//   suffixLength 1 -> 2 when (first && T1<3 && prefix>1) || prefix>2
//   suffixLength s>=2 -> s+1 when s<6 && prefix>2
// Level 2 starts right after level 1 (bit offset prefix_1 + 1 + suffix size
// 1). It is only decoded for the general case in which its suffix size equals
// the suffixLength from the level-1 detector and no correction applies, i.e.
// level_prefix_2 < 15; otherwise level2_valid is low and level 2 is decoded
// as level 1 of the next cycle. Its levelCode is mapped to the level value
// without the two correction checks, which is what balances the two paths.
// Interface: win[63] is the next bit; len is the number of bits consumed.
// Follows the document: the suffixLength detector driven by level_prefix,
// decoding level 2 only in the general case, and moving the corrections of
// level 1 off the level-2 path. Own choices: the 64-bit window and treating
// level_prefix 15 of level 2 as a one-level cycle.
module cavlc_dbtld
  import entropy_pkg::*;
(
  input  logic [63:0]              win,
  input  logic [2:0]               suffix_length,
  input  logic                     first_adj,   // first level of block and TrailingOnes < 3
  input  logic                     want2,       // at least two levels remain
  output logic signed [LEVEL_W-1:0] level1,
  output logic signed [LEVEL_W-1:0] level2,
  output logic                     level2_valid,
  output logic [6:0]               len,
  output logic [2:0]               suffix_length_next
);
  // leading zeros of a 16-bit field, 16 if none
  function automatic logic [4:0] lzc16(input logic [15:0] v);
    logic [4:0] n;
    n = 5'd16;
    for (int k = 0; k < 16; k++) if (v[k]) n = 5'(15 - k);
    return n;
  endfunction

  // suffixLength detector driven by level_prefix
  function automatic logic [2:0] sl_detect(input logic [2:0] sl, input logic [4:0] pre,
                                           input logic adj);
    logic inc;
    case (sl)
      3'd0:    inc = (adj && pre > 5'd3) || (pre > 5'd5);
      3'd1:    inc = (adj && pre > 5'd1) || (pre > 5'd2);
      default: inc = (sl < 3'd6) && (pre > 5'd2);
    endcase
    if (sl == 3'd0) return inc ? 3'd2 : 3'd1;
    return sl + {2'b0, inc};
  endfunction

  function automatic logic signed [LEVEL_W-1:0] map_level(input logic [LEVEL_W:0] code);
    if (!code[0]) return LEVEL_W'((code + 1'b1 + 1'b1) >> 1);
    return -LEVEL_W'((code + 1'b1) >> 1);
  endfunction

  logic [4:0]  pre1, pre2;
  logic [3:0]  ssize1;
  logic [11:0] suf1;
  logic [5:0]  suf2;
  logic [LEVEL_W:0] code1, code2;
  logic [5:0]  len1, len2;
  logic [63:0] w2;
  logic [2:0]  sl1;

  always_comb begin
    // ---- first part, level 1 ----
    pre1 = lzc16(win[63:48]);
    if (pre1 == 5'd15)                               ssize1 = 4'd12;
    else if (pre1 == 5'd14 && suffix_length == 3'd0) ssize1 = 4'd4;
    else                                             ssize1 = {1'b0, suffix_length};
    suf1  = 12'((win << (pre1 + 5'd1)) >> (64 - 32'(ssize1)));
    if (ssize1 == 4'd0) suf1 = '0;
    code1 = (LEVEL_W+1)'(({9'd0, pre1} << suffix_length) + {2'd0, suf1});
    len1  = 6'(pre1) + 6'd1 + 6'(ssize1);
    sl1   = sl_detect(suffix_length, pre1, first_adj);
    // ---- second part, level 1 corrections ----
    if (pre1 == 5'd15 && suffix_length == 3'd0) code1 = code1 + 14'd15;
    if (first_adj)                              code1 = code1 + 14'd2;
    level1 = map_level(code1);

    // ---- level 2, general case only ----
    w2   = win << len1;
    pre2 = lzc16(w2[63:48]);
    suf2 = 6'((w2 << (pre2 + 5'd1)) >> (64 - 32'(sl1)));
    code2 = (LEVEL_W+1)'(({9'd0, pre2} << sl1) + {8'd0, suf2});
    len2  = 6'(pre2) + 6'd1 + 6'(sl1);
    level2 = map_level(code2);
    level2_valid = want2 && (pre2 < 5'd15);
    if (level2_valid) begin
      len = 7'(len1) + 7'(len2);
      suffix_length_next = sl_detect(sl1, pre2, 1'b0);
    end else begin
      len = 7'(len1);
      suffix_length_next = sl1;
      level2 = '0;
    end
  end
endmodule
