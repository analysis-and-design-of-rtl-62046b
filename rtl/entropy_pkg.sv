// entropy_pkg: types, constants and look-up tables shared by the H.264/AVC
// entropy decoder (CAVLC and CABAC paths).
//
// The CAVLC code tables (coeff_token, total_zeros) and the CABAC arithmetic
// decoding tables (LPS range table, LPS state transition) are the ones the
// H.264/AVC standard defines; they are stored here as constant arrays and
// small case functions. VLC tables hold, for every symbol, its code length
// and the value of its code bits (MSB first).
//   coeff_token tables are indexed by 4*TotalCoeff + TrailingOnes and exist
//   for 0<=nC<2 (CT0), 2<=nC<4 (CT1), 4<=nC<8 (CT2) and chroma DC (CDC);
//   nC>=8 uses a 6-bit fixed-length code and needs no table.
//   total_zeros (4x4 blocks) is indexed by 16*(TotalCoeff-1) + total_zeros.
// The context-model address map follows the hybrid memory organisation of
// this design: sets of which two models are never needed in the same cycle
// live in a dual-port SRAM (205 entries), the others in a register file
// (254 entries).
// The CAVLC and CABAC tables are the standard's; the address map and the
// split sizes follow the hybrid memory organisation described for this
// decoder. cm_locate maps the context index ranges the residual decoder uses.
// cm_locate_q is the smaller map of the SVC quality-enhancement-layer decoder
// (199 SRAM + 197 register entries): it keeps the models of mb_skip_flag,
// mb_qp_delta, coded_block_pattern, transform_size_8x8_flag and the residual
// elements, each range in the same memory as in the full map, packed to
// consecutive addresses.
package entropy_pkg;

  // ---------------- general sizes ----------------
  localparam int unsigned WIN_W      = 64;   // bitstream window seen by the decoders
  localparam int unsigned LEVEL_W    = 13;   // CAVLC output buffer word width
  localparam int unsigned CABAC_CW   = 16;   // CABAC coefficient width
  localparam int unsigned CM_SRAM_N  = 205;  // context models held in SRAM
  localparam int unsigned CM_REG_N   = 254;  // context models held in registers
  localparam int unsigned CTX_N      = 460;  // context indices 0..459
  // reduced memory of the quality-enhancement-layer decoder (SVC)
  localparam int unsigned CM_Q_SRAM_N = 199;
  localparam int unsigned CM_Q_REG_N  = 197;

  // context model: 6-bit probability state and most probable symbol
  typedef struct packed {
    logic [5:0] state;
    logic       mps;
  } cm_t;

  // where a context model lives in the hybrid memory
  typedef struct packed {
    logic       valid;   // context index is held by the memory
    logic       is_reg;  // 1: register file, 0: SRAM
    logic [7:0] addr;
  } cm_loc_t;

  // ---------------- CAVLC tables ----------------
  localparam logic [4:0] CT0_LEN [68] = '{1,0,0,0,6,2,0,0,8,6,3,0,9,8,7,5,10,9,8,6,11,10,9,7,13,11,10,8,13,13,11,9,13,13,13,10,14,14,13,11,14,14,14,13,15,15,14,14,15,15,15,14,16,15,15,15,16,16,16,15,16,16,16,16,16,16,16,16};
  localparam logic [3:0] CT0_BITS [68] = '{1,0,0,0,5,1,0,0,7,4,1,0,7,6,5,3,7,6,5,3,7,6,5,4,15,6,5,4,11,14,5,4,8,10,13,4,15,14,9,4,11,10,13,12,15,14,9,12,11,10,13,8,15,1,9,12,11,14,13,8,7,10,9,12,4,6,5,8};
  localparam logic [4:0] CT1_LEN [68] = '{2,0,0,0,6,2,0,0,6,5,3,0,7,6,6,4,8,6,6,4,8,7,7,5,9,8,8,6,11,9,9,6,11,11,11,7,12,11,11,9,12,12,12,11,12,12,12,11,13,13,13,12,13,13,13,13,13,14,13,13,14,14,14,13,14,14,14,14};
  localparam logic [3:0] CT1_BITS [68] = '{3,0,0,0,11,2,0,0,7,7,3,0,7,10,9,5,7,6,5,4,4,6,5,6,7,6,5,8,15,6,5,4,11,14,13,4,15,10,9,4,11,14,13,12,8,10,9,8,15,14,13,12,11,10,9,12,7,11,6,8,9,8,10,1,7,6,5,4};
  localparam logic [4:0] CT2_LEN [68] = '{4,0,0,0,6,4,0,0,6,5,4,0,6,5,5,4,7,5,5,4,7,5,5,4,7,6,6,4,7,6,6,4,8,7,7,5,8,8,7,6,9,8,8,7,9,9,8,8,9,9,9,8,10,9,9,9,10,10,10,10,10,10,10,10,10,10,10,10};
  localparam logic [3:0] CT2_BITS [68] = '{15,0,0,0,15,14,0,0,11,15,13,0,8,12,14,12,15,10,11,11,11,8,9,10,9,14,13,9,8,10,9,8,15,14,13,13,11,14,10,12,15,10,13,12,11,14,9,12,8,10,13,8,13,7,9,12,9,12,11,10,5,8,7,6,1,4,3,2};
  localparam logic [4:0] CDC_LEN [20] = '{2,0,0,0,6,1,0,0,6,6,3,0,6,7,7,6,6,8,8,7};
  localparam logic [3:0] CDC_BITS [20] = '{1,0,0,0,7,1,0,0,4,6,1,0,3,3,2,5,2,3,2,0};
  localparam logic [3:0] TZ_LEN [240] = '{1,3,3,4,4,5,5,6,6,7,7,8,8,9,9,9,3,3,3,3,3,4,4,4,4,5,5,6,6,6,6,0,4,3,3,3,4,4,3,3,4,5,5,6,5,6,0,0,5,3,4,4,3,3,3,4,3,4,5,5,5,0,0,0,4,4,4,3,3,3,3,3,4,5,4,5,0,0,0,0,6,5,3,3,3,3,3,3,4,3,6,0,0,0,0,0,6,5,3,3,3,2,3,4,3,6,0,0,0,0,0,0,6,4,5,3,2,2,3,3,6,0,0,0,0,0,0,0,6,6,4,2,2,3,2,5,0,0,0,0,0,0,0,0,5,5,3,2,2,2,4,0,0,0,0,0,0,0,0,0,4,4,3,3,1,3,0,0,0,0,0,0,0,0,0,0,4,4,2,1,3,0,0,0,0,0,0,0,0,0,0,0,3,3,1,2,0,0,0,0,0,0,0,0,0,0,0,0,2,2,1,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0};
  localparam logic [2:0] TZ_BITS [240] = '{1,3,2,3,2,3,2,3,2,3,2,3,2,3,2,1,7,6,5,4,3,5,4,3,2,3,2,3,2,1,0,0,5,7,6,5,4,3,4,3,2,3,2,1,1,0,0,0,3,7,5,4,6,5,4,3,3,2,2,1,0,0,0,0,5,4,3,7,6,5,4,3,2,1,1,0,0,0,0,0,1,1,7,6,5,4,3,2,1,1,0,0,0,0,0,0,1,1,5,4,3,3,2,1,1,0,0,0,0,0,0,0,1,1,1,3,3,2,2,1,0,0,0,0,0,0,0,0,1,0,1,3,2,1,1,1,0,0,0,0,0,0,0,0,1,0,1,3,2,1,1,0,0,0,0,0,0,0,0,0,0,1,1,2,1,3,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,0,0,0,0,0,0,0,0,0,0,0,0,0,0};

  // ---------------- CABAC tables ----------------
  // LPS sub-range, indexed by probability state and by bits [7:6] of the range.
  function automatic logic [7:0] range_lps(input logic [5:0] s, input logic [1:0] q);
    logic [31:0] row;
    case (s)
      6'd0:  row = {8'd128, 8'd176, 8'd208, 8'd240};
      6'd1:  row = {8'd128, 8'd167, 8'd197, 8'd227};
      6'd2:  row = {8'd128, 8'd158, 8'd187, 8'd216};
      6'd3:  row = {8'd123, 8'd150, 8'd178, 8'd205};
      6'd4:  row = {8'd116, 8'd142, 8'd169, 8'd195};
      6'd5:  row = {8'd111, 8'd135, 8'd160, 8'd185};
      6'd6:  row = {8'd105, 8'd128, 8'd152, 8'd175};
      6'd7:  row = {8'd100, 8'd122, 8'd144, 8'd166};
      6'd8:  row = {8'd95,  8'd116, 8'd137, 8'd158};
      6'd9:  row = {8'd90,  8'd110, 8'd130, 8'd150};
      6'd10: row = {8'd85,  8'd104, 8'd123, 8'd142};
      6'd11: row = {8'd81,  8'd99,  8'd117, 8'd135};
      6'd12: row = {8'd77,  8'd94,  8'd111, 8'd128};
      6'd13: row = {8'd73,  8'd89,  8'd105, 8'd122};
      6'd14: row = {8'd69,  8'd85,  8'd100, 8'd116};
      6'd15: row = {8'd66,  8'd80,  8'd95,  8'd110};
      6'd16: row = {8'd62,  8'd76,  8'd90,  8'd104};
      6'd17: row = {8'd59,  8'd72,  8'd86,  8'd99};
      6'd18: row = {8'd56,  8'd69,  8'd81,  8'd94};
      6'd19: row = {8'd53,  8'd65,  8'd77,  8'd89};
      6'd20: row = {8'd51,  8'd62,  8'd73,  8'd85};
      6'd21: row = {8'd48,  8'd59,  8'd69,  8'd80};
      6'd22: row = {8'd46,  8'd56,  8'd66,  8'd76};
      6'd23: row = {8'd43,  8'd53,  8'd63,  8'd72};
      6'd24: row = {8'd41,  8'd50,  8'd59,  8'd69};
      6'd25: row = {8'd39,  8'd48,  8'd56,  8'd65};
      6'd26: row = {8'd37,  8'd45,  8'd54,  8'd62};
      6'd27: row = {8'd35,  8'd43,  8'd51,  8'd59};
      6'd28: row = {8'd33,  8'd41,  8'd48,  8'd56};
      6'd29: row = {8'd32,  8'd39,  8'd46,  8'd53};
      6'd30: row = {8'd30,  8'd37,  8'd43,  8'd50};
      6'd31: row = {8'd29,  8'd35,  8'd41,  8'd48};
      6'd32: row = {8'd27,  8'd33,  8'd39,  8'd45};
      6'd33: row = {8'd26,  8'd31,  8'd37,  8'd43};
      6'd34: row = {8'd24,  8'd30,  8'd35,  8'd41};
      6'd35: row = {8'd23,  8'd28,  8'd33,  8'd39};
      6'd36: row = {8'd22,  8'd27,  8'd32,  8'd37};
      6'd37: row = {8'd21,  8'd26,  8'd30,  8'd35};
      6'd38: row = {8'd20,  8'd24,  8'd29,  8'd33};
      6'd39: row = {8'd19,  8'd23,  8'd27,  8'd31};
      6'd40: row = {8'd18,  8'd22,  8'd26,  8'd30};
      6'd41: row = {8'd17,  8'd21,  8'd25,  8'd28};
      6'd42: row = {8'd16,  8'd20,  8'd23,  8'd27};
      6'd43: row = {8'd15,  8'd19,  8'd22,  8'd25};
      6'd44: row = {8'd14,  8'd18,  8'd21,  8'd24};
      6'd45: row = {8'd14,  8'd17,  8'd20,  8'd23};
      6'd46: row = {8'd13,  8'd16,  8'd19,  8'd22};
      6'd47: row = {8'd12,  8'd15,  8'd18,  8'd21};
      6'd48: row = {8'd12,  8'd14,  8'd17,  8'd20};
      6'd49: row = {8'd11,  8'd14,  8'd16,  8'd19};
      6'd50: row = {8'd11,  8'd13,  8'd15,  8'd18};
      6'd51: row = {8'd10,  8'd12,  8'd15,  8'd17};
      6'd52: row = {8'd10,  8'd12,  8'd14,  8'd16};
      6'd53: row = {8'd9,   8'd11,  8'd13,  8'd15};
      6'd54: row = {8'd9,   8'd11,  8'd12,  8'd14};
      6'd55: row = {8'd8,   8'd10,  8'd12,  8'd14};
      6'd56: row = {8'd8,   8'd9,   8'd11,  8'd13};
      6'd57: row = {8'd7,   8'd9,   8'd11,  8'd12};
      6'd58: row = {8'd7,   8'd9,   8'd10,  8'd12};
      6'd59: row = {8'd7,   8'd8,   8'd10,  8'd11};
      6'd60: row = {8'd6,   8'd8,   8'd9,   8'd11};
      6'd61: row = {8'd6,   8'd7,   8'd9,   8'd10};
      6'd62: row = {8'd6,   8'd7,   8'd8,   8'd9};
      default: row = {8'd2, 8'd2,   8'd2,   8'd2};
    endcase
    return row[31 - 8*q -: 8];
  endfunction

  localparam logic [5:0] TRANS_LPS [64] = '{
     0, 0, 1, 2, 2, 4, 4, 5, 6, 7, 8, 9, 9,11,11,12,
    13,13,15,15,16,16,18,18,19,19,21,21,22,22,23,24,
    24,25,26,26,27,27,28,29,29,30,30,30,31,32,32,33,
    33,33,34,34,35,35,35,36,36,36,37,37,37,38,38,63};

  // context model after decoding a bin
  function automatic cm_t cm_update(input cm_t c, input logic bin);
    cm_t r;
    r = c;
    if (bin == c.mps) begin
      if (c.state < 6'd62) r.state = c.state + 6'd1;
    end else begin
      if (c.state == 6'd0) r.mps = ~c.mps;
      r.state = TRANS_LPS[c.state];
    end
    return r;
  endfunction

  // number of leading zeros of a 9-bit range below 0x100 (renormalisation shift)
  function automatic logic [2:0] renorm_shift(input logic [8:0] r);
    if (r[8])      return 3'd0;
    else if (r[7]) return 3'd1;
    else if (r[6]) return 3'd2;
    else if (r[5]) return 3'd3;
    else if (r[4]) return 3'd4;
    else if (r[3]) return 3'd5;
    else if (r[2]) return 3'd6;
    else           return 3'd7;
  endfunction

  // ---------------- hybrid context-model memory map ----------------
  function automatic cm_loc_t cm_locate(input logic [8:0] ctx);
    cm_loc_t l;
    int c;
    c = int'(ctx);
    l = '{valid: 1'b1, is_reg: 1'b0, addr: 8'd0};
    // SRAM part
    if      (c <= 2)               l.addr = 8'(c);
    else if (c <= 10)             begin l.is_reg = 1'b1; l.addr = 8'(c - 3);   end
    else if (c <= 13)              l.addr = 8'(c - 8);
    else if (c <= 23)             begin l.is_reg = 1'b1; l.addr = 8'(c - 6);   end
    else if (c <= 26)              l.addr = 8'(c - 18);
    else if (c <= 69)             begin l.is_reg = 1'b1; l.addr = 8'(c - 9);   end
    else if (c <= 72)              l.addr = 8'(c - 61);
    else if (c <= 84)             begin l.is_reg = 1'b1; l.addr = 8'(c - 12);  end
    else if (c <= 104)             l.addr = 8'(c - 73);
    else if (c <= 165)            begin l.is_reg = 1'b1; l.addr = 8'(c - 32);  end
    else if (c <= 226)             l.addr = 8'(c - 134);
    else if (c <= 231)             l.addr = 8'(c - 55);
    else if (c <= 236)            begin l.is_reg = 1'b1; l.addr = 8'(c - 7);   end
    else if (c <= 241)             l.addr = 8'(c - 60);
    else if (c <= 246)            begin l.is_reg = 1'b1; l.addr = 8'(c - 12);  end
    else if (c <= 251)             l.addr = 8'(c - 65);
    else if (c <= 256)            begin l.is_reg = 1'b1; l.addr = 8'(c - 17);  end
    else if (c <= 261)             l.addr = 8'(c - 70);
    else if (c <= 265)            begin l.is_reg = 1'b1; l.addr = 8'(c - 22);  end
    else if (c <= 270)             l.addr = 8'(c - 74);
    else if (c <= 275)            begin l.is_reg = 1'b1; l.addr = 8'(c - 27);  end
    else if (c == 276)             l.valid = 1'b0;                 // end_of_slice: terminate
    else if (c <= 337)            begin l.is_reg = 1'b1; l.addr = 8'(c - 143); end
    else if (c <= 398)             l.addr = 8'(c - 245);
    else if (c <= 401)             l.addr = 8'(c - 197);
    else if (c <= 416)            begin l.is_reg = 1'b1; l.addr = 8'(c - 207); end
    else if (c <= 425)             l.addr = 8'(c - 263);
    else if (c <= 430)             l.addr = 8'(c - 229);
    else if (c <= 435)            begin l.is_reg = 1'b1; l.addr = 8'(c - 182); end
    else if (c <= 450)            begin l.is_reg = 1'b1; l.addr = 8'(c - 226); end
    else if (c <= 459)             l.addr = 8'(c - 288);
    else                           l.valid = 1'b0;
    return l;
  endfunction

  // Address map of the quality-enhancement-layer decoder: only the models of
  // mb_skip_flag, mb_qp_delta, coded_block_pattern, transform_size_8x8_flag,
  // coded_block_flag, the significance map and coeff_abs_level_minus1 are kept.
  function automatic cm_loc_t cm_locate_q(input logic [8:0] ctx);
    cm_loc_t l;
    int c;
    c = int'(ctx);
    l = '{valid: 1'b1, is_reg: 1'b0, addr: 8'd0};
    if      (c >= 11  && c <= 13)  l.addr = 8'(c - 11);
    else if (c >= 24  && c <= 26)  l.addr = 8'(c - 21);
    else if (c >= 60  && c <= 63) begin l.is_reg = 1'b1; l.addr = 8'(c - 60);  end
    else if (c >= 73  && c <= 84) begin l.is_reg = 1'b1; l.addr = 8'(c - 69);  end
    else if (c >= 85  && c <= 104) l.addr = 8'(c - 79);
    else if (c >= 105 && c <= 165) begin l.is_reg = 1'b1; l.addr = 8'(c - 89); end
    else if (c >= 166 && c <= 226) l.addr = 8'(c - 140);
    else if (c >= 227 && c <= 231) l.addr = 8'(c - 61);
    else if (c >= 232 && c <= 236) begin l.is_reg = 1'b1; l.addr = 8'(c - 64); end
    else if (c >= 237 && c <= 241) l.addr = 8'(c - 66);
    else if (c >= 242 && c <= 246) begin l.is_reg = 1'b1; l.addr = 8'(c - 69); end
    else if (c >= 247 && c <= 251) l.addr = 8'(c - 71);
    else if (c >= 252 && c <= 256) begin l.is_reg = 1'b1; l.addr = 8'(c - 74); end
    else if (c >= 257 && c <= 261) l.addr = 8'(c - 76);
    else if (c >= 262 && c <= 265) begin l.is_reg = 1'b1; l.addr = 8'(c - 79); end
    else if (c >= 266 && c <= 270) l.addr = 8'(c - 80);
    else if (c >= 271 && c <= 275) begin l.is_reg = 1'b1; l.addr = 8'(c - 84); end
    else if (c >= 277 && c <= 337) begin l.is_reg = 1'b1; l.addr = 8'(c - 200); end
    else if (c >= 338 && c <= 398) l.addr = 8'(c - 251);
    else if (c >= 399 && c <= 401) l.addr = 8'(c - 203);
    else if (c >= 402 && c <= 416) begin l.is_reg = 1'b1; l.addr = 8'(c - 264); end
    else if (c >= 417 && c <= 425) l.addr = 8'(c - 269);
    else if (c >= 426 && c <= 430) l.addr = 8'(c - 235);
    else if (c >= 431 && c <= 435) begin l.is_reg = 1'b1; l.addr = 8'(c - 239); end
    else if (c >= 436 && c <= 450) begin l.is_reg = 1'b1; l.addr = 8'(c - 283); end
    else if (c >= 451 && c <= 459) l.addr = 8'(c - 294);
    else                           l.valid = 1'b0;
    return l;
  endfunction

  // ---------------- CABAC residual context offsets ----------------
  localparam logic [8:0] CTX_CBF  = 9'd85;
  localparam logic [8:0] CTX_SIG  = 9'd105;
  localparam logic [8:0] CTX_LAST = 9'd166;
  localparam logic [8:0] CTX_ABS  = 9'd227;

  function automatic logic [5:0] cat_off_cbf(input logic [2:0] cat);
    return 6'(4 * cat);
  endfunction
  function automatic logic [5:0] cat_off_sig(input logic [2:0] cat);
    case (cat)
      3'd0: return 6'd0;  3'd1: return 6'd15; 3'd2: return 6'd29;
      3'd3: return 6'd44; default: return 6'd47;
    endcase
  endfunction
  function automatic logic [5:0] cat_off_abs(input logic [2:0] cat);
    case (cat)
      3'd0: return 6'd0;  3'd1: return 6'd10; 3'd2: return 6'd20;
      3'd3: return 6'd30; default: return 6'd39;
    endcase
  endfunction

endpackage
