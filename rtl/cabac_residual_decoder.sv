// cabac_residual_decoder: CABAC decoder for residual blocks (coded_block_flag,
// significance map, coeff_abs_level_minus1, coeff_sign_flag) with the
// two-stage organisation MCS -> TSBAD.
//
// MCS stage (combinational, end of cycle): from the decoder state after the
// bins of this cycle (fed back from binarization matching) it forms the
// addresses of the three models the next pair of bins may need: one SRAM
// address and two register addresses. The synchronous hybrid memory returns
// them at the start of the next cycle (TSBAD stage), where the engine
// decodes up to two bins of one syntax element.
//   significance map: significant_coeff_flag and last_significant_coeff_flag
//     are decoded as one merged element. A pair starting at SIG[i] needs
//     SIG[i] (reg 1), LAST[i] (SRAM) and SIG[i+1] (reg 2); the second bin is
//     LAST[i] after a 1 and SIG[i+1] after a 0. A pair starting at LAST[i]
//     needs LAST[i] (SRAM) and SIG[i+1] (reg 2).
//   coeff_abs_level_minus1 prefix (truncated unary, cMax 14): bin 0 from the
//     SRAM ("first bin" set), later bins from the register file; bins >= 1
//     share one model, so the second bin uses the model updated by the first.
//   suffix (Exp-Golomb k=0) and sign: bypass, one bin per cycle.
// Next-element prediction: when coded_block_flag ends, the next element
// (significance map if 1, next block's coded_block_flag if 0) depends on its
// value. The MCS stage addresses the element predicted from the previous
// coded_block_flag value; on a miss one stall cycle reloads the models.
// All other transitions are independent of the decoded value.
// Blocks are requested by cmd_* (ctxBlockCat 0..4, its maxNumCoeff and the
// coded_block_flag ctxIdxInc from the neighbours). blk_done pulses with the
// 16 coefficients (scan order). Context models are loaded beforehand through
// init_we/init_ctx/init_cm (slice start); slice_init loads range and offset.
// Timing: one or two regular bins per cycle, one bypass bin per cycle; a
// prediction miss adds one cycle; the block's coefficients appear with
// blk_done in the cycle after the last bin.
// Follows the document: the MCS/TSBAD split, the hybrid memory, restricting
// two bins to one element, the merged significance map and prediction from
// the last coded_block_flag value with a one-cycle miss penalty. Own choices:
// only residual elements are decoded (the syntax-element parser for the rest
// of the macroblock is not part of this design), the state encoding, the
// 16-bit coefficient width, and bypass one bin per cycle. 8x8 blocks
// (ctxBlockCat 5) are not handled.
// QUALITY_LAYER = 1 builds the simplified decoder for SVC quality
// enhancement layers: the same logic with the reduced context memory
// (entropy_pkg::cm_locate_q, 199 SRAM + 197 register entries) that keeps only
// the models those layers use; initialisation writes to other indices are
// dropped. The reduced memory follows the document; reusing this module for
// it, rather than a separate one, is this design's choice.
module cabac_residual_decoder
  import entropy_pkg::*;
#(
  // 0: full context memory (205 SRAM + 254 register entries);
  // 1: quality-enhancement-layer decoder with the reduced memory (199 + 197)
  parameter bit QUALITY_LAYER = 1'b0
)(
  input  logic        clk,
  input  logic        rst_n,
  // context initialisation and engine start
  input  logic        init_we,
  input  logic [8:0]  init_ctx,
  input  cm_t         init_cm,
  input  logic        slice_init,
  // block commands
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic [2:0]  cmd_cat,
  input  logic [4:0]  cmd_maxc,
  input  logic [1:0]  cmd_cbf_inc,
  // bitstream
  input  logic [63:0] win,
  input  logic        win_valid,
  output logic [4:0]  consume,
  // results
  output logic                       blk_done,
  output logic                       blk_cbf,
  output logic signed [CABAC_CW-1:0] coeff [16],
  output logic                       busy,
  // activity
  output logic        ev_two_bins,   // two bins decoded this cycle
  output logic        ev_bin,        // at least one bin decoded this cycle
  output logic        ev_pred_hit,
  output logic        ev_pred_miss,
  output logic        ev_stall
);
  typedef enum logic [2:0] {SE_IDLE, SE_CBF, SE_SIG, SE_ABS, SE_SUF, SE_SIGN} se_t;

  typedef struct packed {
    se_t        se;
    logic [2:0] cat;
    logic [4:0] maxc;
    logic [1:0] cbf_inc;
    logic [3:0] pos;      // scan position (sigmap) / current coefficient (levels)
    logic       at_last;  // sigmap pair starts with LAST[pos]
    logic [15:0] sig;
    logic [3:0] bidx;     // prefix bin index
    logic [3:0] gt1, eq1;
    logic [4:0] egk;      // Exp-Golomb order counter
    logic       egbin;    // Exp-Golomb: in binary part
    logic [14:0] val;     // abs level minus 1 being built
  } st_t;

  st_t s, ns;
  logic ld;                 // memory outputs belong to state s
  logic last_cbf;           // prediction history

  // ---------------- context selection ----------------
  typedef struct packed {
    logic [7:0] saddr, raddr1, raddr2;
  } addr_t;

  // context index -> place in the hybrid memory of this decoder
  function automatic cm_loc_t loc(input logic [8:0] c);
    return QUALITY_LAYER ? cm_locate_q(c) : cm_locate(c);
  endfunction

  function automatic logic [8:0] sig_ctx(input st_t t, input logic [3:0] p, input logic last);
    logic [3:0] inc;
    inc = (t.cat == 3'd3) ? ((p > 4'd2) ? 4'd2 : p) : p;
    return (last ? CTX_LAST : CTX_SIG) + 9'(cat_off_sig(t.cat)) + 9'(inc);
  endfunction
  function automatic logic [8:0] abs_ctx(input st_t t, input logic first);
    logic [3:0] inc, lim;
    lim = (t.cat == 3'd3) ? 4'd3 : 4'd4;
    if (first) inc = (t.gt1 != 0) ? 4'd0 : ((t.eq1 + 4'd1 > 4'd4) ? 4'd4 : t.eq1 + 4'd1);
    else       inc = 4'd5 + ((t.gt1 > lim) ? lim : t.gt1);
    return CTX_ABS + 9'(cat_off_abs(t.cat)) + 9'(inc);
  endfunction

  function automatic addr_t cs(input st_t t);
    addr_t a;
    a = '0;
    case (t.se)
      SE_CBF: a.saddr = loc(CTX_CBF + 9'(cat_off_cbf(t.cat)) + 9'(t.cbf_inc)).addr;
      SE_SIG: begin
        a.raddr1 = loc(sig_ctx(t, t.pos, 1'b0)).addr;
        a.saddr  = loc(sig_ctx(t, t.pos, 1'b1)).addr;
        a.raddr2 = loc(sig_ctx(t, t.pos + 4'd1, 1'b0)).addr;
      end
      SE_ABS: begin
        a.saddr  = loc(abs_ctx(t, 1'b1)).addr;
        a.raddr1 = loc(abs_ctx(t, 1'b0)).addr;
      end
      default: ;
    endcase
    return a;
  endfunction

  // ---------------- memory ----------------
  cm_t cm_s, cm_r1, cm_r2;
  addr_t an, a_cur;
  logic s_we, r_we1, r_we2;
  logic [7:0] s_waddr, r_waddr1, r_waddr2;
  cm_t s_wd, r_wd1, r_wd2;
  cm_loc_t iloc;

  cabac_cm_memory #(
    .SRAM_N(QUALITY_LAYER ? CM_Q_SRAM_N : CM_SRAM_N),
    .REG_N (QUALITY_LAYER ? CM_Q_REG_N  : CM_REG_N)
  ) u_mem (
    .clk, .s_raddr(an.saddr), .s_rdata(cm_s), .s_we, .s_waddr, .s_wdata(s_wd),
    .r_raddr1(an.raddr1), .r_raddr2(an.raddr2), .r_rdata1(cm_r1), .r_rdata2(cm_r2),
    .r_we1, .r_waddr1, .r_wdata1(r_wd1), .r_we2, .r_waddr2, .r_wdata2(r_wd2));

  // ---------------- TSBAD stage ----------------
  logic go, byp;
  cm_t cm1, cm20, cm21;
  logic w20, w21, same0, same1;
  logic b1, b2, b2v;
  cm_t c1n, c2n;
  logic [4:0] eng_consume;
  logic [3:0] Lpos;

  assign go  = ld && win_valid && (s.se != SE_IDLE) && !slice_init;
  assign byp = (s.se == SE_SUF) || (s.se == SE_SIGN);
  assign Lpos = 4'(s.maxc - 5'd1);

  always_comb begin
    cm1 = cm_s; cm20 = cm_r2; cm21 = cm_s; w20 = 1'b0; w21 = 1'b0; same0 = 1'b0; same1 = 1'b0;
    case (s.se)
      SE_SIG: if (!s.at_last) begin
        cm1 = cm_r1; cm21 = cm_s; cm20 = cm_r2;
        w21 = 1'b1;                         // LAST[i] follows a 1
        w20 = (s.pos + 4'd1 != Lpos);       // SIG[i+1] follows a 0 unless inferred
      end else begin
        cm1 = cm_s; cm20 = cm_r2;
        w20 = (s.pos + 4'd1 != Lpos);
      end
      SE_ABS: begin
        if (s.bidx == 4'd0) begin cm1 = cm_s; cm21 = cm_r1; end
        else begin cm1 = cm_r1; same1 = 1'b1; end
        w21 = (s.bidx + 4'd1 != 4'd14);
      end
      default: ;
    endcase
  end

  cabac_tsbad u_eng (.clk, .rst_n, .init(slice_init), .en(go), .bypass(byp), .win(win[63:48]),
    .cm1, .cm2_0(cm20), .cm2_1(cm21), .want2_0(w20), .want2_1(w21), .same_0(same0), .same_1(same1),
    .bin1(b1), .bin2(b2), .bin2_valid(b2v), .cm1_new(c1n), .cm2_new(c2n), .consume(eng_consume));
  assign consume = eng_consume;

  // ---------------- binarization matching / next state ----------------
  logic fin;                // block finishes this cycle
  logic [3:0] nxt_lower;
  logic has_lower;
  always_comb begin
    has_lower = 1'b0; nxt_lower = '0;
    for (int k = 0; k < 16; k++)
      if (4'(k) < s.pos && s.sig[k]) begin has_lower = 1'b1; nxt_lower = 4'(k); end
  end

  function automatic st_t start_blk(input st_t t);
    st_t r;
    r = t;
    r.se = SE_CBF; r.cat = cmd_cat; r.maxc = cmd_maxc; r.cbf_inc = cmd_cbf_inc;
    r.pos = '0; r.at_last = 1'b0; r.sig = '0; r.bidx = '0; r.gt1 = '0; r.eq1 = '0;
    r.egk = '0; r.egbin = 1'b0; r.val = '0;
    return r;
  endfunction

  logic signed [CABAC_CW-1:0] lvl;
  logic [15:0] absv;
  logic done_sm, pdone;
  logic [3:0] lastp;
  always_comb begin
    ns = s; fin = 1'b0; done_sm = 1'b0; pdone = 1'b0; lastp = '0;
    absv = 16'(s.val) + 16'd1;
    lvl  = b1 ? -CABAC_CW'(absv) : CABAC_CW'(absv);
    if (go) begin
      case (s.se)
        SE_CBF: if (b1) begin ns.se = SE_SIG; ns.pos = '0; ns.at_last = 1'b0; end
                else fin = 1'b1;
        SE_SIG: begin
          if (!s.at_last) begin
            if (b1) begin
              ns.sig[s.pos] = 1'b1;
              if (b2) begin done_sm = 1'b1; lastp = s.pos; end
              else if (s.pos + 4'd1 == Lpos) begin ns.sig[Lpos] = 1'b1; done_sm = 1'b1; lastp = Lpos; end
              else begin ns.pos = s.pos + 4'd1; ns.at_last = 1'b0; end
            end else if (!b2v) begin
              ns.sig[Lpos] = 1'b1; done_sm = 1'b1; lastp = Lpos;
            end else if (b2) begin
              ns.sig[s.pos + 4'd1] = 1'b1; ns.pos = s.pos + 4'd1; ns.at_last = 1'b1;
            end else if (s.pos + 4'd2 == Lpos) begin
              ns.sig[Lpos] = 1'b1; done_sm = 1'b1; lastp = Lpos;
            end else begin ns.pos = s.pos + 4'd2; ns.at_last = 1'b0; end
          end else begin
            if (b1) begin done_sm = 1'b1; lastp = s.pos; end
            else if (!b2v) begin ns.sig[Lpos] = 1'b1; done_sm = 1'b1; lastp = Lpos; end
            else if (b2) begin ns.sig[s.pos + 4'd1] = 1'b1; ns.pos = s.pos + 4'd1; ns.at_last = 1'b1; end
            else if (s.pos + 4'd2 == Lpos) begin ns.sig[Lpos] = 1'b1; done_sm = 1'b1; lastp = Lpos; end
            else begin ns.pos = s.pos + 4'd2; ns.at_last = 1'b0; end
          end
          if (done_sm) begin ns.se = SE_ABS; ns.pos = lastp; ns.bidx = '0; ns.val = '0; end
        end
        SE_ABS: begin
          if (!b1) begin ns.val = 15'(s.bidx); pdone = 1'b1; end
          else if (!b2v) begin ns.val = 15'd14; pdone = 1'b1; end
          else if (!b2) begin ns.val = 15'(s.bidx) + 15'd1; pdone = 1'b1; end
          else if (s.bidx + 4'd2 == 4'd14) begin ns.val = 15'd14; pdone = 1'b1; end
          else ns.bidx = s.bidx + 4'd2;
          if (pdone) begin
            ns.se = (ns.val == 15'd14) ? SE_SUF : SE_SIGN;
            ns.egk = '0; ns.egbin = 1'b0;
          end
        end
        SE_SUF: begin
          if (!s.egbin) begin
            if (b1) begin ns.val = s.val + 15'(1 << s.egk); ns.egk = s.egk + 5'd1; end
            else if (s.egk == 5'd0) ns.se = SE_SIGN;
            else ns.egbin = 1'b1;
          end else begin
            ns.val = s.val + (b1 ? 15'(1 << (s.egk - 5'd1)) : 15'd0);
            ns.egk = s.egk - 5'd1;
            if (s.egk == 5'd1) ns.se = SE_SIGN;
          end
        end
        SE_SIGN: begin
          if (s.val == 15'd0) ns.eq1 = s.eq1 + 4'd1; else ns.gt1 = s.gt1 + 4'd1;
          if (has_lower) begin ns.se = SE_ABS; ns.pos = nxt_lower; ns.bidx = '0; ns.val = '0; end
          else fin = 1'b1;
        end
        default: ;
      endcase
    end
    if (fin) ns.se = SE_IDLE;
    if ((fin || s.se == SE_IDLE) && cmd_valid && !slice_init) ns = start_blk(ns);
  end

  assign cmd_ready = (fin || s.se == SE_IDLE) && !slice_init;

  // prediction of the element after coded_block_flag
  st_t pred;
  logic cbf_end, pred_is_sig, miss;
  always_comb begin
    cbf_end = go && (s.se == SE_CBF);
    pred_is_sig = last_cbf;
    pred = ns;
    if (cbf_end) begin
      if (pred_is_sig) begin
        pred = s; pred.se = SE_SIG; pred.pos = '0; pred.at_last = 1'b0;
      end else if (cmd_valid) pred = start_blk(s);
      else begin pred = s; pred.se = SE_IDLE; end
    end
    miss = cbf_end && (pred_is_sig != b1);
    // addresses: predicted element on a value-dependent transition, the
    // current state while stalled or idle, the actual next state otherwise
    an = cs(go ? pred : ns);
  end

  // write-back of updated models
  always_comb begin
    s_we = 1'b0; r_we1 = 1'b0; r_we2 = 1'b0; s_waddr = a_cur.saddr; r_waddr1 = a_cur.raddr1;
    r_waddr2 = a_cur.raddr2; s_wd = c1n; r_wd1 = c1n; r_wd2 = c2n;
    iloc = loc(init_ctx);
    if (init_we) begin
      if (iloc.valid && !iloc.is_reg) begin s_we = 1'b1; s_waddr = iloc.addr; s_wd = init_cm; end
      if (iloc.valid &&  iloc.is_reg) begin r_we1 = 1'b1; r_waddr1 = iloc.addr; r_wd1 = init_cm; end
    end else if (go && !byp) begin
      case (s.se)
        SE_CBF: s_we = 1'b1;
        SE_SIG: if (!s.at_last) begin
          r_we1 = 1'b1;                                    // SIG[i]
          if (b2v && b1) begin s_we = 1'b1; s_wd = c2n; end // LAST[i]
          if (b2v && !b1) r_we2 = 1'b1;                    // SIG[i+1]
        end else begin
          s_we = 1'b1;                                     // LAST[i]
          if (b2v) r_we2 = 1'b1;                           // SIG[i+1]
        end
        SE_ABS: if (s.bidx == 4'd0) begin
          s_we = 1'b1;
          if (b2v) begin r_we1 = 1'b1; r_wd1 = c2n; end
        end else begin
          r_we1 = 1'b1;
          if (b2v) r_wd1 = c2n;
        end
        default: ;
      endcase
    end
  end

  // working coefficient array; the finished block is copied to coeff
  logic signed [CABAC_CW-1:0] cw [16], cw_n [16];
  always_comb begin
    cw_n = cw;
    if (go && s.se == SE_SIGN) cw_n[s.pos] = lvl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s <= '0; ld <= 1'b0; last_cbf <= 1'b1; a_cur <= '0; blk_done <= 1'b0; blk_cbf <= 1'b0;
      for (int k = 0; k < 16; k++) begin coeff[k] <= '0; cw[k] <= '0; end
    end else begin
      blk_done <= fin;
      if (go && s.se == SE_CBF) begin blk_cbf <= b1; last_cbf <= b1; end
      if (fin) coeff <= cw_n;
      if (cmd_ready && cmd_valid) for (int k = 0; k < 16; k++) cw[k] <= '0;
      else cw <= cw_n;
      s     <= ns;
      a_cur <= an;
      ld    <= !miss && !init_we && !slice_init;
    end
  end

  assign busy        = (s.se != SE_IDLE);
  assign ev_bin      = go;
  assign ev_two_bins = go && !byp && b2v;
  assign ev_pred_hit = cbf_end && !miss;
  assign ev_pred_miss= miss;
  assign ev_stall    = !ld && (s.se != SE_IDLE);
endmodule
