// cavlc_decoder: CAVLC residual block decoder built around the two-level
// (DBTLD) engine.
//
// One decoding unit works per cycle, chosen by the controller:
//   TOKEN  coeff_token          -> TotalCoeff, TrailingOnes
//   T1     all trailing-one signs in one cycle
//   LEVEL  one or two levels per cycle (cavlc_dbtld)
//   TZ     total_zeros
//   RUN    one or two run_before per cycle, moving coefficients in place
// Nonzero coefficients are pushed into a single 16 x 13-bit output buffer in
// scan order (highest frequency at index TotalCoeff-1). During RUN each
// coefficient at index coeffsLeft-1 is moved to coeffsLeft+zerosLeft-1 and
// its old place is cleared, one or two coefficients per cycle, starting from
// the last one, until no zeros are left. Skips: TotalCoeff 0 ends the block;
// TotalCoeff == TrailingOnes skips LEVEL; TotalCoeff == maxNumCoeff skips TZ
// and RUN; total_zeros 0 or TotalCoeff 1 skips RUN.
// Interface: start/nc/max_num_coeff begin a block (accepted when idle); win is
// the bitstream window (win[63] next bit), valid when win_valid; consume is
// the number of bits used this cycle. done pulses for one cycle with the
// block in coeff[] (index = scan position). Units other than the active one
// see a window but their results are ignored (the document gates them off
// for power; this design does not model clock or operand gating).
// Timing: one unit per cycle as listed; a cycle without a valid window waits.
// The worked 10-coefficient example takes 7 cycles from start to done.
// Follows the document: the unit sequence, signs in one cycle, the single
// 16 x 13-bit buffer with moves to coeffsLeft+zerosLeft-1, two runs per cycle
// and the four skips. Own choices: the FSM encoding and the command handshake.
module cavlc_decoder
  import entropy_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic signed [5:0]          nc,
  input  logic [4:0]                 max_num_coeff,
  input  logic [63:0]                win,
  input  logic                       win_valid,
  output logic [6:0]                 consume,
  output logic                       busy,
  output logic                       done,
  output logic [4:0]                 total_coeff_o,
  output logic signed [LEVEL_W-1:0]  coeff [16],
  output logic [3:0]                 skip_events   // zero-block, level, total_zeros, run skips
);
  typedef enum logic [2:0] {S_IDLE, S_TOKEN, S_T1, S_LEVEL, S_TZ, S_RUN} state_t;
  state_t st;

  logic signed [5:0] nc_q;
  logic [4:0]  maxc_q, tc, ncoef;     // ncoef: coefficients pushed so far
  logic [1:0]  t1;
  logic [2:0]  sl;
  logic [4:0]  coeffs_left;
  logic [3:0]  zeros_left;
  logic signed [LEVEL_W-1:0] buff [16];

  // decoding units
  logic [4:0] ct_tc, ct_len; logic [1:0] ct_t1; logic ct_hit;
  cavlc_coeff_token_dec u_ct (.win(win[63:48]), .nc(nc_q), .total_coeff(ct_tc),
                              .trailing_ones(ct_t1), .len(ct_len), .hit(ct_hit));

  logic signed [LEVEL_W-1:0] lv1, lv2; logic lv2_v; logic [6:0] lv_len; logic [2:0] sl_next;
  logic first_adj, want2;
  assign first_adj = (ncoef == 5'(t1)) && (t1 < 2'd3);
  assign want2     = (tc - ncoef) >= 5'd2;
  cavlc_dbtld u_lv (.win(win), .suffix_length(sl), .first_adj(first_adj), .want2(want2),
                    .level1(lv1), .level2(lv2), .level2_valid(lv2_v), .len(lv_len),
                    .suffix_length_next(sl_next));

  logic [3:0] tz_val, tz_len;
  cavlc_total_zeros_dec u_tz (.win(win[63:55]), .total_coeff(tc), .chroma_dc(maxc_q == 5'd4),
                              .total_zeros(tz_val), .len(tz_len));

  logic [3:0] rb1, rb2; logic rb2_v; logic [4:0] rb_len; logic rb_want2;
  assign rb_want2 = coeffs_left > 5'd2;
  cavlc_run_before_dec u_rb (.win(win[63:42]), .zeros_left(zeros_left), .want2(rb_want2),
                             .run1(rb1), .run2(rb2), .run2_valid(rb2_v), .len(rb_len));

  // run stage helpers
  logic [3:0] zl1, zl2;
  logic [4:0] src1, dst1, src2, dst2;
  logic       mv2;
  always_comb begin
    src1 = coeffs_left - 5'd1;
    dst1 = coeffs_left + 5'(zeros_left) - 5'd1;
    zl1  = (coeffs_left > 5'd1) ? zeros_left - rb1 : 4'd0;
    mv2  = (coeffs_left > 5'd1) && (zl1 != 0);
    src2 = coeffs_left - 5'd2;
    dst2 = coeffs_left - 5'd2 + 5'(zl1);
    zl2  = rb2_v ? zl1 - rb2 : zl1;
  end

  always_comb begin
    consume = '0;
    if (win_valid) begin
      case (st)
        S_TOKEN: consume = {2'b0, ct_len};
        S_T1:    consume = {5'b0, t1};
        S_LEVEL: consume = lv_len;
        S_TZ:    consume = {3'b0, tz_len};
        S_RUN:   consume = (coeffs_left > 5'd1) ? {2'b0, rb_len} : 7'd0;
        default: consume = '0;
      endcase
    end
  end

  assign busy          = (st != S_IDLE);
  assign total_coeff_o = tc;
  assign coeff         = buff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; done <= 1'b0; nc_q <= '0; maxc_q <= 5'd16; tc <= '0; t1 <= '0;
      ncoef <= '0; sl <= '0; coeffs_left <= '0; zeros_left <= '0; skip_events <= '0;
      for (int k = 0; k < 16; k++) buff[k] <= '0;
    end else begin
      done <= 1'b0;
      skip_events <= '0;
      case (st)
        S_IDLE: if (start) begin
          st <= S_TOKEN; nc_q <= nc; maxc_q <= max_num_coeff; ncoef <= '0;
          for (int k = 0; k < 16; k++) buff[k] <= '0;
        end
        S_TOKEN: if (win_valid) begin
          tc <= ct_tc; t1 <= ct_t1;
          sl <= (ct_tc > 5'd10 && ct_t1 < 2'd3) ? 3'd1 : 3'd0;
          if (ct_tc == 5'd0) begin
            st <= S_IDLE; done <= 1'b1; skip_events[0] <= 1'b1;
          end else if (ct_t1 != 2'd0) st <= S_T1;
          else st <= S_LEVEL;
        end
        S_T1: if (win_valid) begin
          // first decoded coefficient goes to the highest index
          for (int k = 0; k < 3; k++)
            if (k < int'(t1)) buff[4'(tc - 5'd1 - 5'(k))] <= win[63-k] ? -LEVEL_W'(1) : LEVEL_W'(1);
          ncoef <= 5'(t1);
          if (tc == 5'(t1)) begin
            skip_events[1] <= 1'b1;
            if (tc == maxc_q) begin st <= S_IDLE; done <= 1'b1; skip_events[2] <= 1'b1; end
            else st <= S_TZ;
          end else st <= S_LEVEL;
        end
        S_LEVEL: if (win_valid) begin
          buff[4'(tc - 5'd1 - ncoef)] <= lv1;
          if (lv2_v) buff[4'(tc - 5'd2 - ncoef)] <= lv2;
          ncoef <= ncoef + (lv2_v ? 5'd2 : 5'd1);
          sl    <= sl_next;
          if (ncoef + (lv2_v ? 5'd2 : 5'd1) == tc) begin
            if (tc == maxc_q) begin st <= S_IDLE; done <= 1'b1; skip_events[2] <= 1'b1; end
            else st <= S_TZ;
          end
        end
        S_TZ: if (win_valid) begin
          zeros_left  <= tz_val;
          coeffs_left <= tc;
          if (tz_val == 4'd0 || tc == 5'd1) begin
            // a single coefficient takes all zeros below it in one move
            if (tc == 5'd1 && tz_val != 4'd0) begin
              buff[4'(5'(tz_val))] <= buff[0];
              buff[0] <= '0;
            end
            st <= S_IDLE; done <= 1'b1; skip_events[3] <= 1'b1;
          end else st <= S_RUN;
        end
        S_RUN: if (win_valid) begin
          if (dst1 != src1) begin buff[4'(src1)] <= '0; buff[4'(dst1)] <= buff[4'(src1)]; end
          if (mv2) begin buff[4'(src2)] <= '0; buff[4'(dst2)] <= buff[4'(src2)]; end
          coeffs_left <= mv2 ? coeffs_left - 5'd2 : coeffs_left - 5'd1;
          zeros_left  <= mv2 ? zl2 : zl1;
          if (coeffs_left <= 5'd1 || zl1 == 4'd0 || (mv2 && (zl2 == 4'd0 || coeffs_left == 5'd2)))
          begin
            // the remaining coefficients already sit at their final places, except
            // the lowest one when it still has zeros below it
            st <= S_IDLE; done <= 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
