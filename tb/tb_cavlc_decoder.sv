// tb_cavlc_decoder: self-checking test of the CAVLC decoder.
// 1) Decodes the worked example block (bitstream 0000100 011 1 0010 111 10 1 1 01,
//    nC 0) and checks the reconstructed block and its 7-cycle schedule
//    (token, signs, two levels, total_zeros, three run cycles).
// 2) Encodes random 4x4 / AC / chroma DC blocks with an independent CAVLC
//    encoder written here (standard encoding rules) and checks that the
//    decoder returns the same coefficients, over all nC table ranges.
module tb_cavlc_decoder;
  import entropy_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start; logic signed [5:0] nc; logic [4:0] maxc;
  logic [63:0] win; logic win_valid; logic [6:0] consume;
  logic busy, done; logic [4:0] tco; logic signed [12:0] coeff [16]; logic [3:0] skips;
  cavlc_decoder dut (.clk, .rst_n, .start, .nc, .max_num_coeff(maxc), .win, .win_valid,
                     .consume, .busy, .done, .total_coeff_o(tco), .coeff, .skip_events(skips));

  int checks = 0, failures = 0;
  bit stream [0:8191];
  int wr, rd;
  int skip_cnt [4];
  int lvl2_cnt = 0;

  always_comb for (int k = 0; k < 64; k++) win[63-k] = stream[(rd + k) & 8191];
  assign win_valid = 1'b1;
  always @(posedge clk) begin
    if (rst_n) rd <= rd + int'(consume);
    for (int k = 0; k < 4; k++) if (skips[k]) skip_cnt[k]++;
    if (dut.st == dut.S_LEVEL && dut.lv2_v) lvl2_cnt++;
  end

  task automatic put(input int len, input int val);
    for (int k = len - 1; k >= 0; k--) begin stream[wr & 8191] = val[k]; wr++; end
  endtask

  function automatic void rb_code(input int zl, input int r, output int l, output int b);
    case (zl)
      1: begin l = 1; b = (r == 0) ? 1 : 0; end
      2: begin if (r == 0) begin l = 1; b = 1; end else begin l = 2; b = (r == 1) ? 1 : 0; end end
      3: begin l = 2; b = 3 - r; end
      4: begin if (r < 3) begin l = 2; b = 3 - r; end else begin l = 3; b = (r == 3) ? 1 : 0; end end
      5: begin if (r < 2) begin l = 2; b = 3 - r; end else begin l = 3; b = 5 - r; end end
      6: begin
        l = 3;
        case (r) 0: begin l = 2; b = 3; end 1: b = 0; 2: b = 1; 3: b = 3; 4: b = 2; 5: b = 5; default: b = 4; endcase
      end
      default: begin if (r < 7) begin l = 3; b = 7 - r; end else begin l = r - 3; b = 1; end end
    endcase
  endfunction

  // encode a block of maxc coefficients (scan order) with the given nC
  task automatic encode(input int blk [16], input int mc, input int ncv);
    int tc, t1, tz, nzpos [16], n, sl, lc, pre, suf, sufsz, zl, idx, l, b;
    bit t1done;
    n = 0;
    for (int i = 0; i < mc; i++) if (blk[i] != 0) begin nzpos[n] = i; n++; end
    tc = n; t1 = 0; t1done = 0;
    for (int j = n - 1; j >= 0 && !t1done; j--)
      if ((blk[nzpos[j]] == 1 || blk[nzpos[j]] == -1) && t1 < 3) t1++; else t1done = 1;
    // coeff_token
    idx = 4 * tc + t1;
    if (ncv >= 8) begin
      if (tc == 0) put(6, 3); else put(6, ((tc - 1) << 2) | t1);
    end else if (ncv < 0) put(int'(CDC_LEN[idx]), int'(CDC_BITS[idx]));
    else if (ncv < 2) put(int'(CT0_LEN[idx]), int'(CT0_BITS[idx]));
    else if (ncv < 4) put(int'(CT1_LEN[idx]), int'(CT1_BITS[idx]));
    else put(int'(CT2_LEN[idx]), int'(CT2_BITS[idx]));
    if (tc == 0) return;
    for (int j = 0; j < t1; j++) put(1, blk[nzpos[n - 1 - j]] < 0 ? 1 : 0);
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int j = t1; j < tc; j++) begin
      int lev;
      lev = blk[nzpos[n - 1 - j]];
      lc = (lev > 0) ? 2 * lev - 2 : -2 * lev - 1;
      if (j == t1 && t1 < 3) lc -= 2;
      if (sl == 0) begin
        if (lc < 14) begin pre = lc; sufsz = 0; suf = 0; end
        else if (lc < 30) begin pre = 14; sufsz = 4; suf = lc - 14; end
        else begin pre = 15; sufsz = 12; suf = lc - 30; end
      end else begin
        if (lc < (15 << sl)) begin pre = lc >> sl; sufsz = sl; suf = lc & ((1 << sl) - 1); end
        else begin pre = 15; sufsz = 12; suf = lc - (15 << sl); end
      end
      put(pre + 1, 1);
      if (sufsz > 0) put(sufsz, suf);
      if (sl == 0) sl = 1;
      if ((lev < 0 ? -lev : lev) > (3 << (sl - 1)) && sl < 6) sl++;
    end
    if (tc < mc) begin
      tz = nzpos[n - 1] + 1 - tc;
      if (mc == 4) begin
        case (tc)
          1: begin if (tz == 0) put(1, 1); else if (tz == 1) put(2, 1); else if (tz == 2) put(3, 1); else put(3, 0); end
          2: begin if (tz == 0) put(1, 1); else if (tz == 1) put(2, 1); else put(2, 0); end
          default: put(1, tz == 0 ? 1 : 0);
        endcase
      end else put(int'(TZ_LEN[16 * (tc - 1) + tz]), int'(TZ_BITS[16 * (tc - 1) + tz]));
      zl = tz;
      for (int j = n - 1; j > 0 && zl > 0; j--) begin
        int r;
        r = nzpos[j] - nzpos[j - 1] - 1;
        rb_code(zl, r, l, b);
        put(l, b);
        zl -= r;
      end
    end
  endtask

  task automatic run_block(input int blk [16], input int mc, input int ncv, input bit chk_cycles,
                           input int exp_cycles);
    int cyc;
    @(negedge clk);
    start = 1; nc = 6'(ncv); maxc = 5'(mc);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(coeff[i]) != ((i < mc) ? blk[i] : 0)) begin
        failures++;
        if (failures < 10) $display("mismatch pos %0d got %0d exp %0d (mc %0d nc %0d)", i, coeff[i], blk[i], mc, ncv);
      end
    end
    if (chk_cycles) begin
      checks++;
      if (cyc - 1 != exp_cycles) begin failures++; $display("cycles %0d expected %0d", cyc - 1, exp_cycles); end
    end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int blk [16];
    int ex [16] = '{0,3,0,1,-1,-1,0,1,0,0,0,0,0,0,0,0};
    start = 0; nc = 0; maxc = 16; wr = 0; rd = 0;
    foreach (skip_cnt[k]) skip_cnt[k] = 0;
    put(24, 24'b000010001110010111101101);
    repeat (3) @(negedge clk); rst_n = 1;
    run_block(ex, 16, 0, 1, 7);
    for (int t = 0; t < 400; t++) begin
      int mc, ncv, dens;
      case (t % 4) 0: mc = 16; 1: mc = 15; 2: mc = 4; default: mc = 16; endcase
      case ($urandom % 5) 0: ncv = 0; 1: ncv = 3; 2: ncv = 5; 3: ncv = 9; default: ncv = 1; endcase
      if (mc == 4) ncv = -1;
      dens = $urandom % 4;
      for (int i = 0; i < 16; i++) begin
        blk[i] = 0;
        if (i < mc && ($urandom % 4) < dens + (t % 7 == 0 ? 4 : 0)) begin
          int m;
          case ($urandom % 6) 0,1,2: m = 1; 3: m = 2 + $urandom % 3; 4: m = 5 + $urandom % 20; default: m = 20 + $urandom % 900; endcase
          blk[i] = ($urandom % 2) ? m : -m;
        end
      end
      encode(blk, mc, ncv);
      run_block(blk, mc, ncv, 0, 0);
    end
    // every skip of the decoder and the two-level path must have been exercised
    for (int k = 0; k < 4; k++) begin checks++; if (skip_cnt[k] == 0) begin failures++; $display("skip %0d never seen", k); end end
    checks++; if (lvl2_cnt == 0) begin failures++; $display("two-level decode never used"); end
    $display("skips %0d %0d %0d %0d, two-level cycles %0d", skip_cnt[0], skip_cnt[1], skip_cnt[2], skip_cnt[3], lvl2_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
