// tb_enc_pkg: reference encoders used by the system testbench. They write an
// H.264/AVC residual bitstream into a bit array:
//   cavlc_block  - CAVLC encoding of one block (coeff_token, trailing-one
//                  signs, levels with the suffixLength adaptation, total_zeros,
//                  run_before), following the standard's encoding rules;
//   cabac_*      - CABAC arithmetic encoder (regular/bypass bins,
//                  renormalisation with outstanding bits, final flush) and
//                  residual binarisation (coded_block_flag, significance map,
//                  truncated-unary + Exp-Golomb levels, signs).
// Context states are kept in ctx[] and must be loaded into the decoder.
package tb_enc_pkg;
  import entropy_pkg::*;

  bit stream [0:131071];
  int wr = 0;
  cm_t ctx [CTX_N];
  int low, range, outstanding;
  bit first_bit;

  function automatic void put(input int len, input int val);
    for (int k = len - 1; k >= 0; k--) begin stream[wr] = val[k]; wr++; end
  endfunction

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

  function automatic void cavlc_block(input int blk [16], input int mc, input int ncv);
    int tc, t1, tz, nzpos [16], n, sl, lc, pre, suf, sufsz, zl, idx, l, b;
    bit t1done;
    n = 0;
    for (int i = 0; i < mc; i++) if (blk[i] != 0) begin nzpos[n] = i; n++; end
    tc = n; t1 = 0; t1done = 0;
    for (int j = n - 1; j >= 0 && !t1done; j--)
      if ((blk[nzpos[j]] == 1 || blk[nzpos[j]] == -1) && t1 < 3) t1++; else t1done = 1;
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
  endfunction

  // ---------------- CABAC ----------------
  function automatic void cabac_start();
    low = 0; range = 510; outstanding = 0; first_bit = 1;
  endfunction
  function automatic void put_bit(input int b);
    if (first_bit) first_bit = 0;
    else begin stream[wr] = b[0]; wr++; end
    while (outstanding > 0) begin stream[wr] = !b[0]; wr++; outstanding--; end
  endfunction
  function automatic void renorm_e();
    while (range < 256) begin
      if (low < 256) put_bit(0);
      else if (low >= 512) begin low -= 512; put_bit(1); end
      else begin low -= 256; outstanding++; end
      range <<= 1; low <<= 1;
    end
  endfunction
  function automatic void enc(input int ci, input int bin);
    int q, rl;
    q = (range >> 6) & 3;
    rl = int'(range_lps(ctx[ci].state, 2'(q)));
    range -= rl;
    if (bin != int'(ctx[ci].mps)) begin low += range; range = rl; end
    ctx[ci] = cm_update(ctx[ci], bin[0]);
    renorm_e();
  endfunction
  function automatic void enc_byp(input int bin);
    low <<= 1;
    if (bin != 0) low += range;
    if (low >= 1024) begin put_bit(1); low -= 1024; end
    else if (low < 512) put_bit(0);
    else begin low -= 512; outstanding++; end
  endfunction
  function automatic void cabac_flush();
    put_bit((low >> 9) & 1);
    for (int k = 8; k >= 0; k--) begin stream[wr] = low[k]; wr++; end
  endfunction
  function automatic int catoff_sig(int c); case (c) 0: return 0; 1: return 15; 2: return 29; 3: return 44; default: return 47; endcase endfunction
  function automatic int catoff_abs(int c); case (c) 0: return 0; 1: return 10; 2: return 20; 3: return 30; default: return 39; endcase endfunction

  function automatic void cabac_block(input int blk [16], input int cat, input int mc, input int cbfinc);
    int last, nz, gt1, eq1, inc;
    last = -1; nz = 0;
    for (int i = 0; i < mc; i++) if (blk[i] != 0) begin last = i; nz++; end
    enc(85 + 4 * cat + cbfinc, int'(nz != 0));
    if (nz == 0) return;
    for (int i = 0; i < mc - 1; i++) begin
      inc = (cat == 3) ? ((i > 2) ? 2 : i) : i;
      enc(105 + catoff_sig(cat) + inc, int'(blk[i] != 0));
      if (blk[i] != 0) begin
        enc(166 + catoff_sig(cat) + inc, int'(i == last));
        if (i == last) break;
      end
    end
    gt1 = 0; eq1 = 0;
    for (int i = last; i >= 0; i--) if (blk[i] != 0) begin
      int a, pre;
      a = (blk[i] < 0 ? -blk[i] : blk[i]) - 1;
      pre = (a < 14) ? a : 14;
      for (int b = 0; b < 14; b++) begin
        int c;
        if (b == 0) c = 227 + catoff_abs(cat) + ((gt1 != 0) ? 0 : ((eq1 + 1 > 4) ? 4 : eq1 + 1));
        else c = 227 + catoff_abs(cat) + 5 + ((gt1 > 4 - (cat == 3)) ? 4 - (cat == 3) : gt1);
        if (b < pre) enc(c, 1);
        else begin if (pre < 14) enc(c, 0); break; end
      end
      if (a >= 14) begin
        int y, k;
        y = a - 14; k = 0;
        while (y >= (1 << k)) begin enc_byp(1); y -= (1 << k); k++; end
        enc_byp(0);
        while (k > 0) begin k--; enc_byp((y >> k) & 1); end
      end
      enc_byp(int'(blk[i] < 0));
      if (a == 0) eq1++; else gt1++;
    end
  endfunction
endpackage
