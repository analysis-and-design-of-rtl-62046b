// tb_cabac_residual_decoder: self-checking test of the CABAC residual decoder.
// The testbench holds its own CABAC arithmetic encoder (regular and bypass
// encoding with renormalisation and outstanding-bit handling, as the standard
// specifies) and its own copy of all context-model states. It loads random
// initial states into the decoder, encodes random residual blocks of the five
// 4x4-type categories (coded_block_flag, significance map, levels with
// Exp-Golomb suffixes, signs) and checks that the decoder returns the same
// coefficients. It also checks that two bins per cycle occur, that the
// next-element prediction both hits and misses, and that a miss costs exactly
// one stall cycle.
module tb_cabac_residual_decoder;
  import entropy_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic init_we, slice_init, cmd_valid, cmd_ready;
  logic [8:0] init_ctx; cm_t init_cm;
  logic [2:0] cmd_cat; logic [4:0] cmd_maxc; logic [1:0] cmd_cbf_inc;
  logic [63:0] win; logic win_valid; logic [4:0] consume;
  logic blk_done, blk_cbf, busy;
  logic signed [15:0] coeff [16];
  logic ev_two, ev_bin, ev_hit, ev_miss, ev_stall;

  cabac_residual_decoder dut (.clk, .rst_n, .init_we, .init_ctx, .init_cm, .slice_init,
    .cmd_valid, .cmd_ready, .cmd_cat, .cmd_maxc, .cmd_cbf_inc, .win, .win_valid, .consume,
    .blk_done, .blk_cbf, .coeff, .busy, .ev_two_bins(ev_two), .ev_bin, .ev_pred_hit(ev_hit),
    .ev_pred_miss(ev_miss), .ev_stall);

  int checks = 0, failures = 0;
  // ---------------- encoder ----------------
  bit stream [0:65535];
  int wr = 0, rd = 0;
  int low, range, outstanding; bit first_bit;
  cm_t ctx [CTX_N];
  int n_two = 0, n_bins_cyc = 0, n_hit = 0, n_miss = 0, n_stall = 0, n_miss_busy = 0;
  logic miss_q = 0;

  function automatic void put_bit(input int b);
    if (first_bit) first_bit = 0;
    else begin stream[wr & 65535] = b[0]; wr++; end
    while (outstanding > 0) begin stream[wr & 65535] = !b[0]; wr++; outstanding--; end
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
    if (bin != int'(ctx[ci].mps)) begin
      low += range; range = rl;
    end
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
  function automatic void flush();
    put_bit((low >> 9) & 1);
    for (int k = 8; k >= 0; k--) begin stream[wr & 65535] = low[k]; wr++; end
  endfunction

  function automatic int catoff_sig(int c); case (c) 0: return 0; 1: return 15; 2: return 29; 3: return 44; default: return 47; endcase endfunction
  function automatic int catoff_abs(int c); case (c) 0: return 0; 1: return 10; 2: return 20; 3: return 30; default: return 39; endcase endfunction

  function automatic void enc_block(input int blk [16], input int cat, input int mc, input int cbfinc);
    int last, nz, gt1, eq1, inc;
    last = -1; nz = 0;
    for (int i = 0; i < mc; i++) if (blk[i] != 0) begin last = i; nz++; end
    enc(85 + 4 * cat + cbfinc, nz != 0);
    if (nz == 0) return;
    for (int i = 0; i < mc - 1; i++) begin
      inc = (cat == 3) ? ((i > 2) ? 2 : i) : i;
      enc(105 + catoff_sig(cat) + inc, blk[i] != 0);
      if (blk[i] != 0) begin
        enc(166 + catoff_sig(cat) + inc, i == last);
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
      enc_byp(blk[i] < 0);
      if (a == 0) eq1++; else gt1++;
    end
  endfunction

  // ---------------- bitstream window ----------------
  always_comb for (int k = 0; k < 64; k++) win[63-k] = stream[(rd + k) & 65535];
  assign win_valid = 1'b1;
  always @(posedge clk) if (rst_n) begin
    rd <= rd + int'(consume);
    if (ev_two) n_two++;
    if (ev_bin) n_bins_cyc++;
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_stall) n_stall++;
    // a miss costs a stall unless the decoder goes idle after it
    miss_q <= ev_miss;
    if (miss_q && busy) n_miss_busy++;
  end

  initial begin
    #20000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int NB = 300;
  int blks [NB][16]; int cats [NB]; int mcs [NB]; int incs [NB];
  int got = 0;

  // collect decoded blocks
  always @(posedge clk) if (rst_n && blk_done) begin
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(coeff[i]) != blks[got][i]) begin
        failures++;
        if (failures < 10) $display("blk %0d pos %0d got %0d exp %0d cat %0d", got, i, coeff[i], blks[got][i], cats[got]);
      end
    end
    got++;
  end

  initial begin
    init_we = 0; slice_init = 0; cmd_valid = 0; init_ctx = 0; init_cm = '0;
    cmd_cat = 0; cmd_maxc = 16; cmd_cbf_inc = 0;
    // random initial context states, shared with the encoder
    for (int i = 0; i < CTX_N; i++) begin
      ctx[i].state = 6'($urandom % 63); ctx[i].mps = 1'($urandom % 2);
    end
    for (int b = 0; b < NB; b++) begin
      int dens;
      cats[b] = b % 5;
      mcs[b] = (cats[b] == 0 || cats[b] == 2) ? 16 : (cats[b] == 3 ? 4 : 15);
      incs[b] = $urandom % 4;
      dens = (b % 11 == 0) ? 0 : ($urandom % 5);
      for (int i = 0; i < 16; i++) begin
        blks[b][i] = 0;
        if (i < mcs[b] && ($urandom % 4) < dens) begin
          int m;
          case ($urandom % 8) 0,1,2,3: m = 1; 4,5: m = 2 + $urandom % 4; 6: m = 6 + $urandom % 12; default: m = 14 + $urandom % 300; endcase
          blks[b][i] = ($urandom % 2) ? m : -m;
        end
      end
    end
    repeat (3) @(negedge clk); rst_n = 1;
    // load contexts
    for (int i = 0; i < CTX_N; i++) begin
      @(negedge clk); init_we = 1; init_ctx = 9'(i); init_cm = ctx[i];
    end
    @(negedge clk); init_we = 0;
    // encode all blocks
    low = 0; range = 510; outstanding = 0; first_bit = 1;
    for (int b = 0; b < NB; b++) enc_block(blks[b], cats[b], mcs[b], incs[b]);
    flush();
    for (int k = 0; k < 128; k++) begin stream[wr & 65535] = 0; wr++; end
    @(negedge clk); slice_init = 1; @(negedge clk); slice_init = 0;
    for (int b = 0; b < NB; b++) begin
      cmd_valid = 1; cmd_cat = 3'(cats[b]); cmd_maxc = 5'(mcs[b]); cmd_cbf_inc = 2'(incs[b]);
      @(posedge clk); while (!cmd_ready) @(posedge clk);
      @(negedge clk);
    end
    cmd_valid = 0;
    while (got < NB) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++; if (got != NB) failures++;
    checks++; if (n_two == 0) begin failures++; $display("no two-bin cycle"); end
    checks++; if (n_hit == 0) begin failures++; $display("no prediction hit"); end
    checks++; if (n_miss == 0) begin failures++; $display("no prediction miss"); end
    // every prediction miss costs exactly one stall cycle
    checks++; if (n_stall != n_miss_busy) begin failures++; $display("stalls %0d != misses %0d", n_stall, n_miss_busy); end
    $display("bin cycles %0d two-bin cycles %0d hits %0d misses %0d stalls %0d", n_bins_cyc, n_two, n_hit, n_miss, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
