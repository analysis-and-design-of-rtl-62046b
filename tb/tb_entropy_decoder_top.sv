// tb_entropy_decoder_top: end-to-end test of the entropy decoder at its
// default parameters. One bitstream is fed as 32-bit words (with random gaps)
// through the bitstream fetcher: first a run of CAVLC-coded blocks (the
// worked example block, then random 4x4, AC and chroma DC blocks over all nC
// table ranges), then, after switching entropy_coding_mode, a CABAC slice of
// random residual blocks of all five 4x4 categories. Reference values come
// from the encoders in tb_enc_pkg. Checks: every coefficient, that the CAVLC
// part consumes exactly its bits, and that every mechanism occurred:
// two-level decoding, two run_before per cycle, the four CAVLC skips, CABAC
// two-bin cycles, prediction hit, prediction miss with its stall, fetcher
// back-pressure, window underflow stalls and the mode switch. A short stored
// stream with three slices (AVC, SVC spatial layer, SVC quality layer) is
// run through the SVC start-code scanner and its events are compared. In
// parallel with the CAVLC part, the quality-layer engine set decodes a
// second stream: a run of CAVLC blocks on its own CAVLC decoder, then, after
// its own mode switch, a CABAC slice through its reduced context memory; the
// cycles in which both engine sets work at once are counted.
module tb_entropy_decoder_top;
  import entropy_pkg::*;
  import tb_enc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic mode;
  logic [31:0] bs_data; logic bs_valid, bs_ready; logic [31:0] bit_pos;
  logic cv_start; logic signed [5:0] cv_nc; logic [4:0] cv_maxc;
  logic cv_busy, cv_done; logic [4:0] cv_tc; logic signed [12:0] cv_coeff [16]; logic [3:0] cv_skip;
  logic cm_we; logic [8:0] cm_ctx; cm_t cm_val; logic slice_init;
  logic cb_valid, cb_ready; logic [2:0] cb_cat; logic [4:0] cb_maxc; logic [1:0] cb_inc;
  logic cb_busy, cb_done, cb_cbf; logic signed [15:0] cb_coeff [16]; logic [4:0] cb_ev;

  entropy_decoder_top dut (.clk, .rst_n, .entropy_coding_mode(mode),
    .bs_data, .bs_valid, .bs_ready, .bs_bit_pos(bit_pos),
    .cavlc_start(cv_start), .cavlc_nc(cv_nc), .cavlc_max_num_coeff(cv_maxc),
    .cavlc_busy(cv_busy), .cavlc_done(cv_done), .cavlc_total_coeff(cv_tc),
    .cavlc_coeff(cv_coeff), .cavlc_skip_events(cv_skip),
    .cm_init_we(cm_we), .cm_init_ctx(cm_ctx), .cm_init_value(cm_val), .cabac_slice_init(slice_init),
    .cabac_cmd_valid(cb_valid), .cabac_cmd_ready(cb_ready), .cabac_cmd_cat(cb_cat),
    .cabac_cmd_maxc(cb_maxc), .cabac_cmd_cbf_inc(cb_inc), .cabac_busy(cb_busy),
    .cabac_done(cb_done), .cabac_cbf(cb_cbf), .cabac_coeff(cb_coeff), .cabac_events(cb_ev),
    .scan_data(sc_data), .scan_valid(sc_valid), .scan_found(sc_found), .scan_addr(sc_addr),
    .scan_quality(sc_q), .scan_nal_type(sc_type), .scan_dependency_id(sc_did), .scan_quality_id(sc_qid),
    .q_bs_data(q_data), .q_bs_valid(q_valid), .q_bs_ready(q_ready), .q_bs_bit_pos(q_bit_pos),
    .q_cm_init_we(q_we), .q_cm_init_ctx(q_ctx), .q_cm_init_value(q_val), .q_slice_init(q_sinit),
    .q_cmd_valid(q_cvalid), .q_cmd_ready(q_cready), .q_cmd_cat(q_cat), .q_cmd_maxc(q_maxc),
    .q_cmd_cbf_inc(q_inc), .q_busy(q_busy), .q_done(q_done), .q_cbf(q_cbf), .q_coeff(q_coeff),
    .q_events(q_ev), .q_entropy_coding_mode(q_mode), .q_cavlc_start(qv_start), .q_cavlc_nc(qv_nc),
    .q_cavlc_max_num_coeff(qv_maxc), .q_cavlc_busy(qv_busy), .q_cavlc_done(qv_done),
    .q_cavlc_total_coeff(qv_tc), .q_cavlc_coeff(qv_coeff), .q_cavlc_skip_events(qv_skip));

  // quality-layer engine: second stream, blocks and counters
  localparam int NQ = 150, NQV = 60;
  logic q_mode, qv_start; logic signed [5:0] qv_nc; logic [4:0] qv_maxc;
  logic qv_busy, qv_done; logic [4:0] qv_tc; logic signed [12:0] qv_coeff [16]; logic [3:0] qv_skip;
  int qvblk [NQV][16]; int qvmc [NQV]; int qvnc [NQV]; int n_qv = 0;
  bit qstream [0:65535]; int qwr;
  logic [31:0] q_data, q_bit_pos; logic q_valid, q_ready;
  logic q_we; logic [8:0] q_ctx; cm_t q_val; logic q_sinit;
  logic q_cvalid, q_cready; logic [2:0] q_cat; logic [4:0] q_maxc; logic [1:0] q_inc;
  logic q_busy, q_done, q_cbf; logic signed [15:0] q_coeff [16]; logic [4:0] q_ev;
  int qblk [NQ][16]; int qcat [NQ]; int qmc [NQ]; int qinc [NQ];
  cm_t qctx0 [CTX_N];
  int qwidx = 0, q_got = 0, n_qtwo = 0, n_parallel = 0; bit qgap;
  always_comb begin
    for (int k = 0; k < 32; k++) q_data[31-k] = qstream[(32 * qwidx + k) % 65536];
    q_valid = !qgap && (32 * qwidx < qwr);
  end
  always @(posedge clk) begin
    qgap <= ($urandom % 5) == 0;
    if (rst_n && q_valid && q_ready) qwidx <= qwidx + 1;
    if (rst_n && q_ev[0]) n_qtwo++;
    if (rst_n && (q_busy || qv_busy) && (cv_busy || cb_busy)) n_parallel++;
    if (rst_n && q_done) begin
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(q_coeff[i]) != qblk[q_got][i]) begin
          failures++;
          if (failures < 10) $display("quality blk %0d pos %0d got %0d exp %0d", q_got, i, q_coeff[i], qblk[q_got][i]);
        end
      end
      q_got++;
    end
  end

  // SVC scanner: a short stored stream with one base-layer slice, one
  // spatial-layer slice and one quality-layer slice
  logic [31:0] sc_data; logic sc_valid, sc_found, sc_q; logic [31:0] sc_addr;
  logic [4:0] sc_type; logic [2:0] sc_did; logic [3:0] sc_qid;
  localparam logic [31:0] SC_WORDS [8] = '{32'h0000_0001, 32'h65B8_4411, 32'hAA00_0000,
    32'h0174_8020, 32'h3355_0000, 32'h0001_7480, 32'h1122_6677, 32'h0000_0000};
  int sc_n = 0, sc_ev = 0, sc_qual = 0;
  localparam int SC_ADDR [3] = '{0, 9, 18};
  localparam logic [12:0] SC_INFO [3] = '{{1'b0, 5'd5, 3'd0, 4'd0}, {1'b0, 5'd20, 3'd2, 4'd0}, {1'b1, 5'd20, 3'd1, 4'd1}};

  int checks = 0, failures = 0;
  localparam int NV = 300, NC = 300;
  int vblk [NV][16]; int vmc [NV]; int vnc [NV];
  int cblk [NC][16]; int ccat [NC]; int cmc [NC]; int cinc [NC];
  int cavlc_end;

  // mechanism counters
  int n_lvl2 = 0, n_run2 = 0, n_skip [4] = '{0,0,0,0}, n_two = 0, n_hit = 0, n_miss = 0, n_stall = 0;
  int n_backpressure = 0, n_underflow = 0, n_switch = 0, n_scan = 0;
  logic mode_q, miss_q = 0;
  int n_miss_busy = 0;

  // word feeder with random gaps
  int widx = 0; bit gap;
  always_comb begin
    for (int k = 0; k < 32; k++) bs_data[31-k] = stream[(32 * widx + k) % 131072];
    bs_valid = !gap && (32 * widx < wr);
  end
  assign sc_valid = rst_n && sc_n < 8;
  assign sc_data  = SC_WORDS[sc_n % 8];
  always @(posedge clk) begin
    if (sc_valid) sc_n <= sc_n + 1;
    if (rst_n && sc_found) begin
      checks++;
      if (sc_ev > 2 || int'(sc_addr) != SC_ADDR[sc_ev % 3] || {sc_q, sc_type, sc_did, sc_qid} != SC_INFO[sc_ev % 3]) begin
        failures++; $display("scanner event %0d: addr %0d info %h", sc_ev, sc_addr, {sc_q, sc_type, sc_did, sc_qid});
      end
      if (sc_q) sc_qual++;
      sc_ev <= sc_ev + 1;
    end
  end
  always @(posedge clk) begin
    gap <= ($urandom % 8) == 0;
    if (rst_n && bs_valid && bs_ready) widx <= widx + 1;
    if (rst_n) begin
      if (bs_valid && !bs_ready) n_backpressure++;
      if ((cv_busy || cb_busy) && !dut.win_valid) n_underflow++;
      if (dut.u_cavlc.st == dut.u_cavlc.S_LEVEL && dut.u_cavlc.lv2_v && dut.win_valid) n_lvl2++;
      if (dut.u_cavlc.st == dut.u_cavlc.S_RUN && dut.u_cavlc.rb2_v && dut.win_valid) n_run2++;
      for (int k = 0; k < 4; k++) if (cv_skip[k]) n_skip[k]++;
      if (cb_ev[0]) n_two++;
      if (cb_ev[2]) n_hit++;
      if (cb_ev[3]) n_miss++;
      if (cb_ev[4]) n_stall++;
      // a miss costs a stall unless the decoder goes idle after it
      miss_q <= cb_ev[3];
      if (miss_q && cb_busy) n_miss_busy++;
      mode_q <= mode;
      if (mode_q != mode) n_switch++;
    end
  end

  initial begin
    #50000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cb_got = 0;
  always @(posedge clk) if (rst_n && cb_done) begin
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (int'(cb_coeff[i]) != cblk[cb_got][i]) begin
        failures++;
        if (failures < 10) $display("CABAC blk %0d pos %0d got %0d exp %0d", cb_got, i, cb_coeff[i], cblk[cb_got][i]);
      end
    end
    cb_got++;
  end

  function automatic void rand_block(ref int b [16], input int mc, input int dens, input int big);
    for (int i = 0; i < 16; i++) begin
      b[i] = 0;
      if (i < mc && ($urandom % 4) < dens) begin
        int m;
        case ($urandom % 8) 0,1,2,3: m = 1; 4,5: m = 2 + $urandom % 4; 6: m = 6 + $urandom % 12; default: m = 14 + $urandom % big; endcase
        b[i] = ($urandom % 2 == 1) ? m : -m;
      end
    end
  endfunction

  initial begin
    automatic int ex [16] = '{0,3,0,1,-1,-1,0,1,0,0,0,0,0,0,0,0};
    mode = 0; gap = 0; cv_start = 0; cv_nc = 0; cv_maxc = 16; cm_we = 0; cm_ctx = 0; cm_val = '0;
    slice_init = 0; cb_valid = 0; cb_cat = 0; cb_maxc = 16; cb_inc = 0; mode_q = 0;
    q_we = 0; q_ctx = 0; q_val = '0; q_sinit = 0; q_cvalid = 0; q_cat = 0; q_maxc = 16; q_inc = 0; qgap = 0;
    q_mode = 0; qv_start = 0; qv_nc = 0; qv_maxc = 16;
    // ---- build the quality-layer stream (small, dense refinements) ----
    wr = 0;
    for (int b = 0; b < NQV; b++) begin
      qvmc[b] = (b % 3 == 2) ? 15 : 16;
      qvnc[b] = $urandom % 12;
      rand_block(qvblk[b], qvmc[b], $urandom % 4, 40);
      cavlc_block(qvblk[b], qvmc[b], qvnc[b]);
    end
    for (int i = 0; i < CTX_N; i++) begin ctx[i].state = 6'($urandom % 63); ctx[i].mps = 1'($urandom % 2); end
    qctx0 = ctx;
    for (int b = 0; b < NQ; b++) begin
      qcat[b] = b % 5;
      qmc[b] = (qcat[b] == 0 || qcat[b] == 2) ? 16 : (qcat[b] == 3 ? 4 : 15);
      qinc[b] = $urandom % 4;
      rand_block(qblk[b], qmc[b], (b % 8 == 0) ? 0 : 1 + $urandom % 3, 20);
    end
    cabac_start();
    for (int b = 0; b < NQ; b++) cabac_block(qblk[b], qcat[b], qmc[b], qinc[b]);
    cabac_flush();
    put(32, 0); put(32, 0); put(32, 0); put(32, 0);
    qwr = wr;
    for (int i = 0; i < qwr; i++) qstream[i] = stream[i];
    // ---- build the main bitstream ----
    wr = 0;
    vblk[0] = ex; vmc[0] = 16; vnc[0] = 0;
    for (int b = 1; b < NV; b++) begin
      case (b % 4) 0: vmc[b] = 16; 1: vmc[b] = 15; 2: vmc[b] = 4; default: vmc[b] = 16; endcase
      case ($urandom % 5) 0: vnc[b] = 0; 1: vnc[b] = 3; 2: vnc[b] = 5; 3: vnc[b] = 9; default: vnc[b] = 1; endcase
      if (vmc[b] == 4) vnc[b] = -1;
      rand_block(vblk[b], vmc[b], (b % 7 == 0) ? 4 + 0 * b : $urandom % 4, 900);
      if (b % 7 == 0) for (int i = 0; i < vmc[b]; i++) if (vblk[b][i] == 0) vblk[b][i] = 1 + $urandom % 3;
    end
    for (int b = 0; b < NV; b++) cavlc_block(vblk[b], vmc[b], vnc[b]);
    cavlc_end = wr;
    for (int i = 0; i < CTX_N; i++) begin ctx[i].state = 6'($urandom % 63); ctx[i].mps = 1'($urandom % 2); end
    for (int b = 0; b < NC; b++) begin
      ccat[b] = b % 5;
      cmc[b] = (ccat[b] == 0 || ccat[b] == 2) ? 16 : (ccat[b] == 3 ? 4 : 15);
      cinc[b] = $urandom % 4;
      rand_block(cblk[b], cmc[b], (b % 6 == 0) ? 0 : $urandom % 5, 300);
    end
    // the decoder receives the initial states; the encoder then adapts its copy
    begin
      cm_t ctx0 [CTX_N];
      ctx0 = ctx;
      cabac_start();
      for (int b = 0; b < NC; b++) cabac_block(cblk[b], ccat[b], cmc[b], cinc[b]);
      cabac_flush();
      put(32, 0); put(32, 0); put(32, 0); put(32, 0); put(32, 0); put(32, 0);
      repeat (3) @(negedge clk); rst_n = 1;
      // ---- quality-layer engine, running beside the CAVLC part ----
      fork
        begin
          for (int b = 0; b < NQV; b++) begin
            @(negedge clk); qv_start = 1; qv_nc = 6'(qvnc[b]); qv_maxc = 5'(qvmc[b]);
            @(negedge clk); qv_start = 0;
            while (!qv_done) @(negedge clk);
            for (int i = 0; i < 16; i++) begin
              checks++;
              if (int'(qv_coeff[i]) != ((i < qvmc[b]) ? qvblk[b][i] : 0)) begin
                failures++;
                if (failures < 10) $display("quality CAVLC blk %0d pos %0d got %0d exp %0d", b, i, qv_coeff[i], qvblk[b][i]);
              end
            end
            n_qv++;
          end
          @(negedge clk); q_mode = 1;
          for (int i = 0; i < CTX_N; i++) begin
            @(negedge clk); q_we = 1; q_ctx = 9'(i); q_val = qctx0[i];
          end
          @(negedge clk); q_we = 0;
          while (!dut.q_win_valid) @(negedge clk);
          q_sinit = 1; @(negedge clk); q_sinit = 0;
          for (int b = 0; b < NQ; b++) begin
            q_cvalid = 1; q_cat = 3'(qcat[b]); q_maxc = 5'(qmc[b]); q_inc = 2'(qinc[b]);
            @(posedge clk); while (!q_cready) @(posedge clk);
            @(negedge clk);
          end
          q_cvalid = 0;
        end
      join_none
      // ---- CAVLC part ----
      for (int b = 0; b < NV; b++) begin
        @(negedge clk); cv_start = 1; cv_nc = 6'(vnc[b]); cv_maxc = 5'(vmc[b]);
        @(negedge clk); cv_start = 0;
        while (!cv_done) @(negedge clk);
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'(cv_coeff[i]) != ((i < vmc[b]) ? vblk[b][i] : 0)) begin
            failures++;
            if (failures < 10) $display("CAVLC blk %0d pos %0d got %0d exp %0d", b, i, cv_coeff[i], vblk[b][i]);
          end
        end
      end
      @(negedge clk);
      checks++;
      if (int'(bit_pos) != cavlc_end) begin failures++; $display("CAVLC consumed %0d bits, expected %0d", bit_pos, cavlc_end); end
      // ---- CABAC part ----
      mode = 1;
      for (int i = 0; i < CTX_N; i++) begin
        @(negedge clk); cm_we = 1; cm_ctx = 9'(i); cm_val = ctx0[i];
      end
      @(negedge clk); cm_we = 0;
      while (!dut.win_valid) @(negedge clk);
      slice_init = 1; @(negedge clk); slice_init = 0;
    end
    for (int b = 0; b < NC; b++) begin
      cb_valid = 1; cb_cat = 3'(ccat[b]); cb_maxc = 5'(cmc[b]); cb_inc = 2'(cinc[b]);
      @(posedge clk); while (!cb_ready) @(posedge clk);
      @(negedge clk);
    end
    cb_valid = 0;
    while (cb_got < NC || q_got < NQ) @(negedge clk);
    repeat (3) @(negedge clk);
    begin
      automatic string nm [17] = '{"two-level decode", "two run_before", "zero-block skip", "level skip",
                         "total_zeros skip", "run skip", "CABAC two bins", "prediction hit",
                         "prediction miss", "fetcher back-pressure", "window underflow", "mode switch",
                         "SVC slice start", "SVC quality slice",
                         "quality-engine two bins", "both engines busy", "quality-set CAVLC block"};
      int cnt [17];
      cnt = '{n_lvl2, n_run2, n_skip[0], n_skip[1], n_skip[2], n_skip[3], n_two, n_hit, n_miss,
              n_backpressure, n_underflow, n_switch, sc_ev, sc_qual,
              n_qtwo, n_parallel, n_qv};
      for (int k = 0; k < 17; k++) begin
        checks++;
        $display("%-22s %0d", nm[k], cnt[k]);
        if (cnt[k] == 0) begin failures++; $display("  never happened"); end
      end
      checks++;
      if (n_stall != n_miss_busy) begin failures++; $display("stalls %0d != misses %0d", n_stall, n_miss_busy); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
