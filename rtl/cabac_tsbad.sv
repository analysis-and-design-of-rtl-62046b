// cabac_tsbad: two-symbol binary arithmetic decoding engine with the
// range/offset registers of the CABAC decoder.
//
// Regular mode decodes one or two bins per cycle. The bin decision uses the
// reordered form O_LPS = (O - R) + R_LPS: (O - R) is formed while R_LPS is
// looked up, and the bin is LPS when O_LPS >= 0. Both outcomes of the first
// bin are prepared in parallel for the second bin:
//   first bin MPS:  O - R after renormalisation = (O_LPS << s) + new bits
//   first bin LPS:  O - R after renormalisation = ((O - R) << s) + new bits
// with s = 0/1 for MPS and s = 1..7 (a table on R_LPS) for LPS, so the second
// decision is one more addition of its R'_LPS. The second bin's context model
// and whether a second bin exists depend on the first bin's value, so the
// caller supplies both choices (cm2_0/want2_0 for a first bin of 0, cm2_1/
// want2_1 for 1). same_x says the second bin uses the first bin's model; the
// model updated by the first bin is then used directly.
// Bypass mode decodes one equiprobable bin per cycle. init loads range 0x1FE
// and the first 9 bits as offset. win[15] is the next bitstream bit; consume
// is the number of bits used. All outputs are combinational; range and offset
// are updated on the clock edge when en (or init) is high.
// Follows the document: the reordered bin decision, the parallel
// preparation of the second bin for both first-bin outcomes, the MPS shift of
// 0/1 and the LPS shift table, and forwarding the updated model when both
// bins share it. Own choice: the second bin's R_LPS is looked up on each
// path's renormalised range (two look-ups) instead of selecting among four
// precomputed intervals; the result is the same.
module cabac_tsbad
  import entropy_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic        bypass,
  input  logic [15:0] win,
  input  cm_t         cm1,
  input  cm_t         cm2_0,
  input  cm_t         cm2_1,
  input  logic        want2_0,
  input  logic        want2_1,
  input  logic        same_0,
  input  logic        same_1,
  output logic        bin1,
  output logic        bin2,
  output logic        bin2_valid,
  output cm_t         cm1_new,
  output cm_t         cm2_new,
  output logic [4:0]  consume
);
  logic [8:0] rng, ofs;

  logic [7:0]  rlps;
  logic [8:0]  rmps;
  logic signed [11:0] d, olps;
  logic        lps1;
  // per path of the first bin: 0 = MPS, 1 = LPS
  logic [2:0]  sh [2];
  logic [8:0]  r1 [2];
  logic signed [11:0] d1 [2];
  cm_t         c1u [2], c2 [2];
  logic [7:0]  rlps2 [2];
  logic signed [11:0] olps2 [2];
  // second bin
  logic        v1, lps2, w2;
  logic [8:0]  r2, o1, o2, r2n;
  logic [2:0]  sh2;
  logic [15:0] win1;
  logic [9:0]  byp;

  function automatic logic [6:0] take(input logic [15:0] w, input logic [2:0] n);
    return 7'(w >> (5'd16 - 5'(n)));
  endfunction

  always_comb begin
    // ---- first bin, both paths ----
    rlps = range_lps(cm1.state, rng[7:6]);
    rmps = rng - {1'b0, rlps};
    d    = 12'(signed'({3'b0, ofs})) - 12'(signed'({3'b0, rng}));
    olps = d + 12'(signed'({4'b0, rlps}));
    lps1 = ~olps[11];
    sh[0] = rmps[8] ? 3'd0 : 3'd1;
    sh[1] = renorm_shift({1'b0, rlps});
    r1[0] = rmps << sh[0];
    r1[1] = 9'({1'b0, rlps} << sh[1]);
    d1[0] = (olps <<< sh[0]) + 12'(take(win, sh[0]));
    d1[1] = (d    <<< sh[1]) + 12'(take(win, sh[1]));
    c1u[0] = cm_update(cm1, cm1.mps);
    c1u[1] = cm_update(cm1, ~cm1.mps);
    // ---- second bin, prepared for both first-bin outcomes ----
    for (int p = 0; p < 2; p++) begin
      logic vb;
      vb = (p == 1) ? ~cm1.mps : cm1.mps;        // first bin value on this path
      if (vb) c2[p] = same_1 ? c1u[p] : cm2_1;
      else    c2[p] = same_0 ? c1u[p] : cm2_0;
      rlps2[p] = range_lps(c2[p].state, r1[p][7:6]);
      olps2[p] = d1[p] + 12'(signed'({4'b0, rlps2[p]}));
    end
    // ---- select ----
    v1   = lps1 ? ~cm1.mps : cm1.mps;
    w2   = v1 ? want2_1 : want2_0;
    lps2 = ~olps2[lps1][11];
    o1   = 9'(d1[lps1] + 12'(signed'({3'b0, r1[lps1]})));   // offset after first bin
    win1 = win << sh[lps1];
    if (lps2) begin
      r2n = {1'b0, rlps2[lps1]};
      o2  = 9'(olps2[lps1]);
    end else begin
      r2n = r1[lps1] - {1'b0, rlps2[lps1]};
      o2  = o1;
    end
    sh2 = renorm_shift(r2n);
    r2  = r2n << sh2;
    o2  = (o2 << sh2) | 9'(take(win1, sh2));
    cm1_new = c1u[lps1];
    cm2_new = cm_update(c2[lps1], lps2 ? ~c2[lps1].mps : c2[lps1].mps);
    bin2    = lps2 ? ~c2[lps1].mps : c2[lps1].mps;
    // ---- bypass ----
    byp = {ofs, win[15]};
    // ---- outputs ----
    if (init) begin
      bin1 = 1'b0; bin2_valid = 1'b0; consume = 5'd9;
    end else if (bypass) begin
      bin1 = (byp >= {1'b0, rng}); bin2_valid = 1'b0; consume = 5'd1;
    end else begin
      bin1 = v1; bin2_valid = w2;
      consume = w2 ? 5'(sh[lps1]) + 5'(sh2) : 5'(sh[lps1]);
    end
    if (!en && !init) consume = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rng <= 9'h1FE; ofs <= '0;
    end else if (init) begin
      rng <= 9'h1FE; ofs <= win[15:7];
    end else if (en) begin
      if (bypass) begin
        ofs <= bin1 ? 9'(byp - {1'b0, rng}) : byp[8:0];
      end else if (w2) begin
        rng <= r2; ofs <= o2;
      end else begin
        rng <= r1[lps1]; ofs <= o1;
      end
    end
  end
endmodule
