// tb_cabac_tsbad: checks the two-symbol binary arithmetic decoding engine
// against a bit-serial model of the standard's decoding process (regular
// DecodeDecision with renormalisation one bit at a time, DecodeBypass).
// A random bitstream is decoded with random context models, random choice of
// one or two bins per cycle, second-bin context chosen per first-bin value
// (own model or the updated first model) and random bypass cycles and idle
// cycles. Each cycle compares bin1, bin2, bin2_valid, both updated models and
// the number of bits consumed, and keeps range/offset in step with the model.
module tb_cabac_tsbad;
  import entropy_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic init, en, bypass; logic [15:0] win;
  cm_t cm1, c20, c21, n1, n2; logic w20, w21, s0, s1;
  logic b1, b2, b2v; logic [4:0] consume;
  cabac_tsbad dut (.clk, .rst_n, .init, .en, .bypass, .win, .cm1, .cm2_0(c20), .cm2_1(c21),
                   .want2_0(w20), .want2_1(w21), .same_0(s0), .same_1(s1),
                   .bin1(b1), .bin2(b2), .bin2_valid(b2v), .cm1_new(n1), .cm2_new(n2), .consume);
  int checks = 0, failures = 0, n_two = 0, n_lps = 0, n_byp = 0;
  bit bits [0:1048575];
  int p = 0, rp;
  int R, O;

  initial begin #100000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int rdbit(); int b; b = bits[rp]; rp++; return b; endfunction
  function automatic cm_t upd(input cm_t c, input int bin);
    cm_t r; r = c;
    if (bin == int'(c.mps)) begin if (c.state < 62) r.state = c.state + 1; end
    else begin if (c.state == 0) r.mps = ~c.mps; r.state = TRANS_LPS[c.state]; end
    return r;
  endfunction
  function automatic int dec(inout cm_t c);
    int rl, bin;
    rl = int'(range_lps(c.state, 2'((R >> 6) & 3)));
    R -= rl;
    if (O >= R) begin bin = 1 - int'(c.mps); O -= R; R = rl; n_lps++; end
    else bin = int'(c.mps);
    c = upd(c, bin);
    while (R < 256) begin R = R << 1; O = (O << 1) | rdbit(); end
    return bin;
  endfunction
  function automatic cm_t rcm(); cm_t c; c.state = 6'($urandom % 63); c.mps = 1'($urandom % 2); return c; endfunction

  always_comb for (int k = 0; k < 16; k++) win[15-k] = bits[p + k];

  initial begin
    for (int i = 0; i < 1048576; i++) bits[i] = 1'($urandom);
    bits[0] = 0;
    init = 0; en = 0; bypass = 0; cm1 = '0; c20 = '0; c21 = '0; w20 = 0; w21 = 0; s0 = 0; s1 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    init = 1; @(negedge clk);
    R = 510; O = 0; for (int k = 0; k < 9; k++) O = (O << 1) | int'(bits[k]);
    p = 9; init = 0;
    repeat (60000) begin
      int eb1, eb2, ecs;
      bit ev2;
      cm_t e1, e2;
      en = ($urandom % 8) != 0;
      bypass = ($urandom % 6) == 0;
      cm1 = rcm(); c20 = rcm(); c21 = rcm();
      w20 = $urandom % 2; w21 = $urandom % 2; s0 = $urandom % 2; s1 = $urandom % 2;
      // small states make LPS paths and long renormalisations frequent
      if ($urandom % 3 == 0) cm1.state = 6'($urandom % 4);
      #1;
      if (en) begin
        rp = p;
        ev2 = 0; eb2 = 0; e2 = '0;
        if (bypass) begin
          O = (O << 1) | rdbit();
          if (O >= R) begin eb1 = 1; O -= R; end else eb1 = 0;
          n_byp++;
        end else begin
          e1 = cm1;
          eb1 = dec(e1);
          ev2 = eb1 ? w21 : w20;
          if (ev2) begin
            e2 = eb1 ? (s1 ? e1 : c21) : (s0 ? e1 : c20);
            eb2 = dec(e2);
            n_two++;
          end
        end
        ecs = rp - p;
        checks++;
        if (b1 != 1'(eb1) || b2v != ev2 || (ev2 && b2 != 1'(eb2)) || consume != 5'(ecs) ||
            (!bypass && n1 != e1) || (ev2 && n2 != e2)) begin
          failures++;
          if (failures < 10) $display("cycle: byp %0d got b1 %0d b2 %0d v %0d cons %0d; exp %0d %0d %0d %0d",
                                       bypass, b1, b2, b2v, consume, eb1, eb2, ev2, ecs);
        end
        @(negedge clk);
        p = rp;
      end else begin
        checks++;
        if (consume != 0) failures++;
        @(negedge clk);
      end
      checks++;
      if (dut.rng != 9'(R) || dut.ofs != 9'(O)) begin
        failures++;
        if (failures < 10) $display("state: rng %0d ofs %0d, exp %0d %0d", dut.rng, dut.ofs, R, O);
      end
      if (p > 1048000) break;
    end
    checks++; if (n_two == 0 || n_byp == 0 || n_lps == 0) failures++;
    $display("two-bin cycles %0d bypass %0d LPS bins %0d", n_two, n_byp, n_lps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
