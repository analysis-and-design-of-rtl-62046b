// tb_cavlc_run_before_dec: checks the two-symbol run_before decoder. Random
// zerosLeft (0..14) and two random runs are encoded with the standard's
// run_before table (tb_enc_pkg::rb_code), followed by random bits; the DUT
// must return both runs when a second one is requested and zeros remain,
// and the combined length. Combinational DUT.
module tb_cavlc_run_before_dec;
  logic [21:0] win; logic [3:0] zl; logic want2;
  logic [3:0] r1, r2; logic r2v; logic [4:0] len;
  cavlc_run_before_dec dut (.win, .zeros_left(zl), .want2, .run1(r1), .run2(r2), .run2_valid(r2v), .len);
  int checks = 0, failures = 0, n_two = 0;

  initial begin #10000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (20000) begin
      int z, a, b, la, ba, lb, bb, pos, el;
      bit w, ev;
      z = $urandom % 15;
      a = (z == 0) ? 0 : $urandom % (z + 1);
      b = (z - a == 0) ? 0 : $urandom % (z - a + 1);
      w = $urandom % 2;
      win = 22'($urandom);
      pos = 21; la = 0; lb = 0;
      if (z > 0) begin
        tb_enc_pkg::rb_code(z, a, la, ba);
        for (int k = la - 1; k >= 0; k--) begin win[pos] = ba[k]; pos--; end
      end
      ev = w && (z - a > 0);
      if (ev) begin
        tb_enc_pkg::rb_code(z - a, b, lb, bb);
        for (int k = lb - 1; k >= 0; k--) begin win[pos] = bb[k]; pos--; end
      end
      zl = 4'(z); want2 = w;
      #1;
      el = la + (ev ? lb : 0);
      checks++;
      if (r1 != 4'(a) || r2v != ev || (ev && r2 != 4'(b)) || len != 5'(el)) begin
        failures++;
        if (failures < 10) $display("zl %0d want2 %0d: got %0d %0d v%0d len %0d, exp %0d %0d v%0d len %0d", z, w, r1, r2, r2v, len, a, b, ev, el);
      end
      if (ev) n_two++;
    end
    checks++;
    if (n_two == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
