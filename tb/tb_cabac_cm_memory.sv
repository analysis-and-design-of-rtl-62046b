// tb_cabac_cm_memory: checks the hybrid context-model memory against two
// reference arrays. Every cycle issues a random SRAM read and (sometimes)
// write, two register-file reads and up to two register writes, often to
// colliding addresses. Checks the synchronous read data, write-first
// forwarding on read/write collisions and that write port 2 wins when both
// register write ports hit one address.
module tb_cabac_cm_memory;
  import entropy_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] sra, swa, ra1, ra2, wa1, wa2; logic swe, we1, we2;
  cm_t srd, swd, rd1, rd2, wd1, wd2;
  cabac_cm_memory dut (.clk, .s_raddr(sra), .s_rdata(srd), .s_we(swe), .s_waddr(swa), .s_wdata(swd),
    .r_raddr1(ra1), .r_raddr2(ra2), .r_rdata1(rd1), .r_rdata2(rd2),
    .r_we1(we1), .r_waddr1(wa1), .r_wdata1(wd1), .r_we2(we2), .r_waddr2(wa2), .r_wdata2(wd2));
  int checks = 0, failures = 0, n_fwd = 0, n_both = 0;
  cm_t sref [CM_SRAM_N]; cm_t rref [CM_REG_N];

  initial begin #10000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic cm_t rcm(); cm_t c; c.state = 6'($urandom); c.mps = 1'($urandom); return c; endfunction
  function automatic logic [7:0] ra(input int n, input logic [7:0] near);
    return (($urandom % 3) == 0) ? near : 8'($urandom % n);
  endfunction

  initial begin
    // fill both memories through the write ports
    swe = 1; we1 = 1; we2 = 0; sra = 0; ra1 = 0; ra2 = 0; wa2 = 0; wd2 = '0;
    for (int i = 0; i < CM_REG_N; i++) begin
      @(negedge clk);
      swa = 8'(i % CM_SRAM_N); swd = rcm(); wa1 = 8'(i); wd1 = rcm();
      sref[i % CM_SRAM_N] = swd; rref[i] = wd1;
    end
    repeat (20000) begin
      cm_t es, e1, e2;
      @(negedge clk);
      sra = 8'($urandom % CM_SRAM_N); swe = $urandom % 2; swa = ra(CM_SRAM_N, sra); swd = rcm();
      ra1 = 8'($urandom % CM_REG_N); ra2 = ra(CM_REG_N, ra1);
      we1 = $urandom % 2; we2 = $urandom % 2; wa1 = ra(CM_REG_N, ra1); wa2 = ra(CM_REG_N, wa1);
      wd1 = rcm(); wd2 = rcm();
      // expected read data (write-first)
      es = (swe && swa == sra) ? swd : sref[sra];
      e1 = rref[ra1]; if (we1 && wa1 == ra1) e1 = wd1; if (we2 && wa2 == ra1) e1 = wd2;
      e2 = rref[ra2]; if (we1 && wa1 == ra2) e2 = wd1; if (we2 && wa2 == ra2) e2 = wd2;
      if ((swe && swa == sra) || (we1 && wa1 == ra1)) n_fwd++;
      if (we1 && we2 && wa1 == wa2) n_both++;
      if (swe) sref[swa] = swd;
      if (we1) rref[wa1] = wd1;
      if (we2) rref[wa2] = wd2;
      @(posedge clk); #1;
      checks++;
      if (srd != es || rd1 != e1 || rd2 != e2) begin
        failures++;
        if (failures < 10) $display("read mismatch sram %0h/%0h r1 %0h/%0h r2 %0h/%0h", srd, es, rd1, e1, rd2, e2);
      end
    end
    checks++; if (n_fwd == 0 || n_both == 0) failures++;
    $display("forwarded reads %0d double writes %0d", n_fwd, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
