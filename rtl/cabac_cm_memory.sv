// cabac_cm_memory: hybrid context-model memory.
// Context-model sets of which two members are never needed in the same cycle
// sit in a dual-port SRAM (one read port, one write port); the sets that the
// two-bin engine needs two at a time (significant_coeff_flag, the later bins
// of coeff_abs_level_minus1, mb_type, mvd, ...) sit in a register file with
// two read and two write ports. Per cycle: one model read from the SRAM, two
// from the registers, and up to two updated models written back.
// Reads are synchronous (data the cycle after the address). A read of an
// address written in the same cycle returns the new data. If both register
// write ports hit the same address, port 2 (the later bin) wins.
// Follows the document: the hybrid split (205 models in a one-read,
// one-write SRAM, 254 in a two-read, two-write register file) and the rule
// for which sets go where. Own choices: synchronous reads with forwarding and
// the write priority; the SRAM is modelled as an array, not a vendor macro.
module cabac_cm_memory
  import entropy_pkg::*;
#(
  parameter int unsigned SRAM_N = CM_SRAM_N,
  parameter int unsigned REG_N  = CM_REG_N
)(
  input  logic       clk,
  input  logic [7:0] s_raddr,
  output cm_t        s_rdata,
  input  logic       s_we,
  input  logic [7:0] s_waddr,
  input  cm_t        s_wdata,
  input  logic [7:0] r_raddr1,
  input  logic [7:0] r_raddr2,
  output cm_t        r_rdata1,
  output cm_t        r_rdata2,
  input  logic       r_we1,
  input  logic [7:0] r_waddr1,
  input  cm_t        r_wdata1,
  input  logic       r_we2,
  input  logic [7:0] r_waddr2,
  input  cm_t        r_wdata2
);
  cm_t sram [SRAM_N];
  cm_t regs [REG_N];

  // SRAM: one read port, one write port
  always_ff @(posedge clk) begin
    if (s_we && 32'(s_waddr) < SRAM_N) sram[s_waddr] <= s_wdata;
    if (s_we && s_waddr == s_raddr) s_rdata <= s_wdata;
    else if (32'(s_raddr) < SRAM_N) s_rdata <= sram[s_raddr];
    else s_rdata <= '0;
  end

  // register file: two read ports, two write ports
  function automatic cm_t rd_fwd(input logic [7:0] a, input cm_t cur);
    cm_t v;
    v = cur;
    if (r_we1 && r_waddr1 == a) v = r_wdata1;
    if (r_we2 && r_waddr2 == a) v = r_wdata2;
    return v;
  endfunction

  always_ff @(posedge clk) begin
    for (int k = 0; k < int'(REG_N); k++) begin
      if (r_we2 && r_waddr2 == 8'(k))      regs[k] <= r_wdata2;
      else if (r_we1 && r_waddr1 == 8'(k)) regs[k] <= r_wdata1;
    end
    r_rdata1 <= rd_fwd(r_raddr1, (32'(r_raddr1) < REG_N) ? regs[r_raddr1] : '0);
    r_rdata2 <= rd_fwd(r_raddr2, (32'(r_raddr2) < REG_N) ? regs[r_raddr2] : '0);
  end
endmodule
