// tb_cavlc_total_zeros_dec: checks the total_zeros decoder for 4x4 blocks
// (TotalCoeff 1..15) and chroma DC (TotalCoeff 1..3). Hand-written codewords
// from the standard are checked first, then every codeword of every table is
// placed at the window head with a random tail and the decoded value and
// length compared. Combinational DUT.
module tb_cavlc_total_zeros_dec;
  import entropy_pkg::*;
  logic [8:0] win; logic [4:0] tc; logic cdc; logic [3:0] tz, len;
  cavlc_total_zeros_dec dut (.win, .total_coeff(tc), .chroma_dc(cdc), .total_zeros(tz), .len);
  int checks = 0, failures = 0;

  initial begin #10000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input int c, input int dc, input int l, input int b, input int ez);
    tc = 5'(c); cdc = 1'(dc);
    win = 9'($urandom);
    for (int k = 0; k < l; k++) win[8-k] = b[l-1-k];
    #1;
    checks++;
    if (tz != 4'(ez) || len != 4'(l)) begin
      failures++;
      if (failures < 10) $display("tc %0d dc %0d: got tz %0d len %0d exp %0d %0d", c, dc, tz, len, ez, l);
    end
  endtask

  initial begin
    chk(1, 0, 1, 'b1, 0);
    chk(1, 0, 9, 'b000000001, 15);
    chk(1, 0, 3, 'b011, 1);
    chk(2, 0, 3, 'b111, 0);
    chk(7, 0, 2, 'b11, 5);
    chk(15, 0, 1, 'b0, 0);
    chk(15, 0, 1, 'b1, 1);
    chk(1, 1, 3, 'b000, 3);
    chk(2, 1, 2, 'b00, 2);
    chk(3, 1, 1, 'b0, 1);
    repeat (30) begin
      for (int c = 1; c <= 15; c++)
        for (int z = 0; z <= 16 - c; z++)
          chk(c, 0, TZ_LEN[16 * (c - 1) + z], TZ_BITS[16 * (c - 1) + z], z);
      for (int c = 1; c <= 3; c++)
        for (int z = 0; z <= 4 - c; z++) begin
          int l, b;
          l = (z == 4 - c) ? z : z + 1; b = (z == 4 - c) ? 0 : 1;
          chk(c, 1, l, b, z);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
