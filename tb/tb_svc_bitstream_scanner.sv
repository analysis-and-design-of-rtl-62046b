// tb_svc_bitstream_scanner: builds a random byte stream of NAL units (AVC
// slices, SVC slices with random dependency/quality ids, parameter sets and
// prefix NAL units) with emulation-prevention bytes in the payload, feeds it
// as 32-bit words with random gaps, and compares every reported slice start
// (address, type, ids, quality flag) with a byte-by-byte scan of the same
// stream. Checks that quality and non-quality slices and all four byte
// alignments of the start code occur.
module tb_svc_bitstream_scanner;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] in_data; logic in_valid;
  logic found, quality; logic [31:0] addr; logic [4:0] nt; logic [2:0] did; logic [3:0] qid;
  svc_bitstream_scanner dut (.clk, .rst_n, .in_data, .in_valid, .found, .addr, .quality,
                             .nal_type(nt), .dependency_id(did), .quality_id(qid));
  int checks = 0, failures = 0;
  byte unsigned bs [$];
  int exp_addr [$]; int exp_info [$];
  int n_q = 0, n_nq = 0, n_align [4] = '{0,0,0,0}, got = 0;

  initial begin #10000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n && found) begin
    checks++;
    if (got >= exp_addr.size()) begin failures++; $display("extra event at %0d", addr); end
    else if (int'(addr) != exp_addr[got] || {quality, nt, did, qid} != 13'(exp_info[got])) begin
      failures++;
      if (failures < 10) $display("event %0d: addr %0d info %h, exp %0d %h", got, addr, {quality, nt, did, qid}, exp_addr[got], exp_info[got]);
    end
    if (quality) n_q++; else n_nq++;
    n_align[addr % 4]++;
    got++;
  end

  initial begin
    int n;
    // ---- build the stream ----
    repeat (400) begin
      int t, z;
      case ($urandom % 6) 0: t = 1; 1: t = 5; 2, 3: t = 20; 4: t = 14; default: t = 7 + $urandom % 2; endcase
      repeat ($urandom % 3) bs.push_back(8'h00);          // trailing zero bytes
      bs.push_back(0); bs.push_back(0); bs.push_back(0); bs.push_back(1);
      bs.push_back(8'(((1 + $urandom % 3) << 5) | t));
      if (t == 20 || t == 14) begin
        bs.push_back(8'h80 | 8'($urandom % 64));
        bs.push_back(8'($urandom % 128));
        bs.push_back(8'($urandom));
      end
      z = 0;
      repeat (3 + $urandom % 40) begin
        byte unsigned v;
        v = (($urandom % 3) == 0) ? 8'h00 : 8'($urandom);
        if (z >= 2 && v <= 3) begin bs.push_back(8'h03); z = 0; end
        bs.push_back(v);
        z = (v == 0) ? z + 1 : 0;
      end
      if (z > 0) bs.push_back(8'h80);                    // rbsp stop bit
    end
    for (int k = 0; k < 16; k++) bs.push_back(8'hAA);
    while (bs.size() % 4 != 0) bs.push_back(8'hAA);
    // ---- reference scan ----
    for (int i = 0; i + 6 < bs.size(); i++)
      if (bs[i] == 0 && bs[i+1] == 0 && bs[i+2] == 0 && bs[i+3] == 1) begin
        int t, q, d;
        t = bs[i+4] & 31;
        if (t == 1 || t == 5 || t == 20) begin
          d = (t == 20) ? (bs[i+6] >> 4) & 7 : 0;
          q = (t == 20) ? bs[i+6] & 15 : 0;
          exp_addr.push_back(i);
          exp_info.push_back(((t == 20 && q != 0) << 12) | (t << 7) | (d << 4) | q);
        end
      end
    // ---- feed ----
    in_valid = 0; in_data = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    n = 0;
    while (n < bs.size()) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_data = {bs[n], bs[n+1], bs[n+2], bs[n+3]};
      if (in_valid) n += 4;
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (got != exp_addr.size()) begin failures++; $display("events %0d expected %0d", got, exp_addr.size()); end
    checks++;
    if (n_q == 0 || n_nq == 0 || n_align[0] == 0 || n_align[1] == 0 || n_align[2] == 0 || n_align[3] == 0) failures++;
    $display("quality slices %0d other slices %0d", n_q, n_nq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
