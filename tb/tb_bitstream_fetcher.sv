// tb_bitstream_fetcher: checks the bitstream buffer. A random bit sequence is
// offered as 32-bit words with random valid gaps; a consumer takes random
// amounts (0..64 bits) whenever the window is valid. Every cycle the 64-bit
// window must equal the sequence at the consumer's position and bit_pos must
// equal the number of bits taken. Counts back-pressure cycles (buffer full)
// and cycles with no valid window.
module tb_bitstream_fetcher;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [31:0] in_data; logic in_valid, in_ready; logic [6:0] consume;
  logic [63:0] win; logic win_valid; logic [31:0] bit_pos;
  bitstream_fetcher dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .consume, .win, .win_valid, .bit_pos);
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  bit bits [0:262143];
  int widx = 0, pos = 0;

  initial begin #10000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always_comb for (int k = 0; k < 32; k++) in_data[31-k] = bits[32 * widx + k];
  always_ff @(posedge clk) if (rst_n && in_valid && in_ready) widx <= widx + 1;

  initial begin
    for (int i = 0; i < 262144; i++) bits[i] = 1'($urandom);
    in_valid = 0; consume = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    repeat (30000) begin
      logic [63:0] ew;
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      if (in_valid && !in_ready) n_full++;
      checks++;
      if (int'(bit_pos) != pos) begin failures++; if (failures < 10) $display("bit_pos %0d exp %0d", bit_pos, pos); end
      if (win_valid) begin
        for (int k = 0; k < 64; k++) ew[63-k] = bits[pos + k];
        checks++;
        if (win != ew) begin failures++; if (failures < 10) $display("window at %0d: %h exp %h", pos, win, ew); end
        case ($urandom % 4) 0: consume = 0; 1: consume = 7'($urandom % 8); 2: consume = 7'($urandom % 30); default: consume = 7'($urandom % 65); endcase
        pos += int'(consume);
      end else begin
        consume = 0; n_empty++;
      end
      if (pos > 262000 - 256) break;
    end
    @(negedge clk); consume = 0;
    checks++; if (n_full == 0 || n_empty == 0) failures++;
    $display("back-pressure cycles %0d empty-window cycles %0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
