// tb_cavlc_coeff_token_dec: checks the coeff_token decoder. Part 1 checks
// hand-written codewords of the standard's tables (one per nC range,
// including the 6-bit fixed-length table and chroma DC). Part 2 places every
// (TotalCoeff, TrailingOnes) codeword of every table, followed by random bits,
// at the head of the window and checks the decoded symbol, its length and
// the hit flag. Combinational DUT; one vector per 1 ns step.
module tb_cavlc_coeff_token_dec;
  import entropy_pkg::*;
  logic [15:0] win; logic signed [5:0] nc;
  logic [4:0] tc; logic [1:0] t1; logic [4:0] len; logic hit;
  cavlc_coeff_token_dec dut (.win, .nc, .total_coeff(tc), .trailing_ones(t1), .len, .hit);
  int checks = 0, failures = 0;

  initial begin #10000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input int ncv, input int code_len, input int code, input int etc, input int et1);
    nc = 6'(ncv);
    win = 16'($urandom);
    for (int k = 0; k < code_len; k++) win[15-k] = code[code_len-1-k];
    #1;
    checks++;
    if (!hit || tc != 5'(etc) || t1 != 2'(et1) || len != 5'(code_len)) begin
      failures++;
      if (failures < 10) $display("nC %0d code len %0d: got tc %0d t1 %0d len %0d hit %0d, exp %0d %0d", ncv, code_len, tc, t1, len, hit, etc, et1);
    end
  endtask

  initial begin
    // fixed examples from the standard's tables
    chk(0, 1, 'b1, 0, 0);
    chk(0, 2, 'b01, 1, 1);
    chk(0, 3, 'b001, 2, 2);
    chk(0, 6, 'b000101, 1, 0);
    chk(0, 5, 'b00011, 3, 3);
    chk(1, 16, 'b0000000000000100, 16, 0);
    chk(1, 16, 'b0000000000001000, 16, 3);
    chk(2, 2, 'b11, 0, 0);
    chk(3, 2, 'b10, 1, 1);
    chk(5, 4, 'b1111, 0, 0);
    chk(7, 4, 'b1110, 1, 1);
    chk(8, 6, 'b000011, 0, 0);
    chk(12, 6, 'b000000, 1, 0);
    chk(16, 6, 'b111111, 16, 3);
    chk(-1, 2, 'b01, 0, 0);
    chk(-1, 1, 'b1, 1, 1);
    chk(-1, 7, 'b0000000, 4, 3);
    // every codeword, several random tails each
    repeat (20) begin
      for (int tab = 0; tab < 5; tab++) begin
        int ncv, maxtc;
        case (tab) 0: ncv = $urandom % 2; 1: ncv = 2 + $urandom % 2; 2: ncv = 4 + $urandom % 4;
                   3: ncv = 8 + $urandom % 9; default: ncv = -1; endcase
        maxtc = (tab == 4) ? 4 : 16;
        for (int c = 0; c <= maxtc; c++)
          for (int o = 0; o < 4 && o <= c; o++) begin
            int i, l, b;
            i = 4 * c + o;
            case (tab)
              0: begin l = CT0_LEN[i]; b = CT0_BITS[i]; end
              1: begin l = CT1_LEN[i]; b = CT1_BITS[i]; end
              2: begin l = CT2_LEN[i]; b = CT2_BITS[i]; end
              3: begin l = 6; b = (c == 0) ? 3 : (((c - 1) << 2) | o); end
              default: begin l = CDC_LEN[i]; b = CDC_BITS[i]; end
            endcase
            chk(ncv, l, b, c, o);
          end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
