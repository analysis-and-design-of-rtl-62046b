// cavlc_coeff_token_dec: decodes the CAVLC coeff_token at the head of the
// bitstream window into TotalCoeff and TrailingOnes, and reports the code
// length. Purely combinational (one symbol per cycle in the CAVLC decoder).
// The table is chosen from nC as the standard prescribes: 0<=nC<2, 2<=nC<4,
// 4<=nC<8 use VLC tables, nC>=8 a 6-bit fixed-length code, nC=-1 the chroma
// DC table. Each VLC table is matched by comparing the window against every
// code of the table in parallel (the codes are prefix-free, so one hits).
// Interface: win[15] is the next bitstream bit; nc is signed.
// Follows the standard's tables; the document gives only the table choice by
// nC. Own choice: the parallel-compare structure.
module cavlc_coeff_token_dec
  import entropy_pkg::*;
(
  input  logic [15:0]       win,
  input  logic signed [5:0] nc,
  output logic [4:0]        total_coeff,
  output logic [1:0]        trailing_ones,
  output logic [4:0]        len,
  output logic              hit
);
  logic [4:0] l;
  logic [3:0] b;
  always_comb begin
    l = '0;
    b = '0;
    total_coeff   = '0;
    trailing_ones = '0;
    len           = '0;
    hit           = 1'b0;
    if (nc >= 6'sd8) begin
      hit = 1'b1;
      len = 5'd6;
      if (win[15:10] == 6'b000011) begin
        total_coeff = 5'd0; trailing_ones = 2'd0;
      end else begin
        total_coeff   = {1'b0, win[15:12]} + 5'd1;
        trailing_ones = win[11:10];
      end
    end else if (nc < 6'sd0) begin
      for (int k = 0; k < 20; k++) begin
        if (CDC_LEN[k] != 0 &&
            (win >> (5'd16 - CDC_LEN[k])) == {12'd0, CDC_BITS[k]}) begin
          hit = 1'b1; len = CDC_LEN[k];
          total_coeff = 5'(k / 4); trailing_ones = 2'(k % 4);
        end
      end
    end else begin
      for (int k = 0; k < 68; k++) begin
        if (nc < 6'sd2)      begin l = CT0_LEN[k]; b = CT0_BITS[k]; end
        else if (nc < 6'sd4) begin l = CT1_LEN[k]; b = CT1_BITS[k]; end
        else                 begin l = CT2_LEN[k]; b = CT2_BITS[k]; end
        if (l != 0 && (win >> (5'd16 - l)) == {12'd0, b}) begin
          hit = 1'b1; len = l;
          total_coeff = 5'(k / 4); trailing_ones = 2'(k % 4);
        end
      end
    end
  end
endmodule
