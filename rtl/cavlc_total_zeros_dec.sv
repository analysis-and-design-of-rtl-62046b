// cavlc_total_zeros_dec: decodes total_zeros (zeros before the last nonzero
// coefficient) at the head of the bitstream window. Combinational. The VLC
// table is selected by TotalCoeff; for chroma DC blocks (maxNumCoeff 4) the
// three short chroma DC tables of the standard are used, otherwise the
// fifteen 4x4 tables. win[8] is the next bitstream bit.
// Follows the standard's tables; own choice: the parallel-compare structure.
module cavlc_total_zeros_dec
  import entropy_pkg::*;
(
  input  logic [8:0] win,
  input  logic [4:0] total_coeff,   // 1..15
  input  logic       chroma_dc,
  output logic [3:0] total_zeros,
  output logic [3:0] len
);
  logic [3:0] l;
  logic [2:0] b;
  int idx;
  always_comb begin
    l = '0;
    b = '0;
    idx = 0;
    total_zeros = '0;
    len         = '0;
    if (chroma_dc) begin
      // TotalCoeff 1: 1,01,001,000  2: 1,01,00  3: 1,0
      case (total_coeff)
        5'd1: begin
          if (win[8])      begin total_zeros = 4'd0; len = 4'd1; end
          else if (win[7]) begin total_zeros = 4'd1; len = 4'd2; end
          else if (win[6]) begin total_zeros = 4'd2; len = 4'd3; end
          else             begin total_zeros = 4'd3; len = 4'd3; end
        end
        5'd2: begin
          if (win[8])      begin total_zeros = 4'd0; len = 4'd1; end
          else if (win[7]) begin total_zeros = 4'd1; len = 4'd2; end
          else             begin total_zeros = 4'd2; len = 4'd2; end
        end
        default: begin
          total_zeros = win[8] ? 4'd0 : 4'd1; len = 4'd1;
        end
      endcase
    end else begin
      for (int k = 0; k < 16; k++) begin
        idx = 16 * (int'(total_coeff) - 1) + k;
        if (idx < 0)   idx = 0;
        if (idx > 239) idx = 239;
        l = TZ_LEN[idx];
        b = TZ_BITS[idx];
        if (l != 0 && (win >> (4'd9 - l)) == {6'd0, b}) begin
          total_zeros = 4'(k); len = l;
        end
      end
    end
  end
endmodule
