// cavlc_run_before_dec: decodes two run_before symbols per cycle.
// The first symbol is looked up with the current zerosLeft; the second is
// looked up with zerosLeft - run_1 on the bits after the first code.
// A second symbol is produced only when the caller says one is wanted
// (want2) and zeros remain after the first. win[21] is the next bit.
// Follows the document: two run_before symbols per cycle, one when only one
// is left. Own choice: the second look-up is cascaded after the first
// (the combined-table method the document cites is not described there).
// Table values are the standard's.
module cavlc_run_before_dec (
  input  logic [21:0] win,
  input  logic [3:0]  zeros_left,
  input  logic        want2,
  output logic [3:0]  run1,
  output logic [3:0]  run2,
  output logic        run2_valid,
  output logic [4:0]  len          // total bits used by the symbols produced
);
  // one run_before symbol: value and length, from the 11 bits at the head
  function automatic logic [7:0] rb(input logic [10:0] w, input logic [3:0] zl);
    logic [3:0] r, l;
    r = '0; l = '0;
    case (zl)
      4'd0: begin r = 0; l = 0; end
      4'd1: begin r = w[10] ? 4'd0 : 4'd1; l = 1; end
      4'd2: begin
        if (w[10]) begin r = 0; l = 1; end
        else begin r = w[9] ? 4'd1 : 4'd2; l = 2; end
      end
      4'd3: begin r = 4'd3 - {2'b0, w[10:9]}; l = 2; end
      4'd4: begin
        if (w[10] | w[9]) begin r = 4'd3 - {2'b0, w[10:9]}; l = 2; end
        else begin r = w[8] ? 4'd3 : 4'd4; l = 3; end
      end
      4'd5: begin
        if (w[10]) begin r = w[9] ? 4'd0 : 4'd1; l = 2; end
        else begin r = 4'd5 - {2'b0, w[9:8]}; l = 3; end
      end
      4'd6: begin
        if (w[10:9] == 2'b11) begin r = 0; l = 2; end
        else begin
          l = 3;
          case (w[10:8])
            3'b000: r = 1; 3'b001: r = 2; 3'b011: r = 3;
            3'b010: r = 4; 3'b101: r = 5; default: r = 6;  // 100
          endcase
        end
      end
      default: begin    // zerosLeft > 6
        if (w[10:8] != 3'b000) begin r = 4'd7 - {1'b0, w[10:8]}; l = 3; end
        else begin
          // 0001 -> 7, 00001 -> 8, ... 00000000001 -> 14
          r = 4'd14; l = 4'd11;
          for (int k = 0; k < 8; k++) begin
            if (w[k]) begin r = 4'(14 - k); l = 4'(11 - k); end
          end
        end
      end
    endcase
    return {r, l};
  endfunction

  logic [3:0] l1, l2, zl1;
  always_comb begin
    {run1, l1} = rb(win[21:11], zeros_left);
    zl1 = zeros_left - run1;
    run2_valid = want2 && (zl1 != 0);
    {run2, l2} = rb(11'(win[21:0] << l1 >> 11), zl1);
    if (!run2_valid) begin run2 = '0; l2 = '0; end
    len = {1'b0, l1} + {1'b0, l2};
  end
endmodule
