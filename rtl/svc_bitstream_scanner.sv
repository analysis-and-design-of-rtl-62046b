// svc_bitstream_scanner: finds NAL unit start codes in the stored bitstream
// and tells the two bitstream fetchers where quality-enhancement-layer slices
// and other slices begin, so the two entropy engines of the scalable decoder
// can work on them in parallel.
//
// How: the bitstream arrives as 32-bit words (first byte in bits 31:24), one
// word per cycle when in_valid. The last six bytes are kept, giving a
// ten-byte view. A slice start is the pattern 00 00 00 01 followed by the NAL
// header byte and, for SVC NAL units, two more header bytes; the pattern can
// end at any of the four new bytes (two can never end in the same word). For
// a slice NAL unit (nal_unit_type 1 or 5, or the SVC slice type 20) one event
// is reported: the byte address of the first start-code byte, the
// nal_unit_type, and for type 20 the dependency_id and quality_id of the NAL
// extension header. quality = 1 marks a quality enhancement layer
// (type 20 with quality_id > 0); those go to the simplified CABAC engine.
//
// Timing: the event is registered: found pulses one cycle after the word
// that completes the pattern. The scanner never stalls its input.
//
// Follows the document: the 4-byte start code 0x00000001 and the split into
// quality and non-quality enhancement layers. This design's own choices: the
// word-wide scan, the header-byte positions (from the SVC NAL unit header
// syntax), and ignoring non-slice NAL units (parameter sets, prefix NALs).
module svc_bitstream_scanner (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] in_data,
  input  logic        in_valid,
  output logic        found,
  output logic [31:0] addr,            // byte address of the start code
  output logic        quality,         // quality enhancement layer slice
  output logic [4:0]  nal_type,
  output logic [2:0]  dependency_id,
  output logic [3:0]  quality_id
);
  logic [7:0]  hist [6];               // hist[0] oldest
  logic [7:0]  b [10];
  logic [31:0] wbyte;                  // byte address of in_data[31:24]
  logic        hit;
  logic [1:0]  hk;
  logic [7:0]  hh, he2;

  function automatic logic is_slice(input logic [4:0] t);
    return (t == 5'd1) || (t == 5'd5) || (t == 5'd20);
  endfunction

  always_comb begin
    for (int k = 0; k < 6; k++) b[k] = hist[k];
    for (int k = 0; k < 4; k++) b[6 + k] = in_data[31 - 8 * k -: 8];
    hit = 1'b0; hk = '0; hh = '0; he2 = '0;
    for (int k = 0; k < 4; k++) begin
      if (b[k] == 8'h00 && b[k+1] == 8'h00 && b[k+2] == 8'h00 && b[k+3] == 8'h01 &&
          is_slice(b[k+4][4:0])) begin
        hit = 1'b1; hk = 2'(k); hh = b[k+4]; he2 = b[k+6];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 6; k++) hist[k] <= 8'hFF;
      wbyte <= '0; found <= 1'b0; addr <= '0; quality <= 1'b0;
      nal_type <= '0; dependency_id <= '0; quality_id <= '0;
    end else begin
      found <= 1'b0;
      if (in_valid) begin
        for (int k = 0; k < 6; k++) hist[k] <= b[k + 4];
        wbyte <= wbyte + 32'd4;
        if (hit) begin
          found         <= 1'b1;
          addr          <= wbyte - 32'd6 + 32'(hk);
          nal_type      <= hh[4:0];
          dependency_id <= (hh[4:0] == 5'd20) ? he2[6:4] : 3'd0;
          quality_id    <= (hh[4:0] == 5'd20) ? he2[3:0] : 4'd0;
          quality       <= (hh[4:0] == 5'd20) && (he2[3:0] != 4'd0);
        end
      end
    end
  end
endmodule
