// bitstream_fetcher: turns a stream of 32-bit bitstream words into a 64-bit
// window whose MSB is the next unread bit, and advances by the number of bits
// the active decoder used (the accumulator of consumed code lengths).
// Words enter a left-aligned shift buffer of NWORDS words; each cycle the
// buffer is shifted left by `consume` (the barrel shifter) and a new word is
// appended behind the valid bits when there is room (load request). The
// window is valid while at least 64 bits are buffered.
// Interface: in_valid/in_ready handshake for words (first bit = bit 31);
// win/win_valid; consume (0..64) must only be non-zero while win_valid.
// bit_pos counts consumed bits since reset.
// Timing: win follows the registered buffer; a consume in cycle t shows in
// the window of cycle t+1; at most one word is taken per cycle.
// Follows the document: bitstream buffer, barrel shifter and accumulator of
// consumed bits in front of the decoders. Own choices: the four-word depth,
// the 64-bit window and the word handshake.
module bitstream_fetcher #(
  parameter int unsigned NWORDS = 4
)(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] in_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  logic [6:0]  consume,
  output logic [63:0] win,
  output logic        win_valid,
  output logic [31:0] bit_pos
);
  localparam int unsigned BW = 32 * NWORDS;
  logic [BW-1:0] buff;
  logic [$clog2(BW+1)-1:0] cnt, cnt_sh;
  logic [BW-1:0] shifted;

  assign win       = buff[BW-1 -: 64];
  assign win_valid = (32'(cnt) >= 64);
  always_comb begin
    shifted = buff << consume;
    cnt_sh  = cnt - ($bits(cnt))'(consume);
  end
  assign in_ready = (32'(cnt_sh) + 32 <= BW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buff <= '0; cnt <= '0; bit_pos <= '0;
    end else begin
      if (in_valid && in_ready) begin
        buff <= shifted | ({in_data, {(BW-32){1'b0}}} >> cnt_sh);
        cnt  <= cnt_sh + ($bits(cnt))'(32);
      end else begin
        buff <= shifted;
        cnt  <= cnt_sh;
      end
      bit_pos <= bit_pos + 32'(consume);
    end
  end

  // a decoder may only use bits that are in the window
  assert property (@(posedge clk) disable iff (!rst_n) (consume != 0) |-> win_valid);
  assert property (@(posedge clk) disable iff (!rst_n) 32'(consume) <= 32'(cnt));
endmodule
