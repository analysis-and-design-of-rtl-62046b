// entropy_decoder_top: H.264/AVC residual entropy decoder with both entropy
// coding modes behind one bitstream fetcher, plus the start-code scanner of
// the scalable (SVC) extension.
//
// entropy_coding_mode selects the decoder: 0 = CAVLC (two-level decoder),
// 1 = CABAC (two-symbol arithmetic decoder with hybrid context memory). The
// selected decoder sees the fetcher's 64-bit window and drives its advance;
// the other one ignores its commands and consumes nothing. The mode should be
// changed only while both decoders are idle (at a slice boundary).
//
// Interface: bitstream words enter with a valid/ready handshake (bs_*). A
// CAVLC block is started with cavlc_start plus nC and maxNumCoeff; the
// result appears with cavlc_done. CABAC needs its 460 context models written
// through cm_init_* and a cabac_slice_init pulse (which reads 9 bits), then
// takes one residual block per accepted command (cabac_cmd_*) and reports it
// with cabac_done. The scanner sees the stored bitstream separately (scan_*)
// and reports slice starts. Event outputs pulse for observation.
//
// Outside this module, as in the document's block diagram but not built
// here: the syntax-element parser that issues the block commands, the
// neighbour memory that supplies nC and the coded_block_flag context
// increment, the context initialisation ROM and the external memory
// controller.
//
// For SVC a second engine set decodes quality enhancement layers in parallel
// with the first (q_* ports): its own bitstream fetcher and the simplified
// CABAC residual decoder whose context memory keeps only the models those
// layers use (199 SRAM + 197 register entries; context writes to other
// indices are dropped). The scanner's slice addresses tell the memory
// controller which stream goes to which fetcher. Like the first set, the
// second carries an unmodified CAVLC decoder beside its CABAC decoder, and
// q_entropy_coding_mode selects which one consumes its window.
// Timing: all outputs are registered in the sub-blocks except the
// combinational bs_ready, q_bs_ready, cabac_cmd_ready and q_cmd_ready.
// Follows the document: one fetcher feeding a CAVLC and a CABAC decoder, the
// scanner with two engine sets for SVC, and the simplified CABAC decoder in
// the quality set. Own choices: the mode multiplexer on the fetcher's
// consume input, the port grouping and the observation event outputs.
module entropy_decoder_top
  import entropy_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        entropy_coding_mode,
  // bitstream words from the memory controller
  input  logic [31:0] bs_data,
  input  logic        bs_valid,
  output logic        bs_ready,
  output logic [31:0] bs_bit_pos,
  // CAVLC block command and result
  input  logic                      cavlc_start,
  input  logic signed [5:0]         cavlc_nc,
  input  logic [4:0]                cavlc_max_num_coeff,
  output logic                      cavlc_busy,
  output logic                      cavlc_done,
  output logic [4:0]                cavlc_total_coeff,
  output logic signed [LEVEL_W-1:0] cavlc_coeff [16],
  output logic [3:0]                cavlc_skip_events,
  // CABAC context initialisation (from the initialisation ROM) and slice start
  input  logic        cm_init_we,
  input  logic [8:0]  cm_init_ctx,
  input  cm_t         cm_init_value,
  input  logic        cabac_slice_init,
  // CABAC block command and result
  input  logic        cabac_cmd_valid,
  output logic        cabac_cmd_ready,
  input  logic [2:0]  cabac_cmd_cat,
  input  logic [4:0]  cabac_cmd_maxc,
  input  logic [1:0]  cabac_cmd_cbf_inc,
  output logic        cabac_busy,
  output logic        cabac_done,
  output logic        cabac_cbf,
  output logic signed [CABAC_CW-1:0] cabac_coeff [16],
  output logic [4:0]  cabac_events,  // two bins, any bin, prediction hit, miss, stall
  // SVC bitstream scanner: stored bitstream in, slice start addresses out
  input  logic [31:0] scan_data,
  input  logic        scan_valid,
  output logic        scan_found,
  output logic [31:0] scan_addr,
  output logic        scan_quality,
  output logic [4:0]  scan_nal_type,
  output logic [2:0]  scan_dependency_id,
  output logic [3:0]  scan_quality_id,
  // SVC quality-enhancement-layer engine: its own fetcher and the simplified
  // CABAC decoder with the reduced context memory
  input  logic        q_entropy_coding_mode,
  input  logic [31:0] q_bs_data,
  input  logic        q_bs_valid,
  output logic        q_bs_ready,
  output logic [31:0] q_bs_bit_pos,
  input  logic        q_cm_init_we,
  input  logic [8:0]  q_cm_init_ctx,
  input  cm_t         q_cm_init_value,
  input  logic        q_slice_init,
  input  logic        q_cmd_valid,
  output logic        q_cmd_ready,
  input  logic [2:0]  q_cmd_cat,
  input  logic [4:0]  q_cmd_maxc,
  input  logic [1:0]  q_cmd_cbf_inc,
  output logic        q_busy,
  output logic        q_done,
  output logic        q_cbf,
  output logic signed [CABAC_CW-1:0] q_coeff [16],
  output logic [4:0]  q_events,
  input  logic                      q_cavlc_start,
  input  logic signed [5:0]         q_cavlc_nc,
  input  logic [4:0]                q_cavlc_max_num_coeff,
  output logic                      q_cavlc_busy,
  output logic                      q_cavlc_done,
  output logic [4:0]                q_cavlc_total_coeff,
  output logic signed [LEVEL_W-1:0] q_cavlc_coeff [16],
  output logic [3:0]                q_cavlc_skip_events
);
  logic [63:0] win;
  logic        win_valid;
  logic [6:0]  consume, cavlc_consume;
  logic [4:0]  cabac_consume;

  bitstream_fetcher u_fetch (.clk, .rst_n, .in_data(bs_data), .in_valid(bs_valid),
    .in_ready(bs_ready), .consume, .win, .win_valid, .bit_pos(bs_bit_pos));

  cavlc_decoder u_cavlc (.clk, .rst_n, .start(cavlc_start && !entropy_coding_mode),
    .nc(cavlc_nc), .max_num_coeff(cavlc_max_num_coeff), .win,
    .win_valid(win_valid && !entropy_coding_mode), .consume(cavlc_consume),
    .busy(cavlc_busy), .done(cavlc_done), .total_coeff_o(cavlc_total_coeff),
    .coeff(cavlc_coeff), .skip_events(cavlc_skip_events));

  logic cabac_cmd_ready_i;
  cabac_residual_decoder u_cabac (.clk, .rst_n, .init_we(cm_init_we), .init_ctx(cm_init_ctx),
    .init_cm(cm_init_value), .slice_init(cabac_slice_init && win_valid && entropy_coding_mode),
    .cmd_valid(cabac_cmd_valid && entropy_coding_mode), .cmd_ready(cabac_cmd_ready_i),
    .cmd_cat(cabac_cmd_cat), .cmd_maxc(cabac_cmd_maxc), .cmd_cbf_inc(cabac_cmd_cbf_inc),
    .win, .win_valid(win_valid && entropy_coding_mode), .consume(cabac_consume),
    .blk_done(cabac_done), .blk_cbf(cabac_cbf), .coeff(cabac_coeff), .busy(cabac_busy),
    .ev_two_bins(cabac_events[0]), .ev_bin(cabac_events[1]), .ev_pred_hit(cabac_events[2]),
    .ev_pred_miss(cabac_events[3]), .ev_stall(cabac_events[4]));
  assign cabac_cmd_ready = cabac_cmd_ready_i && entropy_coding_mode;

  assign consume = entropy_coding_mode ? {2'b0, cabac_consume} : cavlc_consume;

  svc_bitstream_scanner u_scan (.clk, .rst_n, .in_data(scan_data), .in_valid(scan_valid),
    .found(scan_found), .addr(scan_addr), .quality(scan_quality), .nal_type(scan_nal_type),
    .dependency_id(scan_dependency_id), .quality_id(scan_quality_id));

  // second engine set, for quality enhancement layers
  logic [63:0] q_win;
  logic        q_win_valid;
  logic [6:0]  q_consume_sel, q_cavlc_consume;
  logic [4:0]  q_consume;
  logic        q_cmd_ready_i;

  bitstream_fetcher u_q_fetch (.clk, .rst_n, .in_data(q_bs_data), .in_valid(q_bs_valid),
    .in_ready(q_bs_ready), .consume(q_consume_sel), .win(q_win), .win_valid(q_win_valid),
    .bit_pos(q_bs_bit_pos));

  cavlc_decoder u_q_cavlc (.clk, .rst_n, .start(q_cavlc_start && !q_entropy_coding_mode),
    .nc(q_cavlc_nc), .max_num_coeff(q_cavlc_max_num_coeff), .win(q_win),
    .win_valid(q_win_valid && !q_entropy_coding_mode), .consume(q_cavlc_consume),
    .busy(q_cavlc_busy), .done(q_cavlc_done), .total_coeff_o(q_cavlc_total_coeff),
    .coeff(q_cavlc_coeff), .skip_events(q_cavlc_skip_events));

  assign q_consume_sel = q_entropy_coding_mode ? {2'b0, q_consume} : q_cavlc_consume;
  assign q_cmd_ready   = q_cmd_ready_i && q_entropy_coding_mode;

  cabac_residual_decoder #(.QUALITY_LAYER(1'b1)) u_q_cabac (.clk, .rst_n,
    .init_we(q_cm_init_we), .init_ctx(q_cm_init_ctx), .init_cm(q_cm_init_value),
    .slice_init(q_slice_init && q_win_valid && q_entropy_coding_mode),
    .cmd_valid(q_cmd_valid && q_entropy_coding_mode), .cmd_ready(q_cmd_ready_i),
    .cmd_cat(q_cmd_cat), .cmd_maxc(q_cmd_maxc), .cmd_cbf_inc(q_cmd_cbf_inc),
    .win(q_win), .win_valid(q_win_valid && q_entropy_coding_mode), .consume(q_consume),
    .blk_done(q_done), .blk_cbf(q_cbf), .coeff(q_coeff), .busy(q_busy),
    .ev_two_bins(q_events[0]), .ev_bin(q_events[1]), .ev_pred_hit(q_events[2]),
    .ev_pred_miss(q_events[3]), .ev_stall(q_events[4]));
endmodule
