// tc_receiver_top: hardware core of an on-board telecommand (TC) receiver
// for the CCSDS short LDPC codes.
//
// Chain: soft_quantizer -> slrt_frame_sync -> cltu_controller -> nms_decoder.
// Demodulated soft symbols are quantized to 6 (or 3) bits; the S-LRT
// detector finds the 64-symbol start sequence and its polarity; the CLTU
// controller cuts the CLTU into codewords, writes them (sign-corrected) into
// the decoder's double-buffered LLR memory and ends the CLTU on the
// 128-symbol tail sequence (LDPC(128,64)) or on a decoding failure
// (LDPC(512,256)). Beside the chain sits the MRB Part 2 accelerator
// (mrb_part2) of the hybrid decoder: when the NMS decoder fails on an
// LDPC(128,64) codeword (cw_done with cw_ok = 0), software runs MRB Part 1
// on the word and drives the mrb_* ports, then reads the best candidate.
// The processor bus, the processor and the tracking loops are outside this
// module: their configuration values and the MRB inputs are plain ports.
//
// Configuration: code_sel (0 = LDPC(128,64) deep space, 1 = LDPC(512,256)
// near earth), tail_en (tail sequence present), q3/q_shift (quantizer),
// start_thr/tail_thr (S-LRT thresholds, <= 0). Input samples must be at
// least 4 clocks apart. Outputs: start/tail events, one cw_done pulse per
// decoded codeword with its result (cw_bits, bit i = code bit i, the first k
// bits are the information bits), CLTU end events and counters.
module tc_receiver_top
  import tc_pkg::*;
#(
  parameter int unsigned IN_W     = 12,
  parameter int unsigned MAX_ITER = 50,
  parameter int unsigned N_TEU    = 3,
  parameter int unsigned C_PAR    = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration
  input  code_e                    code_sel,
  input  logic                     tail_en,
  input  logic                     q3,
  input  logic [3:0]               q_shift,
  input  logic signed [14:0]       start_thr,
  input  logic signed [14:0]       tail_thr,
  // demodulated symbols
  input  logic                     sample_valid,
  input  logic signed [IN_W-1:0]   sample,
  // frame synchronization / CLTU status
  output logic                     start_det,
  output logic                     tail_det,
  output logic signed [14:0]       sync_metric,
  output logic                     cltu_active,
  output logic                     cltu_end,
  output logic                     end_by_tail,
  output logic [15:0]              cw_count,
  output logic                     overrun,
  // NMS decoder results
  output logic                     cw_done,
  output logic                     cw_ok,
  output logic [6:0]               cw_iters,
  output logic [N_MAX-1:0]         cw_bits,
  // MRB Part 2 (driven by software running MRB Part 1)
  input  logic                     mrb_g_we,
  input  logic [5:0]               mrb_g_row,
  input  logic [MRB_N-1:0]         mrb_g_data,
  input  logic                     mrb_fc_we,
  input  logic [MRB_N-1:0]         mrb_fc_data,
  input  logic                     mrb_rx_we,
  input  logic [6:0]               mrb_rx_addr,
  input  logic signed [SOFT_W-1:0] mrb_rx_data,
  input  logic                     mrb_start,
  input  logic [2:0]               mrb_order,
  input  logic [19:0]              mrb_max_teps,
  input  logic [DIST_W-1:0]        mrb_qe_thr,
  output logic                     mrb_busy,
  output logic                     mrb_done,
  output logic                     mrb_quick_escape,
  output logic [MRB_N-1:0]         mrb_best_cw,
  output logic [DIST_W-1:0]        mrb_best_dist,
  output logic [6:0]               mrb_best_tep [4],
  output logic [19:0]              mrb_tep_count
);
  // quantizer
  logic                     sym_valid;
  logic signed [SOFT_W-1:0] sym;
  soft_quantizer #(.IN_W(IN_W)) u_quant (
    .clk(clk), .rst_n(rst_n), .in_valid(sample_valid), .in_sample(sample), .q3(q3),
    .shift(q_shift), .out_valid(sym_valid), .out_sym(sym));

  // frame synchronizer
  logic fs_mode, fs_tail_eval, fs_polarity, fs_tail_done;
  slrt_frame_sync u_fs (
    .clk(clk), .rst_n(rst_n), .mode(fs_mode), .sym_valid(sym_valid), .sym(sym),
    .tail_eval(fs_tail_eval), .start_thr(start_thr), .tail_thr(tail_thr),
    .start_det(start_det), .polarity(fs_polarity), .tail_done(fs_tail_done),
    .tail_det(tail_det), .metric(sync_metric));

  // CLTU controller
  logic                     llr_we, llr_page, dec_start, dec_page, dec_busy, tail_hit;
  logic [8:0]               llr_addr;
  logic signed [SOFT_W-1:0] llr_data;
  assign tail_hit = fs_tail_done && tail_det;
  cltu_controller u_cltu (
    .clk(clk), .rst_n(rst_n), .code_sel(code_sel), .tail_en(tail_en),
    .sym_valid(sym_valid), .sym(sym),
    .fs_mode(fs_mode), .fs_tail_eval(fs_tail_eval), .fs_start_det(start_det),
    .fs_polarity(fs_polarity), .fs_tail_done(fs_tail_done), .fs_tail_det(tail_hit),
    .llr_we(llr_we), .llr_page(llr_page), .llr_addr(llr_addr), .llr_data(llr_data),
    .dec_start(dec_start), .dec_page(dec_page), .dec_busy(dec_busy),
    .dec_done(cw_done), .dec_success(cw_ok),
    .cltu_active(cltu_active), .cltu_end(cltu_end), .end_by_tail(end_by_tail),
    .cw_count(cw_count), .overrun(overrun));

  // NMS decoder
  nms_decoder #(.MAX_ITER(MAX_ITER)) u_nms (
    .clk(clk), .rst_n(rst_n), .code_sel(code_sel),
    .llr_we(llr_we), .llr_page(llr_page), .llr_addr(llr_addr), .llr_data(llr_data),
    .start(dec_start), .start_page(dec_page), .busy(dec_busy), .done(cw_done),
    .success(cw_ok), .iters(cw_iters), .dec_bits(cw_bits));

  // MRB Part 2
  mrb_part2 #(.N_TEU(N_TEU), .C(C_PAR)) u_mrb (
    .clk(clk), .rst_n(rst_n),
    .g_we(mrb_g_we), .g_row(mrb_g_row), .g_data(mrb_g_data),
    .fc_we(mrb_fc_we), .fc_data(mrb_fc_data),
    .rx_we(mrb_rx_we), .rx_addr(mrb_rx_addr), .rx_data(mrb_rx_data),
    .start(mrb_start), .order(mrb_order), .max_teps(mrb_max_teps), .qe_thr(mrb_qe_thr),
    .busy(mrb_busy), .done(mrb_done), .quick_escape(mrb_quick_escape),
    .best_cw(mrb_best_cw), .best_dist(mrb_best_dist), .best_tep(mrb_best_tep),
    .tep_count(mrb_tep_count));
endmodule
