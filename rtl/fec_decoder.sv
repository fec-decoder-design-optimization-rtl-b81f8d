// fec_decoder: single-chip k = 7 Viterbi decoder for rate 1/2 and punctured
// rate 3/4 convolutional codes (generators 133 and 171 octal).
//
// Soft symbols (3-bit sign-magnitude) enter serially or as I/Q pairs and are
// formed into symbol pairs, with punctured positions marked as erasures. For
// each pair the branch metric logic computes the four branch metrics, the
// state metric unit updates all 64 path metrics with two add-compare-select
// ALUs working on two parity-split 32 x 6 state RAMs and stores 64 pointer
// bits in the byte-wide trellis memory, and, concurrently, the traceback
// unit follows the survivor path from the previous step's best state and
// releases one decoded bit. One decoded bit comes out per symbol pair, after
// a delay of TB_DEPTH_R12 (rate 1/2) or TB_DEPTH_R34 (rate 3/4) pairs.
//
// Interface: frame_start (one cycle, decoder idle) starts a frame whose
// encoder began in state zero; rate34 and serial_mode are held for the frame.
// sym_valid strobes sym_i (serial) or sym_i/sym_q (parallel) with their
// puncture flags. out_valid strobes out_bit. overflow is sticky until
// frame_start and means symbols arrived faster than one pair per 71 clocks.
// Timing: a step takes 71 clocks, so a 10 MHz clock decodes up to about
// 140 kbit/s, i.e. 280 ksymbol/s at rate 1/2.
module fec_decoder
  import fec_pkg::*;
#(
  parameter int unsigned TM_STEPS     = 64,
  parameter int unsigned TB_DEPTH_R12 = 35,
  parameter int unsigned TB_DEPTH_R34 = 56
) (
  input  logic clk,
  input  logic rst_n,
  input  logic frame_start,
  input  logic rate34,
  input  logic serial_mode,
  input  logic sym_valid,
  input  sym_t sym_i,
  input  sym_t sym_q,
  input  logic punct_i,
  input  logic punct_q,
  output logic out_valid,
  output logic out_bit,
  output logic overflow
);

  localparam int unsigned TAW = $clog2(TM_STEPS*8);
  localparam int unsigned SLW = $clog2(TM_STEPS);

  logic   pair_valid, pair_ready, bm_load;
  pair_t  pair;
  bm_t    bm [4];

  symbol_input u_in (
    .clk, .rst_n, .frame_start, .rate34, .serial_mode, .sym_valid,
    .sym_i, .sym_q, .punct_i, .punct_q,
    .pair_valid, .pair_ready, .pair, .overflow);

  branch_metric u_bm (.clk, .rst_n, .load(bm_load), .pair, .bm);

  logic           smu_start, smu_done, smu_busy;
  logic [SLW-1:0] smu_slot, tb_slot;
  state_t         best;
  logic           tw_req, tr_req, tr_grant, tm_en, tm_we;
  logic [TAW-1:0] tw_addr, tr_addr, tm_addr;
  logic [7:0]     tw_data, tm_rdata;
  logic           tb_start, tb_busy;
  logic [6:0]     tb_depth;

  state_metric_unit #(.TM_STEPS(TM_STEPS)) u_smu (
    .clk, .rst_n, .frame_start, .start(smu_start), .slot(smu_slot), .bm,
    .busy(smu_busy), .done(smu_done), .best_state(best),
    .tw_req, .tw_addr, .tw_data);

  trellis_ram #(.TM_STEPS(TM_STEPS)) u_tm (
    .clk, .en(tm_en), .we(tm_we), .addr(tm_addr), .wdata(tw_data), .rdata(tm_rdata));

  traceback #(.TM_STEPS(TM_STEPS)) u_tb (
    .clk, .rst_n, .start(tb_start), .start_state(best), .start_slot(tb_slot),
    .depth(tb_depth), .busy(tb_busy), .rd_req(tr_req), .rd_addr(tr_addr),
    .grant(tr_grant), .rdata(tm_rdata), .bit_valid(out_valid), .bit_out(out_bit));

  decoder_control #(
    .TM_STEPS(TM_STEPS), .TB_DEPTH_R12(TB_DEPTH_R12), .TB_DEPTH_R34(TB_DEPTH_R34)
  ) u_ctl (
    .clk, .rst_n, .frame_start, .rate34,
    .pair_valid, .pair_ready, .bm_load,
    .smu_start, .smu_slot, .smu_done, .smu_busy,
    .tb_start, .tb_slot, .tb_depth, .tb_busy,
    .tw_req, .tw_addr, .tr_req, .tr_addr, .tr_grant,
    .tm_en, .tm_we, .tm_addr);

endmodule
