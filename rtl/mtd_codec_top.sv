// mtd_codec_top: forward error correction codec built around multi-stage
// threshold decoding of a high-rate self-orthogonal convolutional code.
//
// Transmit side: information columns (M_INFO bits, one per information
// sequence) pass the parity-check encoder, which adds one parity column per
// N1 columns, into the tail-biting SOCC:TP2 encoder, which emits blocks of
// K code columns (M_INFO information bits + N_PAR parity bits, rate 8/10;
// overall rate 8/10 * 50/51 = 78.4%). Receive side: K columns of soft
// samples (BPSK, negative = 1) go into the MTD decoder (CMTDF or 2SD, then PC
// decoding), which returns the information columns with the parity-check
// columns removed. The two sides are independent; the channel between them is
// outside this design. All handshakes are valid/ready, one column per cycle.
// The code structure (8 + 2 sequences, J = 12, K = 10506, n1 = 50) follows the
// published main configuration; handshakes and sample width are this design's.
module mtd_codec_top
  import mtd_pkg::*;
#(
  parameter int unsigned K         = K_BLK,
  parameter int unsigned NSET      = 2,
  parameter int unsigned NW        = MIN_TAP_SPACING,
  parameter int unsigned MAX_ITER  = 32,
  parameter int unsigned MAX_PHASE = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // transmit: information in
  input  logic              tx_valid,
  output logic              tx_ready,
  input  logic [M_INFO-1:0] tx_bits,
  // transmit: code columns out
  output logic              cw_valid,
  input  logic              cw_ready,
  output logic [M_INFO-1:0] cw_info,
  output logic [N_PAR-1:0]  cw_par,
  output logic              cw_last,
  // receive: soft code columns in
  input  logic              rx_valid,
  output logic              rx_ready,
  input  soft_t             rx_yu [M_INFO],
  input  soft_t             rx_yv [N_PAR],
  input  logic              two_step,
  // receive: decoded information out
  output logic              dec_valid,
  input  logic              dec_ready,
  output logic [M_INFO-1:0] dec_bits,
  output logic              dec_last,
  // status and events
  output logic [15:0]       iter_count,
  output logic [15:0]       pc_flips,
  output logic              ev_pc_stall,  // PC encoder holds tx_ready low for its parity column
  output logic              ev_pass_w,
  output logic              ev_pass_s,
  output logic              ev_masked,
  output logic              ev_fb,
  output logic              ev_flip,
  output logic              ev_pc_flip
);

  logic              pc_valid, pc_ready, pc_is_pc;
  logic [M_INFO-1:0] pc_bits;

  pc_encoder u_pcenc (
    .clk, .rst_n,
    .in_valid(tx_valid), .in_ready(tx_ready), .in_bits(tx_bits),
    .out_valid(pc_valid), .out_ready(pc_ready), .out_bits(pc_bits), .out_is_pc(pc_is_pc)
  );

  assign ev_pc_stall = pc_is_pc && pc_ready;

  socc_encoder #(.K(K)) u_enc (
    .clk, .rst_n,
    .in_valid(pc_valid), .in_ready(pc_ready), .in_bits(pc_bits),
    .out_valid(cw_valid), .out_ready(cw_ready), .out_info(cw_info), .out_par(cw_par),
    .out_last(cw_last)
  );

  mtd_decoder #(.K(K), .NSET(NSET), .NW(NW), .PC_EN(1'b1), .MAX_ITER(MAX_ITER), .MAX_PHASE(MAX_PHASE)) u_dec (
    .clk, .rst_n,
    .in_valid(rx_valid), .in_ready(rx_ready), .in_yu(rx_yu), .in_yv(rx_yv), .two_step,
    .out_valid(dec_valid), .out_ready(dec_ready), .out_bits(dec_bits), .out_last(dec_last),
    .iter_count, .pc_flips, .ev_pass_w, .ev_pass_s, .ev_masked, .ev_fb, .ev_flip, .ev_pc_flip
  );

endmodule
