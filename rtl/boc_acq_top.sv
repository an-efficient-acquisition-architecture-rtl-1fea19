// boc_acq_top -- acquisition engine for BOC-modulated GNSS signals using
// sub-carrier phase cancellation (SCPC) with reordered, time-shared
// correlation.
//
// Datapath, in the order of the samples:
//   carrier_dco + dchip_integrator  IF samples x sin / cos, summed over the L
//                                   samples of one code increment (dchip)
//   code_correlator_bank            LANES lanes, each serving L code
//                                   hypotheses by time division, sign-invert
//                                   the dchip sums by the replica code and
//                                   accumulate them per subcarrier position k
//   code_generator                  replica PRN code at dchip resolution
//   subcarrier_dco +
//   subcarrier_correlator           weight the K accumulators of a hypothesis
//                                   by S_I(k), S_Q(k): Y_II, Y_IQ, Y_QI, Y_QQ
//   power_combiner                  Q = Y_II^2 + Y_IQ^2 + Y_QI^2 + Y_QQ^2
//   peak_detect                     best cell of the search, threshold test
//   acq_controller                  dwell sequencing over code blocks and
//                                   Doppler bins
// One dwell tests P = LANES*L code phases, one dchip apart, at one Doppler
// bin, over N_DCHIP dchips (N_DCHIP*L samples). The samples come from a
// snapshot source through a valid/ready stream; dwell_start asks the source
// to rewind to the first sample of the snapshot before each dwell.
//
// Timing per dwell: 1 + o + P load cycles (o = block*P), at least
// N_DCHIP*L accumulate cycles plus L for the last dchip, P*K readout cycles
// and 5 cycles to flush and decide. The reported code phase best_code is in
// dchips: the replica delayed by best_code dchips matches the input, i.e.
// input dchip j carries replica dchip j + best_code.
//
// Defaults: L = 4 and K = 8 (BOC(10,5) sampled at 81.84 MHz) follow the
// reference; LANES = 100 gives the equivalent parallelism of 400 at which the
// reference compares adder counts. Sample, carrier and accumulator widths,
// the 1023-chip Gold code and the dwell length of one code period
// (N_DCHIP = 1023*K) are this design's choices.
module boc_acq_top
  import boc_acq_pkg::*;
#(
  parameter int unsigned LANES     = 100,
  parameter int unsigned L         = L_SAMPLES_DEF,
  parameter int unsigned K         = K_SUBCHIPS_DEF,
  parameter int unsigned SC_PERIOD = SC_PERIOD_DEF,
  parameter int unsigned N_DCHIP   = 1023 * K_SUBCHIPS_DEF,
  parameter int unsigned IF_W      = 4,
  parameter int unsigned AMP_W     = 3,
  parameter int unsigned PHASE_W   = 32,
  parameter int unsigned BIN_W     = 8,
  parameter int unsigned CODE_W    = 16,
  parameter int unsigned TAP_A     = 2,
  parameter int unsigned TAP_B     = 6,
  localparam int unsigned P        = LANES * L,
  localparam int unsigned HYP_W    = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned SUB_W    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned T_W      = IF_W + AMP_W + $clog2(L),
  localparam int unsigned ACC_W    = T_W + $clog2((N_DCHIP + K - 1) / K) + 1,
  localparam int unsigned Y_W      = ACC_W + $clog2(K),
  localparam int unsigned Q_W      = 2 * Y_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // search command and result
  input  logic                    start,
  input  logic [BIN_W-1:0]        n_bins,
  input  logic [CODE_W-1:0]       n_blocks,
  input  logic [PHASE_W-1:0]      freq_start,
  input  logic [PHASE_W-1:0]      freq_step,
  input  logic [Q_W-1:0]          threshold,
  output logic                    busy,
  output logic                    done,
  output logic                    found,
  output logic [Q_W-1:0]          best_q,
  output logic [CODE_W-1:0]       best_code,
  output logic [BIN_W-1:0]        best_bin,
  output acq_state_e              state,
  // IF sample stream
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IF_W-1:0]  if_sample,
  output logic                    dwell_start
);

  // Controller outputs.
  logic               dp_restart, load_step, rd_valid, sc_step, peak_clear;
  logic [PHASE_W-1:0] freq_word;
  logic [BIN_W-1:0]   bin;
  logic [CODE_W-1:0]  code_offset;
  logic [HYP_W-1:0]   rd_hyp;
  logic               detected, dchip_done, accept;
  logic [SUB_W-1:0]   sc_k;
  logic               sc_i_neg, sc_q_neg, sc_first, sc_last;

  assign accept = in_valid && in_ready;

  acq_controller #(
    .LANES(LANES), .L(L), .N_DCHIP(N_DCHIP), .FREQ_W(PHASE_W),
    .BIN_W(BIN_W), .CODE_W(CODE_W), .FLUSH_CYC(4)
  ) u_ctrl (
    .clk, .rst_n, .start, .n_bins, .n_blocks, .freq_start, .freq_step,
    .busy, .done, .found, .state_o(state),
    .in_valid, .in_ready, .dwell_start,
    .dp_restart, .load_step, .freq_word, .bin, .code_offset,
    .dchip_done, .rd_valid, .rd_hyp, .sc_step, .sc_last(sc_last),
    .peak_clear, .detected
  );

  // Carrier wipe-off and dchip integration.
  logic signed [AMP_W-1:0] car_sin, car_cos;
  logic                    t_valid;
  logic signed [T_W-1:0]   t_i, t_q;

  carrier_dco #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_carrier (
    .clk, .rst_n, .restart(dp_restart), .step(accept), .freq_word,
    .sin_o(car_sin), .cos_o(car_cos)
  );

  dchip_integrator #(.IF_W(IF_W), .AMP_W(AMP_W), .L(L)) u_integ (
    .clk, .rst_n, .clear(dp_restart), .in_valid(accept), .if_sample,
    .sin_i(car_sin), .cos_i(car_cos), .t_valid, .t_i, .t_q
  );

  // Replica code and code correlation.
  logic             replica_chip, replica_step;
  logic [SUB_W-1:0] code_sub_idx;

  code_generator #(.K(K), .TAP_A(TAP_A), .TAP_B(TAP_B)) u_code (
    .clk, .rst_n, .restart(dp_restart), .step(replica_step),
    .chip(replica_chip), .sub_idx(code_sub_idx)
  );

  logic                    m_valid;
  logic signed [ACC_W-1:0] m_i, m_q;

  code_correlator_bank #(
    .LANES(LANES), .L(L), .K(K), .T_W(T_W), .ACC_W(ACC_W)
  ) u_bank (
    .clk, .rst_n, .clear(dp_restart), .load_step, .replica_chip, .replica_step,
    .t_valid, .t_i, .t_q, .dchip_done,
    .rd_valid, .rd_hyp, .rd_k(sc_k), .m_valid, .m_i, .m_q
  );

  // Subcarrier correlation; the subcarrier signs are delayed to meet the
  // registered readout of the bank.
  subcarrier_dco #(.K(K), .SC_PERIOD(SC_PERIOD)) u_subcar (
    .clk, .rst_n, .restart(dp_restart), .step(sc_step), .k(sc_k),
    .s_i_neg(sc_i_neg), .s_q_neg(sc_q_neg), .first(sc_first), .last(sc_last)
  );

  logic             p_i_neg, p_q_neg, p_first, p_last;
  logic [HYP_W-1:0] p_hyp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {p_i_neg, p_q_neg, p_first, p_last} <= '0;
      p_hyp <= '0;
    end else begin
      {p_i_neg, p_q_neg, p_first, p_last} <= {sc_i_neg, sc_q_neg, sc_first, sc_last};
      p_hyp <= rd_hyp;
    end
  end

  logic                  y_valid;
  logic [HYP_W-1:0]      y_tag;
  logic signed [Y_W-1:0] y_ii, y_iq, y_qi, y_qq;

  subcarrier_correlator #(.ACC_W(ACC_W), .K(K), .TAG_W(HYP_W)) u_subcorr (
    .clk, .rst_n, .in_valid(m_valid), .in_first(p_first), .in_last(p_last),
    .in_tag(p_hyp), .m_i, .m_q, .s_i_neg(p_i_neg), .s_q_neg(p_q_neg),
    .y_valid, .y_tag, .y_ii, .y_iq, .y_qi, .y_qq
  );

  logic             q_valid;
  logic [HYP_W-1:0] q_tag;
  logic [Q_W-1:0]   q;

  power_combiner #(.Y_W(Y_W), .TAG_W(HYP_W)) u_comb (
    .clk, .rst_n, .y_valid, .y_tag, .y_ii, .y_iq, .y_qi, .y_qq,
    .q_valid, .q_tag, .q
  );

  peak_detect #(.Q_W(Q_W), .CODE_W(CODE_W), .BIN_W(BIN_W)) u_peak (
    .clk, .rst_n, .clear(peak_clear), .q_valid, .q,
    .q_code(code_offset + CODE_W'(q_tag)), .q_bin(bin), .threshold,
    .best_q, .best_code, .best_bin, .detected
  );

endmodule
