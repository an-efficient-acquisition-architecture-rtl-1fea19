// subcarrier_correlator -- final correlation of the code-correlated values
// with the in-phase and quad-phase subcarriers.
//
// For one code hypothesis the K values M_I(k), M_Q(k) arrive one per clock
// (in_valid), with the subcarrier signs of their position. Four sign
// inversions and four accumulators form
//   Y_II = sum S_I(k) M_I(k)    Y_IQ = sum S_I(k) M_Q(k)
//   Y_QI = sum S_Q(k) M_I(k)    Y_QQ = sum S_Q(k) M_Q(k)
// in_first starts new sums; on in_last the four results are registered on
// the outputs with y_valid for one clock, together with in_tag (the
// hypothesis number). Latency: one clock after the last value. Sign
// convention: s_*_neg = 1 means -1. Widths are this design's choice.
module subcarrier_correlator #(
  parameter int unsigned ACC_W = 20,
  parameter int unsigned K     = 8,
  parameter int unsigned TAG_W = 9,
  localparam int unsigned Y_W  = ACC_W + $clog2(K)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic                     in_first,
  input  logic                     in_last,
  input  logic [TAG_W-1:0]         in_tag,
  input  logic signed [ACC_W-1:0]  m_i,
  input  logic signed [ACC_W-1:0]  m_q,
  input  logic                     s_i_neg,
  input  logic                     s_q_neg,
  output logic                     y_valid,
  output logic [TAG_W-1:0]         y_tag,
  output logic signed [Y_W-1:0]    y_ii,
  output logic signed [Y_W-1:0]    y_iq,
  output logic signed [Y_W-1:0]    y_qi,
  output logic signed [Y_W-1:0]    y_qq
);

  logic signed [Y_W-1:0] a_ii, a_iq, a_qi, a_qq;     // running sums
  logic signed [Y_W-1:0] n_ii, n_iq, n_qi, n_qq;     // sums including this value
  logic signed [Y_W-1:0] ei, eq;

  assign ei   = Y_W'(m_i);
  assign eq   = Y_W'(m_q);
  assign n_ii = (in_first ? '0 : a_ii) + (s_i_neg ? -ei : ei);
  assign n_iq = (in_first ? '0 : a_iq) + (s_i_neg ? -eq : eq);
  assign n_qi = (in_first ? '0 : a_qi) + (s_q_neg ? -ei : ei);
  assign n_qq = (in_first ? '0 : a_qq) + (s_q_neg ? -eq : eq);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_ii <= '0; a_iq <= '0; a_qi <= '0; a_qq <= '0;
      y_ii <= '0; y_iq <= '0; y_qi <= '0; y_qq <= '0;
      y_valid <= 1'b0;
      y_tag   <= '0;
    end else begin
      y_valid <= 1'b0;
      if (in_valid) begin
        a_ii <= n_ii; a_iq <= n_iq; a_qi <= n_qi; a_qq <= n_qq;
        if (in_last) begin
          y_ii <= n_ii; y_iq <= n_iq; y_qi <= n_qi; y_qq <= n_qq;
          y_valid <= 1'b1;
          y_tag   <= in_tag;
        end
      end
    end
  end

endmodule
