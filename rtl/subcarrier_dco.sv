// subcarrier_dco -- in-phase and quad-phase subcarrier sequence for the last
// correlation step.
//
// After the code correlation, each hypothesis has K accumulated values, one
// per subcarrier position k inside a code chip. This block steps k through
// 0..K-1 and gives the signs of the two square subcarriers at k:
//   in-phase  S_I(k) = sign(sin(2*pi*(k+1/2)/SC_PERIOD))
//   quad-phase S_Q(k) = sign(cos(2*pi*(k+1/2)/SC_PERIOD))
// With SC_PERIOD = 4 and K = 8 this is the BOC(10,5) pair
//   S_I = {+,+,-,-,+,+,-,-}, S_Q = {+,-,-,+,+,-,-,+}.
// Outputs are registered state: k, the two signs (1 = -1) and first/last
// flags belong to the current position; step moves to the next position
// (wrapping after K-1), restart returns to k = 0. The counter form of the
// oscillator is this design's choice.
module subcarrier_dco
  import boc_acq_pkg::*;
#(
  parameter int unsigned K         = K_SUBCHIPS_DEF,
  parameter int unsigned SC_PERIOD = SC_PERIOD_DEF,
  localparam int unsigned SUB_W    = (K > 1) ? $clog2(K) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             step,
  output logic [SUB_W-1:0] k,
  output logic             s_i_neg,
  output logic             s_q_neg,
  output logic             first,
  output logic             last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       k <= '0;
    else if (restart) k <= '0;
    else if (step)    k <= (k == SUB_W'(K - 1)) ? '0 : k + 1'b1;
  end

  assign s_i_neg = !sub_i_sign(int'(k), SC_PERIOD);
  assign s_q_neg = !sub_q_sign(int'(k), SC_PERIOD);
  assign first   = (k == '0);
  assign last    = (k == SUB_W'(K - 1));

endmodule
