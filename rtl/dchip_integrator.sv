// dchip_integrator -- carrier wipe-off and integrate-and-dump over one code
// increment (dchip).
//
// Each accepted IF sample is multiplied by the replica sin (I branch) and cos
// (Q branch) and added into a running sum. On the L-th sample of a dchip the
// completed sums T_I, T_Q are dumped into the output registers (Reg0 for I,
// Reg1 for Q) and t_valid pulses for one cycle; the running sums restart with
// the next sample. The output registers hold their value until the next dump,
// at least L cycles later when one sample is accepted per clock, which is the
// window in which the time-shared code correlator uses them.
//
// Interface: in_valid qualifies if_sample; sin_i/cos_i are the carrier levels
// for that same sample. clear restarts the sample count of the dchip (start of
// a dwell). Latency: T values appear one clock after the L-th sample.
// The structure (mixer, Sum, Reg) follows the reference block diagram; the
// widths are this design's choice and are sized so that no sum overflows.
module dchip_integrator #(
  parameter int unsigned IF_W    = 4,
  parameter int unsigned AMP_W   = 3,
  parameter int unsigned L       = 4,
  localparam int unsigned T_W    = IF_W + AMP_W + $clog2(L)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic signed [IF_W-1:0]   if_sample,
  input  logic signed [AMP_W-1:0]  sin_i,
  input  logic signed [AMP_W-1:0]  cos_i,
  output logic                     t_valid,
  output logic signed [T_W-1:0]    t_i,      // Reg0
  output logic signed [T_W-1:0]    t_q       // Reg1
);

  localparam int unsigned CNT_W = (L > 1) ? $clog2(L) : 1;

  logic signed [T_W-1:0] prod_i, prod_q;
  logic signed [T_W-1:0] sum_i, sum_q;
  logic [CNT_W-1:0]      cnt;
  logic                  last;

  assign prod_i = T_W'(if_sample) * T_W'(sin_i);
  assign prod_q = T_W'(if_sample) * T_W'(cos_i);
  assign last   = (cnt == CNT_W'(L - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      sum_i   <= '0;
      sum_q   <= '0;
      t_i     <= '0;
      t_q     <= '0;
      t_valid <= 1'b0;
    end else begin
      t_valid <= 1'b0;
      if (clear) begin
        cnt   <= '0;
        sum_i <= '0;
        sum_q <= '0;
      end else if (in_valid) begin
        if (last) begin
          cnt     <= '0;
          sum_i   <= '0;
          sum_q   <= '0;
          t_i     <= sum_i + prod_i;
          t_q     <= sum_q + prod_q;
          t_valid <= 1'b1;
        end else begin
          cnt   <= cnt + 1'b1;
          sum_i <= sum_i + prod_i;
          sum_q <= sum_q + prod_q;
        end
      end
    end
  end

endmodule
