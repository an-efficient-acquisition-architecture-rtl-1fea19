// power_combiner -- reconstructed correlation of the sub-carrier phase
// cancellation method,
//   Q = Y_II^2 + Y_IQ^2 + Y_QI^2 + Y_QQ^2 ,
// which removes the dependence on carrier and subcarrier phase and gives a
// single wide, unambiguous correlation peak. One result per clock, registered
// (latency one clock); the tag travels with it. Q is wide enough for the
// largest possible squares, so nothing saturates.
module power_combiner #(
  parameter int unsigned Y_W   = 23,
  parameter int unsigned TAG_W = 9,
  localparam int unsigned Q_W  = 2 * Y_W + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   y_valid,
  input  logic [TAG_W-1:0]       y_tag,
  input  logic signed [Y_W-1:0]  y_ii,
  input  logic signed [Y_W-1:0]  y_iq,
  input  logic signed [Y_W-1:0]  y_qi,
  input  logic signed [Y_W-1:0]  y_qq,
  output logic                   q_valid,
  output logic [TAG_W-1:0]       q_tag,
  output logic [Q_W-1:0]         q
);

  function automatic logic [Q_W-1:0] sq(input logic signed [Y_W-1:0] y);
    logic signed [Q_W-1:0] e;
    e = Q_W'(y);
    return Q_W'(e * e);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q_tag   <= '0;
      q       <= '0;
    end else begin
      q_valid <= y_valid;
      if (y_valid) begin
        q_tag <= y_tag;
        q     <= sq(y_ii) + sq(y_iq) + sq(y_qi) + sq(y_qq);
      end
    end
  end

endmodule
