// carrier_dco -- replica carrier oscillator (numerically controlled).
//
// A PHASE_W-bit phase accumulator advances by freq_word on every cycle in
// which step is high, so the output frequency is freq_word / 2^PHASE_W times
// the step rate (the sample rate). The top three phase bits address an
// eight-entry table of the carrier, sampled at the middle of each 45-degree
// sector and scaled to the levels {1,2,2,1,-1,-2,-2,-1} (about 2.4*sin), the
// usual few-level replica of GNSS receivers. cos is the same table read 90
// degrees ahead. The outputs are combinational from the phase register: they
// belong to the sample presented in the cycle in which step is high, and the
// phase moves on at that clock edge. restart sets the phase to zero (it wins
// over step).
//
// The oscillator drives the sin and cos carrier inputs of the two mixers of
// the correlator; the frequency word carries the intermediate frequency plus
// the Doppler bin under test. The phase width, the table and its levels are
// this design's choice.
module carrier_dco #(
  parameter int unsigned PHASE_W = 32,
  parameter int unsigned AMP_W   = 3          // signed width of sin/cos
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      restart,
  input  logic                      step,
  input  logic [PHASE_W-1:0]        freq_word,
  output logic signed [AMP_W-1:0]   sin_o,
  output logic signed [AMP_W-1:0]   cos_o
);

  logic [PHASE_W-1:0] phase_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       phase_q <= '0;
    else if (restart) phase_q <= '0;
    else if (step)    phase_q <= phase_q + freq_word;
  end

  function automatic logic signed [AMP_W-1:0] sin_tab(input logic [2:0] sector);
    unique case (sector)
      3'd0, 3'd3: return AMP_W'(signed'(3'sd1));
      3'd1, 3'd2: return AMP_W'(signed'(3'sd2));
      3'd4, 3'd7: return AMP_W'(signed'(-3'sd1));
      default:    return AMP_W'(signed'(-3'sd2));
    endcase
  endfunction

  logic [2:0] sector;
  assign sector  = phase_q[PHASE_W-1 -: 3];
  assign sin_o   = sin_tab(sector);
  assign cos_o   = sin_tab(sector + 3'd2);

endmodule
