// code_generator -- PRN replica code generator, stepped at dchip rate.
//
// The code is a 1023-chip Gold code built from two 10-stage shift registers,
// G1 (1 + x^3 + x^10) and G2 (1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10), with
// the satellite selected by the two G2 phase-select taps TAP_A and TAP_B
// (2 and 6 give PRN 1 of the GPS C/A family). Any other PRN family can be
// dropped in behind the same ports. Because the correlator works at the
// resolution of one code increment (dchip), every code chip is held for K
// steps: sub_idx counts the position 0..K-1 inside the chip and the shift
// registers advance when it wraps.
//
// Interface: restart loads the all-ones state and sub_idx = 0 (code phase 0).
// step advances one dchip. chip is the current code bit (0 stands for +1,
// 1 for -1) and is valid in the cycle it is read, before the step edge.
// The reference design only names this block; the Gold code family is this
// design's choice.
module code_generator #(
  parameter int unsigned K     = 8,
  parameter int unsigned TAP_A = 2,
  parameter int unsigned TAP_B = 6,
  localparam int unsigned SUB_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             restart,
  input  logic             step,
  output logic             chip,
  output logic [SUB_W-1:0] sub_idx
);

  logic [10:1] g1, g2;
  logic        g1_fb, g2_fb, chip_end;

  assign g1_fb    = g1[3] ^ g1[10];
  assign g2_fb    = g2[2] ^ g2[3] ^ g2[6] ^ g2[8] ^ g2[9] ^ g2[10];
  assign chip     = g1[10] ^ g2[TAP_A] ^ g2[TAP_B];
  assign chip_end = (sub_idx == SUB_W'(K - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g1      <= '1;
      g2      <= '1;
      sub_idx <= '0;
    end else if (restart) begin
      g1      <= '1;
      g2      <= '1;
      sub_idx <= '0;
    end else if (step) begin
      if (chip_end) begin
        sub_idx <= '0;
        g1      <= {g1[9:1], g1_fb};
        g2      <= {g2[9:1], g2_fb};
      end else begin
        sub_idx <= sub_idx + 1'b1;
      end
    end
  end

endmodule
