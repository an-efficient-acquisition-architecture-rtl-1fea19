// correlator_lane -- one time-shared code-correlation lane with its
// accumulator registers.
//
// A lane serves L code hypotheses, one per clock, while the dchip sums T_I,
// T_Q of one code increment are held in the integrator's output registers
// (time division). For the hypothesis in slot upd_slot the sums are
// sign-inverted by the replica code bit (code_bit = 1 means -1; this is the
// "sign inversion" that replaces a multiplier) and added into the register
// of that hypothesis and of the subcarrier position upd_k:
//   M_I(slot,k) += (+/-) T_I      M_Q(slot,k) += (+/-) T_Q
// Each lane therefore holds L*K registers per branch (its share of the
// Sum_I1..Sum_In and Sum_Q1..Sum_Qn banks). upd_first replaces the register
// content instead of adding to it; it is raised during the first K dchips of
// a dwell, in which every (slot,k) register is written exactly once, so no
// separate clearing pass is needed.
//
// The read port (rd_slot, rd_k) is combinational and is used only while the
// lane is not updating, during readout. One read-modify-write per clock.
// Register widths and the write-on-first-visit clearing are this design's
// choice.
module correlator_lane #(
  parameter int unsigned L     = 4,
  parameter int unsigned K     = 8,
  parameter int unsigned T_W   = 9,
  parameter int unsigned ACC_W = 20,
  localparam int unsigned SLOT_W = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned SUB_W  = (K > 1) ? $clog2(K) : 1
) (
  input  logic                     clk,
  input  logic                     upd_valid,
  input  logic [SLOT_W-1:0]        upd_slot,
  input  logic [SUB_W-1:0]         upd_k,
  input  logic                     upd_first,
  input  logic                     code_bit,
  input  logic signed [T_W-1:0]    t_i,
  input  logic signed [T_W-1:0]    t_q,
  input  logic [SLOT_W-1:0]        rd_slot,
  input  logic [SUB_W-1:0]         rd_k,
  output logic signed [ACC_W-1:0]  rd_i,
  output logic signed [ACC_W-1:0]  rd_q
);

  localparam int unsigned DEPTH = L * K;
  localparam int unsigned ADR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic signed [ACC_W-1:0] sum_i [DEPTH];
  logic signed [ACC_W-1:0] sum_q [DEPTH];

  logic [ADR_W-1:0]        upd_adr, rd_adr;
  logic signed [ACC_W-1:0] v_i, v_q, base_i, base_q;

  assign upd_adr = ADR_W'(upd_slot * K + upd_k);
  assign rd_adr  = ADR_W'(rd_slot * K + rd_k);

  // Code correlation by sign inversion.
  assign v_i    = code_bit ? -ACC_W'(t_i) : ACC_W'(t_i);
  assign v_q    = code_bit ? -ACC_W'(t_q) : ACC_W'(t_q);
  assign base_i = upd_first ? '0 : sum_i[upd_adr];
  assign base_q = upd_first ? '0 : sum_q[upd_adr];

  always_ff @(posedge clk) begin
    if (upd_valid) begin
      sum_i[upd_adr] <= base_i + v_i;
      sum_q[upd_adr] <= base_q + v_q;
    end
  end

  assign rd_i = sum_i[rd_adr];
  assign rd_q = sum_q[rd_adr];

endmodule
