// code_correlator_bank -- parallel, time-shared PRN code correlation of
// P = LANES*L code hypotheses, with the accumulator banks and the readout
// multiplexer.
//
// Replica window: win[d] holds the replica code bit of dchip j+d, where j is
// the dchip now being correlated, for the P hypotheses d = 0..P-1 (one
// dchip apart, i.e. one code increment apart). The window is a shift
// register fed from the code generator: each shift takes in replica_chip at
// the top and pulses replica_step so the generator moves on by one dchip.
// kbase is the subcarrier position (0..K-1) of win[0]; hypothesis d uses
// position (kbase + d) mod K, so its K registers line up with the subcarrier
// of its own replica.
//
// Loading: clear (one cycle) resets kbase to -P mod K and the dwell's dchip
// count; then load_step shifts the window once per cycle. After o+P load
// steps from a restarted generator, win[d] holds replica dchip o+d, i.e. the
// bank tests code offsets o..o+P-1.
//
// Correlation: when t_valid brings a new pair of dchip sums, slot 0 is
// processed in that cycle and slots 1..L-1 in the next L-1 cycles; in slot s
// lane u handles hypothesis d = u*L + s. After slot L-1 the window shifts
// and dchip_done pulses. A new t_valid must not arrive sooner than L cycles
// after the previous one, which holds when at most one sample is accepted per
// clock; an assertion checks this. upd_first is high for the first K dchips of the dwell.
//
// Readout: rd_valid/rd_hyp/rd_k select M_I, M_Q of one hypothesis and
// subcarrier position; m_valid, m_i, m_q follow one clock later.
// The split into lanes, the window and the slot order are this design's
// reading of the time-division scheme; the reference gives its function.
module code_correlator_bank #(
  parameter int unsigned LANES = 100,
  parameter int unsigned L     = 4,
  parameter int unsigned K     = 8,
  parameter int unsigned T_W   = 9,
  parameter int unsigned ACC_W = 20,
  localparam int unsigned P      = LANES * L,
  localparam int unsigned HYP_W  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned SLOT_W = (L > 1) ? $clog2(L) : 1,
  localparam int unsigned SUB_W  = (K > 1) ? $clog2(K) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     load_step,
  input  logic                     replica_chip,
  output logic                     replica_step,
  input  logic                     t_valid,
  input  logic signed [T_W-1:0]    t_i,
  input  logic signed [T_W-1:0]    t_q,
  output logic                     dchip_done,
  input  logic                     rd_valid,
  input  logic [HYP_W-1:0]         rd_hyp,
  input  logic [SUB_W-1:0]         rd_k,
  output logic                     m_valid,
  output logic signed [ACC_W-1:0]  m_i,
  output logic signed [ACC_W-1:0]  m_q
);

  localparam int unsigned KBASE0 = (K - (P % K)) % K;
  localparam int unsigned JCNT_W = $clog2(K + 1);

  logic [P-1:0]        win;
  logic [SUB_W-1:0]    kbase;
  logic [JCNT_W-1:0]   jcnt;        // dchips done this dwell, saturates at K
  logic                busy;
  logic [SLOT_W-1:0]   slot_q, slot;
  logic                active, slot_last, shift;

  assign active     = t_valid || busy;
  assign slot       = t_valid ? '0 : slot_q;
  assign slot_last  = active && (slot == SLOT_W'(L - 1));
  assign shift      = load_step || slot_last;
  assign replica_step = shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win        <= '0;
      kbase      <= '0;
      jcnt       <= '0;
      busy       <= 1'b0;
      slot_q     <= '0;
      dchip_done <= 1'b0;
    end else begin
      dchip_done <= slot_last;
      if (clear) begin
        kbase  <= SUB_W'(KBASE0);
        jcnt   <= '0;
        busy   <= 1'b0;
        slot_q <= '0;
      end else begin
        if (shift) begin
          win   <= {replica_chip, win[P-1:1]};
          kbase <= (kbase == SUB_W'(K - 1)) ? '0 : kbase + 1'b1;
        end
        if (slot_last) begin
          busy   <= 1'b0;
          slot_q <= '0;
          if (jcnt != JCNT_W'(K)) jcnt <= jcnt + 1'b1;
        end else if (active) begin
          busy   <= 1'b1;
          slot_q <= slot + 1'b1;
        end
      end
    end
  end

  // A new pair of dchip sums may only arrive once the L slots of the previous
  // pair are done (at most one input sample per clock upstream).
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n) t_valid |-> !busy)
    else $error("dchip sums arrived before the previous dchip was correlated");

  // Lanes.
  logic signed [ACC_W-1:0] lane_rd_i [LANES];
  logic signed [ACC_W-1:0] lane_rd_q [LANES];
  logic [SLOT_W-1:0]       rd_slot;
  logic                    first;

  assign rd_slot = SLOT_W'(int'(rd_hyp) % L);
  assign first   = (jcnt < JCNT_W'(K));

  for (genvar u = 0; u < LANES; u++) begin : g_lane
    localparam int unsigned DMODK = (u * L) % K;
    logic [SUB_W-1:0] k_u;
    logic             code_u;

    assign k_u    = SUB_W'((int'(kbase) + DMODK + int'(slot)) % K);
    assign code_u = win[u * L + int'(slot)];

    correlator_lane #(
      .L(L), .K(K), .T_W(T_W), .ACC_W(ACC_W)
    ) u_lane (
      .clk       (clk),
      .upd_valid (active),
      .upd_slot  (slot),
      .upd_k     (k_u),
      .upd_first (first),
      .code_bit  (code_u),
      .t_i       (t_i),
      .t_q       (t_q),
      .rd_slot   (rd_slot),
      .rd_k      (rd_k),
      .rd_i      (lane_rd_i[u]),
      .rd_q      (lane_rd_q[u])
    );
  end

  // Readout multiplexer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_valid <= 1'b0;
      m_i     <= '0;
      m_q     <= '0;
    end else begin
      m_valid <= rd_valid;
      if (rd_valid) begin
        m_i <= lane_rd_i[int'(rd_hyp) / L];
        m_q <= lane_rd_q[int'(rd_hyp) / L];
      end
    end
  end

endmodule
