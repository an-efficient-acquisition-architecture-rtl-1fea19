// tb_code_correlator_bank -- self-checking test of the time-shared code
// correlator bank at LANES = 3, L = 4, K = 8 (P = 12 hypotheses).
// A random replica bit stream stands in for the code generator (it advances
// on replica_step). The bank is cleared, loaded for code offset o, and fed
// N dchip sums with random gaps between them, held constant in between as
// the integrator does. A reference computes, for every hypothesis d and
// subcarrier position k,
//   M(d,k) = sum over dchips j with (o+j+d) mod K == k of (+/-)T(j),
// the sign being the replica bit of dchip o+j+d. Checked: every M_I and M_Q
// through the read port (one-clock latency), dchip_done exactly L clocks
// after each t_valid, and the number of replica steps. Two dwells are run
// with different offsets to show that a new dwell overwrites the old sums.
module tb_code_correlator_bank;
  localparam int LANES = 3, L = 4, K = 8, P = LANES * L, T_W = 9, ACC_W = 20;
  localparam int NDCH = 40;
  logic clk = 0, rst_n = 0, clear = 0, load_step = 0;
  logic replica_chip, replica_step;
  logic t_valid = 0;
  logic signed [T_W-1:0] t_i = 0, t_q = 0;
  logic dchip_done;
  logic rd_valid = 0;
  logic [3:0] rd_hyp = 0;
  logic [2:0] rd_k = 0;
  logic m_valid;
  logic signed [ACC_W-1:0] m_i, m_q;
  int checks = 0, failures = 0;
  bit R [0:511];
  int ridx = 0, nsteps = 0;
  int mi [P][K], mq [P][K];
  int tv_cycle [$];
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign replica_chip = R[ridx];
  always @(posedge clk) if (replica_step) begin ridx <= ridx + 1; nsteps <= nsteps + 1; end

  code_correlator_bank #(.LANES(LANES), .L(L), .K(K), .T_W(T_W), .ACC_W(ACC_W)) dut (
    .clk, .rst_n, .clear, .load_step, .replica_chip, .replica_step,
    .t_valid, .t_i, .t_q, .dchip_done, .rd_valid, .rd_hyp, .rd_k,
    .m_valid, .m_i, .m_q
  );

  // dchip_done must follow each t_valid by exactly L clocks
  always @(negedge clk) if (rst_n) begin
    if (t_valid) tv_cycle.push_back(cyc);
    if (dchip_done) begin
      checks++;
      if (tv_cycle.size() == 0 || cyc - tv_cycle[0] != L) begin
        failures++;
        $display("dchip_done at %0d not L after t_valid", cyc);
      end
      if (tv_cycle.size() != 0) void'(tv_cycle.pop_front());
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dwell(input int o);
    int ti, tq, idx;
    for (int d = 0; d < P; d++) for (int k = 0; k < K; k++) begin mi[d][k] = 0; mq[d][k] = 0; end
    @(negedge clk); clear = 1; ridx = 0;
    @(negedge clk); clear = 0;
    nsteps = 0;
    for (int s = 0; s < o + P; s++) begin
      load_step = 1; @(negedge clk);
    end
    load_step = 0;
    checks++;
    if (nsteps != o + P) begin failures++; $display("load steps %0d", nsteps); end
    for (int j = 0; j < NDCH; j++) begin
      ti = $urandom_range(0, 400) - 200;
      tq = $urandom_range(0, 400) - 200;
      t_valid = 1; t_i = T_W'(ti); t_q = T_W'(tq);
      for (int d = 0; d < P; d++) begin
        idx = o + j + d;
        mi[d][idx % K] += R[idx] ? -ti : ti;
        mq[d][idx % K] += R[idx] ? -tq : tq;
      end
      @(negedge clk); t_valid = 0;
      repeat (L - 1 + $urandom_range(0, 2)) @(negedge clk);
    end
    repeat (L + 2) @(negedge clk);
    checks++;
    if (nsteps != o + P + NDCH) begin failures++; $display("steps %0d", nsteps); end
    for (int d = 0; d < P; d++) for (int k = 0; k < K; k++) begin
      rd_valid = 1; rd_hyp = 4'(d); rd_k = 3'(k);
      @(negedge clk);
      rd_valid = 0;
      checks++;
      if (!m_valid || int'(m_i) != mi[d][k] || int'(m_q) != mq[d][k]) begin
        failures++;
        if (failures < 10) $display("d=%0d k=%0d: %0d/%0d exp %0d/%0d", d, k, m_i, m_q, mi[d][k], mq[d][k]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 512; i++) R[i] = 1'($urandom);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    dwell(5);
    dwell(17);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
