// tb_correlator_lane -- self-checking test of one correlation lane.
// Random updates (slot, k, first, code bit, T_I, T_Q) are applied to the DUT
// and to a reference array; after each update every register is read back
// through the read port and compared. First-visit writes and accumulating
// updates both occur, and both signs of the code bit.
module tb_correlator_lane;
  localparam int L = 4, K = 8, T_W = 9, ACC_W = 20;
  logic clk = 0;
  logic upd_valid = 0, upd_first = 0, code_bit = 0;
  logic [1:0] upd_slot = 0, rd_slot = 0;
  logic [2:0] upd_k = 0, rd_k = 0;
  logic signed [T_W-1:0] t_i = 0, t_q = 0;
  logic signed [ACC_W-1:0] rd_i, rd_q;
  int checks = 0, failures = 0, n_first = 0, n_acc = 0;
  int ref_i [L*K], ref_q [L*K];

  always #5 clk = ~clk;

  correlator_lane #(.L(L), .K(K), .T_W(T_W), .ACC_W(ACC_W)) dut (
    .clk, .upd_valid, .upd_slot, .upd_k, .upd_first, .code_bit, .t_i, .t_q,
    .rd_slot, .rd_k, .rd_i, .rd_q
  );

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every register with first-visit writes
    for (int a = 0; a < L*K; a++) begin
      @(negedge clk);
      upd_valid = 1; upd_first = 1; upd_slot = 2'(a / K); upd_k = 3'(a % K);
      code_bit = 0; t_i = T_W'(a); t_q = T_W'(-a);
      ref_i[a] = a; ref_q[a] = -a;
    end
    for (int it = 0; it < 3000; it++) begin
      int a, vi, vq;
      @(negedge clk);
      upd_valid = ($urandom_range(0, 4) != 0);
      upd_first = ($urandom_range(0, 9) == 0);
      upd_slot  = 2'($urandom);
      upd_k     = 3'($urandom);
      code_bit  = 1'($urandom);
      t_i       = T_W'($urandom_range(0, 511));
      t_q       = T_W'($urandom_range(0, 511));
      a  = int'(upd_slot) * K + int'(upd_k);
      vi = code_bit ? -int'(t_i) : int'(t_i);
      vq = code_bit ? -int'(t_q) : int'(t_q);
      if (upd_valid) begin
        if (upd_first) begin ref_i[a] = vi; ref_q[a] = vq; n_first++; end
        else begin ref_i[a] += vi; ref_q[a] += vq; n_acc++; end
      end
      // read one random register (combinational port)
      rd_slot = 2'($urandom); rd_k = 3'($urandom);
      #1;
      // register contents before this edge: compare only if not the one being written
      if (!(upd_valid && rd_slot == upd_slot && rd_k == upd_k)) begin
        checks++;
        if (int'(rd_i) != ref_i[int'(rd_slot)*K + int'(rd_k)] ||
            int'(rd_q) != ref_q[int'(rd_slot)*K + int'(rd_k)]) begin
          failures++;
          if (failures < 10) $display("reg %0d.%0d: %0d/%0d exp %0d/%0d", rd_slot, rd_k, rd_i, rd_q,
                                      ref_i[int'(rd_slot)*K + int'(rd_k)], ref_q[int'(rd_slot)*K + int'(rd_k)]);
        end
      end
    end
    @(negedge clk); upd_valid = 0;
    for (int a = 0; a < L*K; a++) begin
      @(negedge clk);
      rd_slot = 2'(a / K); rd_k = 3'(a % K);
      #1 checks++;
      if (int'(rd_i) != ref_i[a] || int'(rd_q) != ref_q[a]) failures++;
    end
    checks++;
    if (n_first < 100 || n_acc < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
