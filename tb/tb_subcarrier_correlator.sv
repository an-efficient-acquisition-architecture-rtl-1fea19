// tb_subcarrier_correlator -- self-checking test of the subcarrier
// correlation. Groups of K = 8 random M_I, M_Q values with random signs
// (including the BOC(10,5) patterns) and random valid gaps are fed in; the
// reference forms Y_II, Y_IQ, Y_QI, Y_QQ with integer arithmetic. Each result
// must appear one clock after the last value of its group, with its tag.
module tb_subcarrier_correlator;
  localparam int ACC_W = 20, K = 8, Y_W = 23;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0, s_i_neg = 0, s_q_neg = 0;
  logic [8:0] in_tag = 0;
  logic signed [ACC_W-1:0] m_i = 0, m_q = 0;
  logic y_valid;
  logic [8:0] y_tag;
  logic signed [Y_W-1:0] y_ii, y_iq, y_qi, y_qq;
  int checks = 0, failures = 0;
  longint e_ii, e_iq, e_qi, e_qq;
  bit expect_y = 0;
  int e_tag = 0, groups = 0;

  always #5 clk = ~clk;

  subcarrier_correlator #(.ACC_W(ACC_W), .K(K), .TAG_W(9)) dut (
    .clk, .rst_n, .in_valid, .in_first, .in_last, .in_tag, .m_i, .m_q,
    .s_i_neg, .s_q_neg, .y_valid, .y_tag, .y_ii, .y_iq, .y_qi, .y_qq
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k = 0;
    longint a_ii = 0, a_iq = 0, a_qi = 0, a_qq = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 8000; i++) begin
      @(negedge clk);
      checks++;
      if (y_valid != expect_y) begin
        failures++;
        $display("y_valid %0b exp %0b", y_valid, expect_y);
      end else if (expect_y && (longint'(y_ii) != e_ii || longint'(y_iq) != e_iq ||
               longint'(y_qi) != e_qi || longint'(y_qq) != e_qq || int'(y_tag) != e_tag)) begin
        failures++;
        if (failures < 10) $display("Y %0d %0d %0d %0d exp %0d %0d %0d %0d", y_ii, y_iq, y_qi, y_qq, e_ii, e_iq, e_qi, e_qq);
      end
      expect_y = 0;
      in_valid = ($urandom_range(0, 3) != 0);
      m_i = ACC_W'($urandom);
      m_q = ACC_W'($urandom);
      if (i % 3 == 0) begin
        s_i_neg = ((k % 4) >= 2);
        s_q_neg = (((k + 1) % 4) >= 2);
      end else begin
        s_i_neg = 1'($urandom);
        s_q_neg = 1'($urandom);
      end
      in_first = (k == 0);
      in_last  = (k == K - 1);
      in_tag   = 9'(groups);
      @(posedge clk);
      if (in_valid) begin
        longint vi, vq;
        vi = longint'(m_i); vq = longint'(m_q);
        if (in_first) begin a_ii = 0; a_iq = 0; a_qi = 0; a_qq = 0; end
        a_ii += s_i_neg ? -vi : vi;
        a_iq += s_i_neg ? -vq : vq;
        a_qi += s_q_neg ? -vi : vi;
        a_qq += s_q_neg ? -vq : vq;
        if (in_last) begin
          e_ii = a_ii; e_iq = a_iq; e_qi = a_qi; e_qq = a_qq;
          e_tag = groups % 512; expect_y = 1; groups++;
        end
        k = (k + 1) % K;
      end
    end
    checks++;
    if (groups < 500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
