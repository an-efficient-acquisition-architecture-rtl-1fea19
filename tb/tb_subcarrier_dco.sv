// tb_subcarrier_dco -- checks the subcarrier sequences of the BOC(10,5)
// configuration against the printed patterns
//   S_I = {1,1,-1,-1,1,1,-1,-1}  S_Q = {1,-1,-1,1,1,-1,-1,1}
// over several wraps, with random step gaps and a restart, and checks the
// first/last flags.
module tb_subcarrier_dco;
  logic clk = 0, rst_n = 0, restart = 0, step = 0;
  logic [2:0] k;
  logic s_i_neg, s_q_neg, first, last;
  int checks = 0, failures = 0;
  int si [8] = '{1, 1, -1, -1, 1, 1, -1, -1};
  int sq [8] = '{1, -1, -1, 1, 1, -1, -1, 1};
  int exp_k = 0;

  always #5 clk = ~clk;

  subcarrier_dco #(.K(8), .SC_PERIOD(4)) dut (
    .clk, .rst_n, .restart, .step, .k, .s_i_neg, .s_q_neg, .first, .last
  );

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      checks++;
      if (int'(k) != exp_k || (s_i_neg ? -1 : 1) != si[exp_k] || (s_q_neg ? -1 : 1) != sq[exp_k] ||
          first != (exp_k == 0) || last != (exp_k == 7)) begin
        failures++;
        if (failures < 10) $display("k=%0d exp %0d si_neg=%0b sq_neg=%0b", k, exp_k, s_i_neg, s_q_neg);
      end
      step    = ($urandom_range(0, 3) != 0);
      restart = (i == 200);
      @(posedge clk);
      if (restart) exp_k = 0;
      else if (step) exp_k = (exp_k + 1) % 8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
