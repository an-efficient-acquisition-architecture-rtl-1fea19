// tb_peak_detect -- feeds random correlation values with cell tags, with
// clears between searches, and checks the stored maximum, its cell and the
// threshold flag against a reference after every clock.
module tb_peak_detect;
  localparam int Q_W = 47;
  logic clk = 0, rst_n = 0, clear = 0, q_valid = 0;
  logic [Q_W-1:0] q = 0, threshold = 0, best_q;
  logic [13:0] q_code = 0, best_code;
  logic [7:0] q_bin = 0, best_bin;
  logic detected;
  int checks = 0, failures = 0, n_det = 0, n_nodet = 0;
  longint unsigned r_q = 0;
  int r_code = 0, r_bin = 0;

  always #5 clk = ~clk;

  peak_detect #(.Q_W(Q_W), .CODE_W(14), .BIN_W(8)) dut (
    .clk, .rst_n, .clear, .q_valid, .q, .q_code, .q_bin, .threshold,
    .best_q, .best_code, .best_bin, .detected
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    threshold = 47'd1 << 40;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (longint'(best_q) != r_q || int'(best_code) != r_code || int'(best_bin) != r_bin ||
          detected != (r_q > longint'(threshold))) begin
        failures++;
        if (failures < 10) $display("best %0d exp %0d", best_q, r_q);
      end
      if (detected) n_det++; else n_nodet++;
      clear   = (i % 200 == 199);
      q_valid = ($urandom_range(0, 1) != 0);
      q       = {15'($urandom), 32'($urandom)} >> $urandom_range(0, 12);
      q_code  = 14'($urandom);
      q_bin   = 8'($urandom);
      @(posedge clk);
      if (clear) begin r_q = 0; r_code = 0; r_bin = 0; end
      else if (q_valid && longint'(q) > r_q) begin
        r_q = longint'(q); r_code = int'(q_code); r_bin = int'(q_bin);
      end
    end
    checks++;
    if (n_det == 0 || n_nodet == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
