// tb_power_combiner -- checks Q = Y_II^2 + Y_IQ^2 + Y_QI^2 + Y_QQ^2 for
// random and extreme (most negative) inputs against 64-bit integer
// arithmetic, and the one-clock latency of q_valid and of the tag.
module tb_power_combiner;
  localparam int Y_W = 23, Q_W = 47;
  logic clk = 0, rst_n = 0, y_valid = 0;
  logic [8:0] y_tag = 0, q_tag;
  logic signed [Y_W-1:0] y [4];
  logic q_valid;
  logic [Q_W-1:0] q;
  int checks = 0, failures = 0;
  longint unsigned e_q;
  bit expect_q = 0;
  int e_tag = 0;

  always #5 clk = ~clk;

  power_combiner #(.Y_W(Y_W), .TAG_W(9)) dut (
    .clk, .rst_n, .y_valid, .y_tag, .y_ii(y[0]), .y_iq(y[1]), .y_qi(y[2]), .y_qq(y[3]),
    .q_valid, .q_tag, .q
  );

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < 4; j++) y[j] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (q_valid != expect_q || (expect_q && (longint'(q) != e_q || int'(q_tag) != e_tag))) begin
        failures++;
        if (failures < 10) $display("q=%0d exp %0d", q, e_q);
      end
      expect_q = 0;
      y_valid = ($urandom_range(0, 3) != 0);
      y_tag = 9'($urandom);
      for (int j = 0; j < 4; j++)
        y[j] = (i < 10) ? {1'b1, {(Y_W-1){1'b0}}} : Y_W'($urandom);
      @(posedge clk);
      if (y_valid) begin
        e_q = 0;
        for (int j = 0; j < 4; j++) e_q += longint'(y[j]) * longint'(y[j]);
        e_tag = int'(y_tag);
        expect_q = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
