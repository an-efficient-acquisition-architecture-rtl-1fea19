// tb_dchip_integrator -- self-checking test of carrier wipe-off and
// integrate-and-dump. Random samples and carrier levels arrive with random
// gaps; a reference sums x*sin and x*cos over every L accepted samples. Each
// dump must come exactly one clock after the L-th sample with the reference
// sums, and no other cycle may show t_valid.
module tb_dchip_integrator;
  localparam int L = 4;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic signed [3:0] x = 0;
  logic signed [2:0] sn = 0, cs = 0;
  logic t_valid;
  logic signed [8:0] t_i, t_q;
  int checks = 0, failures = 0;
  int acc_i = 0, acc_q = 0, cnt = 0, exp_i = 0, exp_q = 0;
  bit expect_dump = 0;
  int dumps = 0;

  always #5 clk = ~clk;

  dchip_integrator #(.IF_W(4), .AMP_W(3), .L(L)) dut (
    .clk, .rst_n, .clear, .in_valid, .if_sample(x), .sin_i(sn), .cos_i(cs),
    .t_valid, .t_i, .t_q
  );

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      // outputs of the previous edge
      checks++;
      if (t_valid !== expect_dump) begin
        failures++;
        $display("t_valid=%0b expected %0b at %0d", t_valid, expect_dump, i);
      end else if (expect_dump && (int'(t_i) != exp_i || int'(t_q) != exp_q)) begin
        failures++;
        $display("dump %0d/%0d expected %0d/%0d", t_i, t_q, exp_i, exp_q);
      end
      expect_dump = 0;
      in_valid = ($urandom_range(0, 2) != 0);
      x  = 4'($urandom);
      sn = 3'($urandom_range(0, 4) - 2);
      cs = 3'($urandom_range(0, 4) - 2);
      clear = (i == 3000);
      @(posedge clk);
      if (clear) begin
        cnt = 0; acc_i = 0; acc_q = 0;
      end else if (in_valid) begin
        acc_i += int'(x) * int'(sn);
        acc_q += int'(x) * int'(cs);
        cnt++;
        if (cnt == L) begin
          exp_i = acc_i; exp_q = acc_q; expect_dump = 1; dumps++;
          cnt = 0; acc_i = 0; acc_q = 0;
        end
      end
    end
    checks++;
    if (dumps < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
