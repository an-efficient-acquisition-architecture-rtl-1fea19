// tb_code_generator -- self-checking test of the Gold code generator.
// Checks against published values: the first ten chips of GPS C/A PRN 1 are
// 1100100000 (octal 1440) and of PRN 2 (taps 3,7) 1110010000 (octal 1620).
// Against a reference built from the recurrences g1[n+10] = g1[n+7]^g1[n]
// and g2[n+10] = g2[n+8]^g2[n+7]^g2[n+4]^g2[n+2]^g2[n+1]^g2[n] it checks
// all 1023 chips of PRN 1, each held for K = 8 steps with sub_idx counting
// 0..7, the balance of the code (512 ones) and its period.
module tb_code_generator;
  localparam int K = 8;
  logic clk = 0, rst_n = 0, restart = 0, step = 0;
  logic chip1, chip2;
  logic [2:0] sub1;
  logic [0:0] sub2;
  int checks = 0, failures = 0;
  bit g1 [0:1032], g2 [0:1032];
  bit ref1 [0:1022];

  always #5 clk = ~clk;

  code_generator #(.K(K), .TAP_A(2), .TAP_B(6)) dut1 (
    .clk, .rst_n, .restart, .step, .chip(chip1), .sub_idx(sub1)
  );
  code_generator #(.K(1), .TAP_A(3), .TAP_B(7)) dut2 (
    .clk, .rst_n, .restart, .step, .chip(chip2), .sub_idx(sub2)
  );

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    bit [9:0] first1, first2;
    // Reference sequences: G1 and G2 output sequences from all-ones state.
    for (int n = 0; n < 10; n++) begin g1[n] = 1; g2[n] = 1; end
    for (int n = 0; n < 1023; n++) begin
      g1[n+10] = g1[n+7] ^ g1[n];
      g2[n+10] = g2[n+8] ^ g2[n+7] ^ g2[n+4] ^ g2[n+2] ^ g2[n+1] ^ g2[n];
    end
    // Stage s of the register at time n holds sequence element n + 10 - s.
    for (int n = 0; n < 1023; n++) ref1[n] = g1[n] ^ g2[n + 8] ^ g2[n + 4];

    repeat (3) @(posedge clk);
    rst_n = 1;
    ones = 0;
    for (int n = 0; n < 1023 + 2; n++) begin
      for (int s = 0; s < K; s++) begin
        @(negedge clk);
        checks++;
        if (chip1 !== ref1[n % 1023] || sub1 != 3'(s)) begin
          failures++;
          if (failures < 10) $display("chip %0d.%0d: %0b exp %0b", n, s, chip1, ref1[n % 1023]);
        end
        if (s == 0 && n < 1023) ones += int'(chip1);
        if (s == 0 && n < 10) first1[9 - n] = chip1;
        if (n == 0 && s < 8) first2[9 - s] = chip2;
        if (n == 1 && s < 2) first2[1 - s] = chip2;
        step = ($urandom_range(0, 3) != 0);
        while (!step) begin
          @(negedge clk);
          step = ($urandom_range(0, 3) != 0);
        end
        @(posedge clk);
        #1 step = 0;
      end
    end
    checks++;
    if (first1 != 10'o1440) begin failures++; $display("PRN1 first chips %o", first1); end
    checks++;
    if (first2 != 10'o1620) begin failures++; $display("PRN2 first chips %o", first2); end
    checks++;
    if (ones != 512) begin failures++; $display("ones %0d", ones); end
    // restart returns to code phase 0
    @(negedge clk); restart = 1; @(posedge clk); #1 restart = 0;
    @(negedge clk);
    checks++;
    if (chip1 !== ref1[0] || sub1 != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
