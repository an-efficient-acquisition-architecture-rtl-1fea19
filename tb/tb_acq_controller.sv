// tb_acq_controller -- self-checking test of the search sequencer at
// LANES = 2, L = 4 (P = 8), K = 8, N_DCHIP = 16.
// Small models stand in for the datapath: dchip_done follows every L-th
// accepted sample after L clocks, and a K-position counter gives sc_last.
// The sample source inserts random gaps. Run 1 never detects: the dwells
// must visit (bin, offset) = (0,0),(0,8),(1,0),(1,8),(2,0),(2,8) in that
// order and end with found = 0. Run 2 raises detected during the third dwell
// and must stop there with found = 1. For every dwell: one restart cycle,
// exactly o+P load steps, dwell_start once, N_DCHIP*L accepted samples,
// P*K read cycles visiting each hypothesis K times in order, and the
// frequency word freq_start + bin*freq_step.
module tb_acq_controller;
  import boc_acq_pkg::*;
  localparam int LANES = 2, L = 4, K = 8, P = LANES * L, NDCH = 16;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] n_bins = 3;
  logic [15:0] n_blocks = 2;
  logic [31:0] freq_start = 32'h1000_0000, freq_step = 32'h0080_0000;
  logic busy, done, found, in_valid = 0, in_ready, dwell_start;
  acq_state_e state;
  logic dp_restart, load_step, rd_valid, sc_step, peak_clear, detected = 0, dchip_done;
  logic [31:0] freq_word;
  logic [7:0] bin;
  logic [15:0] code_offset;
  logic [2:0] rd_hyp;
  logic sc_last;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  acq_controller #(.LANES(LANES), .L(L), .N_DCHIP(NDCH), .FREQ_W(32), .BIN_W(8),
                   .CODE_W(16), .FLUSH_CYC(4)) dut (
    .clk, .rst_n, .start, .n_bins, .n_blocks, .freq_start, .freq_step,
    .busy, .done, .found, .state_o(state), .in_valid, .in_ready, .dwell_start,
    .dp_restart, .load_step, .freq_word, .bin, .code_offset, .dchip_done,
    .rd_valid, .rd_hyp, .sc_step, .sc_last, .peak_clear, .detected
  );

  // datapath stand-ins
  int acc_cnt = 0, k = 0;
  int due [$];
  assign dchip_done = (due.size() != 0) && (due[0] == cyc);
  assign sc_last = (k == K - 1);
  always @(posedge clk) begin
    if (dchip_done) void'(due.pop_front());
    if (in_valid && in_ready) begin
      if (acc_cnt % L == L - 1) due.push_back(cyc + L + 1);
      acc_cnt <= acc_cnt + 1;
    end
    if (dp_restart) begin k <= 0; acc_cnt <= 0; end
    else if (sc_step) k <= (k + 1) % K;
  end
  always @(negedge clk) in_valid <= ($urandom_range(0, 3) != 0);

  // per-dwell monitor
  int n_restart, n_load, n_dstart, n_acc, n_read, dwells, rd_expect;
  int exp_bin [6] = '{0, 0, 1, 1, 2, 2};
  int exp_off [6] = '{0, 8, 0, 8, 0, 8};
  bit detect_in_dwell2 = 0;

  always @(negedge clk) if (rst_n) begin
    if (dp_restart) begin
      n_restart++; n_load = 0; n_dstart = 0; n_acc = 0; n_read = 0; rd_expect = 0;
    end
    if (load_step) n_load++;
    if (dwell_start) n_dstart++;
    if (in_valid && in_ready) n_acc++;
    if (rd_valid) begin
      checks++;
      if (int'(rd_hyp) != rd_expect / K) begin failures++; $display("rd_hyp %0d exp %0d", rd_hyp, rd_expect / K); end
      rd_expect++;
      n_read++;
    end
    if (state == ST_DECIDE) begin
      checks++;
      if (dwells >= 6 || int'(bin) != exp_bin[dwells] || int'(code_offset) != exp_off[dwells] ||
          n_load != exp_off[dwells] + P || n_dstart != 1 || n_acc != NDCH * L || n_read != P * K ||
          freq_word != freq_start + 32'(exp_bin[dwells]) * freq_step) begin
        failures++;
        $display("dwell %0d: bin %0d off %0d load %0d acc %0d read %0d", dwells, bin, code_offset, n_load, n_acc, n_read);
      end
      dwells++;
    end
    if (detect_in_dwell2 && dwells == 2 && state == ST_READ) detected <= 1;
  end

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
    // run 1: exhaustive search
    start = 1; @(negedge clk); start = 0;
    checks++;
    if (!busy) failures++;
    wait (done);
    @(negedge clk);
    checks++;
    if (found || dwells != 6 || n_restart != 6) begin failures++; $display("run1 found=%0b dwells=%0d", found, dwells); end
    // run 2: detection in the third dwell
    dwells = 0; n_restart = 0; detect_in_dwell2 = 1;
    start = 1; @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (!found || dwells != 3 || n_restart != 3) begin failures++; $display("run2 found=%0b dwells=%0d", found, dwells); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
