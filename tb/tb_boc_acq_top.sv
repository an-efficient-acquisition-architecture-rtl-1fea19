// tb_boc_acq_top -- end-to-end test of the acquisition engine at reduced
// size: LANES = 2 (P = 8 code phases per dwell), L = 4, K = 8,
// N_DCHIP = 256 (1024 samples per dwell).
//
// Stimulus: a BOC(10,5)-like snapshot. Sample n lies in dchip j = n/L; the
// signal is the PRN 1 Gold code chip of replica dchip j+D, times the
// in-phase subcarrier sign at position (j+D) mod K, times a cosine carrier
// at frequency word F0 + FBIN*FSTEP, scaled, plus uniform noise, quantised to
// 4 bits. The source rewinds on dwell_start and inserts random gaps.
//
// Reference: the four correlations of the direct (not reordered) SCPC
// formulation are computed sample by sample for every cell of the search,
// with the same few-level replica carrier, giving Q for every (bin, code
// phase). Every Q the engine computes must equal the reference Q of its
// cell, and the engine's reordered, time-shared arithmetic must give exactly
// the same maximum, at the same cell, which must be the true one (D, FBIN).
//
// Run A: threshold above everything -> all 3 bins x 3 blocks are searched,
//        found = 0, best cell = global maximum.
// Run B: threshold = half the maximum -> the search must stop after the
//        first dwell whose running maximum exceeds it, found = 1.
// Checked cycle counts per dwell: 1+o+P load cycles, P*K read cycles.
// Mechanisms that must occur: source gaps during a dwell, backpressure
// (samples offered while not ready), all L time-division slots, first-visit
// writes and accumulation in the lanes, Doppler bin steps, code block steps,
// early stop on detection and exhaustive search without detection.
module tb_boc_acq_top;
  import boc_acq_pkg::*;
  localparam int LANES = 2, L = 4, K = 8, P = LANES * L, NDCH = 256;
  localparam int NS = NDCH * L;
  localparam int NBINS = 3, NBLK = 3, D = 13, FBIN = 1;
  localparam longint F0 = 64'h3F00_0000, FSTEP = 64'h0080_0000;
  localparam int Q_W = 2 * (4 + 3 + 2 + 5 + 1 + 3) + 1;   // matches the top's derived width

  logic clk = 0, rst_n = 0, start = 0;
  logic [Q_W-1:0] threshold = '1;
  logic busy, done, found;
  logic [Q_W-1:0] best_q;
  logic [15:0] best_code;
  logic [7:0] best_bin;
  acq_state_e state;
  logic in_valid = 0, in_ready, dwell_start;
  logic signed [3:0] if_sample;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  boc_acq_top #(.LANES(LANES), .L(L), .K(K), .N_DCHIP(NDCH)) dut (
    .clk, .rst_n, .start, .n_bins(8'(NBINS)), .n_blocks(16'(NBLK)),
    .freq_start(32'(F0)), .freq_step(32'(FSTEP)), .threshold,
    .busy, .done, .found, .best_q, .best_code, .best_bin, .state,
    .in_valid, .in_ready, .if_sample, .dwell_start
  );

  // ---------------- stimulus and reference ----------------
  bit code [0:1022];
  int x [NS];
  longint qref [NBINS][NBLK * P];

  function automatic int lut(input longint unsigned ph);
    int sector;
    sector = int'((ph >> 29) & 7);
    return int'($floor(2.4 * $sin((real'(sector) + 0.5) * 3.14159265358979 / 4.0) + 0.5));
  endfunction

  function automatic int si(input int k); return ((k % 4) < 2) ? 1 : -1; endfunction
  function automatic int sq(input int k); return (((k + 1) % 4) < 2) ? 1 : -1; endfunction

  task automatic make_signal();
    bit g1 [0:1032], g2 [0:1032];
    for (int n = 0; n < 10; n++) begin g1[n] = 1; g2[n] = 1; end
    for (int n = 0; n < 1023; n++) begin
      g1[n+10] = g1[n+7] ^ g1[n];
      g2[n+10] = g2[n+8] ^ g2[n+7] ^ g2[n+4] ^ g2[n+2] ^ g2[n+1] ^ g2[n];
    end
    for (int n = 0; n < 1023; n++) code[n] = g1[n] ^ g2[n + 8] ^ g2[n + 4];
    for (int n = 0; n < NS; n++) begin
      int idx, v;
      real a;
      idx = n / L + D;
      a = 3.0 * (code[(idx / K) % 1023] ? -1.0 : 1.0) * real'(si(idx % K)) *
          $cos(2.0 * 3.14159265358979 * real'(F0 + FBIN * FSTEP) / 4294967296.0 * real'(n) + 0.7);
      v = int'($floor(a + 0.5)) + $urandom_range(0, 2) - 1;
      x[n] = (v > 7) ? 7 : (v < -8) ? -8 : v;
    end
  endtask

  task automatic make_reference();
    for (int b = 0; b < NBINS; b++) begin
      longint unsigned fw;
      fw = longint'(F0 + b * FSTEP);
      for (int c = 0; c < NBLK * P; c++) begin
        longint yii, yiq, yqi, yqq;
        yii = 0; yiq = 0; yqi = 0; yqq = 0;
        for (int n = 0; n < NS; n++) begin
          longint unsigned ph;
          int idx, cs, s, co;
          ph  = (longint'(n) * fw) & 64'hffff_ffff;
          s   = lut(ph);
          co  = lut(ph + 64'h4000_0000);
          idx = n / L + c;
          cs  = code[(idx / K) % 1023] ? -x[n] : x[n];
          yii += cs * s  * si(idx % K);
          yiq += cs * co * si(idx % K);
          yqi += cs * s  * sq(idx % K);
          yqq += cs * co * sq(idx % K);
        end
        qref[b][c] = yii * yii + yiq * yiq + yqi * yqi + yqq * yqq;
      end
    end
  endtask

  // ---------------- sample source ----------------
  int sidx = 0;
  assign if_sample = 4'(x[sidx < NS ? sidx : 0]);
  always @(posedge clk) begin
    if (dwell_start) sidx <= 0;
    else if (in_valid && in_ready) sidx <= sidx + 1;
  end
  always @(negedge clk) in_valid <= ($urandom_range(0, 4) != 0);

  // ---------------- mechanism and cycle monitors ----------------
  int n_gap = 0, n_backpressure = 0, n_bin_step = 0, n_blk_step = 0;
  int n_first_write = 0, n_accumulate = 0, n_detect_stop = 0, n_exhaustive = 0;
  int slot_seen [L];
  int load_cyc = 0, read_cyc = 0, dwells = 0, n_qcmp = 0, n_qbad = 0;
  logic [7:0] last_bin = 0;
  logic [15:0] last_off = 0;

  always @(negedge clk) if (rst_n) begin
    if (state == ST_ACCUM && !in_valid) n_gap++;
    if (state != ST_ACCUM && in_valid) n_backpressure++;
    if (dut.u_bank.active) begin
      slot_seen[int'(dut.u_bank.slot)]++;
      if (dut.u_bank.first) n_first_write++; else n_accumulate++;
    end
    if (dut.q_valid) begin
      n_qcmp++;
      if (longint'(dut.q) != qref[int'(dut.bin)][int'(dut.code_offset) + int'(dut.q_tag)]) n_qbad++;
    end
    if (state == ST_LOAD) load_cyc++;
    if (state == ST_READ) read_cyc++;
    if (state == ST_DECIDE) begin
      checks++;
      if (load_cyc != 1 + int'(dut.code_offset) + P || read_cyc != P * K) begin
        failures++;
        $display("dwell cycles: load %0d read %0d", load_cyc, read_cyc);
      end
      load_cyc = 0; read_cyc = 0; dwells++;
    end
    if (dut.bin != last_bin) begin n_bin_step++; last_bin = dut.bin; end
    if (dut.code_offset != last_off && dut.code_offset != 0) n_blk_step++;
    last_off = dut.code_offset;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint qmax, run_max;
    int mb, mc, stop_dwell;
    make_signal();
    make_reference();
    qmax = -1; mb = 0; mc = 0;
    for (int b = 0; b < NBINS; b++) for (int c = 0; c < NBLK * P; c++)
      if (qref[b][c] > qmax) begin qmax = qref[b][c]; mb = b; mc = c; end
    check(mb == FBIN && mc == D, "reference peak at the true cell");

    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Run A: exhaustive search
    threshold = '1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    if (!found) n_exhaustive++;
    check(!found, "run A: no detection");
    check(dwells == NBINS * NBLK, "run A: all dwells");
    check(longint'(best_q) == qmax, $sformatf("run A: best_q %0d exp %0d", best_q, qmax));
    check(int'(best_code) == D && int'(best_bin) == FBIN,
          $sformatf("run A: cell %0d/%0d", best_bin, best_code));

    // Run B: stop on detection
    threshold = Q_W'(qmax / 2);
    stop_dwell = 0; run_max = -1;
    for (int b = 0; b < NBINS && stop_dwell == 0; b++)
      for (int blk = 0; blk < NBLK && stop_dwell == 0; blk++) begin
        for (int h = 0; h < P; h++) if (qref[b][blk * P + h] > run_max) run_max = qref[b][blk * P + h];
        if (run_max > qmax / 2) stop_dwell = b * NBLK + blk + 1;
      end
    dwells = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    @(negedge clk);
    if (found) n_detect_stop++;
    check(found, "run B: detection");
    check(dwells == stop_dwell, $sformatf("run B: %0d dwells, expected %0d", dwells, stop_dwell));
    check(int'(best_code) == D && int'(best_bin) == FBIN, "run B: cell");

    check(n_qbad == 0 && n_qcmp > 0, $sformatf("%0d of %0d Q values differ from the direct reference", n_qbad, n_qcmp));
    // every mechanism must have happened
    check(n_gap > 0, "source gaps");
    check(n_backpressure > 0, "backpressure");
    for (int s = 0; s < L; s++) check(slot_seen[s] > 0, "time-division slot");
    check(n_first_write > 0 && n_accumulate > 0, "first-visit write and accumulate");
    check(n_bin_step > 0, "Doppler bin step");
    check(n_blk_step > 0, "code block step");
    check(n_detect_stop > 0 && n_exhaustive > 0, "detect stop and exhaustive search");
    $display("mechanisms: gaps=%0d backpressure=%0d slots=%0d/%0d/%0d/%0d first=%0d acc=%0d bins=%0d blocks=%0d",
             n_gap, n_backpressure, slot_seen[0], slot_seen[1], slot_seen[2], slot_seen[3],
             n_first_write, n_accumulate, n_bin_step, n_blk_step);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
