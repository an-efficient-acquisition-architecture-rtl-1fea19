// tb_boc_acq_parallelism -- the engine at three degrees of equivalent
// parallelism, P = 40, 400 and 1200 code phases per dwell (LANES = 10, 100,
// 300 with L = 4), the range over which the architecture's hardware cost is
// usually compared. The three engines run side by side on the same short
// snapshot (N_DCHIP = 128, 512 samples, code delay D = 29 dchips, one
// Doppler bin, one code block each, own random source gaps).
// Every Q that leaves each engine's combiner is compared with the Q of the
// direct, sample-by-sample SCPC correlation for that code phase, so all P
// hypotheses of every lane and slot are checked, not only the peak. Each
// engine must then report the true code phase and read for exactly P*K
// cycles.
module tb_boc_acq_parallelism;
  import boc_acq_pkg::*;
  localparam int L = 4, K = 8, NDCH = 128, NS = NDCH * L, D = 29;
  localparam int PMAX = 1200;
  localparam longint FW = 64'h3F40_0000;
  localparam int Q_W = 2 * (4 + 3 + 2 + 4 + 1 + 3) + 1;

  logic clk = 0, rst_n = 0, start = 0;
  int checks = 0, failures = 0;
  bit code [0:1022];
  int x [NS];
  longint qref [PMAX];

  always #5 clk = ~clk;

  function automatic int lut(input longint unsigned ph);
    int sector;
    sector = int'((ph >> 29) & 7);
    return int'($floor(2.4 * $sin((real'(sector) + 0.5) * 3.14159265358979 / 4.0) + 0.5));
  endfunction
  function automatic int si(input int k); return ((k % 4) < 2) ? 1 : -1; endfunction
  function automatic int sq(input int k); return (((k + 1) % 4) < 2) ? 1 : -1; endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit g1 [0:1032], g2 [0:1032];
    int sl [NS], cl [NS];
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
          $cos(2.0 * 3.14159265358979 * real'(FW) / 4294967296.0 * real'(n) + 1.9);
      v = int'($floor(a + 0.5)) + $urandom_range(0, 2) - 1;
      x[n] = (v > 7) ? 7 : (v < -8) ? -8 : v;
    end
    for (int n = 0; n < NS; n++) begin
      longint unsigned ph;
      ph = (longint'(n) * longint'(FW)) & 64'hffff_ffff;
      sl[n] = lut(ph);
      cl[n] = lut(ph + 64'h4000_0000);
    end
    for (int c = 0; c < PMAX; c++) begin
      longint yii, yiq, yqi, yqq;
      yii = 0; yiq = 0; yqi = 0; yqq = 0;
      for (int n = 0; n < NS; n++) begin
        int idx, cs;
        idx = n / L + c;
        cs  = code[(idx / K) % 1023] ? -x[n] : x[n];
        yii += cs * sl[n] * si(idx % K);
        yiq += cs * cl[n] * si(idx % K);
        yqi += cs * sl[n] * sq(idx % K);
        yqq += cs * cl[n] * sq(idx % K);
      end
      qref[c] = yii * yii + yiq * yiq + yqi * yqi + yqq * yqq;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
  end

  int finished = 0;

  for (genvar g = 0; g < 3; g++) begin : g_eng
    localparam int LANES = (g == 0) ? 10 : (g == 1) ? 100 : 300;
    localparam int P = LANES * L;
    logic busy, done, found, in_valid = 0, in_ready, dwell_start;
    logic [Q_W-1:0] best_q;
    logic [15:0] best_code;
    logic [7:0] best_bin;
    acq_state_e state;
    int sidx = 0, nq = 0, rd = 0, qbad = 0;

    boc_acq_top #(.LANES(LANES), .L(L), .K(K), .N_DCHIP(NDCH)) dut (
      .clk, .rst_n, .start, .n_bins(8'd1), .n_blocks(16'd1),
      .freq_start(32'(FW)), .freq_step(32'd0), .threshold('1),
      .busy, .done, .found, .best_q, .best_code, .best_bin, .state,
      .in_valid, .in_ready, .if_sample(4'(x[sidx < NS ? sidx : 0])), .dwell_start
    );

    always @(posedge clk) begin
      if (dwell_start) sidx <= 0;
      else if (in_valid && in_ready) sidx <= sidx + 1;
    end
    always @(negedge clk) in_valid <= ($urandom_range(0, 5) != 0);

    always @(negedge clk) if (rst_n) begin
      if (state == ST_READ) rd++;
      if (dut.q_valid) begin
        nq++;
        if (longint'(dut.q) != qref[int'(dut.q_tag)]) qbad++;
      end
    end

    initial begin
      wait (rst_n);
      @(negedge clk);
      wait (done);
      @(negedge clk);
      check(nq == P, $sformatf("P=%0d: %0d Q values", P, nq));
      check(qbad == 0, $sformatf("P=%0d: %0d Q values differ from the direct reference", P, qbad));
      check(rd == P * K, $sformatf("P=%0d: %0d read cycles", P, rd));
      check(int'(best_code) == D && !found, $sformatf("P=%0d: best code %0d", P, best_code));
      $display("P=%0d: peak Q %0d at code phase %0d", P, best_q, best_code);
      finished++;
    end
  end

  initial begin
    wait (finished == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
