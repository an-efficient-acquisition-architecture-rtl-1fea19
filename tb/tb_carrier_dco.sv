// tb_carrier_dco -- self-checking test of the replica carrier oscillator.
// A reference phase accumulator runs beside the DUT with random frequency
// words, random step gaps and occasional restarts; every cycle the DUT's sin
// and cos must equal round(2.4*sin(centre of the 45-degree sector)) and the
// same 90 degrees ahead, computed with real arithmetic.
module tb_carrier_dco;
  logic clk = 0, rst_n = 0, restart = 0, step = 0;
  logic [31:0] fw = 0;
  logic signed [2:0] s, c;
  int checks = 0, failures = 0;
  longint unsigned ref_phase = 0;

  always #5 clk = ~clk;

  carrier_dco #(.PHASE_W(32), .AMP_W(3)) dut (
    .clk, .rst_n, .restart, .step, .freq_word(fw), .sin_o(s), .cos_o(c)
  );

  function automatic int level(input longint unsigned ph, input real shift);
    real ang;
    int sector;
    sector = int'((ph >> 29) & 7);
    ang = (real'(sector) + 0.5) * 3.14159265358979 / 4.0 + shift;
    return int'($floor(2.4 * $sin(ang) + 0.5));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if (i % 500 == 0) fw = $urandom;
      restart = ($urandom_range(0, 199) == 0);
      step    = ($urandom_range(0, 3) != 0);
      checks++;
      if (int'(s) != level(ref_phase, 0.0) || int'(c) != level(ref_phase, 3.14159265358979 / 2.0)) begin
        failures++;
        if (failures < 10) $display("mismatch phase=%h sin=%0d cos=%0d", ref_phase, s, c);
      end
      @(posedge clk);
      if (restart) ref_phase = 0;
      else if (step) ref_phase = (ref_phase + 64'(fw)) & 64'hffff_ffff;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
