// peak_detect -- running maximum of the reconstructed correlation and the
// acquisition threshold test.
//
// Every Q that arrives with q_valid is compared with the largest one seen
// since clear; a strictly larger value replaces it together with its cell
// (code phase in code increments, Doppler bin). detected is high while the
// stored maximum exceeds threshold. clear (start of a search) empties the
// store; it wins over a simultaneous q_valid. Results are registered: a new
// maximum is visible one clock after its q_valid. Keeping the maximum across
// all dwells of a search, and the strict comparisons, are this design's
// choice.
module peak_detect #(
  parameter int unsigned Q_W    = 47,
  parameter int unsigned CODE_W = 14,
  parameter int unsigned BIN_W  = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic               q_valid,
  input  logic [Q_W-1:0]     q,
  input  logic [CODE_W-1:0]  q_code,
  input  logic [BIN_W-1:0]   q_bin,
  input  logic [Q_W-1:0]     threshold,
  output logic [Q_W-1:0]     best_q,
  output logic [CODE_W-1:0]  best_code,
  output logic [BIN_W-1:0]   best_bin,
  output logic               detected
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_q    <= '0;
      best_code <= '0;
      best_bin  <= '0;
    end else if (clear) begin
      best_q    <= '0;
      best_code <= '0;
      best_bin  <= '0;
    end else if (q_valid && (q > best_q)) begin
      best_q    <= q;
      best_code <= q_code;
      best_bin  <= q_bin;
    end
  end

  assign detected = (best_q > threshold);

endmodule
