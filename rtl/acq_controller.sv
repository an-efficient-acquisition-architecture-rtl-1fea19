// acq_controller -- sequencer of the acquisition search.
//
// The search visits cells (code phase, Doppler bin) in blocks of P = LANES*L
// code phases, one code increment apart. For every block it runs one dwell:
//   LOAD   restart the code generator, carrier oscillator, integrator and
//          subcarrier counter (first cycle), then shift the replica window
//          o+P times so it holds the replica for code offsets o..o+P-1,
//          o = block*P. The last load cycle raises dwell_start so the sample
//          source can rewind its snapshot.
//   ACCUM  accept N_DCHIP*L input samples (in_ready high, in_valid may gap).
//   DRAIN  wait until all N_DCHIP dchips have gone through the lanes.
//   READ   read the K accumulators of each of the P hypotheses, one per clock
//          (P*K cycles), stepping the subcarrier counter along.
//   FLUSH  wait FLUSH_CYC cycles for the readout pipeline to reach the peak
//          detector.
//   DECIDE stop with found = 1 if the best Q exceeds the threshold, otherwise
//          go to the next code block, and after the last block to the next
//          Doppler bin (freq_word += freq_step). After the last bin the
//          search stops with found = 0.
// start (in IDLE or DONE) begins a search and clears the peak detector;
// done stays high in DONE. n_bins and n_blocks must be at least 1 and are
// sampled at start.
// Searching cell by cell until one exceeds the threshold follows the
// reference; the state sequence, the snapshot rewind and all counters are
// this design's choice.
module acq_controller
  import boc_acq_pkg::*;
#(
  parameter int unsigned LANES     = 100,
  parameter int unsigned L         = L_SAMPLES_DEF,
  parameter int unsigned N_DCHIP   = 8184,
  parameter int unsigned FREQ_W    = 32,
  parameter int unsigned BIN_W     = 8,
  parameter int unsigned CODE_W    = 16,
  parameter int unsigned FLUSH_CYC = 4,
  localparam int unsigned P        = LANES * L,
  localparam int unsigned HYP_W    = (P > 1) ? $clog2(P) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // search command
  input  logic               start,
  input  logic [BIN_W-1:0]   n_bins,
  input  logic [CODE_W-1:0]  n_blocks,
  input  logic [FREQ_W-1:0]  freq_start,
  input  logic [FREQ_W-1:0]  freq_step,
  output logic               busy,
  output logic               done,
  output logic               found,
  output acq_state_e         state_o,
  // sample stream
  input  logic               in_valid,
  output logic               in_ready,
  output logic               dwell_start,
  // datapath control
  output logic               dp_restart,    // code gen, DCOs, integrator, bank clear
  output logic               load_step,
  output logic [FREQ_W-1:0]  freq_word,
  output logic [BIN_W-1:0]   bin,
  output logic [CODE_W-1:0]  code_offset,
  input  logic               dchip_done,
  output logic               rd_valid,
  output logic [HYP_W-1:0]   rd_hyp,
  output logic               sc_step,
  input  logic               sc_last,
  output logic               peak_clear,
  input  logic               detected
);

  localparam int unsigned SAMP_W = $clog2(N_DCHIP * L + 1);
  localparam int unsigned DCH_W  = $clog2(N_DCHIP + 1);

  acq_state_e          state;
  logic [CODE_W:0]     load_cnt;
  logic [SAMP_W-1:0]   samp_cnt;
  logic [DCH_W-1:0]    dch_cnt;
  logic [HYP_W-1:0]    hyp_cnt;
  logic [3:0]          flush_cnt;
  logic [BIN_W-1:0]    n_bins_q;
  logic [CODE_W-1:0]   n_blocks_q, blk;
  logic                accept, load_end;

  assign state_o     = state;
  assign busy        = (state != ST_IDLE) && (state != ST_DONE);
  assign done        = (state == ST_DONE);
  assign in_ready    = (state == ST_ACCUM);
  assign accept      = in_ready && in_valid;
  assign dp_restart  = (state == ST_LOAD) && (load_cnt == '0);
  assign load_step   = (state == ST_LOAD) && (load_cnt != '0);
  assign load_end    = (state == ST_LOAD) && (load_cnt == (CODE_W+1)'(code_offset) + (CODE_W+1)'(P));
  assign dwell_start = load_end;
  assign rd_valid    = (state == ST_READ);
  assign rd_hyp      = hyp_cnt;
  assign sc_step     = (state == ST_READ);
  assign peak_clear  = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      load_cnt    <= '0;
      samp_cnt    <= '0;
      dch_cnt     <= '0;
      hyp_cnt     <= '0;
      flush_cnt   <= '0;
      n_bins_q    <= '0;
      n_blocks_q  <= '0;
      blk         <= '0;
      bin         <= '0;
      code_offset <= '0;
      freq_word   <= '0;
      found       <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (start) begin
            n_bins_q    <= n_bins;
            n_blocks_q  <= n_blocks;
            blk         <= '0;
            bin         <= '0;
            code_offset <= '0;
            freq_word   <= freq_start;
            found       <= 1'b0;
            load_cnt    <= '0;
            state       <= ST_LOAD;
          end
        end
        ST_LOAD: begin
          load_cnt <= load_cnt + 1'b1;
          if (load_end) begin
            samp_cnt <= '0;
            dch_cnt  <= '0;
            state    <= ST_ACCUM;
          end
        end
        ST_ACCUM, ST_DRAIN: begin
          if (accept) begin
            samp_cnt <= samp_cnt + 1'b1;
            if (samp_cnt == SAMP_W'(N_DCHIP * L - 1)) state <= ST_DRAIN;
          end
          if (dchip_done) begin
            dch_cnt <= dch_cnt + 1'b1;
            if (dch_cnt == DCH_W'(N_DCHIP - 1)) begin
              hyp_cnt <= '0;
              state   <= ST_READ;
            end
          end
        end
        ST_READ: begin
          if (sc_last) begin
            if (hyp_cnt == HYP_W'(P - 1)) begin
              flush_cnt <= '0;
              state     <= ST_FLUSH;
            end else begin
              hyp_cnt <= hyp_cnt + 1'b1;
            end
          end
        end
        ST_FLUSH: begin
          flush_cnt <= flush_cnt + 1'b1;
          if (flush_cnt == 4'(FLUSH_CYC - 1)) state <= ST_DECIDE;
        end
        ST_DECIDE: begin
          load_cnt <= '0;
          if (detected) begin
            found <= 1'b1;
            state <= ST_DONE;
          end else if (blk + 1'b1 < n_blocks_q) begin
            blk         <= blk + 1'b1;
            code_offset <= code_offset + CODE_W'(P);
            state       <= ST_LOAD;
          end else if (bin + 1'b1 < n_bins_q) begin
            blk         <= '0;
            code_offset <= '0;
            bin         <= bin + 1'b1;
            freq_word   <= freq_word + freq_step;
            state       <= ST_LOAD;
          end else begin
            state <= ST_DONE;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

endmodule
