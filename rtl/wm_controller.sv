// wm_controller: sequences one watermark insertion + extraction run.
//
// A run over `nblk` cover blocks (1..IMG_BLOCKS, larger values are clamped;
// `start` with nblk = 0 is ignored) goes through these states:
//   INSERT   nblk cycles, `issue` high with mode_ext = 0: one block per clock
//            enters the two-stage datapath (stage 1: LFSRs and cover read,
//            stage 2: AOI unit and SRAM write).
//   RELOAD   one cycle, `gen_reload` high: both LFSRs return to their seeds,
//            so the extraction pass sees the same watermark and addresses.
//   EXTRACT  nblk cycles, `issue` high with mode_ext = 1 (stage 1: LFSRs,
//            SRAM read, cover re-read; stage 2: AOI unit removes watermark).
//   FLUSH    two cycles while the last block leaves stage 2 and reaches the
//            PSNR accumulator.
//   FINISH   one cycle, `psnr_finish` high.
//   WAIT     until `psnr_valid`; then `done` pulses for one clock and the
//            controller returns to IDLE.
// `blk` is the cover-RAM block index of the block being issued. `psnr_clear`
// and `gen_reload` are high in the cycle `start` is accepted, so every run
// starts the LFSRs from their seeds. `busy` is high outside IDLE.
// A run of n blocks takes 2n+5 clocks from start to done.
// The state set and handshake are this design's own.
module wm_controller #(
  parameter int unsigned IMG_BLOCKS = 13,
  localparam int unsigned BW = (IMG_BLOCKS > 1) ? $clog2(IMG_BLOCKS) : 1,
  localparam int unsigned NW = $clog2(IMG_BLOCKS + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  input  logic [NW-1:0] nblk,
  input  logic          psnr_valid,
  output logic          issue,
  output logic          mode_ext,
  output logic [BW-1:0] blk,
  output logic          gen_reload,
  output logic          psnr_clear,
  output logic          psnr_finish,
  output logic          busy,
  output logic          done
);
  typedef enum logic [2:0] {
    S_IDLE, S_INSERT, S_RELOAD, S_EXTRACT, S_FLUSH, S_FINISH, S_WAIT
  } state_t;

  state_t        state;
  logic [BW-1:0] last;     // index of the last block of the run
  logic [BW-1:0] cnt;
  logic          flush_cnt;

  always_comb begin
    issue       = (state == S_INSERT) || (state == S_EXTRACT);
    mode_ext    = (state == S_EXTRACT);
    blk         = cnt;
    psnr_clear  = (state == S_IDLE) && start && (nblk != '0);
    gen_reload  = (state == S_RELOAD) || psnr_clear;
    psnr_finish = (state == S_FINISH);
    busy        = (state != S_IDLE);
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state     <= S_IDLE;
      last      <= '0;
      cnt       <= '0;
      flush_cnt <= 1'b0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start && nblk != '0) begin
          last  <= (nblk > NW'(IMG_BLOCKS)) ? BW'(IMG_BLOCKS - 1) : BW'(nblk - 1'b1);
          cnt   <= '0;
          state <= S_INSERT;
        end
        S_INSERT: if (cnt == last) begin
          cnt   <= '0;
          state <= S_RELOAD;
        end else cnt <= cnt + 1'b1;
        S_RELOAD: state <= S_EXTRACT;
        S_EXTRACT: if (cnt == last) begin
          cnt       <= '0;
          flush_cnt <= 1'b0;
          state     <= S_FLUSH;
        end else cnt <= cnt + 1'b1;
        S_FLUSH: begin
          flush_cnt <= 1'b1;
          if (flush_cnt) state <= S_FINISH;
        end
        S_FINISH: state <= S_WAIT;
        S_WAIT: if (psnr_valid) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
