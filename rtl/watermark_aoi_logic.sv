// watermark_aoi_logic: LFSR-based image watermarking with an SRAM store.
//
// The image is handled as 8x8-bit blocks (8 gray pixels of 8 bits). A run
// first watermarks every block and scatters its rows over a 256-row SRAM,
// then reads them back and removes the watermark:
//   insertion  stage 1: the watermark LFSR produces an 8x8 watermark block,
//                       the address LFSR 8 row addresses, and the cover block
//                       is read from the input RAM (cover_image_bits);
//              stage 2: the AOI unit XORs cover and watermark; the result is
//                       registered (watermark_aoi_bits) and written to the
//                       SRAM at the 8 addresses in the same clock.
//   extraction both LFSRs restart from their seeds; stage 1 regenerates the
//              watermark and addresses; stage 2 feeds the 8 SRAM rows read at
//              those addresses through the same AOI unit, which returns the
//              cover block (recover_image_bits).
// One AOI unit serves both directions through two multiplexers: one picks its
// data input (cover block or SRAM data), the other steers its result (SRAM
// write or recovered-block register). The recovered blocks are compared with
// the cover blocks, re-read in stage 1 of extraction, by the PSNR unit.
//
// Interface: load cover blocks with img_we/img_waddr/img_wdata (allowed at
// any time, also during a run), then pulse `start` with `nblk` blocks. One
// block enters per clock; each block spends two clocks in the datapath.
// wm_valid / rec_valid mark the cycles in which watermark_aoi_bits /
// recover_image_bits hold a new block. psnr_valid pulses 2*nblk+4 clocks
// after `start`; psnr_q8 (dB, Q8.8), psnr_inf and sse then hold until the
// next run, and `done` pulses one clock later.
// `reset` is asynchronous, active high.
// Block size, LFSR width, address-sequence seed, two-clock latency and the
// shared AOI unit follow the source design; the watermark seed, the input-RAM
// depth, the run handshake and the PSNR number format are this design's own.
module watermark_aoi_logic #(
  parameter int unsigned IMG_BLOCKS = 13,
  parameter logic [7:0]  WM_SEED    = 8'hE1,
  parameter logic [7:0]  ADDR_SEED  = 8'h80,
  localparam int unsigned BW = (IMG_BLOCKS > 1) ? $clog2(IMG_BLOCKS) : 1,
  localparam int unsigned NW = $clog2(IMG_BLOCKS + 1)
) (
  input  logic                clk,
  input  logic                reset,
  // cover image load port
  input  logic                img_we,
  input  logic [BW-1:0]       img_waddr,
  input  logic [7:0][7:0]     img_wdata,
  // run control
  input  logic                start,
  input  logic [NW-1:0]       nblk,
  output logic                busy,
  output logic                done,
  // datapath observation buses
  output logic [7:0][7:0]     cover_image_bits,
  output logic [7:0][7:0]     lfsr_out_watermark,
  output logic [7:0][7:0]     lfsr_out_add,
  output logic [7:0][7:0]     watermark_aoi_bits,
  output logic                wm_valid,
  output logic [7:0][7:0]     recover_image_bits,
  output logic                rec_valid,
  // image quality
  output logic [15:0]         psnr_q8,
  output logic                psnr_inf,
  output logic [31:0]         sse,
  output logic                psnr_valid
);
  localparam int unsigned ROWS = wm_pkg::ROWS;

  logic          issue, mode_ext, gen_reload, psnr_clear, psnr_finish;
  logic [BW-1:0] blk;

  wm_controller #(.IMG_BLOCKS(IMG_BLOCKS)) u_ctrl (
    .clk, .reset, .start, .nblk, .psnr_valid,
    .issue, .mode_ext, .blk, .gen_reload, .psnr_clear, .psnr_finish,
    .busy, .done
  );

  // ---- stage 1: generators and cover read ----
  lfsr_block_gen #(.SEED(WM_SEED), .ROWS(ROWS)) u_wm_gen (
    .clk, .reset, .reload(gen_reload), .advance(issue), .rows(lfsr_out_watermark)
  );

  lfsr_block_gen #(.SEED(ADDR_SEED), .ROWS(ROWS)) u_addr_gen (
    .clk, .reset, .reload(gen_reload), .advance(issue), .rows(lfsr_out_add)
  );

  cover_ram #(.DEPTH(IMG_BLOCKS), .ROWS(ROWS)) u_cover_ram (
    .clk, .reset,
    .we(img_we), .waddr(img_waddr), .wdata(img_wdata),
    .re(issue), .raddr(blk), .rdata(cover_image_bits)
  );

  logic s1_valid, s1_ext;
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      s1_valid <= 1'b0;
      s1_ext   <= 1'b0;
    end else begin
      s1_valid <= issue;
      s1_ext   <= mode_ext;
    end
  end

  // ---- stage 2: shared AOI unit, SRAM ----
  logic [7:0][7:0] sram_rdata, aoi_in, aoi_out;

  assign aoi_in = s1_ext ? sram_rdata : cover_image_bits;   // input mux

  aoi_watermark #(.ROWS(ROWS)) u_aoi (
    .data(aoi_in), .wm(lfsr_out_watermark), .out(aoi_out)
  );

  wm_sram #(.ADDR_W(wm_pkg::ADDR_W), .ROWS(ROWS)) u_sram (
    .clk,
    .we(s1_valid && !s1_ext), .waddr(lfsr_out_add), .wdata(aoi_out),
    .raddr(lfsr_out_add), .rdata(sram_rdata)
  );

  logic [7:0][7:0] cover_d;   // cover block aligned with recover_image_bits
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      watermark_aoi_bits <= '0;
      recover_image_bits <= '0;
      cover_d            <= '0;
      wm_valid           <= 1'b0;
      rec_valid          <= 1'b0;
    end else begin
      wm_valid  <= s1_valid && !s1_ext;                      // output demux
      rec_valid <= s1_valid && s1_ext;
      if (s1_valid && !s1_ext) watermark_aoi_bits <= aoi_out;
      if (s1_valid &&  s1_ext) begin
        recover_image_bits <= aoi_out;
        cover_d            <= cover_image_bits;
      end
    end
  end

  // ---- PSNR between sent (cover) and received (recovered) image ----
  psnr_unit #(.ROWS(ROWS)) u_psnr (
    .clk, .reset, .clear(psnr_clear), .acc_en(rec_valid),
    .ref_blk(cover_d), .test_blk(recover_image_bits), .finish(psnr_finish),
    .psnr_q8, .psnr_inf, .sse, .valid(psnr_valid)
  );
endmodule
