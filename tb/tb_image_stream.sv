// tb_image_stream: watermarks and recovers a whole gray image with the
// default-size top.
//
// The image is generated here: 32 x 32 pixels of 8 bits,
//   pixel(x, y) = (8*x + 3*y + (x*y mod 7)) mod 256,
// cut into blocks of 8 horizontally adjacent pixels (128 blocks). The input
// RAM holds 13 blocks, so the image goes through in 10 runs (9 of 13 blocks,
// one of 11). While a run is extracting, the next chunk is written into the
// input RAM behind the extraction pointer (block b is overwritten one clock
// after extraction has re-read it), so loading overlaps processing.
// Checks: every recovered block equals the image block, every run reports
// infinite PSNR (exact recovery) and lasts 2n+5 clocks, and the whole image
// takes the sum of those clocks plus one idle clock between runs.
module tb_image_stream;
  localparam int W = 32, H = 32, NB = W * H / 8, CH = 13;

  logic clk = 1'b0, reset = 1'b1;
  logic img_we = 1'b0;
  logic [3:0] img_waddr = '0;
  logic [7:0][7:0] img_wdata = '0;
  logic start = 1'b0;
  logic [3:0] nblk = '0;
  logic busy, done, wm_valid, rec_valid, psnr_inf, psnr_valid;
  logic [7:0][7:0] cover_image_bits, lfsr_out_watermark, lfsr_out_add,
                   watermark_aoi_bits, recover_image_bits;
  logic [15:0] psnr_q8;
  logic [31:0] sse;

  watermark_aoi_logic dut (
    .clk, .reset, .img_we, .img_waddr, .img_wdata, .start, .nblk, .busy, .done,
    .cover_image_bits, .lfsr_out_watermark, .lfsr_out_add, .watermark_aoi_bits,
    .wm_valid, .recover_image_bits, .rec_valid, .psnr_q8, .psnr_inf, .sse, .psnr_valid
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [7:0][7:0] image_block(input int k);
    logic [7:0][7:0] b;
    for (int i = 0; i < 8; i++) begin
      int p, x, y;
      p = k * 8 + i;
      x = p % W;
      y = p / W;
      b[i] = 8'((8 * x + 3 * y + (x * y) % 7) % 256);
    end
    return b;
  endfunction

  int chunk_n [$];
  int total_cycles, exp_cycles, base, recovered;

  initial begin
    for (int s = 0; s < NB; s += CH) chunk_n.push_back((NB - s < CH) ? NB - s : CH);
    repeat (2) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    // first chunk before the first run
    for (int b = 0; b < chunk_n[0]; b++) begin
      img_we = 1'b1; img_waddr = 4'(b); img_wdata = image_block(b);
      @(negedge clk);
    end
    img_we = 1'b0;
    total_cycles = 0; exp_cycles = 0; base = 0; recovered = 0;

    for (int c = 0; c < chunk_n.size(); c++) begin
      int n, nn, cyc, done_cyc, nrec;
      n  = chunk_n[c];
      nn = (c + 1 < chunk_n.size()) ? chunk_n[c + 1] : 0;
      nblk = 4'(n);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1; done_cyc = -1; nrec = 0;
      while (done_cyc < 0 && cyc < 100) begin
        // overlap: write block b of the next chunk one clock after
        // block b of this chunk was re-read for extraction
        if (cyc >= n + 3 && cyc - n - 3 < nn) begin
          int b;
          b = cyc - n - 3;
          img_we = 1'b1; img_waddr = 4'(b); img_wdata = image_block(base + n + b);
        end else img_we = 1'b0;
        @(negedge clk);
        if (rec_valid) begin
          chk(recover_image_bits === image_block(base + nrec), "recovered block");
          nrec++; recovered++;
        end
        if (done) done_cyc = cyc;
        cyc++;
      end
      img_we = 1'b0;
      chk(nrec == n, "blocks per run");
      chk(done_cyc == 2 * n + 5, "run length");
      chk(psnr_inf && sse == 0, "exact recovery (infinite PSNR)");
      total_cycles += done_cyc + 1;
      exp_cycles += 2 * n + 6;
      base += n;
    end
    chk(recovered == NB, "whole image recovered");
    chk(total_cycles == exp_cycles, "total cycles");
    $display("image %0dx%0d: %0d blocks in %0d runs, %0d clocks", W, H, NB, chunk_n.size(), total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
