// tb_watermark_aoi_logic: end-to-end test of the watermarking top at its
// default size (13-block input RAM, seeds 8'hE1 and 8'h80).
//
// A reference model built here (bit-serial LFSRs with taps 5, 2, 0, an XOR
// per bit and a 256-row shadow SRAM) predicts every bus: the watermark and
// address blocks of each stage 1, the cover block, the watermarked block two
// clocks after issue, the recovered block, the PSNR result and the
// start-to-done time of 2n+5 clocks. Runs cover 1, 5 and 13 blocks and a
// run during which the host rewrites cover blocks, so the recovered image
// differs from the new reference and the PSNR is finite.
// Mechanism counters (each must be non-zero): insertion blocks, SRAM row
// writes checked on read-back, LFSR restart before extraction, extraction
// blocks through the shared AOI unit, mode switches between insertion and
// extraction, infinite PSNR, finite PSNR, cover loads during a run.
module tb_watermark_aoi_logic;
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
  int n_insert = 0, n_sram_rows = 0, n_restart = 0, n_extract = 0, n_switch = 0,
      n_psnr_inf = 0, n_psnr_fin = 0, n_load_busy = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- reference model ----
  function automatic logic [7:0] ref_step(input logic [7:0] q);
    return {q[5] ^ q[2] ^ q[0], q[7:1]};
  endfunction

  function automatic logic [7:0][7:0] ref_block(inout logic [7:0] q);
    logic [7:0][7:0] b;
    for (int i = 0; i < 8; i++) begin b[i] = q; q = ref_step(q); end
    return b;
  endfunction

  logic [7:0][7:0] img [13];     // contents of the input RAM
  logic [7:0][7:0] sent [13];      // cover blocks used during insertion
  logic [7:0]      sram [256];

  task automatic load(input int b, input logic [7:0][7:0] d);
    img_we = 1'b1; img_waddr = 4'(b); img_wdata = d;
    @(negedge clk);
    img_we = 1'b0;
    img[b] = d;
  endtask

  // One run of n blocks; if `reload_mid` the host rewrites block 0 during
  // the insertion pass of the run (after block 0 has been read).
  task automatic run(input int n, input bit reload_mid);
    logic [7:0] wq, aq;
    logic [7:0][7:0] w_exp [13], a_exp [13];
    logic [7:0][7:0] newblk;
    longint exp_sse;
    int cyc, first_wm, first_rec, done_cyc, nwm, nrec, ns1, pv_cyc;
    bit prev_ext, seen_ext;
    real exp_db, got_db;

    wq = 8'hE1; aq = 8'h80;
    for (int b = 0; b < n; b++) begin w_exp[b] = ref_block(wq); a_exp[b] = ref_block(aq); end
    for (int i = 0; i < 8; i++) newblk[i] = 8'($urandom);

    nblk = 4'(n);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 1; first_wm = -1; first_rec = -1; done_cyc = -1; nwm = 0; nrec = 0; ns1 = 0;
    prev_ext = 1'b0; seen_ext = 1'b0; pv_cyc = -1;
    while (done_cyc < 0 && cyc < 200) begin
      // mid-run rewrite of block 0 by the host
      if (reload_mid && cyc == 2) begin
        img_we = 1'b1; img_waddr = 4'd0; img_wdata = newblk;
        chk(busy, "busy while loading");
        n_load_busy++;
      end else img_we = 1'b0;
      @(negedge clk);
      if (reload_mid && cyc == 2) img[0] = newblk;
      // stage-1 buses: right after block b was issued
      if (cyc >= 1 && cyc <= n) begin
        int b;
        b = cyc - 1;
        chk(lfsr_out_watermark === w_exp[b], "insertion watermark block");
        chk(lfsr_out_add === a_exp[b], "insertion address block");
        chk(cover_image_bits === sent[b], "cover block read");
      end
      if (cyc >= n + 2 && cyc <= 2 * n + 1) begin
        int b;
        b = cyc - n - 2;
        chk(lfsr_out_watermark === w_exp[b], "extraction watermark block (restart)");
        chk(lfsr_out_add === a_exp[b], "extraction address block (restart)");
        if (b == 0 && lfsr_out_add == a_exp[0] && lfsr_out_watermark == w_exp[0]) n_restart++;
      end
      if (wm_valid) begin
        logic [7:0][7:0] e;
        for (int i = 0; i < 8; i++) e[i] = sent[nwm][i] ^ w_exp[nwm][i];
        chk(watermark_aoi_bits === e, "watermarked block");
        for (int i = 0; i < 8; i++) sram[a_exp[nwm][i]] = e[i];
        if (first_wm < 0) first_wm = cyc;
        nwm++; n_insert++;
        chk(!seen_ext, "insertion after extraction");
      end
      if (rec_valid) begin
        chk(recover_image_bits === sent[nrec], "recovered block");
        for (int i = 0; i < 8; i++) begin
          logic [7:0] r;
          r = sram[a_exp[nrec][i]] ^ w_exp[nrec][i];
          chk(recover_image_bits[i] === r, "row read back from SRAM");
          n_sram_rows++;
        end
        if (first_rec < 0) first_rec = cyc;
        if (!prev_ext) n_switch++;
        prev_ext = 1'b1; seen_ext = 1'b1;
        nrec++; n_extract++;
      end
      if (psnr_valid) pv_cyc = cyc;
      if (done) done_cyc = cyc;
      cyc++;
    end
    chk(first_wm == 2, "two-clock insertion latency");
    chk(first_rec == n + 3, "two-clock extraction latency");
    chk(nwm == n && nrec == n, "block counts");
    chk(done_cyc == 2 * n + 5, "start-to-done time");
    chk(pv_cyc == 2 * n + 4, "psnr valid one clock before done");
    // PSNR between the cover RAM now and what was recovered
    exp_sse = 0;
    for (int b = 0; b < n; b++)
      for (int i = 0; i < 8; i++)
        exp_sse += (int'(img[b][i]) - int'(sent[b][i])) * (int'(img[b][i]) - int'(sent[b][i]));
    chk(sse === 32'(exp_sse), "sse");
    if (exp_sse == 0) begin
      chk(psnr_inf, "infinite psnr");
      n_psnr_inf++;
    end else begin
      exp_db = 10.0 * $log10(65025.0 * real'(n * 8) / real'(exp_sse));
      got_db = real'(psnr_q8) / 256.0;
      chk(!psnr_inf && got_db - exp_db < 0.1 && exp_db - got_db < 0.1, "finite psnr");
      n_psnr_fin++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    @(negedge clk);
    for (int b = 0; b < 13; b++) begin
      logic [7:0][7:0] d;
      for (int i = 0; i < 8; i++) d[i] = 8'($urandom);
      load(b, d);
    end
    // a single 8x8 block, then 5 and 13 blocks
    for (int b = 0; b < 13; b++) sent[b] = img[b];
    run(1, 0);
    run(5, 0);
    run(13, 0);
    // run in which block 0 is replaced after it was read for insertion;
    // extraction re-reads the new block 0, so the PSNR is finite
    run(3, 1);
    // next run starts from the new contents
    for (int b = 0; b < 13; b++) sent[b] = img[b];
    run(13, 0);

    $display("mechanisms: insert=%0d sram_rows=%0d restart=%0d extract=%0d switch=%0d psnr_inf=%0d psnr_finite=%0d load_during_run=%0d",
             n_insert, n_sram_rows, n_restart, n_extract, n_switch, n_psnr_inf, n_psnr_fin, n_load_busy);
    chk(n_insert > 0, "insertion happened");
    chk(n_sram_rows > 0, "SRAM rows read back");
    chk(n_restart > 0, "LFSR restart happened");
    chk(n_extract > 0, "extraction happened");
    chk(n_switch > 0, "mode switch happened");
    chk(n_psnr_inf > 0, "infinite PSNR seen");
    chk(n_psnr_fin > 0, "finite PSNR seen");
    chk(n_load_busy > 0, "load during run happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
