// tb_wm_controller: runs the sequencer for several block counts and checks
// the issue pattern (n insertion blocks with indices 0..n-1, one reload, n
// extraction blocks), the single psnr_finish two clocks after the last
// extraction block, psnr_clear at start, and that done comes 2n+5 clocks
// after start. The PSNR unit is modelled by returning valid one clock after
// finish.
module tb_wm_controller;
  localparam int IMG_BLOCKS = 13;
  logic clk = 1'b0, reset = 1'b1, start = 1'b0, psnr_valid = 1'b0;
  logic [3:0] nblk;
  logic issue, mode_ext, gen_reload, psnr_clear, psnr_finish, busy, done;
  logic [3:0] blk;
  int checks = 0, failures = 0;

  wm_controller #(.IMG_BLOCKS(IMG_BLOCKS)) dut (.clk, .reset, .start, .nblk, .psnr_valid,
    .issue, .mode_ext, .blk, .gen_reload, .psnr_clear, .psnr_finish, .busy, .done);

  always #5 clk = ~clk;
  always_ff @(posedge clk) psnr_valid <= psnr_finish;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (n=%0d)", what, nblk); end
  endtask

  task automatic run(input int n);
    int cyc, ins, ext, rel, fin, last_ext, fin_cyc, done_cyc, exp_idx_i, exp_idx_e, nn;
    nn = (n > IMG_BLOCKS) ? IMG_BLOCKS : n;
    ins = 0; ext = 0; rel = 0; fin = 0; done_cyc = -1; last_ext = -1; fin_cyc = -1;
    nblk = 4'(n);
    start = 1'b1;
    #1;
    chk(psnr_clear, "psnr_clear with start");
    chk(gen_reload, "gen_reload with start");
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (done_cyc < 0 && cyc < 100) begin
      if (issue && !mode_ext) begin chk(blk == 4'(ins), "insert block index"); chk(rel == 0, "insert before reload"); ins++; end
      if (issue && mode_ext)  begin chk(blk == 4'(ext), "extract block index"); chk(rel == 1, "extract after reload"); ext++; last_ext = cyc; end
      if (gen_reload) rel++;
      if (psnr_finish) begin fin++; fin_cyc = cyc; end
      chk(busy, "busy during run");
      @(negedge clk);
      if (done) done_cyc = cyc;
      cyc++;
    end
    chk(ins == nn, "insertion block count");
    chk(ext == nn, "extraction block count");
    chk(rel == 1, "one reload");
    chk(fin == 1, "one finish");
    chk(fin_cyc == last_ext + 3, "finish position");
    chk(done_cyc == 2 * nn + 5, "start-to-done cycles");
    @(negedge clk);
    chk(!busy && !done, "idle after run");
  endtask

  initial begin
    nblk = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    // start with nblk = 0 is ignored
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    chk(!busy, "nblk=0 ignored");
    run(1);
    run(2);
    run(13);
    run(15);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
