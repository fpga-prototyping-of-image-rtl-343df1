// tb_psnr_unit: accumulates random image pairs with known errors and compares
// the unit's PSNR (Q8.8 dB) with a floating-point evaluation of
// 10*log10(255^2 * N / SSE); tolerance 0.1 dB. Also checks the exact SSE,
// the infinite flag for identical images, clear, and that valid comes one
// clock after finish.
module tb_psnr_unit;
  logic clk = 1'b0, reset = 1'b1, clear = 1'b0, acc_en = 1'b0, finish = 1'b0;
  logic [7:0][7:0] ref_blk, test_blk;
  logic [15:0] psnr_q8;
  logic psnr_inf, valid;
  logic [31:0] sse;
  int checks = 0, failures = 0;

  psnr_unit #(.ROWS(8)) dut (.clk, .reset, .clear, .acc_en, .ref_blk, .test_blk,
                             .finish, .psnr_q8, .psnr_inf, .sse, .valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int nblocks, input int maxerr);
    longint exp_sse;
    real exp_db, got_db;
    exp_sse = 0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int b = 0; b < nblocks; b++) begin
      for (int r = 0; r < 8; r++) begin
        int e, t;
        ref_blk[r] = 8'($urandom);
        e = (maxerr == 0) ? 0 : $urandom_range(2 * maxerr) - maxerr;
        t = int'(ref_blk[r]) + e;
        if (t < 0) t = 0;
        if (t > 255) t = 255;
        test_blk[r] = 8'(t);
        exp_sse += (int'(ref_blk[r]) - t) * (int'(ref_blk[r]) - t);
      end
      acc_en = 1'b1;
      @(negedge clk);
      acc_en = 1'b0;
    end
    finish = 1'b1;
    @(negedge clk);
    finish = 1'b0;
    checks++;
    if (!valid) begin failures++; $display("FAIL valid not one clock after finish"); end
    checks++;
    if (sse !== 32'(exp_sse)) begin failures++; $display("FAIL sse %0d vs %0d", sse, exp_sse); end
    checks++;
    if (exp_sse == 0) begin
      if (!psnr_inf) begin failures++; $display("FAIL inf flag"); end
    end else begin
      exp_db = 10.0 * $log10(65025.0 * real'(nblocks * 8) / real'(exp_sse));
      got_db = real'(psnr_q8) / 256.0;
      if (psnr_inf || got_db - exp_db > 0.1 || exp_db - got_db > 0.1) begin
        failures++;
        $display("FAIL psnr %f dB vs %f dB (sse %0d)", got_db, exp_db, exp_sse);
      end
    end
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid longer than one clock"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    reset = 1'b0;
    run(4, 0);
    run(1, 1);
    run(13, 2);
    for (int t = 0; t < 60; t++) run($urandom_range(20) + 1, $urandom_range(200));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
