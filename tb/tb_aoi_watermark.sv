// tb_aoi_watermark: random blocks through the AOI unit. The result must be
// the bitwise XOR of data and watermark, and a second pass with the same
// watermark must give back the data (extraction inverts insertion).
module tb_aoi_watermark;
  logic [7:0][7:0] data, wm, out, data2, back;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  aoi_watermark #(.ROWS(8)) dut  (.data(data),  .wm(wm), .out(out));
  aoi_watermark #(.ROWS(8)) dut2 (.data(data2), .wm(wm), .out(back));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int r = 0; r < 8; r++) begin
        data[r] = 8'($urandom);
        wm[r]   = (t < 4) ? {8{t[0]}} : 8'($urandom);
      end
      #1;
      data2 = out;
      #1;
      for (int r = 0; r < 8; r++) begin
        logic [7:0] exp;
        for (int b = 0; b < 8; b++) exp[b] = (data[r][b] != wm[r][b]);
        checks++;
        if (out[r] !== exp) begin
          failures++;
          $display("FAIL insert row %0d: %b ^ %b -> %b", r, data[r], wm[r], out[r]);
        end
        checks++;
        if (back[r] !== data[r]) begin
          failures++;
          $display("FAIL extract row %0d", r);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
