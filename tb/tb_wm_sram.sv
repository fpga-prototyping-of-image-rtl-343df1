// tb_wm_sram: writes blocks of 8 rows at 8 distinct random addresses and
// checks every read port against a shadow array, including reads of rows
// written by earlier blocks and read-after-write in the following cycle.
module tb_wm_sram;
  logic clk = 1'b0, we = 1'b0;
  logic [7:0][7:0] waddr, wdata, raddr, rdata;
  logic [7:0] shadow [256];
  logic       written [256];
  int checks = 0, failures = 0;

  wm_sram #(.ADDR_W(8), .ROWS(8)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0][7:0] distinct_addrs();
    logic [7:0][7:0] a;
    logic ok;
    for (int i = 0; i < 8; i++) begin
      do begin
        a[i] = 8'($urandom);
        ok = 1'b1;
        for (int j = 0; j < i; j++) if (a[j] == a[i]) ok = 1'b0;
      end while (!ok);
    end
    return a;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) written[i] = 1'b0;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      // write one block
      waddr = distinct_addrs();
      for (int i = 0; i < 8; i++) wdata[i] = 8'($urandom);
      we = 1'b1;
      @(posedge clk);
      for (int i = 0; i < 8; i++) begin shadow[waddr[i]] = wdata[i]; written[waddr[i]] = 1'b1; end
      @(negedge clk);
      we = 1'b0;
      // read back the same rows, then rows of earlier blocks
      for (int pass = 0; pass < 2; pass++) begin
        for (int i = 0; i < 8; i++) begin
          if (pass == 0) raddr[i] = waddr[i];
          else begin
            do raddr[i] = 8'($urandom); while (!written[raddr[i]]);
          end
        end
        #1;
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (rdata[i] !== shadow[raddr[i]]) begin
            failures++;
            $display("FAIL port %0d addr %h: got %h expected %h", i, raddr[i], rdata[i], shadow[raddr[i]]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
