// tb_cover_ram: fills the 13-block input RAM, reads every block back with the
// one-clock read latency, checks that the read register holds while re is
// low, and that a write to one block while another is read does not disturb
// the read.
module tb_cover_ram;
  localparam int DEPTH = 13;
  logic clk = 1'b0, reset = 1'b1, we = 1'b0, re = 1'b0;
  logic [3:0] waddr, raddr;
  logic [7:0][7:0] wdata, rdata;
  logic [7:0][7:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  cover_ram #(.DEPTH(DEPTH), .ROWS(8)) dut (.clk, .reset, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h vs %h", what, got, exp); end
  endtask

  initial begin
    waddr = '0; raddr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    chk(rdata, '0, "reset");
    for (int b = 0; b < DEPTH; b++) begin
      we = 1'b1; waddr = 4'(b);
      for (int i = 0; i < 8; i++) wdata[i] = 8'($urandom);
      shadow[b] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int b = DEPTH - 1; b >= 0; b--) begin
      re = 1'b1; raddr = 4'(b);
      @(negedge clk);
      chk(rdata, shadow[b], "read");
    end
    re = 1'b0; raddr = 4'd3;
    @(negedge clk);
    chk(rdata, shadow[0], "hold");
    // overlapped write and read of different blocks
    for (int t = 0; t < 40; t++) begin
      int wb, rb;
      wb = $urandom_range(DEPTH - 1);
      do rb = $urandom_range(DEPTH - 1); while (rb == wb);
      we = 1'b1; waddr = 4'(wb);
      for (int i = 0; i < 8; i++) wdata[i] = 8'($urandom);
      re = 1'b1; raddr = 4'(rb);
      @(negedge clk);
      shadow[wb] = wdata;
      chk(rdata, shadow[rb], "overlapped read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
