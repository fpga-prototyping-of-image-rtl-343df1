// tb_lfsr_block_gen: checks the block LFSR against a bit-serial reference.
// The reference shifts one state at a time with the XOR of bits 5, 2 and 0
// fed into bit 7. The first block from seed 8'h80 must equal the fixed
// address sequence 80 40 20 90 48 24 12 09; later blocks, reload and hold are
// compared with the reference; the period of 105 states is checked too.
module tb_lfsr_block_gen;
  logic clk = 1'b0, reset = 1'b1, reload = 1'b0, advance = 1'b0;
  logic [7:0][7:0] rows;
  int checks = 0, failures = 0;

  lfsr_block_gen #(.SEED(8'h80), .ROWS(8)) dut (.clk, .reset, .reload, .advance, .rows);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] ref_step(input logic [7:0] q);
    logic fb;
    fb = q[5] ^ q[2] ^ q[0];
    return {fb, q[7:1]};
  endfunction

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  logic [7:0] r;
  logic [7:0] fixed_seq [8] = '{8'h80, 8'h40, 8'h20, 8'h90, 8'h48, 8'h24, 8'h12, 8'h09};
  int period;

  initial begin
    repeat (2) @(posedge clk);
    reset = 1'b0;
    @(negedge clk);
    for (int i = 0; i < 8; i++) check(rows[i], 8'h00, "reset value");
    advance = 1'b1;
    @(negedge clk);
    advance = 1'b0;
    for (int i = 0; i < 8; i++) check(rows[i], fixed_seq[i], "first block");
    // hold without advance
    @(negedge clk);
    for (int i = 0; i < 8; i++) check(rows[i], fixed_seq[i], "hold");
    // 30 more blocks against the serial reference
    r = 8'h80;
    for (int i = 0; i < 8; i++) r = ref_step(r);
    for (int b = 0; b < 30; b++) begin
      advance = 1'b1;
      @(negedge clk);
      for (int i = 0; i < 8; i++) begin
        check(rows[i], r, "later block");
        r = ref_step(r);
      end
    end
    advance = 1'b0;
    // reload: next block starts at the seed again
    reload = 1'b1;
    @(negedge clk);
    reload = 1'b0;
    advance = 1'b1;
    @(negedge clk);
    advance = 1'b0;
    for (int i = 0; i < 8; i++) check(rows[i], fixed_seq[i], "after reload");
    // period of the sequence from the seed (reference model)
    r = ref_step(8'h80); period = 1;
    while (r != 8'h80 && period < 300) begin r = ref_step(r); period++; end
    checks++;
    if (period != 105) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
