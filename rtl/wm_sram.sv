// wm_sram: register-based SRAM holding the watermarked rows.
//
// 2**ADDR_W rows of 8 bits. A whole block of ROWS rows is written in one clock
// at ROWS independent addresses (the outputs of the address LFSR), and read
// back the same way, so there are ROWS write ports and ROWS read ports. The
// array is built from flip-flops rather than block RAM so that all ports work
// in the same cycle; each port's address compare is its row decoder.
//
// Timing: writes take effect on the rising edge when `we` is high; reads are
// combinational from `raddr`. Contents are not reset. If two write ports
// address the same row the higher-numbered port wins; the block's LFSR
// addresses are always distinct, and an assertion checks it.
// The 8-bit row address and the use of registers instead of RAM follow the
// original design; the port count is what a one-block-per-clock rate needs.
module wm_sram #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned ROWS   = 8
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [ROWS-1:0][ADDR_W-1:0] waddr,
  input  logic [ROWS-1:0][7:0]      wdata,
  input  logic [ROWS-1:0][ADDR_W-1:0] raddr,
  output logic [ROWS-1:0][7:0]      rdata
);
  logic [7:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we)
      for (int p = 0; p < ROWS; p++) mem[waddr[p]] <= wdata[p];
  end

  always_comb begin
    for (int p = 0; p < ROWS; p++) rdata[p] = mem[raddr[p]];
  end

  // The ROWS addresses of one write must be distinct.
  function automatic logic addrs_distinct(input logic [ROWS-1:0][ADDR_W-1:0] a);
    for (int i = 0; i < ROWS; i++)
      for (int j = i + 1; j < ROWS; j++)
        if (a[i] == a[j]) return 1'b0;
    return 1'b1;
  endfunction

  a_distinct_waddr: assert property (@(posedge clk) we |-> addrs_distinct(waddr))
    else $error("wm_sram: two write ports address the same row");
endmodule
