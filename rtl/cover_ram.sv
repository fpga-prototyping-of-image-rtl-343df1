// cover_ram: input block RAM holding the cover image.
//
// DEPTH words, each one 8x8-bit block. The host writes a block per clock on
// the write port while the datapath reads on the separate read port, so a new
// image can be loaded while the previous one is being processed.
// Timing: write on the rising edge when `we` is high; read data is registered,
// valid the clock after `re`, and holds while `re` is low. `reset`
// (asynchronous) clears only the read register; the array is not reset.
// Reading a word written in the same cycle returns the old contents.
// An input RAM with simultaneous load and processing is part of the original
// design; the depth of 13 blocks (the most the address sequence can place
// in the SRAM without reuse) and the port timing are this design's choice.
module cover_ram #(
  parameter int unsigned DEPTH = 13,
  parameter int unsigned ROWS  = 8,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  logic [ROWS-1:0][7:0] wdata,
  input  logic                 re,
  input  logic [AW-1:0]        raddr,
  output logic [ROWS-1:0][7:0] rdata
);
  logic [ROWS-1:0][7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)                         rdata <= '0;
    else if (re && raddr < AW'(DEPTH)) rdata <= mem[raddr];
  end
endmodule
