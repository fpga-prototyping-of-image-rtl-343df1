// lfsr_block_gen: 8-bit LFSR that delivers a whole block of states per clock.
//
// The register is an 8-bit Fibonacci LFSR (wm_pkg::lfsr_step: shift right,
// feedback q[5]^q[2]^q[0] into bit 7). Instead of one state per clock the
// shift is unrolled ROWS times: on `advance` the output `rows` takes the ROWS
// states starting at the held `state`, and `state` jumps ROWS shifts ahead.
// From SEED = 8'h80 the first block is 80,40,20,90,48,24,12,09 (hex).
// The same module serves as watermark generator and as SRAM address
// generator, with different seeds.
//
// Interface: `reload` puts `state` back to SEED (the output holds), so a
// second pass regenerates the identical sequence; it has priority over
// `advance`. `reset` is asynchronous, active high: state <= SEED, rows <= 0.
// Timing: `rows` changes on the clock edge where `advance` is sampled high.
// SEED must not be 8'h00 or 8'hFF, which map onto themselves.
// The 8-bit width, the XOR3 feedback, the asynchronous reset and the seed
// 10000000 of the address sequence come from the original design; producing
// a whole block per clock is how this design meets its one-block-per-clock
// rate. The sequence period is 105 states.
module lfsr_block_gen #(
  parameter logic [7:0]  SEED = 8'h80,
  parameter int unsigned ROWS = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             reload,
  input  logic             advance,
  output logic [ROWS-1:0][7:0] rows
);
  import wm_pkg::*;

  logic [7:0] state;
  logic [ROWS:0][7:0] chain;  // chain[i] = state shifted i times

  always_comb begin
    logic [7:0] s;
    s = state;
    for (int i = 0; i <= ROWS; i++) begin
      chain[i] = s;
      s = lfsr_step(s);
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      state <= SEED;
      rows  <= '0;
    end else if (reload) begin
      state <= SEED;
    end else if (advance) begin
      state <= chain[ROWS];
      for (int i = 0; i < ROWS; i++) rows[i] <= chain[i];
    end
  end

endmodule
