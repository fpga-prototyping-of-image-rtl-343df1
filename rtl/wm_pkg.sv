// wm_pkg: types and the LFSR step shared by the watermarking datapath.
//
// An image block is 8 rows of 8 bits (an 8x8 bit array). The watermark, the
// SRAM row addresses and the cover image all travel as blocks, so one block
// is processed per clock. The LFSR step function is the 8-bit Fibonacci
// register used by both generators: shift right, new bit 7 = q[5]^q[2]^q[0].
// The first seven shifts of that register from 10000000 reproduce the address
// sequence the design is based on; the q[0] tap is this design's choice that
// makes the register a full 8 bits deep.
package wm_pkg;

  localparam int unsigned ROW_W  = 8;   // bits per row (one gray pixel)
  localparam int unsigned ROWS   = 8;   // rows per block
  localparam int unsigned ADDR_W = 8;   // SRAM row address width

  typedef logic [ROW_W-1:0]  row_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // One LFSR shift.
  function automatic logic [7:0] lfsr_step(input logic [7:0] q);
    return {q[5] ^ q[2] ^ q[0], q[7:1]};
  endfunction

endpackage
