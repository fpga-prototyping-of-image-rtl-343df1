// aoi_watermark: bitwise watermark insertion / extraction of one block.
//
// Every bit is combined with its watermark bit by an AND-OR-invert gate fed
// with the true and complemented inputs, out = ~((d & w) | (~d & ~w)), which
// is d XOR w. Because XOR is its own inverse the same unit inserts the
// watermark into a cover block and removes it from a watermarked block;
// the top shares one instance between the two directions.
// Purely combinational: the result is registered by the caller.
// The original design names an AOI-based combination of cover and LFSR bits;
// choosing the XOR form of AOI, so that extraction is exact, is this
// design's reading.
module aoi_watermark #(
  parameter int unsigned ROWS = 8
) (
  input  logic [ROWS-1:0][7:0] data,
  input  logic [ROWS-1:0][7:0] wm,
  output logic [ROWS-1:0][7:0] out
);
  always_comb begin
    for (int r = 0; r < ROWS; r++)
      out[r] = ~((data[r] & wm[r]) | (~data[r] & ~wm[r]));
  end
endmodule
