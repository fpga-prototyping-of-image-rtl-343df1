// psnr_unit: peak signal-to-noise ratio between a sent and a received image.
//
// Each 8-bit row of a block is one gray pixel (peak value 255). While
// `acc_en` is high the unit adds the squared differences of the ROWS pixel
// pairs of `ref_blk` and `test_blk` to a 32-bit error sum and counts the
// pixels. On `finish` it evaluates
//     PSNR = 10*log10(255^2 * N / SSE) = 10*log10(2) * (log2(255^2*N) - log2(SSE))
// and registers it as an unsigned Q8.8 number of dB (`psnr_q8`), with
// `psnr_inf` set when SSE is zero (identical images). log2 is computed as
// the leading-one position plus the mantissa f with a quadratic correction,
// log2(1+f) ~ f + 0.348*f*(1-f), which keeps the result within about
// 0.03 dB; the log method and the number format are this design's choice.
// Timing: `valid` pulses with the result one clock after `finish`. `clear`
// zeroes the sums (for a new image). Sums are not saturated: up to 66049
// pixels of worst-case error fit. `reset` is asynchronous.
module psnr_unit #(
  parameter int unsigned ROWS = 8
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clear,
  input  logic                 acc_en,
  input  logic [ROWS-1:0][7:0] ref_blk,
  input  logic [ROWS-1:0][7:0] test_blk,
  input  logic                 finish,
  output logic [15:0]          psnr_q8,
  output logic                 psnr_inf,
  output logic [31:0]          sse,
  output logic                 valid
);
  logic [31:0] npix;
  logic [31:0] blk_sse;

  // Squared error of one block.
  always_comb begin
    blk_sse = '0;
    for (int r = 0; r < ROWS; r++) begin
      logic signed [8:0] d;
      d = $signed({1'b0, ref_blk[r]}) - $signed({1'b0, test_blk[r]});
      blk_sse += 32'(d * d);
    end
  end

  // log2(x) in Q8.8 for x >= 1.
  function automatic logic [15:0] log2_q8(input logic [47:0] x);
    logic [5:0]  k;
    logic [47:0] m;
    logic [7:0]  f;
    logic [15:0] corr;
    k = '0;
    for (int i = 0; i < 48; i++) if (x[i]) k = 6'(i);
    m = x << (6'd47 - k);
    f = m[46:39];
    corr = 16'((32'(f) * (32'd256 - 32'(f)) * 32'd89) >> 16);
    return {2'b0, k, 8'b0} + 16'(f) + corr;
  endfunction

  logic [47:0] num;
  logic [15:0] l_num, l_sse;
  logic [31:0] scaled;

  always_comb begin
    num    = 48'(npix) * 48'd65025;
    l_num  = log2_q8(num);
    l_sse  = log2_q8({16'b0, sse});
    // 10*log10(2) = 3.0103 ~ 12330/4096
    scaled = (32'(l_num - l_sse) * 32'd12330) >> 12;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      sse <= '0; npix <= '0; psnr_q8 <= '0; psnr_inf <= 1'b0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (clear) begin
        sse  <= '0;
        npix <= '0;
      end else if (acc_en) begin
        sse  <= sse + blk_sse;
        npix <= npix + ROWS;
      end
      if (finish) begin
        valid    <= 1'b1;
        psnr_inf <= (sse == '0);
        psnr_q8  <= (sse == '0) ? '0 : scaled[15:0];
      end
    end
  end
endmodule
