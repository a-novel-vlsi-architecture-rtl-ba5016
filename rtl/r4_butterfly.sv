// r4_butterfly: the add/subtract part of a radix-4 decimation-in-frequency butterfly.
//
// From four complex points a0..a3 it forms
//   y0 = a0 +   a1 + a2 +   a3      y1 = a0 - j*a1 - a2 + j*a3
//   y2 = a0 -   a1 + a2 -   a3      y3 = a0 + j*a1 - a2 - j*a3
// where multiplying by +-j is only a swap of real and imaginary part and a sign,
// so the block has adders only. Each output is divided by 4 with rounding
// ((s + 2) >>> 2), so a 64-point transform is scaled by 1/64 overall and cannot
// overflow. The radix-4 butterfly is the design's; the per-pass scaling by 1/4 and
// the rounding are this design's choice. The twiddle rotation follows in
// fft_processor. Timing: one register, outputs one enabled clock after inputs.
module r4_butterfly
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  ena,
  input  cplx_t a [RADIX],
  output cplx_t y [RADIX]
);
  localparam int unsigned SW = DATA_W + 2;

  // (s + 2) >>> 2 always fits DATA_W bits, as |s| <= 4 * 2**(DATA_W-1)
  function automatic logic signed [DATA_W-1:0] quarter(input logic signed [SW-1:0] s);
    logic signed [SW-1:0] r;
    r = s + SW'(2);
    return r[SW-1:2];
  endfunction

  logic signed [SW-1:0] ar [RADIX], ai [RADIX];
  logic signed [SW-1:0] sr [RADIX], si [RADIX];

  always_comb begin
    for (int m = 0; m < RADIX; m++) begin
      ar[m] = SW'(a[m].re);
      ai[m] = SW'(a[m].im);
    end
    sr[0] = ar[0] + ar[1] + ar[2] + ar[3];
    si[0] = ai[0] + ai[1] + ai[2] + ai[3];
    sr[1] = ar[0] + ai[1] - ar[2] - ai[3];
    si[1] = ai[0] - ar[1] - ai[2] + ar[3];
    sr[2] = ar[0] - ar[1] + ar[2] - ar[3];
    si[2] = ai[0] - ai[1] + ai[2] - ai[3];
    sr[3] = ar[0] - ai[1] - ar[2] + ai[3];
    si[3] = ai[0] + ar[1] - ai[2] - ar[3];
  end

  always_ff @(posedge clk) begin
    if (ena) begin
      for (int m = 0; m < RADIX; m++) begin
        y[m].re <= quarter(sr[m]);
        y[m].im <= quarter(si[m]);
      end
    end
  end

endmodule
