// trunc_data: truncation of the generated cosine/sine into receiver samples.
//
// The sine/cosine generator delivers Q1.15 values that reach full scale; the
// receiver's samples are DATA_W-bit complex values. This block forms the sample
// cos + j*sin and truncates it: each part is shifted right arithmetically by
// SHIFT (the dropped low bits are discarded, rounding toward minus infinity) and
// cut to DATA_W bits, so the generated tone has amplitude 2**-SHIFT and leaves
// headroom in the FFT. The block is the design's; the cosine-to-real/sine-to-
// imaginary packing and the default SHIFT of 1 are this design's choices.
// Combinational.
module trunc_data
  import ofdm_pkg::*;
#(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned SHIFT = 1
) (
  input  logic signed [IN_W-1:0] cos_in,
  input  logic signed [IN_W-1:0] sin_in,
  output cplx_t                  sample
);
  logic signed [IN_W-1:0] c_sh, s_sh;

  always_comb begin
    c_sh = cos_in >>> SHIFT;
    s_sh = sin_in >>> SHIFT;
    // keep the DATA_W most significant bits of the IN_W-bit value
    if (IN_W >= DATA_W) begin
      sample.re = DATA_W'(c_sh >>> (IN_W - DATA_W));
      sample.im = DATA_W'(s_sh >>> (IN_W - DATA_W));
    end else begin
      sample.re = DATA_W'(c_sh) <<< (DATA_W - IN_W);
      sample.im = DATA_W'(s_sh) <<< (DATA_W - IN_W);
    end
  end

endmodule
