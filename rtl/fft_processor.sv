// fft_processor: CORDIC-based radix-4 butterfly unit of the FFT.
//
// Takes four points of one radix-4 butterfly per clock and returns them
// transformed: the radix-4 adds (r4_butterfly, scaled by 1/4) followed by the
// twiddle multiplication of outputs 1..3 by W_N^(m*j*4**s), where s is the pass
// (0 first) and j the position of the butterfly inside its group. Twiddles are not
// stored as values: the exponent indexes a ROM of angles and a CORDIC rotator
// turns the point through that angle. Output 0 is never rotated and goes through a
// matching delay line. A single unit like this executes all butterflies of all
// passes in turn; the memory and the address generator feed it.
//
// Timing: fully pipelined, one butterfly per clock, result LATENCY = ITER + 3
// clocks after the inputs (one for the adds and the angle ROM read in parallel,
// ITER + 2 in the rotators). in_tag travels with the data unchanged so that the
// caller knows where to write the result back (in place). out_valid is reset by
// rst_n; the data path has no reset.
module fft_processor
  import ofdm_pkg::*;
#(
  parameter int unsigned ITER  = CORDIC_IT,
  parameter int unsigned TAG_W = RADIX * IDX_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [$clog2(STAGES)-1:0]  in_stage,
  input  idx_t                       in_j,
  input  cplx_t                      in_a [RADIX],
  input  logic [TAG_W-1:0]           in_tag,
  output logic                       out_valid,
  output cplx_t                      out_y [RADIX],
  output logic [TAG_W-1:0]           out_tag
);
  localparam int unsigned LATENCY = ITER + 3;
  localparam int unsigned ROT_LAT = ITER + 2;

  cplx_t         bf [RADIX];
  idx_t          expo [RADIX];
  logic [ANGLE_W-1:0] ang [RADIX];

  always_comb begin
    for (int m = 0; m < RADIX; m++) begin
      // m * j * 4**s, modulo N by truncation to IDX_W bits
      expo[m] = idx_t'((IDX_W + 4)'(m) * (IDX_W + 4)'(in_j) << (2 * in_stage));
    end
  end

  r4_butterfly u_bf (.clk(clk), .ena(1'b1), .a(in_a), .y(bf));

  for (genvar m = 1; m < RADIX; m++) begin : g_rot
    twiddle_angle_rom #(.N(FFT_N), .AW(ANGLE_W)) u_rom (
      .clk(clk), .ena(1'b1), .e(expo[m]), .angle(ang[m])
    );
    cordic_rotator #(.DW(DATA_W), .AW(ANGLE_W), .ITER(ITER)) u_rot (
      .clk(clk), .ena(1'b1),
      .x_in(bf[m].re), .y_in(bf[m].im), .angle(ang[m]),
      .x_out(out_y[m].re), .y_out(out_y[m].im)
    );
  end
  assign ang[0] = '0;  // W^0: output 0 is not rotated

  // delay line for the unrotated output 0
  cplx_t d0 [ROT_LAT];
  always_ff @(posedge clk) begin
    d0[0] <= bf[0];
    for (int k = 1; k < ROT_LAT; k++) d0[k] <= d0[k-1];
  end
  assign out_y[0] = d0[ROT_LAT-1];

  // valid and tag travel alongside
  logic [LATENCY-1:0] vld;
  logic [TAG_W-1:0]   tag [LATENCY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LATENCY-2:0], in_valid};
  end
  always_ff @(posedge clk) begin
    tag[0] <= in_tag;
    for (int k = 1; k < LATENCY; k++) tag[k] <= tag[k-1];
  end
  assign out_valid = vld[LATENCY-1];
  assign out_tag   = tag[LATENCY-1];

endmodule
