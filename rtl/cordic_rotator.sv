// cordic_rotator: multiplies a complex sample by a twiddle factor given only by its
// angle, using a rotation-mode CORDIC in place of a complex multiplier.
//
// The sample (x + jy) is rotated through angle (2**AW units per turn), which is
// multiplication by exp(j*angle); a twiddle W_N^e = exp(-j*2*pi*e/N) is therefore
// the angle -e*2**AW/N. Angles in the second and third quadrant are first turned
// by 180 degrees by negating x and y, so the CORDIC sees |z| <= 90 degrees. The
// CORDIC gain K is removed afterwards by a fixed shift-and-add multiplication with
// 1/K ~= 2^-1 + 2^-3 - 2^-6 - 2^-9 - 2^-12 + 2^-14 + 2^-16 - 2^-20 (error below
// 1e-6), so no multiplier is used anywhere. Two integer guard bits absorb the
// growth of up to K*sqrt(2) inside; the result is rounded and saturated to DW bits.
// Using the CORDIC as the twiddle multiplier with the angles kept in a ROM is the
// design's approach; the quadrant folding, guard bits, the shift-and-add gain
// correction and the pipelining are this design's choices.
//
// Timing: one input register, ITER CORDIC registers and one output register, so
// the result appears ITER + 2 enabled clocks after the inputs; ena stalls all of
// it. A new sample can enter on every enabled clock. No reset (data only).
module cordic_rotator #(
  parameter int unsigned DW   = ofdm_pkg::DATA_W,
  parameter int unsigned AW   = ofdm_pkg::ANGLE_W,
  parameter int unsigned ITER = ofdm_pkg::CORDIC_IT
) (
  input  logic                 clk,
  input  logic                 ena,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] y_in,
  input  logic [AW-1:0]        angle,
  output logic signed [DW-1:0] x_out,
  output logic signed [DW-1:0] y_out
);
  localparam int unsigned GUARD = 4;               // fraction guard bits
  localparam int unsigned W     = DW + 2 + GUARD;  // two integer guard bits
  localparam int unsigned ZG    = 4;
  localparam int unsigned ZW    = AW + ZG;
  localparam int unsigned SW    = W + 21;          // width of the gain product

  logic signed [W-1:0]  x0_r, y0_r;
  logic signed [ZW-1:0] z0_r;
  logic signed [W-1:0]  xn, yn;
  logic signed [ZW-1:0] zn_unused;

  always_ff @(posedge clk) begin
    if (ena) begin
      if (angle[AW-1] ^ angle[AW-2]) begin
        x0_r <= -(W'(x_in) <<< GUARD);
        y0_r <= -(W'(y_in) <<< GUARD);
        z0_r <= $signed({~angle[AW-1], angle[AW-2:0], {ZG{1'b0}}});
      end else begin
        x0_r <= W'(x_in) <<< GUARD;
        y0_r <= W'(y_in) <<< GUARD;
        z0_r <= $signed({angle, {ZG{1'b0}}});
      end
    end
  end

  cordic_pipeline #(.W(W), .AW(ZW), .ITER(ITER)) u_cordic (
    .clk(clk), .ena(ena),
    .x_in(x0_r), .y_in(y0_r), .z_in(z0_r),
    .x_out(xn), .y_out(yn), .z_out(zn_unused)
  );

  // v * (1/K) by shifts and adds, then round off GUARD + 20 bits and saturate
  function automatic logic signed [DW-1:0] scale_sat(input logic signed [W-1:0] v);
    logic signed [SW-1:0] e, acc, q;
    e   = SW'(v);
    acc = (e <<< 19) + (e <<< 17) - (e <<< 14) - (e <<< 11) - (e <<< 8)
        + (e <<< 6) + (e <<< 4) - e;
    acc = acc + (SW'(1) <<< (GUARD + 19));
    q   = acc >>> (GUARD + 20);
    if (q > SW'((1 << (DW - 1)) - 1))        return {1'b0, {(DW-1){1'b1}}};
    else if (q < -(SW'(1) <<< (DW - 1)))     return {1'b1, {(DW-1){1'b0}}};
    else                                     return q[DW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (ena) begin
      x_out <= scale_sat(xn);
      y_out <= scale_sat(yn);
    end
  end

endmodule
