// sincos_gen: sine and cosine of an angle by a rotation-mode CORDIC.
//
// The generator rotates the vector (1/K, 0) through the angle Ain. Since the
// cascade multiplies by K, the result is (cos Ain, sin Ain) with no scaling step
// (X0 = 1/An, Y0 = 0). Ain is an unsigned turn fraction: 2**16 units per 360
// degrees, so 16'h2000 is 45 degrees. The CORDIC converges only for |z| < 99.7
// degrees, so an angle in the second or third quadrant is first turned by 180
// degrees: the angle is reduced by 16'h8000 and the start vector becomes
// (-1/K, 0). The result is rounded to Q1.15 (16'h7FFF is just under +1) and
// saturated. The angle is carried with four extra fraction bits
// inside so that the rounding of the arctangent table does not add up; 45 degrees gives 16'h5A82 for both outputs.
//
// Interface (the ports of the design's sine/cosine generator): Ain(15:0), clk,
// ena in; cos(15:0), sin(15:0) out. ena advances the pipeline; a new angle can be
// presented on every enabled clock and its result appears CORDIC_IT + 2 enabled
// clocks later (one input register, one register per CORDIC block, one output
// register). The Q1.15 output format, the 19 fraction bits inside, the quadrant
// folding and the iteration count are this design's choices. There is no reset,
// as the generator has none: the registers carry data only.
module sincos_gen #(
  parameter int unsigned AW   = ofdm_pkg::ANGLE_W,    // angle width
  parameter int unsigned OW   = 16,                   // output width, Q1.(OW-1)
  parameter int unsigned ITER = ofdm_pkg::CORDIC_IT   // CORDIC blocks
) (
  input  logic               clk,
  input  logic               ena,
  input  logic [AW-1:0]      Ain,
  output logic signed [OW-1:0] cos,
  output logic signed [OW-1:0] sin
);
  import ofdm_pkg::*;

  localparam int unsigned GUARD = 4;           // extra fraction bits inside
  localparam int unsigned FRAC  = OW - 1 + GUARD;
  localparam int unsigned W     = FRAC + 3;    // sign + 2 integer bits (+-4)
  localparam logic [31:0] X0_RAW = CORDIC_INV_GAIN_Q32 >> (32 - FRAC);
  localparam logic [W-1:0] X0   = W'(X0_RAW) + W'((CORDIC_INV_GAIN_Q32 >> (31 - FRAC)) & 1);
  localparam int unsigned ZG    = 4;           // extra angle bits inside
  localparam int unsigned ZW    = AW + ZG;

  logic signed [W-1:0]  x0_r, y0_r;
  logic signed [ZW-1:0] z0_r;
  logic signed [W-1:0]  xn, yn;
  logic signed [ZW-1:0] zn_unused;

  // input register with quadrant folding
  always_ff @(posedge clk) begin
    if (ena) begin
      y0_r <= '0;
      if (Ain[AW-1] ^ Ain[AW-2]) begin
        x0_r <= -$signed(X0);
        z0_r <= $signed({~Ain[AW-1], Ain[AW-2:0], {ZG{1'b0}}});
      end else begin
        x0_r <= $signed(X0);
        z0_r <= $signed({Ain, {ZG{1'b0}}});
      end
    end
  end

  cordic_pipeline #(.W(W), .AW(ZW), .ITER(ITER)) u_cordic (
    .clk(clk), .ena(ena),
    .x_in(x0_r), .y_in(y0_r), .z_in(z0_r),
    .x_out(xn), .y_out(yn), .z_out(zn_unused)
  );

  // round away the guard bits and saturate to Q1.(OW-1)
  function automatic logic signed [OW-1:0] round_sat(input logic signed [W-1:0] v);
    logic signed [W:0] r;
    logic signed [W:0] q;
    r = {v[W-1], v} + (W+1)'(1 << (GUARD - 1));
    q = r >>> GUARD;
    if (q > $signed((W+1)'((1 << (OW - 1)) - 1)))      return {1'b0, {(OW-1){1'b1}}};
    else if (q < -$signed((W+1)'(1 << (OW - 1))))      return {1'b1, {(OW-1){1'b0}}};
    else                                               return q[OW-1:0];
  endfunction

  always_ff @(posedge clk) begin
    if (ena) begin
      cos <= round_sat(xn);
      sin <= round_sat(yn);
    end
  end

endmodule
