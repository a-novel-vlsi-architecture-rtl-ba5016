// cordic_stage: one rotation-mode CORDIC iteration (the "basic block").
//
// The sign of the residual angle z picks the rotation direction d. Each of x and y
// is passed either as it is or negated, shifted right arithmetically by i, and
// added to the other coordinate; the table entry atan(2**-i) is subtracted from or
// added to z; the iteration index is incremented for the next block:
//   x' = x - d*(y >>> i),  y' = y + d*(x >>> i),  z' = z - d*atan(2**-i),  i' = i + 1
// with d = +1 for z >= 0 and d = -1 otherwise. This is equations (1) and (2) with
// cos a(i) factored out, so every block scales the vector by sqrt(1 + 2**-2i); the
// user removes the accumulated gain. The datapath (negate/mux, shift by i, add or
// subtract, arctangent table, +1 on i) follows the basic-block diagram of the
// design; the widths and the rounding of the table to ANGLE_W bits are this
// design's choice. Purely combinational: the cascade adds the registers.
module cordic_stage #(
  parameter int unsigned W     = 20,  // x/y width, two's complement
  parameter int unsigned AW    = 16,  // angle width, 2**AW units per turn
  parameter int unsigned IDX_W = 5    // width of the iteration index
) (
  input  logic signed [W-1:0]  x_i,
  input  logic signed [W-1:0]  y_i,
  input  logic signed [AW-1:0] z_i,
  input  logic [IDX_W-1:0]     i_i,
  output logic signed [W-1:0]  x_o,
  output logic signed [W-1:0]  y_o,
  output logic signed [AW-1:0] z_o,
  output logic [IDX_W-1:0]     i_o
);
  import ofdm_pkg::*;

  logic              pos;       // "Sign?": residual angle is not negative
  logic signed [W-1:0] x_sel, y_sel;
  logic signed [W-1:0] x_sh, y_sh;
  logic [AW-1:0]     lut;

  always_comb begin
    pos   = ~z_i[AW-1];
    // negate-or-pass multiplexers ahead of the shifters
    y_sel = pos ? y_i : -y_i;
    x_sel = pos ? -x_i : x_i;
    y_sh  = y_sel >>> i_i;
    x_sh  = x_sel >>> i_i;
    // arctangent table, rounded from 32-bit angle units to AW bits
    lut      = AW'(({1'b0, atan_q32(int'(i_i))} + (33'd1 << (32 - AW - 1))) >> (32 - AW));
    x_o = x_i - y_sh;
    y_o = y_i - x_sh;
    z_o = pos ? (z_i - $signed(lut)) : (z_i + $signed(lut));
    i_o = i_i + 1'b1;
  end

endmodule
