// cordic_pipeline: ITER CORDIC basic blocks in cascade, one register per block.
//
// Block k receives iteration index k and feeds the next block, so after ITER clock
// enables the outputs hold the input vector rotated through z_in (to within the
// last table entry) and multiplied by the CORDIC gain K (about 1.6468 for 16 or
// more iterations); z_out is the angle left over. The cascade of n basic blocks
// follows the design's CORDIC structure; placing a register after every block (a
// fully pipelined rotator taking a new vector every enabled clock) is this
// design's choice. Interface: x_in/y_in/z_in are sampled on a rising clk with
// ena high; x_out/y_out/z_out appear ITER enabled clocks later. ena stalls the
// whole cascade. No reset: the registers carry data only.
module cordic_pipeline #(
  parameter int unsigned W    = 20,
  parameter int unsigned AW   = 16,
  parameter int unsigned ITER = 16
) (
  input  logic                 clk,
  input  logic                 ena,
  input  logic signed [W-1:0]  x_in,
  input  logic signed [W-1:0]  y_in,
  input  logic signed [AW-1:0] z_in,
  output logic signed [W-1:0]  x_out,
  output logic signed [W-1:0]  y_out,
  output logic signed [AW-1:0] z_out
);
  localparam int unsigned IDX_W = $clog2(ITER + 1);

  logic signed [W-1:0]  xs [ITER+1];
  logic signed [W-1:0]  ys [ITER+1];
  logic signed [AW-1:0] zs [ITER+1];

  assign xs[0] = x_in;
  assign ys[0] = y_in;
  assign zs[0] = z_in;

  for (genvar k = 0; k < ITER; k++) begin : g_stage
    logic signed [W-1:0]  xn, yn;
    logic signed [AW-1:0] zn;
    logic [IDX_W-1:0]     in_unused;

    cordic_stage #(.W(W), .AW(AW), .IDX_W(IDX_W)) u_stage (
      .x_i(xs[k]), .y_i(ys[k]), .z_i(zs[k]), .i_i(IDX_W'(k)),
      .x_o(xn), .y_o(yn), .z_o(zn), .i_o(in_unused)
    );

    logic signed [W-1:0]  xr, yr;
    logic signed [AW-1:0] zr;
    always_ff @(posedge clk) begin
      if (ena) begin
        xr <= xn;
        yr <= yn;
        zr <= zn;
      end
    end
    assign xs[k+1] = xr;
    assign ys[k+1] = yr;
    assign zs[k+1] = zr;
  end

  assign x_out = xs[ITER];
  assign y_out = ys[ITER];
  assign z_out = zs[ITER];

endmodule
