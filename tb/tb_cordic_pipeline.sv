// tb_cordic_pipeline: self-checking test of the cascade of CORDIC blocks.
//
// One random vector and angle (|angle| < 90 degrees) per clock. ITER clocks later
// the outputs must equal K times the vector rotated through the angle, with K the
// product of sqrt(1 + 2**-2i), within 8 LSB plus the error the last iteration
// leaves (|v| * 6e-5), and the residual angle must be within 8 units of zero. Also checks the latency: a
// result is not present one clock early.
module tb_cordic_pipeline;
  localparam int W = 24, AW = 20, ITER = 16, NV = 400;
  logic clk = 0, ena;
  logic signed [W-1:0] x_in, y_in, x_out, y_out;
  logic signed [AW-1:0] z_in, z_out;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;
  real K;
  int xs[NV], ys[NV], zs[NV];

  cordic_pipeline #(.W(W), .AW(AW), .ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    K = 1.0;
    for (int i = 0; i < ITER; i++) K = K * $sqrt(1.0 + 1.0 / real'(longint'(1) << (2 * i)));
    for (int n = 0; n < NV; n++) begin
      xs[n] = $urandom_range(0, 4000000) - 2000000;
      ys[n] = $urandom_range(0, 4000000) - 2000000;
      zs[n] = $urandom_range(0, 520000) - 260000;   // about +-89 degrees
    end
    xs[0] = 1000000; ys[0] = 0; zs[0] = 1 << (AW - 3);   // 45 degrees
    ena = 1;
    @(negedge clk);
    for (int k = 0; k < NV + ITER; k++) begin
      if (k < NV) begin
        x_in = W'(xs[k]); y_in = W'(ys[k]); z_in = AW'(zs[k]);
      end
      @(posedge clk);
      #1;
      if (k + 1 >= ITER && k + 1 - ITER < NV) begin
        int a;
        real th, xe, ye, tol;
        a = k + 1 - ITER;
        th = 2.0 * pi * real'(zs[a]) / real'(1 << AW);
        xe = K * (real'(xs[a]) * $cos(th) - real'(ys[a]) * $sin(th));
        ye = K * (real'(ys[a]) * $cos(th) + real'(xs[a]) * $sin(th));
        // the last table angle, atan(2**-(ITER-1)), bounds the rotation error
        tol = 8.0 + K * $sqrt(real'(xs[a]) * real'(xs[a]) + real'(ys[a]) * real'(ys[a])) * 6.0e-5;
        chk($sformatf("x[%0d]", a), real'(x_out), xe, tol);
        chk($sformatf("y[%0d]", a), real'(y_out), ye, tol);
        chk($sformatf("z[%0d]", a), real'(z_out), 0.0, 8.0);
      end
      if (k + 2 == ITER) chk("not early", real'(x_out) == K * 1000000.0 * $cos(pi / 4.0) ? 1.0 : 0.0, 0.0, 0.0);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
