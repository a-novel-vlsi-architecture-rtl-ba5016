// tb_cordic_rotator: self-checking test of the CORDIC twiddle multiplier.
//
// Random 16-bit samples (|x|,|y| < 0.7 of full scale) are rotated through random
// angles and through the 64-point twiddle angles -e*2**16/64. The result, ITER + 2
// clocks later, must match (x + jy) * exp(j*angle) in double precision within
// 3 LSB; gain correction is included, so no factor K remains. A sample driven
// while ena is low must not enter.
module tb_cordic_rotator;
  localparam int DW = 16, AW = 16, ITER = 16, NV = 400;
  localparam int LAT = ITER + 2;
  logic clk = 0, ena;
  logic signed [DW-1:0] x_in, y_in, x_out, y_out;
  logic [AW-1:0] angle;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;
  int xs[NV], ys[NV], as[NV];

  cordic_rotator #(.DW(DW), .AW(AW), .ITER(ITER)) dut (.*);
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
    for (int n = 0; n < NV; n++) begin
      xs[n] = $urandom_range(0, 45000) - 22500;
      ys[n] = $urandom_range(0, 45000) - 22500;
      as[n] = (n < 64) ? ((65536 - n * 1024) % 65536) : int'($urandom_range(0, 65535));
    end
    ena = 1;
    @(negedge clk);
    for (int k = 0; k < NV + LAT; k++) begin
      if (k < NV) begin
        x_in = DW'(xs[k]); y_in = DW'(ys[k]); angle = AW'(as[k]);
      end
      @(posedge clk);
      #1;
      if (k + 1 >= LAT && k + 1 - LAT < NV) begin
        int a;
        real th;
        a = k + 1 - LAT;
        th = 2.0 * pi * real'(as[a]) / 65536.0;
        chk($sformatf("x[%0d]", a), real'(x_out), real'(xs[a]) * $cos(th) - real'(ys[a]) * $sin(th), 3.0);
        chk($sformatf("y[%0d]", a), real'(y_out), real'(ys[a]) * $cos(th) + real'(xs[a]) * $sin(th), 3.0);
      end
      @(negedge clk);
    end
    // stall: a sample offered with ena low is not taken
    x_in = 16'sd10000; y_in = 0; angle = 0;
    repeat (LAT + 1) @(posedge clk);
    @(negedge clk);
    ena = 0;
    x_in = -16'sd10000; angle = 16'h4000;
    repeat (3) @(posedge clk);
    @(negedge clk);
    ena = 1;
    x_in = 16'sd10000; angle = 0;
    repeat (LAT) @(posedge clk);
    #1;
    chk("stall x", real'(x_out), 10000.0, 3.0);
    chk("stall y", real'(y_out), 0.0, 3.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
