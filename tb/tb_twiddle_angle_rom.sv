// tb_twiddle_angle_rom: checks every entry of the twiddle angle ROM.
//
// For each exponent e the angle, one clock after e is presented, must be the
// angle of exp(-j*2*pi*e/64), worked out here by taking atan2 of that twiddle in
// double precision and converting it to 16-bit angle units (exact for N = 64).
// A read with ena low must leave the output unchanged.
module tb_twiddle_angle_rom;
  localparam int N = 64, AW = 16;
  logic clk = 0, ena = 1;
  logic [5:0] e;
  logic [AW-1:0] angle;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;

  twiddle_angle_rom #(.N(N), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < N; k++) begin
      real th;
      int expv;
      @(negedge clk);
      e = 6'(k);
      @(posedge clk);
      #1;
      th = $atan2(-$sin(2.0 * pi * k / N), $cos(2.0 * pi * k / N));  // (-pi, pi]
      if (th < 0) th += 2.0 * pi;
      expv = int'($floor(th / (2.0 * pi) * 65536.0 + 0.5)) % 65536;
      checks++;
      if (int'(angle) != expv) begin
        failures++;
        $display("FAIL e=%0d got %h exp %h", k, angle, expv);
      end
    end
    @(negedge clk);
    e = 6'd16; ena = 0;
    @(posedge clk);
    #1;
    checks++;
    if (angle != 16'h0400) begin   // still entry 63
      failures++;
      $display("FAIL ena low: %h", angle);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
