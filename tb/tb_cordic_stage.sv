// tb_cordic_stage: self-checking test of one CORDIC iteration.
//
// Random x, y, z and every iteration index 0..15. The expected outputs are worked
// out here with integer floor division and a double-precision arctangent:
// d = +1 for z >= 0, else -1; x' = x - floor(d*y / 2**i); y' = y + floor(d*x / 2**i)
// written as y - floor(-d*x / 2**i); z' = z - d*round(atan(2**-i) * 2**16 / (2*pi));
// i' = i + 1. The block is combinational, so values are checked after a delay.
module tb_cordic_stage;
  localparam int W = 20, AW = 16, IW = 5;
  logic signed [W-1:0] x_i, y_i, x_o, y_o;
  logic signed [AW-1:0] z_i, z_o;
  logic [IW-1:0] i_i, i_o;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;

  cordic_stage #(.W(W), .AW(AW), .IDX_W(IW)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint floordiv(input longint a, input int sh);
    longint p;
    p = longint'(1) << sh;
    if (a >= 0) return a / p;
    return -((-a + p - 1) / p);
  endfunction

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d (i=%0d)", what, got, exp, i_i);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      longint xe, ye, ze, lut;
      int d;
      x_i = W'($urandom_range(0, (1 << W) - 1)) >>> 2;  // keep away from overflow
      y_i = W'($urandom_range(0, (1 << W) - 1)) >>> 2;
      z_i = AW'($urandom);
      i_i = IW'(n % 16);
      #1;
      d = (z_i >= 0) ? 1 : -1;
      lut = longint'($floor($atan(1.0 / real'(longint'(1) << i_i)) / (2.0 * pi) * 65536.0 + 0.5));
      xe = longint'(x_i) - floordiv(d * longint'(y_i), int'(i_i));
      ye = longint'(y_i) - floordiv(-d * longint'(x_i), int'(i_i));
      ze = longint'(z_i) - d * lut;
      chk("x", longint'(x_o), xe);
      chk("y", longint'(y_o), ye);
      ze = ze & ((longint'(1) << AW) - 1);
      if (ze >= (longint'(1) << (AW - 1))) ze = ze - (longint'(1) << AW);
      chk("z", longint'(z_o), ze);
      chk("i", longint'(i_o), longint'(i_i) + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
