// tb_r4_butterfly: self-checking test of the radix-4 butterfly adds.
//
// Random points, including full-scale corner values; each output must equal the
// radix-4 DFT of the four inputs, y_m = sum_n a_n * (-j)**(m*n), divided by 4 and
// rounded half up, one clock after the inputs. The reference is computed here in
// integer arithmetic from the DFT definition, not from the block's equations.
module tb_r4_butterfly;
  import ofdm_pkg::*;
  logic clk = 0, ena = 1;
  cplx_t a [RADIX], y [RADIX];
  int checks = 0, failures = 0;

  r4_butterfly dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floordiv4(input int v);
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int er [RADIX], ei [RADIX];
      @(negedge clk);
      for (int n = 0; n < RADIX; n++) begin
        if (t < 4) begin
          a[n].re = (t[0]) ? 16'sh8000 : 16'sh7FFF;
          a[n].im = (t[1]) ? 16'sh8000 : 16'sh7FFF;
        end else begin
          a[n].re = 16'($urandom);
          a[n].im = 16'($urandom);
        end
      end
      for (int m = 0; m < RADIX; m++) begin
        int sr, si;
        sr = 0; si = 0;
        for (int n = 0; n < RADIX; n++) begin
          // (-j)**p for p = m*n mod 4: 1, -j, -1, j
          case ((m * n) % 4)
            0: begin sr += a[n].re; si += a[n].im; end
            1: begin sr += a[n].im; si -= a[n].re; end
            2: begin sr -= a[n].re; si -= a[n].im; end
            default: begin sr -= a[n].im; si += a[n].re; end
          endcase
        end
        er[m] = floordiv4(sr + 2);
        ei[m] = floordiv4(si + 2);
      end
      @(posedge clk);
      #1;
      for (int m = 0; m < RADIX; m++) begin
        checks += 2;
        if (int'(y[m].re) != er[m] || int'(y[m].im) != ei[m]) begin
          failures++;
          $display("FAIL t=%0d y%0d got (%0d,%0d) exp (%0d,%0d)", t, m, y[m].re, y[m].im, er[m], ei[m]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
