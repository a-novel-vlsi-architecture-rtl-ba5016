// tb_fft_processor: self-checking test of the CORDIC radix-4 butterfly unit.
//
// One butterfly per clock with random points (|re|,|im| < 16000), random pass s
// (0..2) and random j. Expected: y_m = (sum_n a_n (-j)**(m n)) / 4 multiplied by
// exp(-j*2*pi*m*j*4**s/64), in double precision, within 6 LSB. The result must
// come out exactly ITER + 3 = 19 clocks later with its tag; out_valid must be low
// for clocks with no butterfly (gaps are inserted at random).
module tb_fft_processor;
  import ofdm_pkg::*;
  localparam int LAT = CORDIC_IT + 3;
  localparam int NB = 600;
  localparam int TAG_W = RADIX * IDX_W;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [1:0] in_stage;
  idx_t in_j;
  cplx_t in_a [RADIX];
  logic [TAG_W-1:0] in_tag;
  logic out_valid;
  cplx_t out_y [RADIX];
  logic [TAG_W-1:0] out_tag;
  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;

  fft_processor dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus record, indexed by issue cycle
  bit  v_at  [NB + LAT + 2];
  int  ar [NB][RADIX], ai [NB][RADIX], st [NB], jj [NB];

  task automatic chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got %f exp %f", what, got, exp);
    end
  endtask

  initial begin
    for (int c = 0; c < NB; c++) begin
      v_at[c] = ($urandom_range(0, 4) != 0);
      st[c] = $urandom_range(0, 2);
      jj[c] = $urandom_range(0, (1 << (2 * (2 - st[c]))) - 1);  // j < span
      for (int m = 0; m < RADIX; m++) begin
        ar[c][m] = $urandom_range(0, 32000) - 16000;
        ai[c][m] = $urandom_range(0, 32000) - 16000;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NB + LAT + 2; c++) begin
      if (c < NB) begin
        in_valid = v_at[c];
        in_stage = 2'(st[c]);
        in_j = idx_t'(jj[c]);
        in_tag = TAG_W'(c);
        for (int m = 0; m < RADIX; m++) begin
          in_a[m].re = 16'(ar[c][m]);
          in_a[m].im = 16'(ai[c][m]);
        end
      end else in_valid = 0;
      @(posedge clk);
      #1;
      // the butterfly issued at cycle c - LAT + 1 is at the outputs now
      if (c + 1 >= LAT) begin
        int b;
        b = c + 1 - LAT;
        checks++;
        if (out_valid != (b < NB && v_at[b])) begin
          failures++;
          $display("FAIL valid at issue %0d: %0d", b, out_valid);
        end
        if (b < NB && v_at[b]) begin
          checks++;
          if (out_tag != TAG_W'(b)) begin failures++; $display("FAIL tag %0d", b); end
          for (int m = 0; m < RADIX; m++) begin
            real sr, si, th, er, ei;
            sr = 0; si = 0;
            for (int n = 0; n < RADIX; n++) begin
              th = -pi / 2.0 * real'(m * n);
              sr += real'(ar[b][n]) * $cos(th) - real'(ai[b][n]) * $sin(th);
              si += real'(ar[b][n]) * $sin(th) + real'(ai[b][n]) * $cos(th);
            end
            sr /= 4.0; si /= 4.0;
            th = -2.0 * pi * real'(m * jj[b] * (1 << (2 * st[b]))) / 64.0;
            er = sr * $cos(th) - si * $sin(th);
            ei = sr * $sin(th) + si * $cos(th);
            chk($sformatf("bf %0d y%0d.re", b, m), real'(out_y[m].re), er, 6.0);
            chk($sformatf("bf %0d y%0d.im", b, m), real'(out_y[m].im), ei, 6.0);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
