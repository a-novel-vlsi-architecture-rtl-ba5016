// tb_decoder: checks the QPSK hard-decision demapper.
//
// Random subcarrier values (and values on the axes) are presented one per clock
// with random valid, first and last flags; one clock later bits[0] must be 1 for
// a negative real part, bits[1] 1 for a negative imaginary part, and the flags
// and valid must follow.
module tb_decoder;
  import ofdm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  cplx_t in_data = '0;
  logic out_valid, out_first, out_last;
  logic [1:0] out_bits;
  int checks = 0, failures = 0;

  decoder dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int re, im;
      re = (t == 0) ? 0 : ((t == 1) ? -1 : int'($urandom_range(0, 65535)) - 32768);
      im = (t == 0) ? -1 : ((t == 1) ? 0 : int'($urandom_range(0, 65535)) - 32768);
      in_valid = (t < 2) ? 1'b1 : 1'($urandom);
      in_first = 1'($urandom);
      in_last = 1'($urandom);
      in_data.re = 16'(re);
      in_data.im = 16'(im);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != in_valid) begin failures++; $display("FAIL valid t=%0d", t); end
      if (in_valid) begin
        checks++;
        if (out_bits != {im < 0, re < 0} || out_first != in_first || out_last != in_last) begin
          failures++;
          $display("FAIL t=%0d (%0d,%0d): bits %b", t, re, im, out_bits);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
