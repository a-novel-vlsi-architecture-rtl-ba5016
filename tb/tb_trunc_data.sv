// tb_trunc_data: checks the truncation of cosine/sine into samples.
//
// For random and corner Q1.15 inputs, with the default shift of 1 and with a
// shift of 3, each part must equal floor(value / 2**SHIFT), cosine to the real
// part and sine to the imaginary part.
module tb_trunc_data;
  import ofdm_pkg::*;
  logic signed [15:0] cos_in, sin_in;
  cplx_t s1, s3;
  int checks = 0, failures = 0;

  trunc_data dut1 (.cos_in(cos_in), .sin_in(sin_in), .sample(s1));
  trunc_data #(.IN_W(16), .SHIFT(3)) dut3 (.cos_in(cos_in), .sin_in(sin_in), .sample(s3));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv(input int v, input int sh);
    int p;
    p = 1 << sh;
    return (v >= 0) ? v / p : -((-v + p - 1) / p);
  endfunction

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      case (t)
        0: begin cos_in = 16'sh7FFF; sin_in = 16'sh8000; end
        1: begin cos_in = -16'sd1;   sin_in = 16'sd1;    end
        default: begin cos_in = 16'($urandom); sin_in = 16'($urandom); end
      endcase
      #1;
      chk("re shift 1", int'(s1.re), fdiv(int'(cos_in), 1));
      chk("im shift 1", int'(s1.im), fdiv(int'(sin_in), 1));
      chk("re shift 3", int'(s3.re), fdiv(int'(cos_in), 3));
      chk("im shift 3", int'(s3.im), fdiv(int'(sin_in), 3));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
