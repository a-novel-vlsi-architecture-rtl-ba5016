// tb_selector: checks the memory input selector.
//
// For random valid bits and samples on both sources and both settings of
// src_test, the output must be the generator's valid and sample when src_test
// is high and the input's when it is low.
module tb_selector;
  import ofdm_pkg::*;
  logic src_test, ext_valid, gen_valid, out_valid;
  cplx_t ext_data, gen_data, out_data;
  int checks = 0, failures = 0;

  selector dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      src_test = t[0];
      ext_valid = 1'($urandom);
      gen_valid = 1'($urandom);
      ext_data = cplx_t'($urandom);
      gen_data = cplx_t'($urandom);
      #1;
      checks += 2;
      if (out_valid != (src_test ? gen_valid : ext_valid)) begin
        failures++; $display("FAIL valid t=%0d", t);
      end
      if (out_data != (src_test ? gen_data : ext_data)) begin
        failures++; $display("FAIL data t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
