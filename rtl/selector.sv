// selector: picks the source of the samples written into the FFT memory.
//
// With src_test low the receiver input (ext_valid, ext_data) is passed on; with
// src_test high the truncated output of the sine/cosine generator (gen_valid,
// gen_data) is passed on and the receiver input is ignored. The selector is the
// design's; which two sources it chooses between is read from its place in the
// receiver, between the input and the generator's truncation. Combinational.
module selector
  import ofdm_pkg::*;
(
  input  logic  src_test,
  input  logic  ext_valid,
  input  cplx_t ext_data,
  input  logic  gen_valid,
  input  cplx_t gen_data,
  output logic  out_valid,
  output cplx_t out_data
);
  always_comb begin
    if (src_test) begin
      out_valid = gen_valid;
      out_data  = gen_data;
    end else begin
      out_valid = ext_valid;
      out_data  = ext_data;
    end
  end
endmodule
