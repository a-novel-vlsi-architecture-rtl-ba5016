// decoder: hard-decision QPSK demapper of the FFT output.
//
// Each subcarrier value is mapped back to two bits by the sign of its parts:
// bits[0] = 1 when the real part is negative, bits[1] = 1 when the imaginary part
// is negative (Gray-coded QPSK, constellation points (+-1 +-j)/sqrt(2)). The
// design names a decoder after the FFT; the modulation and mapping are this
// design's choice. Timing: one register, outputs one clock after the input;
// out_first/out_last mark the first and last subcarrier of a symbol.
module decoder
  import ofdm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  cplx_t      in_data,
  input  logic       in_first,
  input  logic       in_last,
  output logic       out_valid,
  output logic [1:0] out_bits,
  output logic       out_first,
  output logic       out_last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bits  <= '0;
      out_first <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_bits  <= {in_data.im[DATA_W-1], in_data.re[DATA_W-1]};
        out_first <= in_first;
        out_last  <= in_last;
      end
    end
  end
endmodule
