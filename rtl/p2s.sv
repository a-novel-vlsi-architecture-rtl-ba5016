// p2s: parallel-to-serial converter at the receiver output.
//
// Loads a PW-bit word when in_valid and in_ready are both high and shifts it out
// one bit per clock, bit 0 first, with ser_valid high for each bit. ser_first
// marks the first bit of a word loaded with in_first (start of an OFDM symbol),
// ser_last the last bit of a word loaded with in_last. in_ready is high when the
// register is empty or holds its last bit, so back-to-back words leave no gap.
// The P/S stage is the design's; the word width, bit order and handshake are this
// design's choices.
module p2s #(
  parameter int unsigned PW = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [PW-1:0] in_bits,
  input  logic          in_first,
  input  logic          in_last,
  output logic          in_ready,
  output logic          ser_valid,
  output logic          ser_bit,
  output logic          ser_first,
  output logic          ser_last
);
  logic [PW-1:0]          sreg;
  logic [$clog2(PW+1)-1:0] cnt;   // bits left, including the one on ser_bit
  logic                   first_q, last_q;

  assign in_ready  = (cnt <= 1);
  assign ser_valid = (cnt != 0);
  assign ser_bit   = sreg[0];
  assign ser_first = first_q && (cnt == ($clog2(PW+1))'(PW));
  assign ser_last  = last_q && (cnt == 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg    <= '0;
      cnt     <= '0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else if (in_valid && in_ready) begin
      sreg    <= in_bits;
      cnt     <= ($clog2(PW+1))'(PW);
      first_q <= in_first;
      last_q  <= in_last;
    end else if (cnt != 0) begin
      sreg <= sreg >> 1;
      cnt  <= cnt - 1'b1;
    end
  end

  // a word offered while the register is busy would be lost
  always_ff @(posedge clk) begin
    a_no_overrun: assert (!in_valid || in_ready) else $error("p2s: word offered while busy");
  end
endmodule
