// twiddle_angle_rom: ROM of twiddle-factor angles for an N-point FFT.
//
// The CORDIC twiddle multiplier needs only the angle of W_N^e = exp(-j*2*pi*e/N),
// so this ROM holds angles rather than cosine/sine pairs: entry e is
// (-e * 2**AW / N) mod 2**AW, in the angle units of the CORDIC (2**AW per turn).
// Keeping angles in place of twiddle values is the design's idea; the contents
// are filled from that formula at elaboration. Timing: synchronous read, the
// angle of exponent e appears one enabled clock after e is presented.
module twiddle_angle_rom #(
  parameter int unsigned N  = ofdm_pkg::FFT_N,
  parameter int unsigned AW = ofdm_pkg::ANGLE_W
) (
  input  logic                 clk,
  input  logic                 ena,
  input  logic [$clog2(N)-1:0] e,
  output logic [AW-1:0]        angle
);
  logic [AW-1:0] rom [N];

  for (genvar k = 0; k < N; k++) begin : g_rom
    // -k/N of a turn; N is a power of two, so 2**AW / N is exact
    assign rom[k] = AW'(((N - k) % N) * ((1 << AW) / N));
  end

  always_ff @(posedge clk) begin
    if (ena) angle <= rom[e];
  end

endmodule
