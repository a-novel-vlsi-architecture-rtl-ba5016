// ofdm_pkg: types, constants and small functions shared by the OFDM receiver.
//
// The receiver works on complex samples in two's-complement fixed point. A full
// turn of phase is 2**ANGLE_W angle units, so a 16-bit angle wraps at 360 degrees
// and 0x2000 is 45 degrees. The arctangent table below is given in 32-bit angle
// units (2**32 per turn), entry i = round(atan(2**-i) / (2*pi) * 2**32), and is
// shifted down to the angle width in use. CORDIC_INV_GAIN_Q32 is 1/K in Q0.32,
// where K = prod sqrt(1 + 2**-2i) is the gain of a converged CORDIC (about 1.6468).
// The 64-point, radix-4, 16-bit figures are the ones the receiver is built for;
// the data width and the iteration count are this design's own choice.
package ofdm_pkg;

  localparam int unsigned FFT_N     = 64;  // points per OFDM symbol (64-point radix-4 FFT)
  localparam int unsigned RADIX     = 4;
  localparam int unsigned DATA_W    = 16;  // sample width, real and imaginary part each
  localparam int unsigned ANGLE_W   = 16;  // angle width, Ain(15:0) of the sin/cos generator
  localparam int unsigned CORDIC_IT = 16;  // CORDIC iterations (basic blocks in cascade)

  localparam int unsigned IDX_W     = $clog2(FFT_N);     // index of a point
  localparam int unsigned STAGES    = IDX_W / 2;         // radix-4 passes (log4 N)
  localparam int unsigned BF_PER_ST = FFT_N / RADIX;     // butterflies per pass
  localparam int unsigned BANK_AW   = IDX_W - 2;         // address inside a memory bank

  localparam logic [31:0] CORDIC_INV_GAIN_Q32 = 32'h9B74_EDA8;  // 0.6072529350

  // Complex sample, Q1.(DATA_W-1) real and imaginary parts.
  typedef struct packed {
    logic signed [DATA_W-1:0] re;
    logic signed [DATA_W-1:0] im;
  } cplx_t;

  typedef logic [IDX_W-1:0] idx_t;

  // Phases of the FFT side of the receiver (transform, then read-out).
  typedef enum logic [1:0] {
    PH_IDLE = 2'd0,  // waiting for a loaded symbol
    PH_FFT  = 2'd1,  // running the in-place radix-4 passes
    PH_OUT  = 2'd2   // reading the spectrum out in natural order
  } phase_e;

  // States of the load side (filling one of the two memory sets).
  typedef enum logic [1:0] {
    LD_START = 2'd0,  // one clock: sample the source of the next symbol
    LD_FILL  = 2'd1,  // writing N time-domain samples
    LD_FULL  = 2'd2   // set full, waiting for the FFT side to take it
  } ld_state_e;

  // atan(2**-i) in 32-bit angle units.
  function automatic logic [31:0] atan_q32(input int unsigned i);
    case (i)
      0:  return 32'd536870912;
      1:  return 32'd316933406;
      2:  return 32'd167458907;
      3:  return 32'd85004756;
      4:  return 32'd42667331;
      5:  return 32'd21354465;
      6:  return 32'd10679838;
      7:  return 32'd5340245;
      8:  return 32'd2670163;
      9:  return 32'd1335087;
      10: return 32'd667544;
      11: return 32'd333772;
      12: return 32'd166886;
      13: return 32'd83443;
      14: return 32'd41722;
      15: return 32'd20861;
      16: return 32'd10430;
      17: return 32'd5215;
      18: return 32'd2608;
      19: return 32'd1304;
      20: return 32'd652;
      21: return 32'd326;
      22: return 32'd163;
      23: return 32'd81;
      24: return 32'd41;
      25: return 32'd20;
      26: return 32'd10;
      27: return 32'd5;
      28: return 32'd3;
      29: return 32'd1;
      30: return 32'd1;
      default: return 32'd0;
    endcase
  endfunction

  // Memory bank of point idx: sum of its base-4 digits modulo 4. The four points
  // of any radix-4 butterfly differ in exactly one digit, so they fall into four
  // different banks. The word inside the bank is idx >> 2.
  function automatic logic [1:0] bank_of(input idx_t idx);
    logic [1:0] b;
    b = '0;
    for (int unsigned d = 0; d < STAGES; d++) b = b + idx[2*d +: 2];
    return b;
  endfunction

  // Base-4 digit reversal of an index of DIGITS digits (radix-4 output order).
  function automatic int unsigned digit_rev4(input int unsigned idx, input int unsigned digits);
    int unsigned r;
    r = 0;
    for (int unsigned d = 0; d < digits; d++) begin
      r = (r << 2) | ((idx >> (2 * d)) & 3);
    end
    return r;
  endfunction

endpackage
