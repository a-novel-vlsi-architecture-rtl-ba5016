// ofdm_receiver: 64-point OFDM receiver built around a CORDIC radix-4 FFT.
//
// One OFDM symbol is N = 64 complex time-domain samples. The receiver
//  1. loads a symbol into one of two four-bank in-place memories, through a
//     selector that takes either the receiver input or an on-chip test tone made
//     by the CORDIC sine/cosine generator and truncated to sample width;
//  2. runs the three radix-4 passes with one CORDIC butterfly unit, reading and
//     writing four points per clock, twiddles given only as angles;
//  3. reads the 64 subcarriers out in natural order, decides two QPSK bits per
//     subcarrier and sends them out serially.
// Steps 2 and 3 work on one memory while step 1 fills the other with the next
// symbol; the memories swap roles when both sides are done.
// The control unit sequences the phases; the address generator and
// synchronization unit makes every memory address and aligns data with them.
// The blocks and how they connect follow the receiver's block diagram; how each
// works inside beyond that (see each module) is partly this design's choice.
//
// Interface
//   in_valid/in_ready/in_sample  time-domain input, Q1.15 complex; a sample moves
//                                when both valid and ready are high. in_ready is
//                                high only while a symbol is loaded from the input.
//   test_mode, tone_bin          sampled when a load starts: with test_mode high the
//                                next symbol is the tone exp(j*2*pi*tone_bin*n/64)/2.
//   fft_valid/fft_k/fft_data     the FFT output X[k]/64, k = 0..63 in order.
//   ser_valid/ser_bit/ser_first/ser_last  the decided bits, two per subcarrier
//                                (real sign bit first), first/last bit of a symbol.
//   ld_state, phase              status: load side and FFT side sequences.
//   drain_stall, swap_wait       status: waiting between FFT passes; a full memory
//                                waiting for the FFT side.
//   symbols                      status: symbols completed.
// Timing at N = 64: loading takes 64 accepted samples (64 + SC_LAT clocks for a
// test tone); each FFT pass issues 16 butterflies on 16 clocks and then waits for
// the 19-clock butterfly pipeline to drain (111 clocks per FFT); the output takes
// 4 clocks per subcarrier (one point in flight between memory and the P/S).
// Loading overlaps the FFT and the output, so back to back symbols are limited by
// FFT plus output: 369 clocks per symbol.
module ofdm_receiver
  import ofdm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   test_mode,
  input  idx_t   tone_bin,
  input  logic   in_valid,
  output logic   in_ready,
  input  cplx_t  in_sample,
  output logic   fft_valid,
  output idx_t   fft_k,
  output cplx_t  fft_data,
  output logic   ser_valid,
  output logic   ser_bit,
  output logic   ser_first,
  output logic   ser_last,
  output ld_state_e ld_state,
  output phase_e phase,
  output logic   drain_stall,
  output logic   swap_wait,
  output logic   [15:0] symbols
);
  localparam int unsigned TAG_W = RADIX * IDX_W;

  // control and generator
  logic                 src_test, ext_ready, sc_ena, gen_valid;
  logic [ANGLE_W-1:0]   sc_angle;
  logic signed [15:0]   sc_cos, sc_sin;
  cplx_t                gen_sample;
  logic                 ld_en, ld_full, wsel, fft_done, out_done;

  // load path
  logic  ld_valid;
  cplx_t ld_data;

  // memory
  logic             mem_ld_we;
  idx_t             mem_ld_idx;
  cplx_t            mem_ld_data;
  logic             mem_rd_en;
  idx_t             mem_rd_idx  [RADIX];
  cplx_t            mem_rd_data [RADIX];
  logic [RADIX-1:0] mem_wr_en;
  idx_t             mem_wr_idx  [RADIX];
  cplx_t            mem_wr_data [RADIX];

  // FFT processor
  logic                      bf_valid, fp_valid;
  logic [$clog2(STAGES)-1:0] bf_stage;
  idx_t                      bf_j;
  cplx_t                     bf_data [RADIX];
  cplx_t                     fp_data [RADIX];
  logic [TAG_W-1:0]          bf_tag, fp_tag;

  // output path
  logic       out_ready, out_ack, out_first, out_last;
  logic       dec_valid, dec_first, dec_last;
  logic [1:0] dec_bits;

  control_unit u_ctrl (
    .clk, .rst_n, .test_mode, .tone_bin,
    .ld_full, .fft_done, .out_done,
    .ld_state, .ld_en, .wsel, .phase, .src_test, .ext_ready, .sc_ena, .sc_angle, .gen_valid, .symbols
  );

  sincos_gen u_sincos (
    .clk, .ena(sc_ena), .Ain(sc_angle), .cos(sc_cos), .sin(sc_sin)
  );

  trunc_data u_trunc (.cos_in(sc_cos), .sin_in(sc_sin), .sample(gen_sample));

  assign in_ready = ext_ready;

  selector u_sel (
    .src_test,
    .ext_valid(in_valid && ext_ready), .ext_data(in_sample),
    .gen_valid, .gen_data(gen_sample),
    .out_valid(ld_valid), .out_data(ld_data)
  );

  fft_pingpong_mem u_mem (
    .clk, .wsel,
    .ld_we(mem_ld_we), .ld_idx(mem_ld_idx), .ld_data(mem_ld_data),
    .rd_en(mem_rd_en), .rd_idx(mem_rd_idx), .rd_data(mem_rd_data),
    .wr_en(mem_wr_en), .wr_idx(mem_wr_idx), .wr_data(mem_wr_data)
  );

  addr_gen u_agen (
    .clk, .rst_n, .phase,
    .ld_en, .ld_valid, .ld_data, .ld_full,
    .mem_ld_we, .mem_ld_idx, .mem_ld_data,
    .mem_rd_en, .mem_rd_idx, .mem_rd_data, .mem_wr_en, .mem_wr_idx, .mem_wr_data,
    .bf_valid, .bf_stage, .bf_j, .bf_data, .bf_tag,
    .fp_valid, .fp_data, .fp_tag, .fft_done, .drain_stall,
    .out_ready, .out_ack,
    .out_valid(fft_valid), .out_data(fft_data), .out_k(fft_k),
    .out_first, .out_last, .out_done
  );

  fft_processor u_fft (
    .clk, .rst_n,
    .in_valid(bf_valid), .in_stage(bf_stage), .in_j(bf_j), .in_a(bf_data), .in_tag(bf_tag),
    .out_valid(fp_valid), .out_y(fp_data), .out_tag(fp_tag)
  );

  decoder u_dec (
    .clk, .rst_n,
    .in_valid(fft_valid), .in_data(fft_data), .in_first(out_first), .in_last(out_last),
    .out_valid(dec_valid), .out_bits(dec_bits), .out_first(dec_first), .out_last(dec_last)
  );

  p2s #(.PW(2)) u_ps (
    .clk, .rst_n,
    .in_valid(dec_valid), .in_bits(dec_bits), .in_first(dec_first), .in_last(dec_last),
    .in_ready(out_ready),
    .ser_valid, .ser_bit, .ser_first, .ser_last
  );

  assign swap_wait = (ld_state == LD_FULL) && (phase != PH_IDLE);
  assign out_ack = dec_valid;   // the P/S takes every decided word

endmodule
