// tb_ofdm_receiver: end-to-end test of the OFDM receiver at its default size.
//
// Runs six symbols back to back, switching the data source between them:
//   1. on-chip test tone at bin 5    2. QPSK OFDM symbol from the input
//   3. test tone at bin 63           4. QPSK symbol, input with gaps
//   5. QPSK symbol                   6. test tone at bin 0
// A QPSK symbol is built here: random bit pairs per subcarrier are mapped to
// (+-1 +-j), taken through an inverse DFT in double precision, scaled by 1/48
// and rounded to Q1.15. For every symbol the 64 FFT outputs are compared with a
// double-precision DFT of the samples actually loaded, divided by 64 (tolerance
// 48 LSB); for a tone the reference is the ideal tone of amplitude 1/2. For QPSK
// symbols all 128 serial bits must equal the bits sent; for tones the two bits of
// the tone bin are checked. Also checked: 48 butterflies per symbol, which is
// (N log4 N)/4 for N = 64, the length of the FFT phase (three passes of 16 issue
// clocks plus the drain of the 19-clock butterfly pipeline), and that every
// mechanism happened: both sources, a source switch, input gaps, a stall between
// passes, a serial-line backpressure wait, loading of one symbol while the
// previous one is in the FFT, a full memory waiting for the FFT side, and the
// FFT side waiting for a load.
module tb_ofdm_receiver;
  import ofdm_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   test_mode = 0;
  idx_t   tone_bin = '0;
  logic   in_valid = 0, in_ready;
  cplx_t  in_sample = '0;
  logic   fft_valid;
  idx_t   fft_k;
  cplx_t  fft_data;
  logic   ser_valid, ser_bit, ser_first, ser_last;
  ld_state_e ld_state;
  phase_e phase;
  logic   drain_stall, swap_wait;
  logic [15:0] symbols;

  ofdm_receiver dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real pi = 3.14159265358979323846;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input longint got, input longint exp, input longint tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------- symbol plan ----------
  localparam int NSYM = 6;
  bit  sym_test [NSYM] = '{1, 0, 1, 0, 0, 1};
  int  sym_tone [NSYM] = '{5, 0, 63, 0, 0, 0};
  bit  sym_gaps [NSYM] = '{0, 0, 0, 1, 0, 0};

  // data of the QPSK symbol being sent
  bit [1:0] tx_bits [NSYM][FFT_N];
  int       tx_re   [NSYM][FFT_N];
  int       tx_im   [NSYM][FFT_N];

  function automatic int q15(input real v);
    int r;
    r = int'($floor(v * 32768.0 + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  // ---------- mechanism counters ----------
  int n_test_sym = 0, n_ext_sym = 0, n_switch = 0, n_in_gap = 0;
  int n_drain = 0, n_backpressure = 0;
  int n_overlap = 0, n_swap_wait = 0, n_fft_wait = 0;
  int bf_count [NSYM+1], fft_cycles [NSYM+1];
  int out_cycles = 0;

  // monitors sample just after the falling edge, when the inputs of the coming
  // rising edge are settled
  always @(negedge clk) if (rst_n) begin
    #1;
    if (in_ready && !in_valid && ld_state == LD_FILL) n_in_gap++;
    if (drain_stall) n_drain++;
    if (phase == PH_OUT && !dut.out_ready) n_backpressure++;
    if (ld_state == LD_FILL && phase != PH_IDLE) n_overlap++;
    if (swap_wait) n_swap_wait++;
    if (ld_state == LD_FILL && phase == PH_IDLE && symbols != 0) n_fft_wait++;
    if (int'(symbols) <= NSYM) begin
      if (dut.bf_valid) bf_count[int'(symbols)]++;
      if (phase == PH_FFT) fft_cycles[int'(symbols)]++;
    end
    if (phase == PH_OUT) out_cycles++;
  end

  // ---------- input driver ----------
  initial begin : drive
    for (int s = 0; s < NSYM; s++) begin
      // build the QPSK symbol (used when the source is the input)
      for (int k = 0; k < FFT_N; k++) tx_bits[s][k] = 2'($urandom);
      for (int n = 0; n < FFT_N; n++) begin
        real xr, xi;
        xr = 0.0; xi = 0.0;
        for (int k = 0; k < FFT_N; k++) begin
          real sr, si, th;
          sr = tx_bits[s][k][0] ? -1.0 : 1.0;
          si = tx_bits[s][k][1] ? -1.0 : 1.0;
          th = 2.0 * pi * real'(k * n) / real'(FFT_N);
          xr += sr * $cos(th) - si * $sin(th);
          xi += sr * $sin(th) + si * $cos(th);
        end
        tx_re[s][n] = q15(xr / 48.0);
        tx_im[s][n] = q15(xi / 48.0);
      end
    end
    @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NSYM; s++) begin
      // the source is sampled when the load starts
      test_mode = sym_test[s];
      tone_bin  = idx_t'(sym_tone[s]);
      while (ld_state != LD_FILL) @(negedge clk);
      // a long pause before symbol 5, so the FFT side has to wait for the load
      if (s == 4) repeat (500) @(negedge clk);
      if (!sym_test[s]) begin
        for (int n = 0; n < FFT_N; n++) begin
          if (sym_gaps[s]) begin
            in_valid = 0;
            repeat ($urandom_range(0, 3)) @(negedge clk);
          end
          in_valid  = 1;
          in_sample.re = 16'(tx_re[s][n]);
          in_sample.im = 16'(tx_im[s][n]);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          @(negedge clk);
        end
        in_valid = 0;
      end
      while (ld_state == LD_FILL) @(negedge clk);
    end
  end

  // ---------- capture of the loaded samples (reference input) ----------
  int ld_re [NSYM][FFT_N], ld_im [NSYM][FFT_N];
  bit src_of_sym [NSYM];
  int ld_n = 0, ld_sym = 0;
  always @(negedge clk) if (rst_n) begin
    #1;
    if (dut.mem_ld_we && ld_sym < NSYM) begin
      ld_re[ld_sym][ld_n] = int'(dut.mem_ld_data.re);
      ld_im[ld_sym][ld_n] = int'(dut.mem_ld_data.im);
      src_of_sym[ld_sym]  = dut.src_test;
      ld_n++;
      if (ld_n == FFT_N) begin
        ld_n = 0;
        ld_sym++;
      end
    end
  end

  // ---------- output checks ----------
  int got_re [FFT_N], got_im [FFT_N];
  bit [1:0] got_bits [FFT_N];
  int nbits = 0;
  bit prev_src;
  int sym = 0;

  always @(negedge clk) if (rst_n) begin
    #1;
    if (fft_valid) begin
      got_re[fft_k] = int'(fft_data.re);
      got_im[fft_k] = int'(fft_data.im);
    end
    if (ser_valid) begin
      if (ser_first) nbits = 0;
      got_bits[nbits / 2][nbits % 2] = ser_bit;
      nbits++;
    end
  end

  initial begin : check_results
    int exp_fft_cycles;
    exp_fft_cycles = STAGES * (BF_PER_ST + 1 + (CORDIC_IT + 3) + 1) + 1;
    @(posedge rst_n);
    for (int s = 0; s < NSYM; s++) begin
      while (symbols != 16'(s + 1)) @(posedge clk);
      repeat (3) @(posedge clk);
      if (src_of_sym[s]) n_test_sym++; else n_ext_sym++;
      if (s > 0 && src_of_sym[s] != prev_src) n_switch++;
      prev_src = src_of_sym[s];
      chk($sformatf("sym %0d source", s), longint'(src_of_sym[s]), longint'(sym_test[s]), 0);
      chk($sformatf("sym %0d butterflies", s), bf_count[s], FFT_N * STAGES / 4, 0);
      chk($sformatf("sym %0d FFT clocks", s), fft_cycles[s], exp_fft_cycles, 0);
      chk($sformatf("sym %0d serial bits", s), nbits, 2 * FFT_N, 0);
      for (int k = 0; k < FFT_N; k++) begin
        real er, ei;
        if (sym_test[s]) begin
          er = (k == sym_tone[s]) ? 16384.0 : 0.0;
          ei = 0.0;
        end else begin
          er = 0.0; ei = 0.0;
          for (int n = 0; n < FFT_N; n++) begin
            real th;
            th = -2.0 * pi * real'(k * n) / real'(FFT_N);
            er += real'(ld_re[s][n]) * $cos(th) - real'(ld_im[s][n]) * $sin(th);
            ei += real'(ld_re[s][n]) * $sin(th) + real'(ld_im[s][n]) * $cos(th);
          end
          er /= real'(FFT_N);
          ei /= real'(FFT_N);
        end
        chk($sformatf("sym %0d X[%0d].re", s, k), got_re[k], longint'($rtoi(er + (er < 0 ? -0.5 : 0.5))), 48);
        chk($sformatf("sym %0d X[%0d].im", s, k), got_im[k], longint'($rtoi(ei + (ei < 0 ? -0.5 : 0.5))), 48);
        if (!sym_test[s])
          chk($sformatf("sym %0d bits[%0d]", s, k), got_bits[k], tx_bits[s][k], 0);
        else if (k == sym_tone[s])
          chk($sformatf("sym %0d tone bits", s), got_bits[k], 0, 0);
      end
      if (!sym_test[s]) begin
        // the samples loaded are the ones sent
        for (int n = 0; n < FFT_N; n++) begin
          chk("loaded re", ld_re[s][n], tx_re[s][n], 0);
          chk("loaded im", ld_im[s][n], tx_im[s][n], 0);
        end
      end
    end
    $display("clocks in the output phase per symbol: %0d", out_cycles / NSYM);
    $display("mechanisms: test symbols %0d, input symbols %0d, source switches %0d, input gaps %0d, drain stall clocks %0d, backpressure clocks %0d",
             n_test_sym, n_ext_sym, n_switch, n_in_gap, n_drain, n_backpressure);
    $display("mechanisms: load during FFT/output clocks %0d, full memory waiting clocks %0d, FFT side waiting for a load clocks %0d",
             n_overlap, n_swap_wait, n_fft_wait);
    chk("test-tone symbols happened", n_test_sym > 0, 1, 0);
    chk("input symbols happened", n_ext_sym > 0, 1, 0);
    chk("source switch happened", n_switch > 0, 1, 0);
    chk("input gaps happened", n_in_gap > 0, 1, 0);
    chk("drain stall happened", n_drain > 0, 1, 0);
    chk("backpressure happened", n_backpressure > 0, 1, 0);
    chk("load overlapped the FFT side", n_overlap > 0, 1, 0);
    chk("full memory waited for the FFT side", n_swap_wait > 0, 1, 0);
    chk("FFT side waited for a load", n_fft_wait > 0, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
