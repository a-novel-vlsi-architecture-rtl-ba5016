// tb_control_unit: self-checking test of the receiver sequencer.
//
// Loads three symbols: test tone at bin 3, input symbol, test tone at bin 62, and
// drives the done inputs so that every ordering of the two sides occurs:
//  * symbol 1: the FFT side is idle, so the full set is swapped in at once;
//  * symbol 2 is loaded while symbol 1 is in the FFT; the full set must wait
//    (no swap, wsel held) until the FFT side is back in IDLE;
//  * symbol 3: the FFT side finishes first and waits in IDLE for the load.
// Also checked: the phase order IDLE -> FFT -> OUT -> IDLE, ld_en only in LD_FILL,
// ext_ready only while an input symbol is filling and not full, that a test
// symbol drives exactly 64 angles n * tone * 1024 (mod 2**16) into the generator,
// one per clock, with gen_valid SC_LAT clocks after each angle, that test_mode
// changed during a load has no effect until the next one, and the symbol count.
module tb_control_unit;
  import ofdm_pkg::*;
  localparam int SC_LAT = CORDIC_IT + 2;

  logic clk = 0, rst_n = 0;
  logic test_mode = 0;
  idx_t tone_bin = '0;
  logic ld_full = 0, fft_done = 0, out_done = 0;
  ld_state_e ld_state;
  logic ld_en, wsel;
  phase_e phase;
  logic src_test, ext_ready, sc_ena, gen_valid;
  logic [ANGLE_W-1:0] sc_angle;
  logic [15:0] symbols;

  control_unit dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic sig);
    @(negedge clk);
    sig = 1;
    @(negedge clk);
    sig = 0;
  endtask

  // fill the load set with one symbol; returns at a negedge in LD_FULL (or
  // already swapped, when the FFT side was idle)
  task automatic fill(input bit test, input int tone);
    int nang, nvalid, first_issue;
    test_mode = test;
    tone_bin  = idx_t'(tone);
    while (ld_state != LD_FILL) @(negedge clk);
    chk("source latched", src_test, test);
    chk("ld_en in LD_FILL", ld_en, 1);
    test_mode = !test;                   // must not matter now
    tone_bin  = idx_t'(tone + 1);
    chk("ext_ready while filling", ext_ready, !test);
    nang = 0; nvalid = 0; first_issue = -1;
    if (test) begin
      // 64 angles, one per clock, then gen_valid SC_LAT later for each
      for (int c = 0; c < 64 + SC_LAT + 4; c++) begin
        #1;
        if (sc_ena && dut.gen_issue) begin
          chk($sformatf("angle %0d", nang), sc_angle, (nang * tone * 1024) % 65536);
          if (first_issue < 0) first_issue = c;
          nang++;
        end
        if (gen_valid) begin
          chk($sformatf("gen_valid time %0d", nvalid), c, first_issue + SC_LAT + nvalid);
          nvalid++;
        end
        @(negedge clk);
      end
      chk("angles issued", nang, 64);
      chk("gen_valid count", nvalid, 64);
    end else begin
      repeat (5) @(negedge clk);
    end
    chk("still filling", ld_state, LD_FILL);
    chk("source held", src_test, test);
    ld_full = 1;
    #1 chk("no ext_ready when full", ext_ready, 0);
    @(negedge clk);
    ld_full = 0;
    chk("ld_en off after full", ld_en, 0);
  endtask

  initial begin
    logic w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // symbol 1: FFT side idle, swap on the next clock
    chk("IDLE after reset", phase, PH_IDLE);
    w = wsel;
    fill(1, 3);
    chk("LD_FULL", ld_state, LD_FULL);
    @(negedge clk);
    chk("swap: FFT started", phase, PH_FFT);
    chk("swap: wsel toggled", wsel, !w);
    chk("swap: load restarted", ld_state, LD_START);
    // symbol 2 loads while symbol 1 is in the FFT; the full set has to wait
    w = wsel;
    fill(0, 0);
    chk("overlap: FFT still running", phase, PH_FFT);
    repeat (4) @(negedge clk);
    chk("waiting: LD_FULL held", ld_state, LD_FULL);
    chk("waiting: wsel held", wsel, w);
    chk("no ext_ready while waiting", ext_ready, 0);
    pulse(fft_done);
    chk("OUT after fft_done", phase, PH_OUT);
    chk("still waiting in OUT", ld_state, LD_FULL);
    repeat (3) @(negedge clk);
    pulse(out_done);
    chk("IDLE after out_done", phase, PH_IDLE);
    chk("symbols after 1", symbols, 1);
    @(negedge clk);
    chk("swap after IDLE: FFT", phase, PH_FFT);
    chk("swap after IDLE: wsel", wsel, !w);
    // symbol 3: the FFT side finishes first and waits for the load
    w = wsel;
    fork
      fill(1, 62);
      begin
        repeat (3) @(negedge clk);
        pulse(fft_done);
        pulse(out_done);
        chk("symbols after 2", symbols, 2);
        repeat (3) @(negedge clk);
        chk("FFT side waits for the load", phase, PH_IDLE);
        chk("no swap before full", wsel, w);
      end
    join
    @(negedge clk);
    chk("swap after full: FFT", phase, PH_FFT);
    chk("swap after full: wsel", wsel, !w);
    pulse(fft_done);
    pulse(out_done);
    chk("symbols after 3", symbols, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
