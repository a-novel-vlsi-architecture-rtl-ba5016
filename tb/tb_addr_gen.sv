// tb_addr_gen: self-checking test of the address generator and synchronization unit.
//
// The memories and the FFT processor are modelled here: a 64-entry array for the
// load port, one for the FFT port (read with one clock of latency), and a
// 19-clock delay line that returns each butterfly's tag unchanged with data
// (pass+1, m) so the writes can be traced.
//  * load: samples offered with random gaps must be written through the load
//    port to points 0..63 in order; ld_full must rise after the 64th, a 65th
//    sample must be ignored, and ld_full must clear when ld_en drops. A second
//    symbol is loaded while the FFT runs, and must not disturb it.
//  * PH_FFT: the butterflies issued must be exactly the radix-4 DIF schedule
//    (pass s, span 64/4**(s+1), groups of four points g*4*span + j + m*span),
//    listed here independently, in that order; the pass number and j sent with
//    the data must match; no butterfly of a pass may be issued while one of the
//    previous pass is still in the processor model; fft_done must pulse once after
//    the last write-back; 48 butterflies in all.
//  * PH_OUT: with out_ready toggled at random, output k = 0..63 must read point
//    digit_rev4(k), carry the data of that point, mark first/last, and out_done
//    must pulse once.
module tb_addr_gen;
  import ofdm_pkg::*;
  localparam int LAT = CORDIC_IT + 3;
  localparam int TAG_W = RADIX * IDX_W;

  logic clk = 0, rst_n = 0;
  phase_e phase = PH_IDLE;
  logic ld_en = 0, ld_valid = 0;
  cplx_t ld_data = '0;
  logic ld_full;
  logic mem_ld_we;
  idx_t mem_ld_idx;
  cplx_t mem_ld_data;
  logic mem_rd_en;
  idx_t mem_rd_idx [RADIX];
  cplx_t mem_rd_data [RADIX];
  logic [RADIX-1:0] mem_wr_en;
  idx_t mem_wr_idx [RADIX];
  cplx_t mem_wr_data [RADIX];
  logic bf_valid;
  logic [1:0] bf_stage;
  idx_t bf_j;
  cplx_t bf_data [RADIX];
  logic [TAG_W-1:0] bf_tag;
  logic fp_valid;
  cplx_t fp_data [RADIX];
  logic [TAG_W-1:0] fp_tag;
  logic fft_done, drain_stall;
  logic out_ready = 0, out_ack = 0;
  logic out_valid;
  cplx_t out_data;
  idx_t out_k;
  logic out_first, out_last, out_done;

  addr_gen dut (.*);
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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- memory model ----
  cplx_t mem [FFT_N], lmem [FFT_N];
  always @(posedge clk) begin
    if (mem_ld_we) lmem[mem_ld_idx] <= mem_ld_data;
    for (int m = 0; m < RADIX; m++) if (mem_wr_en[m]) mem[mem_wr_idx[m]] <= mem_wr_data[m];
    if (mem_rd_en) for (int m = 0; m < RADIX; m++) mem_rd_data[m] <= mem[mem_rd_idx[m]];
  end

  // ---- processor model ----
  logic [LAT-1:0] pv = '0;
  logic [TAG_W-1:0] pt [LAT];
  logic [1:0] ps [LAT];
  always @(posedge clk) begin
    pv <= {pv[LAT-2:0], bf_valid};
    pt[0] <= bf_tag;
    ps[0] <= bf_stage;
    for (int k = 1; k < LAT; k++) begin pt[k] <= pt[k-1]; ps[k] <= ps[k-1]; end
  end
  assign fp_valid = pv[LAT-1];
  assign fp_tag = pt[LAT-1];
  always_comb for (int m = 0; m < RADIX; m++) begin
    fp_data[m].re = 16'(ps[LAT-1]) + 16'd1;
    fp_data[m].im = 16'(m);
  end

  // ---- expected butterfly schedule ----
  int exp_idx [STAGES * FFT_N / 4][RADIX];
  int exp_st  [STAGES * FFT_N / 4];
  int exp_j   [STAGES * FFT_N / 4];
  int nbf = 0, nfft_done = 0, nout_done = 0;
  int in_proc [STAGES];    // butterflies of each pass inside the processor model

  initial begin
    int e;
    e = 0;
    for (int s = 0; s < STAGES; s++) begin
      int span;
      span = FFT_N >> (2 * (s + 1));
      for (int g = 0; g < FFT_N / (4 * span); g++)
        for (int j = 0; j < span; j++) begin
          for (int m = 0; m < RADIX; m++) exp_idx[e][m] = g * 4 * span + j + m * span;
          exp_st[e] = s;
          exp_j[e] = j;
          e++;
        end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (fft_done) nfft_done++;
    if (out_done) nout_done++;
    if (bf_valid) begin
      if (nbf < STAGES * FFT_N / 4) begin
        for (int m = 0; m < RADIX; m++)
          chk($sformatf("bf %0d idx%0d", nbf, m), bf_tag[m*IDX_W +: IDX_W], exp_idx[nbf][m]);
        chk($sformatf("bf %0d pass", nbf), bf_stage, exp_st[nbf]);
        chk($sformatf("bf %0d j", nbf), bf_j, exp_j[nbf]);
        if (bf_stage > 0) chk($sformatf("bf %0d issued before drain", nbf), in_proc[bf_stage-1], 0);
      end
      nbf++;
    end
    for (int s = 0; s < STAGES; s++)
      in_proc[s] = in_proc[s] + ((bf_valid && bf_stage == 2'(s)) ? 1 : 0)
                              - ((fp_valid && ps[LAT-1] == 2'(s)) ? 1 : 0);
  end

  task automatic load(input int base);
    @(negedge clk);
    ld_en = 1;
    for (int n = 0; n < FFT_N; n++) begin
      ld_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
      ld_valid = 1;
      ld_data.re = 16'(base + n);
      ld_data.im = 16'(-n);
      #1;
      chk($sformatf("load write %0d", n), {mem_ld_we, mem_ld_idx}, {1'b1, 6'(n)});
      chk($sformatf("load not full %0d", n), ld_full, 0);
      @(negedge clk);
    end
    // one sample too many: ignored
    ld_data.re = 16'(base - 1);
    #1;
    chk("ld_full after 64", ld_full, 1);
    chk("65th sample ignored", mem_ld_we, 0);
    @(negedge clk);
    ld_valid = 0;
    ld_en = 0;
    @(negedge clk);
    chk("ld_full cleared", ld_full, 0);
  endtask

  initial begin
    for (int s = 0; s < STAGES; s++) in_proc[s] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ---- load ----
    load(1000);
    for (int n = 0; n < FFT_N; n++) chk("loaded", lmem[n].re, 1000 + n);
    mem = lmem;
    // ---- FFT, with the next symbol loaded at the same time ----
    phase = PH_FFT;
    fork
      load(2000);
      begin
        while (!fft_done) @(negedge clk);
        @(negedge clk);
      end
    join
    for (int n = 0; n < FFT_N; n++) chk("loaded during FFT", lmem[n].re, 2000 + n);
    chk("butterflies", nbf, STAGES * FFT_N / 4);
    chk("fft_done pulses", nfft_done, 1);
    for (int n = 0; n < FFT_N; n++) chk($sformatf("point %0d last pass", n), mem[n].re, STAGES);
    // ---- out ----
    for (int n = 0; n < FFT_N; n++) mem[n] = cplx_t'({16'(n), 16'(3 * n)});
    phase = PH_OUT;
    for (int k = 0; k < FFT_N; k++) begin
      while (1) begin
        out_ready = $urandom_range(0, 1);
        @(posedge clk);
        #1;
        if (out_valid) break;
        @(negedge clk);
      end
      chk($sformatf("out k %0d", k), out_k, k);
      chk($sformatf("out data %0d", k), out_data.re, digit_rev4(k, STAGES));
      chk($sformatf("out first %0d", k), out_first, k == 0);
      chk($sformatf("out last %0d", k), out_last, k == FFT_N - 1);
      @(negedge clk);
      out_ack = 1;           // accepted one clock later, like the decoder
      @(negedge clk);
      out_ack = 0;
    end
    repeat (3) @(negedge clk);
    chk("out_done pulses", nout_done, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
