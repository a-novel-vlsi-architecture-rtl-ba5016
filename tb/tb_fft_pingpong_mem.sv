// tb_fft_pingpong_mem: self-checking test of the two-set FFT memory.
//
// For 3000 clocks every input is random: the set select wsel (changed now and
// then), a load-port write of one point, four-lane FFT-port writes of one
// butterfly group and four-lane reads of another group of the same radix-4 pass
// (groups of one pass are disjoint and each spans the four banks). A model of the
// two sets is kept here. Every read must return the FFT-side set (!wsel at the
// read) as it was before that clock's writes. The read data are checked after
// wsel and the read indices have already changed for the next clock.
module tb_fft_pingpong_mem;
  import ofdm_pkg::*;
  logic clk = 0;
  logic wsel = 0;
  logic ld_we = 0;
  idx_t ld_idx = '0;
  cplx_t ld_data = '0;
  logic rd_en = 0;
  idx_t rd_idx [RADIX];
  cplx_t rd_data [RADIX];
  logic [RADIX-1:0] wr_en = '0;
  idx_t wr_idx [RADIX];
  cplx_t wr_data [RADIX];
  int checks = 0, failures = 0;
  cplx_t model [2][FFT_N];

  fft_pingpong_mem dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // point m of butterfly b in pass s
  function automatic int bf_point(input int s, input int b, input int m);
    int span;
    span = FFT_N >> (2 * (s + 1));
    return (b / span) * 4 * span + (b % span) + m * span;
  endfunction

  initial begin
    cplx_t exp_rd [RADIX];
    bit    prev_rd;
    for (int st = 0; st < 2; st++)
      for (int n = 0; n < FFT_N; n++) model[st][n] = '0;
    // clear both sets through the FFT port
    for (int st = 0; st < 2; st++) begin
      @(negedge clk);
      wsel = !st[0];
      for (int b = 0; b < BF_PER_ST; b++) begin
        wr_en = '1;
        for (int m = 0; m < RADIX; m++) begin
          wr_idx[m]  = idx_t'(bf_point(0, b, m));
          wr_data[m] = '0;
        end
        @(negedge clk);
      end
      wr_en = '0;
    end
    prev_rd = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int s, bw, br;
      if ($urandom_range(0, 15) == 0) wsel = !wsel;
      s  = $urandom_range(0, STAGES - 1);
      bw = $urandom_range(0, BF_PER_ST - 1);
      br = (bw + $urandom_range(1, BF_PER_ST - 1)) % BF_PER_ST;
      ld_we   = $urandom_range(0, 1);
      ld_idx  = idx_t'($urandom);
      ld_data = cplx_t'($urandom);
      wr_en   = $urandom_range(0, 1) ? '1 : '0;
      rd_en   = $urandom_range(0, 3) != 0;
      for (int m = 0; m < RADIX; m++) begin
        wr_idx[m]  = idx_t'(bf_point(s, bw, m));
        wr_data[m] = cplx_t'($urandom);
        rd_idx[m]  = idx_t'(bf_point(s, br, m));
      end
      #1;
      if (prev_rd)
        for (int m = 0; m < RADIX; m++) begin
          checks++;
          if (rd_data[m] !== exp_rd[m]) begin
            failures++;
            $display("FAIL clock %0d lane %0d: got %h expected %h", cyc, m, rd_data[m], exp_rd[m]);
          end
        end
      // what this clock reads, then what it writes
      for (int m = 0; m < RADIX; m++) exp_rd[m] = model[!wsel][rd_idx[m]];
      prev_rd = rd_en;
      if (ld_we) model[wsel][ld_idx] = ld_data;
      for (int m = 0; m < RADIX; m++) if (wr_en[m]) model[!wsel][wr_idx[m]] = wr_data[m];
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
