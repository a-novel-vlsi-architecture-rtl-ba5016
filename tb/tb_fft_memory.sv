// tb_fft_memory: self-checking test of the four-bank in-place FFT memory.
//
// 1. Writes all 64 points one at a time on lane 0 (other lanes idle, random
//    indices on them) and reads each back on lane 0 with random indices on the
//    idle lanes: single-point access must not be disturbed by the other lanes.
// 2. For every butterfly of every radix-4 pass (points i0 + m*span), reads the
//    four points in one clock and, in the same clock, writes new values to the
//    four points of the previous butterfly; then checks the read data against a
//    model array kept here. All 64 points are finally read back.
// Read data is checked after the next, unrelated request is already on the read
// inputs, as a pipelined address generator presents it.
module tb_fft_memory;
  import ofdm_pkg::*;
  logic clk = 0;
  logic rd_en = 0;
  idx_t rd_idx [RADIX];
  cplx_t rd_data [RADIX];
  logic [RADIX-1:0] wr_en = '0;
  idx_t wr_idx [RADIX];
  cplx_t wr_data [RADIX];
  int checks = 0, failures = 0;
  cplx_t model [FFT_N];

  fft_memory dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_pt(input int lane, input int idx);
    checks++;
    if (rd_data[lane] != model[idx]) begin
      failures++;
      $display("FAIL lane %0d point %0d: got %h exp %h", lane, idx, rd_data[lane], model[idx]);
    end
  endtask

  initial begin
    // 1. single-point writes and reads
    for (int n = 0; n < FFT_N; n++) begin
      @(negedge clk);
      for (int m = 0; m < RADIX; m++) rd_idx[m] = idx_t'($urandom);
      wr_en = 4'b0001;
      wr_idx[0] = idx_t'(n);
      for (int m = 1; m < RADIX; m++) wr_idx[m] = idx_t'($urandom);
      wr_data[0] = cplx_t'($urandom);
      model[n] = wr_data[0];
    end
    @(negedge clk);
    wr_en = '0;
    for (int n = 0; n < FFT_N; n++) begin
      int p;
      p = (n * 37 + 11) % FFT_N;
      rd_en = 1;
      rd_idx[0] = idx_t'(p);
      for (int m = 1; m < RADIX; m++) rd_idx[m] = idx_t'($urandom);
      @(posedge clk);
      #1;
      // the next request is already presented: the data must stay the old one's
      for (int m = 0; m < RADIX; m++) rd_idx[m] = idx_t'($urandom);
      #1;
      chk_pt(0, p);
      @(negedge clk);
    end
    rd_en = 0;
    // 2. butterfly-pattern reads with overlapped write-back
    for (int s = 0; s < STAGES; s++) begin
      int span;
      int prev [RADIX];
      bit have_prev;
      span = FFT_N >> (2 * (s + 1));
      have_prev = 0;
      for (int b = 0; b <= FFT_N / 4; b++) begin
        int i0, idx [RADIX];
        @(negedge clk);
        rd_en = (b < FFT_N / 4);
        if (b < FFT_N / 4) begin
          i0 = (b / span) * 4 * span + (b % span);
          for (int m = 0; m < RADIX; m++) begin
            idx[m] = i0 + m * span;
            rd_idx[m] = idx_t'(idx[m]);
          end
        end
        wr_en = have_prev ? '1 : '0;
        if (have_prev) begin
          for (int m = 0; m < RADIX; m++) begin
            wr_idx[m] = idx_t'(prev[m]);
            wr_data[m] = cplx_t'($urandom);
          end
        end
        @(posedge clk);
        #1;
        for (int m = 0; m < RADIX; m++) rd_idx[m] = idx_t'($urandom);
        #1;
        if (b < FFT_N / 4) for (int m = 0; m < RADIX; m++) chk_pt(m, idx[m]);
        if (have_prev) for (int m = 0; m < RADIX; m++) model[prev[m]] = wr_data[m];
        for (int m = 0; m < RADIX; m++) prev[m] = idx[m];
        have_prev = 1;
      end
      @(negedge clk);
      wr_en = '0;
      rd_en = 0;
    end
    for (int n = 0; n < FFT_N; n++) begin
      @(negedge clk);
      rd_en = 1;
      rd_idx[0] = idx_t'(n);
      for (int m = 1; m < RADIX; m++) rd_idx[m] = idx_t'($urandom);
      @(posedge clk);
      #1;
      chk_pt(0, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
