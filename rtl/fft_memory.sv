// fft_memory: the FFT data memory, four banks of two-port RAM used in place.
//
// A radix-r FFT needs r banks so that the r points of a butterfly are read, and
// written back, in one clock. Point idx lives in bank bank_of(idx) (sum of its
// base-4 digits mod 4) at word idx >> 2. The four points of any radix-4 butterfly
// differ in one base-4 digit only, so they always fall in four different banks;
// an assertion checks that enabled lanes never collide. Each bank has one read
// and one write port, so a pass can read new butterflies while results of
// earlier ones are written back.
//
// Interface: four lanes, in the point order of the butterfly. Reads: rd_en with
// rd_idx[0..3]; rd_data[m] holds point rd_idx[m] one clock later (synchronous
// read). Writes: wr_en[m], wr_idx[m], wr_data[m] per lane, written at the clock
// edge. A single point is read or written on lane 0. Four banks of two-port
// memory and in-place operation follow the design; the digit-sum bank mapping is
// this design's choice (the design names no scheme of its own). No reset: the
// contents are data only.
module fft_memory
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  rd_en,
  input  idx_t  rd_idx  [RADIX],
  output cplx_t rd_data [RADIX],
  input  logic  [RADIX-1:0] wr_en,
  input  idx_t  wr_idx  [RADIX],
  input  cplx_t wr_data [RADIX]
);
  localparam int unsigned DEPTH = FFT_N / RADIX;

  logic [1:0]         rd_bank   [RADIX];
  logic [1:0]         rd_bank_q [RADIX];
  logic [BANK_AW-1:0] b_raddr   [RADIX];
  logic [BANK_AW-1:0] b_waddr   [RADIX];
  cplx_t              b_wdata   [RADIX];
  logic [RADIX-1:0]   b_we;
  cplx_t              b_q       [RADIX];

  // route lanes to banks
  always_comb begin
    for (int b = 0; b < RADIX; b++) begin
      b_raddr[b] = '0;
      b_waddr[b] = '0;
      b_wdata[b] = '0;
      b_we[b]    = 1'b0;
    end
    // lane 0 is routed last, so a single-point read on lane 0 always wins
    for (int m = RADIX - 1; m >= 0; m--) begin
      rd_bank[m] = bank_of(rd_idx[m]);
      b_raddr[bank_of(rd_idx[m])] = rd_idx[m][IDX_W-1:2];
    end
    for (int m = 0; m < RADIX; m++) begin
      if (wr_en[m]) begin
        b_waddr[bank_of(wr_idx[m])] = wr_idx[m][IDX_W-1:2];
        b_wdata[bank_of(wr_idx[m])] = wr_data[m];
        b_we[bank_of(wr_idx[m])]    = 1'b1;
      end
    end
  end

  for (genvar b = 0; b < RADIX; b++) begin : g_bank
    cplx_t mem [DEPTH];
    always_ff @(posedge clk) begin
      if (b_we[b]) mem[b_waddr[b]] <= b_wdata[b];
      if (rd_en)   b_q[b] <= mem[b_raddr[b]];
    end
  end

  // route banks back to lanes
  always_ff @(posedge clk) begin
    if (rd_en) rd_bank_q <= rd_bank;
  end
  always_comb begin
    for (int m = 0; m < RADIX; m++) rd_data[m] = b_q[rd_bank_q[m]];
  end

  // lanes of one access never share a bank (in-place radix-4 addressing)
  always_ff @(posedge clk) begin
    for (int m = 0; m < RADIX; m++) begin
      for (int n = m + 1; n < RADIX; n++) begin
        if (wr_en[m] && wr_en[n])
          assert (bank_of(wr_idx[m]) != bank_of(wr_idx[n]))
            else $error("fft_memory: write lanes %0d and %0d hit one bank", m, n);
      end
    end
  end

endmodule
