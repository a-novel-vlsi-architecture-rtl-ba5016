// fft_pingpong_mem: two FFT memories used in turn, 4N words in all.
//
// One N-point memory (fft_memory, four banks of two-port RAM) receives the next
// symbol's time-domain samples while the other holds the symbol being
// transformed and read out; after each symbol the roles swap. This gives the 4N
// words of storage the architecture asks for (2N for input samples, 2N for the
// output), and lets loading overlap with the FFT and the output.
//
// Interface: wsel selects the set being loaded (set wsel takes the load port,
// set !wsel the FFT port). Load port: ld_we, ld_idx, ld_data write one point.
// FFT port: the four-lane interface of fft_memory (reads with one clock latency,
// per-lane writes). wsel may change only when no FFT-port read is in flight; the
// read data follow the set selected at the read. Splitting the 4N words into two
// complete in-place memories used alternately is this design's reading.
module fft_pingpong_mem
  import ofdm_pkg::*;
(
  input  logic  clk,
  input  logic  wsel,
  // load port
  input  logic  ld_we,
  input  idx_t  ld_idx,
  input  cplx_t ld_data,
  // FFT port
  input  logic  rd_en,
  input  idx_t  rd_idx  [RADIX],
  output cplx_t rd_data [RADIX],
  input  logic  [RADIX-1:0] wr_en,
  input  idx_t  wr_idx  [RADIX],
  input  cplx_t wr_data [RADIX]
);
  cplx_t set_rd_data [2][RADIX];
  logic  rsel_q;

  for (genvar s = 0; s < 2; s++) begin : g_set
    logic             s_rd_en;
    logic [RADIX-1:0] s_wr_en;
    idx_t             s_wr_idx  [RADIX];
    cplx_t            s_wr_data [RADIX];
    cplx_t            s_rd_data [RADIX];

    always_comb begin
      if (wsel == 1'(s)) begin
        // this set is being loaded: single points on lane 0
        s_rd_en   = 1'b0;
        s_wr_en   = {{(RADIX-1){1'b0}}, ld_we};
        s_wr_idx  = wr_idx;
        s_wr_data = wr_data;
        s_wr_idx[0]  = ld_idx;
        s_wr_data[0] = ld_data;
      end else begin
        s_rd_en   = rd_en;
        s_wr_en   = wr_en;
        s_wr_idx  = wr_idx;
        s_wr_data = wr_data;
      end
    end

    fft_memory u_mem (
      .clk, .rd_en(s_rd_en), .rd_idx(rd_idx), .rd_data(s_rd_data),
      .wr_en(s_wr_en), .wr_idx(s_wr_idx), .wr_data(s_wr_data)
    );
    assign set_rd_data[s] = s_rd_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rsel_q <= ~wsel;
  end
  assign rd_data = set_rd_data[rsel_q];

endmodule
