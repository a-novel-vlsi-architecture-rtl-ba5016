// addr_gen: address generator and synchronization unit.
//
// Produces every memory address of the receiver and keeps data and addresses in
// step. The load side and the FFT side work on different memory sets at once:
//  * load (ld_en high): each time-domain sample offered (ld_valid) is written
//    through the load port to point n = 0..N-1 in natural order. After the Nth,
//    ld_full is high and further samples are ignored until ld_en drops.
// The FFT side follows the phase set by the control unit:
//  * PH_FFT: the in-place radix-4 DIF passes. Pass s (0..STAGES-1) has span
//    4**(STAGES-1-s); butterfly b reads points i0 + m*span (m = 0..3), with
//    j = b mod span and i0 = (b / span)*4*span + j, one butterfly per clock. One
//    clock later, when the memory data arrives, the points go to the FFT
//    processor with the pass, j and their four indices as tag; results come back
//    LATENCY clocks later and are written to the same four indices. A pass starts
//    only when every result of the previous one is written (drain_stall is high
//    while it waits). fft_done pulses after the last write of the last pass.
//  * PH_OUT: the result sits in base-4 digit-reversed order, so output k reads
//    point digit_rev4(k). One read is in flight at a time: a read is issued when
//    out_ready is high and the previous point was accepted (out_ack). out_valid,
//    out_k, out_first and out_last come with the data one clock after the read;
//    out_done pulses with the acceptance of the last point.
// The unit is the design's; its sequencing, the one-butterfly-per-clock issue,
// the stall between passes and the output handshake are this design's choices.
module addr_gen
  import ofdm_pkg::*;
#(
  parameter int unsigned TAG_W = RADIX * IDX_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  phase_e phase,
  // load
  input  logic  ld_en,
  input  logic  ld_valid,
  input  cplx_t ld_data,
  output logic  ld_full,
  // memory: load port
  output logic  mem_ld_we,
  output idx_t  mem_ld_idx,
  output cplx_t mem_ld_data,
  // memory: FFT port
  output logic  mem_rd_en,
  output idx_t  mem_rd_idx  [RADIX],
  input  cplx_t mem_rd_data [RADIX],
  output logic  [RADIX-1:0] mem_wr_en,
  output idx_t  mem_wr_idx  [RADIX],
  output cplx_t mem_wr_data [RADIX],
  // FFT processor
  output logic  bf_valid,
  output logic  [$clog2(STAGES)-1:0] bf_stage,
  output idx_t  bf_j,
  output cplx_t bf_data [RADIX],
  output logic  [TAG_W-1:0] bf_tag,
  input  logic  fp_valid,
  input  cplx_t fp_data [RADIX],
  input  logic  [TAG_W-1:0] fp_tag,
  output logic  fft_done,
  output logic  drain_stall,
  // spectrum out
  input  logic  out_ready,
  input  logic  out_ack,
  output logic  out_valid,
  output cplx_t out_data,
  output idx_t  out_k,
  output logic  out_first,
  output logic  out_last,
  output logic  out_done
);
  localparam int unsigned SW = $clog2(STAGES);
  localparam int unsigned BW = $clog2(BF_PER_ST);

  // ---------------- load ----------------
  idx_t ld_cnt;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_cnt  <= '0;
      ld_full <= 1'b0;
    end else if (!ld_en) begin
      ld_cnt  <= '0;
      ld_full <= 1'b0;
    end else if (ld_valid && !ld_full) begin
      ld_cnt <= ld_cnt + 1'b1;
      if (ld_cnt == idx_t'(FFT_N - 1)) ld_full <= 1'b1;
    end
  end
  assign mem_ld_we   = ld_en && ld_valid && !ld_full;
  assign mem_ld_idx  = ld_cnt;
  assign mem_ld_data = ld_data;

  // ---------------- FFT passes ----------------
  logic [SW-1:0] st;          // pass being issued
  logic [BW-1:0] bcnt;        // butterfly being issued
  logic          issuing;     // still butterflies to issue in this pass
  logic [BW:0]   outstanding; // issued, not yet written back
  logic          fft_run;
  idx_t          iss_idx [RADIX];
  idx_t          iss_j;
  logic          issue;
  logic          last_bf;

  // span = 4**(STAGES-1-st) is a power of two: j and i0 are bit fields of bcnt
  always_comb begin
    int unsigned sl;   // log2(span)
    int unsigned jj, i0;
    sl = 2 * (STAGES - 1 - int'(st));
    jj = int'(bcnt) & ((1 << sl) - 1);
    i0 = ((int'(bcnt) >> sl) << (sl + 2)) | jj;
    iss_j = idx_t'(jj);
    for (int m = 0; m < RADIX; m++) iss_idx[m] = idx_t'(i0 + (m << sl));
  end

  assign issue       = (phase == PH_FFT) && fft_run && issuing;
  assign last_bf     = (bcnt == BW'(BF_PER_ST - 1));
  assign drain_stall = (phase == PH_FFT) && fft_run && !issuing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= '0;
      bcnt        <= '0;
      issuing     <= 1'b1;
      outstanding <= '0;
      fft_run     <= 1'b0;
      fft_done    <= 1'b0;
    end else begin
      fft_done <= 1'b0;
      outstanding <= outstanding + (BW+1)'(issue) - (BW+1)'(fp_valid);
      if (phase != PH_FFT) begin
        st      <= '0;
        bcnt    <= '0;
        issuing <= 1'b1;
        fft_run <= 1'b1;                 // armed for the next FFT phase
      end else if (fft_run) begin
        if (issue) begin
          bcnt <= bcnt + 1'b1;
          if (last_bf) issuing <= 1'b0;
        end else if (!issuing && outstanding == '0) begin
          // previous pass fully written back
          if (st == SW'(STAGES - 1)) begin
            fft_run  <= 1'b0;
            fft_done <= 1'b1;
          end else begin
            st      <= st + 1'b1;
            bcnt    <= '0;
            issuing <= 1'b1;
          end
        end
      end
    end
  end

  // memory data arrives one clock after the read: align pass, j and indices
  logic          iss_q;
  logic [SW-1:0] st_q;
  idx_t          j_q;
  idx_t          idx_q [RADIX];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) iss_q <= 1'b0;
    else        iss_q <= issue;
  end
  always_ff @(posedge clk) begin
    st_q  <= st;
    j_q   <= iss_j;
    idx_q <= iss_idx;
  end
  assign bf_valid = iss_q;
  assign bf_stage = st_q;
  assign bf_j     = j_q;
  assign bf_data  = mem_rd_data;
  always_comb begin
    for (int m = 0; m < RADIX; m++) bf_tag[m*IDX_W +: IDX_W] = idx_q[m];
  end

  // ---------------- spectrum out ----------------
  idx_t ok_cnt;      // next k to read
  logic pending;     // a point is read and not yet accepted
  logic out_issue;
  logic out_all;     // every k has been read
  idx_t k_q;

  assign out_issue = (phase == PH_OUT) && !out_all && !pending && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ok_cnt    <= '0;
      pending   <= 1'b0;
      out_all   <= 1'b0;
      out_valid <= 1'b0;
      out_done  <= 1'b0;
    end else begin
      out_valid <= out_issue;
      out_done  <= 1'b0;
      if (phase != PH_OUT) begin
        ok_cnt  <= '0;
        out_all <= 1'b0;
        pending <= 1'b0;
      end else begin
        if (out_issue) begin
          ok_cnt  <= ok_cnt + 1'b1;
          pending <= 1'b1;
          if (ok_cnt == idx_t'(FFT_N - 1)) out_all <= 1'b1;
        end else if (out_ack) begin
          pending <= 1'b0;
          if (out_all) out_done <= 1'b1;
        end
      end
    end
  end
  always_ff @(posedge clk) if (out_issue) k_q <= ok_cnt;

  assign out_data  = mem_rd_data[0];
  assign out_k     = k_q;
  assign out_first = (k_q == '0);
  assign out_last  = (k_q == idx_t'(FFT_N - 1));

  // ---------------- memory ports ----------------
  always_comb begin
    mem_rd_en = issue || out_issue;
    for (int m = 0; m < RADIX; m++) mem_rd_idx[m] = iss_idx[m];
    if (phase == PH_OUT) mem_rd_idx[0] = idx_t'(digit_rev4(int'(ok_cnt), STAGES));

    mem_wr_en = {RADIX{fp_valid}};
    for (int m = 0; m < RADIX; m++) begin
      mem_wr_idx[m]  = fp_tag[m*IDX_W +: IDX_W];
      mem_wr_data[m] = fp_data[m];
    end
  end

endmodule
