// control_unit: sequencer of the receiver and driver of the sine/cosine generator.
//
// The receiver has two memory sets used in turn, so two sequences run at once:
//  * load side: LD_START -> LD_FILL -> LD_FULL. LD_START samples test_mode and
//    tone_bin for the next symbol. LD_FILL lasts until the address generator
//    reports the set full (ld_full). In LD_FULL the unit waits for the FFT side to
//    be idle; then it swaps the sets (wsel toggles) and starts both sides again.
//  * FFT side: PH_IDLE -> PH_FFT -> PH_OUT -> PH_IDLE, on the swap and on the
//    fft_done and out_done pulses of the address generator.
// So symbol n+1 is loaded while symbol n is transformed and read out.
//
// Source of a symbol, sampled in LD_START:
//  * test_mode = 0: samples come from the receiver input, and ext_ready is high
//    while the set is filling.
//  * test_mode = 1: the symbol is made on chip. The unit feeds the sine/cosine
//    generator N angles n * tone_bin * 2**ANGLE_W / N (a phase accumulator), one
//    per clock. It raises gen_valid when each result leaves the generator, SC_LAT
//    clocks later. The FFT of that symbol is a single line at bin tone_bin: a
//    self-test of the whole receiver.
// The control unit and its link to the sine/cosine generator are the design's.
// The two sequences, the swap rule, the self-test use of the generator and the
// timing are this design's choices.
module control_unit
  import ofdm_pkg::*;
#(
  parameter int unsigned SC_LAT = CORDIC_IT + 2   // sine/cosine generator latency
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      test_mode,
  input  idx_t      tone_bin,
  input  logic      ld_full,
  input  logic      fft_done,
  input  logic      out_done,
  output ld_state_e ld_state,
  output logic      ld_en,        // the load set is filling
  output logic      wsel,         // memory set being loaded
  output phase_e    phase,        // FFT side
  output logic      src_test,     // source of the symbol being loaded: 1 = generator
  output logic      ext_ready,    // receiver input is accepted
  output logic      sc_ena,       // sine/cosine generator enable
  output logic      [ANGLE_W-1:0] sc_angle,
  output logic      gen_valid,    // generator output is a sample of this symbol
  output logic      [15:0] symbols // symbols completed
);
  idx_t              tone_q;
  logic [IDX_W:0]    gen_cnt;
  logic              gen_issue;
  logic [SC_LAT-1:0] gvd;
  logic              swap;

  assign ld_en     = (ld_state == LD_FILL);
  assign gen_issue = ld_en && src_test && (gen_cnt < (IDX_W+1)'(FFT_N));
  assign sc_ena    = ld_en && src_test;
  assign ext_ready = ld_en && !src_test && !ld_full;
  assign gen_valid = gvd[SC_LAT-1];
  assign swap      = (ld_state == LD_FULL) && (phase == PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_state <= LD_START;
      wsel     <= 1'b0;
      phase    <= PH_IDLE;
      src_test <= 1'b0;
      tone_q   <= '0;
      gen_cnt  <= '0;
      sc_angle <= '0;
      gvd      <= '0;
      symbols  <= '0;
    end else begin
      // load side
      unique case (ld_state)
        LD_START: begin
          src_test <= test_mode;
          tone_q   <= tone_bin;
          gen_cnt  <= '0;
          sc_angle <= '0;
          ld_state <= LD_FILL;
        end
        LD_FILL: if (ld_full) ld_state <= LD_FULL;
        LD_FULL: if (swap) begin
          wsel     <= ~wsel;
          ld_state <= LD_START;
        end
        default: ld_state <= LD_START;
      endcase
      // FFT side
      unique case (phase)
        PH_IDLE: if (swap) phase <= PH_FFT;
        PH_FFT:  if (fft_done) phase <= PH_OUT;
        PH_OUT:  if (out_done) begin
          phase   <= PH_IDLE;
          symbols <= symbols + 1'b1;
        end
        default: phase <= PH_IDLE;
      endcase
      // generator feed
      if (sc_ena) begin
        gvd <= {gvd[SC_LAT-2:0], gen_issue};
        if (gen_issue) begin
          gen_cnt  <= gen_cnt + 1'b1;
          sc_angle <= sc_angle + (ANGLE_W'(tone_q) << (ANGLE_W - IDX_W));
        end
      end
    end
  end

endmodule
