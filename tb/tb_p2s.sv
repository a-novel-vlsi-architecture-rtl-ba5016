// tb_p2s: checks the parallel-to-serial converter.
//
// Offers 300 random 2-bit words whenever in_ready is high (sometimes holding back
// at random), flagging every 8th word as first and the word before as last. The
// serial stream must be the words' bits, bit 0 first, one per clock with
// ser_valid high; in_ready must already be high while the last bit of a word is
// out, so words can follow without a gap; ser_first must be on the first bit of a
// first word and ser_last on the last bit of a last one.
module tb_p2s;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [1:0] in_bits = '0;
  logic in_ready, ser_valid, ser_bit, ser_first, ser_last;
  int checks = 0, failures = 0;

  p2s #(.PW(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_bit [$];
  bit exp_first [$];
  bit exp_last [$];
  int nser = 0, gaps_b2b = 0;

  always @(posedge clk) if (rst_n) begin
    if (ser_valid) begin
      checks++;
      if (exp_bit.size() == 0) begin
        failures++; $display("FAIL unexpected bit");
      end else begin
        bit b, f, l;
        b = exp_bit.pop_front(); f = exp_first.pop_front(); l = exp_last.pop_front();
        if (ser_bit != b || ser_first != f || ser_last != l) begin
          failures++;
          $display("FAIL bit %0d: got %b/%b/%b exp %b/%b/%b", nser, ser_bit, ser_first, ser_last, b, f, l);
        end
      end
      nser++;
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      bit hold;
      hold = (w >= 150) && ($urandom_range(0, 3) == 0);
      if (hold) begin
        in_valid = 0;
        @(negedge clk);
      end
      while (!in_ready) begin in_valid = 0; @(negedge clk); end
      in_valid = 1;
      in_bits = 2'($urandom);
      in_first = (w % 8 == 0);
      in_last = (w % 8 == 7);
      for (int b = 0; b < 2; b++) begin
        exp_bit.push_back(in_bits[b]);
        exp_first.push_back(in_first && b == 0);
        exp_last.push_back(in_last && b == 1);
      end
      @(negedge clk);
      in_valid = 0;
      if (w < 150) begin
        // back to back: next word offered as soon as ready, stream has no gap
        @(negedge clk);
        checks++;
        if (!in_ready) begin failures++; $display("FAIL not ready for back-to-back word %0d", w); end
      end
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (nser != 600) begin failures++; $display("FAIL %0d serial bits", nser); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
