// tb_sincos_gen: self-checking test of the CORDIC sine/cosine generator.
//
// Feeds one angle per clock (45 degrees first, then the four axis angles, then
// random angles) and compares every result, CORDIC_IT + 2 clocks later, with
// cos/sin computed in double precision and scaled to Q1.15 (tolerance 4 LSB).
// Also checks that 45 degrees gives 16'h5A82 within one LSB, that the result is
// not there one clock early, and that holding ena low freezes the outputs.
module tb_sincos_gen;
  localparam int unsigned LAT = ofdm_pkg::CORDIC_IT + 2;
  localparam int unsigned NANG = 300;

  logic clk = 0;
  logic ena;
  logic [15:0] Ain;
  logic signed [15:0] cos_o, sin_o;
  int checks = 0, failures = 0;

  sincos_gen dut (.clk(clk), .ena(ena), .Ain(Ain), .cos(cos_o), .sin(sin_o));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_q15(input real v);
    int r;
    r = int'($floor(v * 32768.0 + 0.5));
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return r;
  endfunction

  task automatic check(input string what, input int got, input int exp, input int tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  logic [15:0] angles [NANG];
  real pi = 3.14159265358979323846;

  initial begin
    angles[0] = 16'h2000;   // 45 degrees
    angles[1] = 16'h0000;
    angles[2] = 16'h4000;
    angles[3] = 16'h8000;
    angles[4] = 16'hC000;
    angles[5] = 16'h6000;   // 135
    angles[6] = 16'hA000;   // 225
    angles[7] = 16'hE000;   // 315
    for (int k = 8; k < NANG; k++) angles[k] = 16'($urandom);

    ena = 1;
    Ain = 0;
    @(negedge clk);
    for (int k = 0; k < NANG + LAT; k++) begin
      if (k < NANG) Ain = angles[k];
      @(posedge clk);
      #1;
      // result of angle k-LAT+1 is now at the outputs
      if (k + 1 >= LAT && k + 1 - LAT < NANG) begin
        int a;
        real th;
        a = k + 1 - LAT;
        th = 2.0 * pi * real'(angles[a]) / 65536.0;
        check($sformatf("cos[%0d]", a), int'(cos_o), expect_q15($cos(th)), 4);
        check($sformatf("sin[%0d]", a), int'(sin_o), expect_q15($sin(th)), 4);
        if (a == 0) begin
          check("cos45 = 5A82", int'(cos_o), 32'h5A82, 1);
          check("sin45 = 5A82", int'(sin_o), 32'h5A82, 1);
        end
      end
      @(negedge clk);
    end

    // latency: a new angle must not show one clock early
    Ain = 16'h0000;
    repeat (LAT + 2) @(posedge clk);
    @(negedge clk);
    Ain = 16'h4000;  // 90 degrees: cos 0, sin +1
    repeat (LAT - 1) @(posedge clk);
    #1;
    check("not early (cos still 1)", int'(cos_o), 32767, 4);
    @(posedge clk);
    #1;
    check("on time (cos 0)", int'(cos_o), 0, 4);
    check("on time (sin 1)", int'(sin_o), 32767, 4);

    // ena low freezes
    @(negedge clk);
    Ain = 16'hC000;
    ena = 0;
    repeat (LAT + 3) @(posedge clk);
    #1;
    check("frozen cos", int'(cos_o), 0, 4);
    check("frozen sin", int'(sin_o), 32767, 4);
    @(negedge clk);
    ena = 1;
    repeat (LAT + 1) @(posedge clk);
    #1;
    check("resumed sin -1", int'(sin_o), -32768, 4);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
