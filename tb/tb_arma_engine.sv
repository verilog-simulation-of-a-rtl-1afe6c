// tb_arma_engine: self-checking test of the ARMA engine.
// Drives start pulses with random spacing, random and published
// coefficient sets and changing setpoints. Each sample's c16, c8, e8 and
// wrap flag are compared with an integer reference model. The 6-cycle
// latency from start to valid is checked. A start during a busy sample must
// raise overrun and be dropped.
module tb_arma_engine;
  timeunit 1ns;
  timeprecision 1ps;
  import arma_pkg::*;
  import arma_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  arma_coefs_t coefs;
  setpoint_t r;
  logic signed [15:0] c16;
  sig_t c8, e8;
  logic valid, busy, overrun, wrap;

  int checks = 0;
  int failures = 0;
  int n_wrap = 0;
  int n_overrun = 0;
  ref_state_t m;

  arma_engine dut (.clk, .rst_n, .start, .coefs, .r, .c16, .c8, .e8,
                   .valid, .busy, .overrun, .wrap);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic load_coefs(input int a1, a3, a4, b2, b3);
    coefs = '{a1: 8'(a1), a3: 8'(a3), a4: 8'(a4), b2: 8'(b2), b3: 8'(b3)};
    m.a1 = a1; m.a3 = a3; m.a4 = a4; m.b2 = b2; m.b3 = b3;
  endtask

  // One sample: pulse start, count cycles to valid, compare.
  task automatic sample(input int rv);
    int lat;
    r = setpoint_t'(rv);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 0;
    while (!valid) begin
      @(negedge clk);
      lat++;
      if (lat > 20) break;
    end
    ref_step(m, rv);
    check(lat == 6, $sformatf("latency %0d clocks, expected 6", lat));
    check(int'(c16) == m.c16, $sformatf("c16 %0d exp %0d", c16, m.c16));
    check(int'(c8) == m.c8, $sformatf("c8 %0d exp %0d", c8, m.c8));
    check(int'(e8) == m.e8, $sformatf("e8 %0d exp %0d", e8, m.e8));
    check(wrap == (m.c16 != m.c8), "wrap flag");
    if (wrap) n_wrap++;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rv;
    ref_reset(m);
    load_coefs(9, 4, -3, 107, -43);
    r = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Step response with the published coefficients.
    for (int k = 0; k < 40; k++) sample(8);
    // Skyline of setpoints.
    for (int k = 0; k < 120; k++) begin
      if (k % 20 == 0) rv = $urandom_range(0, 31) - 16;
      sample(rv);
    end
    // Random coefficient sets, including ones that wrap the 8-bit output.
    for (int t = 0; t < 20; t++) begin
      load_coefs($urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128,
                 $urandom_range(0, 255) - 128, $urandom_range(0, 255) - 128,
                 $urandom_range(0, 255) - 128);
      for (int k = 0; k < 10; k++) sample($urandom_range(0, 31) - 16);
    end
    // Overrun: a second start while busy is flagged and ignored.
    r = setpoint_t'(3);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(overrun == 1'b1, "overrun flagged");
    if (overrun) n_overrun++;
    while (!valid) @(negedge clk);
    ref_step(m, 3);
    check(int'(c16) == m.c16, "c16 after overrun");
    repeat (10) @(negedge clk);
    check(!busy && !valid, "dropped start did not run a sample");
    check(n_wrap > 0, "output wrap exercised");
    $display("wraps=%0d overruns=%0d", n_wrap, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
