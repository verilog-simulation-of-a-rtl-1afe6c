// tb_arma_pid_full: the control loop exactly as it comes out of reset.
// No parameter and no register is changed: the published coefficients and
// the 0x9C40 divider give a 4 ms sampling period at a 10 MHz clock. Only the
// setpoint field is driven. The test runs a step to setpoint 8 for 160 ms,
// then a 500 ms skyline of setpoint levels. Every sample's output is
// compared with the integer reference model. Every sampling period is
// checked to be 40000 clocks (4 ms). Finally the step's peak, the
// overshoot relative to the step's final level, and the settling time into
// a +/-2 % band of the 8-bit range are printed.
module tb_arma_pid_full;
  timeunit 1ns;
  timeprecision 1ps;
  import arma_pkg::*;
  import arma_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] io_in = {3'b111, 8'h00, 5'd0};
  logic [15:0] io_out;

  int checks = 0;
  int failures = 0;
  ref_state_t m;
  int cur_r = 0;
  int n_samples = 0;
  realtime last_t = -1.0;
  int step_trace [40];

  arma_pid_top dut (.clk, .rst_n, .io_in, .io_out);

  always #50 clk = ~clk;   // 10 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n && dut.u_arma.valid) begin
      ref_step(m, cur_r);
      check(int'(signed'(io_out)) == m.c16,
            $sformatf("sample %0d out %0d exp %0d", n_samples, signed'(io_out), m.c16));
      if (last_t >= 0.0)
        check($realtime - last_t == 4.0e6, $sformatf("period %0t", $realtime - last_t));
      last_t = $realtime;
      if (n_samples < 40) step_trace[n_samples] = int'(signed'(io_out));
      n_samples++;
    end
  end

  task automatic run(input int rv, input int n);
    @(negedge clk);
    cur_r = rv;
    io_in = {3'b111, 8'h00, 5'(rv)};
    repeat (n) @(posedge dut.u_arma.valid);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    #1000ms;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int peak, fin, settle;
    ref_reset(m);
    m.a1 = 9; m.a3 = 4; m.a4 = -3; m.b2 = 107; m.b3 = -43;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Step to setpoint 8 (sample value 64), 40 samples = 160 ms.
    run(8, 40);
    peak = 0;
    foreach (step_trace[i]) if (step_trace[i] > peak) peak = step_trace[i];
    // Final level: mean of the last 16 samples (the loop settles into a
    // small limit cycle caused by the product truncation).
    fin = 0;
    for (int i = 24; i < 40; i++) fin += step_trace[i];
    fin = fin / 16;
    settle = 0;
    foreach (step_trace[i])
      if (step_trace[i] > fin + 5 || step_trace[i] < fin - 5) settle = i + 1;
    $display("step to 64: peak %0d, final %0d, overshoot %0d %%, settled within +/-5 after %0d samples (%0d ms)",
             peak, fin, (peak - fin) * 100 / fin, settle, settle * 4);
    foreach (step_trace[i]) $write("%0d ", step_trace[i]);
    $display("");
    check(peak > fin, "step response overshoots");
    check(settle * 4 <= 100, "step settles within 100 ms");
    check(fin > 40 && fin < 70, "step final level near the setpoint value 64");
    // Skyline, 500 ms.
    run(12, 30);
    run(3, 30);
    run(9, 30);
    run(3, 35);
    @(negedge clk);
    check(n_samples == 165, $sformatf("sample count %0d", n_samples));
    $display("simulated %0t", $realtime);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
