// tb_arma_pid_top: end-to-end test of the PID control-loop chip.
// Everything goes through the 16-bit input word: the five coefficients,
// both divider bytes and the setpoint. A short sampling period keeps the
// run quick. Every sample's 16-bit output is compared with the integer
// reference model, and so is the spacing between samples. The output must
// hold between samples. Workloads: a step, a skyline of setpoint levels and
// a ramp. The test also forces an 8-bit output wrap with a high-gain
// coefficient set, and overruns with a divider shorter than one sample
// computation. Each mechanism is counted, and one that never happens counts
// as a failure.
module tb_arma_pid_top;
  timeunit 1ns;
  timeprecision 1ps;
  import arma_pkg::*;
  import arma_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] io_in = 16'h0;
  logic [15:0] io_out;

  int checks = 0;
  int failures = 0;
  ref_state_t m;
  int cur_r = 0;
  int cur_div = 40000;
  int last_valid_cycle = -1;
  int cycle = 0;

  // Mechanism counters.
  int n_field [8];
  int n_samples = 0;
  int n_period_ok = 0;
  int n_wrap = 0;
  int n_overrun = 0;
  int n_div_change = 0;
  int n_hold = 0;

  arma_pid_top dut (.clk, .rst_n, .io_in, .io_out);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Register contents as written through the input word.
  int w_coef [5] = '{9, 4, -3, 107, -43};

  // Present one input word for one clock.
  task automatic write_field(input int sel, input int val);
    @(negedge clk);
    io_in = (sel == 7) ? {3'b111, 8'h00, 5'(val)} : {3'(sel), 8'(val), 5'h0};
    n_field[sel]++;
    @(posedge clk);
    if (sel < 5) w_coef[sel] = (val & 255) >= 128 ? (val & 255) - 256 : (val & 255);
    @(negedge clk);
  endtask

  // Reprogram coefficients and divider between two samples: first park the
  // divider at a long period, let any sample in flight finish, then load.
  task automatic load_config(input int a1, a3, a4, b2, b3, input int div);
    @(posedge dut.u_arma.valid);
    write_field(6, 8'hFF);
    repeat (10) @(negedge clk);
    write_field(0, a1);
    write_field(1, a3);
    write_field(2, a4);
    write_field(3, b2);
    write_field(4, b3);
    write_field(5, div & 255);
    write_field(7, cur_r);
    write_field(6, div >> 8);
    if (div != cur_div) n_div_change++;
    cur_div = div;
    last_valid_cycle = -1;
  endtask

  // Run n samples at setpoint rv.
  task automatic run(input int rv, input int n);
    @(negedge clk);
    cur_r = rv;
    io_in = {3'b111, 8'h00, 5'(rv)};
    n_field[7]++;
    repeat (n) @(posedge dut.u_arma.valid);
    @(negedge clk);
  endtask

  // Snapshot the coefficients when a sample starts.
  int snap [5];
  always @(posedge clk)
    if (rst_n && dut.u_arma.start && !dut.u_arma.busy) snap = w_coef;

  // Every completed sample is checked against the reference model.
  always @(negedge clk) begin
    if (rst_n && dut.u_arma.valid) begin
      m.a1 = snap[0]; m.a3 = snap[1]; m.a4 = snap[2]; m.b2 = snap[3]; m.b3 = snap[4];
      ref_step(m, cur_r);
      n_samples++;
      checks++;
      if (int'(signed'(io_out)) != m.c16) begin
        failures++;
        $display("FAIL sample %0d r=%0d out %0d exp %0d", n_samples, cur_r,
                 signed'(io_out), m.c16);
      end
      if (dut.u_arma.wrap) n_wrap++;
      if (last_valid_cycle >= 0 && cur_div >= 7) begin
        checks++;
        if (cycle - last_valid_cycle != cur_div) begin
          failures++;
          $display("FAIL sample spacing %0d exp %0d", cycle - last_valid_cycle, cur_div);
        end
        n_period_ok++;
      end
      last_valid_cycle = cycle;
    end
  end

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && dut.u_arma.overrun) n_overrun++;

  // The output word changes only together with a sample's valid pulse.
  logic [15:0] prev_out = 16'h0;
  always @(negedge clk) begin
    if (rst_n) begin
      if (io_out != prev_out) begin
        checks++;
        if (!dut.u_arma.valid) begin
          failures++;
          $display("FAIL output changed without a sample");
        end
      end else if (!dut.u_arma.valid) n_hold++;
    end
    prev_out = io_out;
  end

  initial begin
    #200000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_reset(m);
    snap = w_coef;
    io_in = {3'b111, 8'h00, 5'd0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(io_out == 16'h0, "output after reset");
    // Published controller, sampled every 20 clocks.
    load_config(9, 4, -3, 107, -43, 20);
    // Step response.
    run(8, 40);
    // Skyline.
    run(12, 30);
    run(2, 30);
    run(-10, 30);
    run(5, 30);
    // Ramp, one setpoint step every two samples.
    for (int v = -16; v < 16; v++) run(v, 2);
    // High-gain set: the 8-bit feedback sample wraps.
    load_config(127, 60, 40, 120, -60, 25);
    run(15, 40);
    // A divider shorter than one computation: ticks are dropped.
    load_config(9, 4, -3, 107, -43, 4);
    run(6, 20);
    // Back to a normal period, different from the first.
    load_config(9, 4, -3, 107, -43, 33);
    run(-4, 20);

    for (int s = 0; s < 8; s++) check(n_field[s] > 0, $sformatf("field %0d written", s));
    check(n_samples > 0, "samples computed");
    check(n_period_ok > 0, "sample spacing follows the divider");
    check(n_wrap > 0, "8-bit output wrap");
    check(n_overrun > 0, "overrun on a short divider");
    check(n_div_change >= 3, "divider reprogrammed");
    check(n_hold > 0, "output held between samples");
    $display("samples=%0d wraps=%0d overruns=%0d divider_changes=%0d hold_cycles=%0d",
             n_samples, n_wrap, n_overrun, n_div_change, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
