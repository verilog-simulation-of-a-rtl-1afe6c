// tb_sample_divider: self-checking test of the sampling-period generator.
// For several divider values, including the 4 ms default 0x9C40 at 10 MHz,
// measures the number of clocks between ticks and checks that every tick
// lasts one clock.
module tb_sample_divider;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] divider = 16'd40000;
  logic tick;

  int checks = 0;
  int failures = 0;

  sample_divider dut (.clk, .rst_n, .divider, .tick);

  always #50 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Measure n periods of the current divider.
  task automatic measure(input int n);
    int cnt;
    while (!tick) @(negedge clk);
    for (int p = 0; p < n; p++) begin
      @(negedge clk);
      check(!tick, $sformatf("tick longer than one clock, divider %0d", divider));
      cnt = 1;
      while (!tick) begin
        @(negedge clk);
        cnt++;
      end
      check(cnt == int'(divider), $sformatf("period %0d exp %0d", cnt, divider));
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime ts, te;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // Default: 4 ms sampling period at 10 MHz.
    @(posedge tick) ts = $realtime;
    @(posedge tick) te = $realtime;
    check((te - ts) == 4.0e6, $sformatf("sampling period %0t", te - ts));
    @(negedge clk);
    divider = 16'd7;  measure(20);
    divider = 16'd2;  measure(20);
    divider = 16'd37; measure(10);
    for (int k = 0; k < 10; k++) begin
      divider = 16'($urandom_range(2, 300));
      measure(4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
