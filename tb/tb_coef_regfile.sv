// tb_coef_regfile: self-checking test of the input-word decoder.
// Checks the reset contents, then writes random words with random field
// selects and compares every register with a model kept in the testbench,
// one clock after each write.
module tb_coef_regfile;
  timeunit 1ns;
  timeprecision 1ps;
  import arma_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [15:0] io_in = 16'h0;
  arma_coefs_t coefs;
  logic [15:0] divider;
  setpoint_t r;

  int checks = 0;
  int failures = 0;
  int exp_c [5];
  int exp_div;
  int exp_r;
  int sel_seen [8];

  coef_regfile dut (.clk, .rst_n, .io_in, .coefs, .divider, .r);

  always #50 clk = ~clk;   // 10 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic compare(input string when);
    check(int'(coefs.a1) == exp_c[0], {when, " a1"});
    check(int'(coefs.a3) == exp_c[1], {when, " a3"});
    check(int'(coefs.a4) == exp_c[2], {when, " a4"});
    check(int'(coefs.b2) == exp_c[3], {when, " b2"});
    check(int'(coefs.b3) == exp_c[4], {when, " b3"});
    check(int'(divider) == exp_div, {when, " divider"});
    check(int'(r) == exp_r, {when, " setpoint"});
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel, cb, rf, cs;
    exp_c = '{9, 4, -3, 107, -43};
    exp_div = 40000;
    exp_r = 0;
    io_in = {3'b111, 8'h00, 5'd0};
    repeat (2) @(negedge clk);
    compare("reset");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      sel = $urandom_range(0, 7);
      cb  = $urandom_range(0, 255);
      rf  = $urandom_range(0, 31);
      sel_seen[sel]++;
      io_in = {3'(sel), 8'(cb), 5'(rf)};
      cs = (cb >= 128) ? cb - 256 : cb;
      case (sel)
        0, 1, 2, 3, 4: exp_c[sel] = cs;
        5: exp_div = (exp_div & 32'hFF00) | cb;
        6: exp_div = (exp_div & 32'h00FF) | (cb << 8);
        default: exp_r = (rf >= 16) ? rf - 32 : rf;
      endcase
      @(negedge clk);
      compare($sformatf("write %0d sel %0d", i, sel));
    end
    // Programming the published set by field writes reproduces the reset set.
    foreach (sel_seen[i]) check(sel_seen[i] > 0, "every field selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
