// sample_divider: sampling-period generator.
//
// Counts clock cycles and raises tick for one cycle every `divider` cycles.
// At the 10 MHz chip clock the default divider 0x9C40 = 40000 gives the 4 ms
// sampling period of the controller. The divider value is a run-time input
// (two bytes of the configuration registers), as the design description
// specifies. How the count is made is this design's choice: a free-running
// up-counter that restarts at divider-1. A divider of 1 ticks on every
// cycle. A divider of 0 wraps the counter, giving a period of 2**DIV_W
// cycles. If the divider is lowered below the current count, the counter
// restarts at the next edge, so the new period takes effect within one
// period.
//
// Timing: tick is registered. The first tick comes `divider` cycles after
// reset is released.
module sample_divider #(
  parameter int DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] divider,
  output logic             tick
);

  logic [DIV_W-1:0] cnt;
  logic             last;

  assign last = (cnt >= divider - DIV_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= last;
      cnt  <= last ? '0 : cnt + DIV_W'(1);
    end
  end

endmodule
