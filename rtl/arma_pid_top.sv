// arma_pid_top: single-chip PID control loop in a 16-in/16-out slot.
//
// The chip takes one 16-bit input word, gives one 16-bit output word and runs
// from a 10 MHz clock. The input word {sel[2:0], coef[7:0], r[4:0]} programs
// the five ARMA coefficients, the 16-bit sampling divider and the 5-bit
// setpoint (see coef_regfile). The divider makes one sampling strobe per
// period T (4 ms with the reset divider 0x9C40). Each strobe starts
// arma_engine, which advances the combined controller-and-plant difference
// equation by one sample. The 16-bit output word io_out is the latest
// output c(k) before it is cut to 8 bits. It is sign-extended, and one unit
// is 1/8 of a setpoint step (the setpoint is shifted left by 3). io_out
// updates 7 clocks after each strobe and holds its value between samples.
//
// The block structure, the field codes, the 4 ms period and the arithmetic
// follow the design description. The field bit order, the reset values, the
// reset pin and the choice of the full sum as the output word are this
// design's.
//
// The engine's c8, e8, valid, busy, overrun and wrap outputs are connected to
// local signals that go nowhere. The slot has one 16-bit output and it
// carries c16. They stay as named observation points for simulation, and
// lint reports them as unused.
module arma_pid_top
  import arma_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic [IO_W-1:0] io_in,
  output logic [IO_W-1:0] io_out
);

  arma_coefs_t             coefs;
  logic [DIV_W-1:0]        divider;
  setpoint_t               r;
  logic                    tick;
  logic signed [IO_W-1:0]  c16;
  sig_t                    c8;
  sig_t                    e8;
  logic                    valid;
  logic                    busy;
  logic                    overrun;
  logic                    wrap;

  coef_regfile u_regs (
    .clk     (clk),
    .rst_n   (rst_n),
    .io_in   (io_in),
    .coefs   (coefs),
    .divider (divider),
    .r       (r)
  );

  sample_divider #(.DIV_W(DIV_W)) u_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .divider (divider),
    .tick    (tick)
  );

  arma_engine #(.OUT_W(IO_W)) u_arma (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (tick),
    .coefs   (coefs),
    .r       (r),
    .c16     (c16),
    .c8      (c8),
    .e8      (e8),
    .valid   (valid),
    .busy    (busy),
    .overrun (overrun),
    .wrap    (wrap)
  );

  assign io_out = c16;

endmodule
