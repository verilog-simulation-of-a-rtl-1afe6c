// arma_pkg: types and constants shared by the ARMA PID controller.
//
// The controller is a closed-loop PID plus plant model folded into one
// third-order ARMA difference equation and evaluated in 8-bit fixed point.
// This package fixes the word sizes of the 16-bit input interface:
// a 3-bit field select, an 8-bit coefficient byte and a 5-bit setpoint. It
// also holds the coefficient record and the reset contents of the registers.
//
// The widths, the field names and the divider value 0x9C40 (4 ms at 10 MHz)
// come from the design description. The reset coefficients are the
// published floating-point coefficients in Q2.6 (value x 64, rounded to
// nearest). Loading the registers at reset is this design's choice. With it
// the chip runs the published controller without being programmed.
package arma_pkg;

  localparam int COEF_W = 8;   // coefficient byte
  localparam int SIG_W  = 8;   // error and output samples fed back
  localparam int R_W    = 5;   // setpoint field
  localparam int DIV_W  = 16;  // sampling divider, two bytes
  localparam int IO_W   = 16;  // chip input and output words
  localparam int SEL_W  = 3;

  // Field select of the input word, one code per register.
  typedef enum logic [SEL_W-1:0] {
    SEL_A1       = 3'b000,
    SEL_A3       = 3'b001,
    SEL_A4       = 3'b010,
    SEL_B2       = 3'b011,
    SEL_B3       = 3'b100,
    SEL_DIV_LSB  = 3'b101,
    SEL_DIV_MSB  = 3'b110,
    SEL_SETPOINT = 3'b111
  } sel_e;

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [SIG_W-1:0]  sig_t;
  typedef logic signed [R_W-1:0]    setpoint_t;

  // ARMA coefficients, Q2.6 two's complement (range -2.0 .. +1.984).
  typedef struct packed {
    coef_t a1;  // error e(k-1)
    coef_t a3;  // error e(k-2)
    coef_t a4;  // error e(k-3)
    coef_t b2;  // output c(k-1)
    coef_t b3;  // output c(k-2)
  } arma_coefs_t;

  // 0.1361, 0.06508, -0.04732, 1.67, -0.6703 times 64, rounded.
  localparam arma_coefs_t COEF_RESET = '{
    a1: 8'sd9,
    a3: 8'sd4,
    a4: -8'sd3,
    b2: 8'sd107,
    b3: -8'sd43
  };

  // 10 MHz / 40000 = 250 Hz, T = 4 ms.
  localparam logic [DIV_W-1:0] DIV_RESET = 16'h9C40;

endpackage
