// coef_regfile: input-word decoder and configuration registers.
//
// The chip has one 16-bit input word. It is split into three fields,
// {sel[2:0], coef[7:0], r[4:0]}, from the most significant bit down. On every
// clock the register named by sel is loaded:
//   sel 000..100  coefficient a1, a3, a4, b2, b3 <- coef (Q2.6)
//   sel 101, 110  low and high byte of the sampling divider <- coef
//   sel 111       setpoint <- r (5-bit two's complement)
// A register keeps its value while sel names another register. So a host
// writes the coefficients one after another, then leaves sel at 111 and
// changes the setpoint as needed.
//
// The field meanings and codes follow the design description. The bit order
// of the three fields, the signed setpoint and the reset values (the
// published coefficients and divider 0x9C40) are this design's choices.
//
// Timing: a value presented at a rising edge is visible on the outputs right
// after that edge. Reset is asynchronous and active low.
module coef_regfile
  import arma_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [IO_W-1:0]           io_in,
  output arma_coefs_t               coefs,
  output logic        [DIV_W-1:0]   divider,
  output setpoint_t                 r
);

  sel_e                 sel;
  logic [COEF_W-1:0]    coef_byte;
  logic [R_W-1:0]       r_field;

  assign sel       = sel_e'(io_in[IO_W-1 -: SEL_W]);
  assign coef_byte = io_in[R_W +: COEF_W];
  assign r_field   = io_in[R_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coefs   <= COEF_RESET;
      divider <= DIV_RESET;
      r       <= '0;
    end else begin
      unique case (sel)
        SEL_A1:       coefs.a1           <= coef_t'(coef_byte);
        SEL_A3:       coefs.a3           <= coef_t'(coef_byte);
        SEL_A4:       coefs.a4           <= coef_t'(coef_byte);
        SEL_B2:       coefs.b2           <= coef_t'(coef_byte);
        SEL_B3:       coefs.b3           <= coef_t'(coef_byte);
        SEL_DIV_LSB:  divider[7:0]       <= coef_byte;
        SEL_DIV_MSB:  divider[15:8]      <= coef_byte;
        SEL_SETPOINT: r                  <= setpoint_t'(r_field);
      endcase
    end
  end

endmodule
