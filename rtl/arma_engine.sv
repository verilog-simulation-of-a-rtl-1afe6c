// arma_engine: fixed-point ARMA evaluation of the closed PID control loop.
//
// The PID controller D(z) and the sampled plant G(z) are merged into one
// open-loop transfer function. Once per sample it is evaluated as
//   c(k) = a1*e(k-1) + a3*e(k-2) + a4*e(k-3) + b2*c(k-1) + b3*c(k-2)
//   e(k) = r8 - c(k),   r8 = r << R_SHIFT
// This closes the loop: the engine both controls and models the plant.
// Errors and outputs are kept as 8-bit two's-complement samples. The
// coefficients are Q2.6 bytes.
//
// How it works: one signed 8x8 multiplier is shared by the five products,
// as the design description's multiply-and-add wording suggests, which keeps
// the block within a small gate budget. A start pulse begins a sample. Five
// MAC cycles follow, one product each, in the order a1, a3, a4, b2, b3. Each
// 16-bit product is shifted right arithmetically by PROD_SHIFT before it is
// added: its fraction bits are truncated product by product. This per-product
// truncation is the design description's and is the source of the small DC
// bias and limit cycles of the fixed-point loop. In an update cycle the 16-bit
// sum becomes the output c16. Its low SIG_W bits are the fed-back sample c8
// (higher bits are dropped, so a large output wraps). The error e8 = r8 - c8
// is formed and both delay lines shift.
//
// Interface: start (one-cycle pulse per sample), coefs and r (held stable
// by the configuration registers). Outputs: c16, the c8 and e8 samples,
// valid (one-cycle pulse when they update), busy, overrun (a start that
// arrived while busy and was dropped) and wrap (the new c16 did not fit in
// c8).
//
// Timing: valid rises 6 clocks after the clock edge that sees start (5 MAC
// cycles plus one update cycle). Samples may therefore start every 7 or
// more clocks. The delay lines reset to zero.
//
// This design's own choices:
//  - PROD_SHIFT is 6. The text shifts each product right by 7 and counts an
//    extra factor of 2 on the signal. Here the setpoint is shifted by 3 only,
//    so the equivalent shift for Q2.6 coefficients is 6. This keeps
//    b2 + b3 = 1.0 and the loop's integral action.
//  - The error terms use the previous three errors e(k-1..k-3). Eq. (23)
//    gives this; the printed difference equation writes e(k), e(k-2) and
//    e(k-3).
module arma_engine
  import arma_pkg::*;
#(
  parameter int R_SHIFT    = 3,   // setpoint to 8-bit sample scaling
  parameter int PROD_SHIFT = 6,   // product to sample scaling (Q2.6)
  parameter int OUT_W      = 16   // width of the output word
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  arma_coefs_t              coefs,
  input  setpoint_t                r,
  output logic signed [OUT_W-1:0]  c16,
  output sig_t                     c8,
  output sig_t                     e8,
  output logic                     valid,
  output logic                     busy,
  output logic                     overrun,
  output logic                     wrap
);

  localparam int PROD_W = COEF_W + SIG_W;
  localparam int NTERMS = 5;

  typedef enum logic [1:0] {S_IDLE, S_MAC, S_UPDATE} state_e;

  state_e                     state;
  logic [2:0]                 idx;
  logic signed [OUT_W-1:0]    acc;

  // Delay lines: e_d[0] = e(k-1), e_d[1] = e(k-2), e_d[2] = e(k-3),
  // c_d[0] = c(k-1), c_d[1] = c(k-2).
  sig_t                       e_d [3];
  sig_t                       c_d [2];

  coef_t                      op_coef;
  sig_t                       op_sig;
  logic signed [PROD_W-1:0]   prod;
  logic signed [OUT_W-1:0]    term;

  sig_t                       r8;
  sig_t                       c8_next;
  sig_t                       e8_next;

  // Operand select for the shared multiplier.
  always_comb begin
    unique case (idx)
      3'd0:    begin op_coef = coefs.a1; op_sig = e_d[0]; end
      3'd1:    begin op_coef = coefs.a3; op_sig = e_d[1]; end
      3'd2:    begin op_coef = coefs.a4; op_sig = e_d[2]; end
      3'd3:    begin op_coef = coefs.b2; op_sig = c_d[0]; end
      default: begin op_coef = coefs.b3; op_sig = c_d[1]; end
    endcase
  end

  assign prod = op_coef * op_sig;
  assign term = OUT_W'(prod >>> PROD_SHIFT);

  // Setpoint scaled to a sample, output truncated to a sample, error.
  assign r8      = sig_t'(SIG_W'(r) <<< R_SHIFT);
  assign c8_next = sig_t'(acc[SIG_W-1:0]);
  assign e8_next = sig_t'(r8 - c8_next);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      idx     <= '0;
      acc     <= '0;
      c16     <= '0;
      c8      <= '0;
      e8      <= '0;
      valid   <= 1'b0;
      overrun <= 1'b0;
      wrap    <= 1'b0;
      e_d     <= '{default: '0};
      c_d     <= '{default: '0};
    end else begin
      valid   <= 1'b0;
      wrap    <= 1'b0;
      overrun <= start && (state != S_IDLE);
      unique case (state)
        S_IDLE: begin
          if (start) begin
            acc   <= '0;
            idx   <= '0;
            state <= S_MAC;
          end
        end
        S_MAC: begin
          acc <= acc + term;
          idx <= idx + 3'd1;
          if (idx == 3'(NTERMS - 1)) state <= S_UPDATE;
        end
        S_UPDATE: begin
          c16    <= acc;
          c8     <= c8_next;
          e8     <= e8_next;
          wrap   <= (acc != OUT_W'(c8_next));
          e_d[2] <= e_d[1];
          e_d[1] <= e_d[0];
          e_d[0] <= e8_next;
          c_d[1] <= c_d[0];
          c_d[0] <= c8_next;
          valid  <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Assertions. Their disable condition samples rst_n on the clock, which
  // lint reports as mixed synchronous and asynchronous use of the reset.
  // The flops themselves use rst_n only asynchronously.
  // A sample's results are announced once.
  a_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    valid |=> !valid);
  // The operand counter never leaves the five products while accumulating.
  a_idx_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_MAC) |-> (idx < 3'(NTERMS)));

endmodule
