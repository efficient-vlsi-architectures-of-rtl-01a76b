// lift_pe: basic lifting processing element, one of four categories.
//
// Every lifting step of the factorisation is made of these elements: an output
// node D takes one sample A of its own parity and one or two samples B, C of
// the other parity, and adds a filtered version of B and C to A:
//   (a) PE_SYM     D = A + alpha*(B + C)   symmetric step, 1 multiplier
//   (b) PE_ANTI    D = A + alpha*(B - C)   anti-symmetric step, 1 multiplier
//   (c) PE_SINGLE  D = A + alpha*B         one-tap step, 1 multiplier
//   (d) PE_GENERAL D = A + beta*B + alpha*C   general step, 2 multipliers
// The four structures follow the document; in (d) the printed "+/-" is taken
// into the sign of alpha.  Fixed-point handling is this design's own: the
// product (or the sum of the two products in (d)) carries CF fraction bits
// and is shifted right arithmetically (rounding toward minus infinity) before
// the final addition, and the result wraps to W bits.
// Purely combinational; no clock.
module lift_pe
  import dwt_pkg::*;
#(
  parameter int      W      = DATA_W,
  parameter pe_cat_e CAT    = PE_SYM,
  parameter int      COEF_A = ALPHA_Q,  // alpha, CF fraction bits
  parameter int      COEF_B = 0         // beta, used by category (d) only
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic signed [W-1:0] c,
  output logic signed [W-1:0] d
);

  localparam int PW = W + CW + 2;  // product width, no overflow possible

  logic signed [PW-1:0] ca, cb, bw, cw, prod, sum;

  always_comb begin
    ca = PW'(COEF_A);
    cb = PW'(COEF_B);
    bw = PW'(b);
    cw = PW'(c);
    unique case (CAT)
      PE_SYM:     prod = (bw + cw) * ca;
      PE_ANTI:    prod = (bw - cw) * ca;
      PE_SINGLE:  prod = bw * ca;
      PE_GENERAL: prod = bw * cb + cw * ca;
      default:    prod = '0;
    endcase
    sum = PW'(a) + (prod >>> CF);
    d   = sum[W-1:0];
  end

endmodule
