// lift_core: combinational datapath of the systolic 1-D lifting architecture.
//
// The lifting steps are chained as in the document's systolic mapping (one PE
// of category (a) per step, the (9,7) filter giving four).  One call of the
// datapath is one time slot k of a line, in which the odd/even input pair
// (x[2k-1], x[2k]) enters; the previous line's last odd sample x[N-1] is the
// odd input of slot 0 of the next line, which makes every line N/2 slots long
// and lets lines follow one another without a gap.
//
// With y0 = even input and yi = output of PE i, PE i computes
//   yi = A + coef_i * (B + C),  A = odd input (i = 1) or st[i-2] (i > 1),
//                               B = st[i-1],  C = y(i-1),
// where st[j] is the temporal register holding yj from the previous slot.
// The caller stores st_o[j] = yj as the next st[j]; in the row filter these
// are registers, in the column filter they live in the temporal line buffer.
// Low pass = y(STEPS), high pass = y(STEPS-1).  In slot k they belong to
// sample index k - STEPS/2 of the line (of the previous line if negative).
//
// Line ends use symmetric extension, this design's own choice of boundary
// rule: mirror_i[i-1] makes PE i use C := B (odd steps, at the line end) or
// B := C (even steps, at the line start).  PE i = 2p+1 mirrors in slot p,
// PE i = 2p+2 in slot p+1; the caller raises the flags.
module lift_core
  import dwt_pkg::*;
#(
  parameter int        W     = DATA_W,
  parameter int        STEPS = 4,        // lifting steps (even)
  parameter coef_vec_t COEFS = COEFS_97
) (
  input  logic signed [W-1:0] odd_i,
  input  logic signed [W-1:0] even_i,
  input  logic signed [W-1:0] st_i [STEPS],
  input  logic [STEPS-1:0]    mirror_i,
  output logic signed [W-1:0] st_o [STEPS],
  output logic signed [W-1:0] low_o,
  output logic signed [W-1:0] high_o
);

  // Each PE's input and output live in its own generate scope, so that no
  // array links the stages and the chain reads as the straight pipe it is.
  for (genvar i = 0; i < STEPS; i++) begin : g_step
    // PE number i+1 of the chain
    logic signed [W-1:0] yin, yout, pa, pb, pc;

    if (i == 0) begin : g_first
      assign yin = even_i;
      assign pa  = odd_i;
    end else begin : g_next
      assign yin = g_step[i-1].yout;
      assign pa  = st_i[i-1];
    end

    always_comb begin
      pb = st_i[i];
      pc = yin;
      if (mirror_i[i]) begin
        if (i % 2 == 0) pc = st_i[i];  // odd step: right neighbour mirrored
        else            pb = yin;      // even step: left neighbour mirrored
      end
    end

    lift_pe #(.W(W), .CAT(PE_SYM), .COEF_A(COEFS[i])) u_pe (
      .a(pa), .b(pb), .c(pc), .d(yout)
    );

    assign st_o[i] = yin;
  end

  assign low_o  = g_step[STEPS-1].yout;
  assign high_o = g_step[STEPS-1].yin;

endmodule
