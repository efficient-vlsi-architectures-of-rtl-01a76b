// lift_core_pipe: combinational datapath of the further-pipelined systolic
// 1-D lifting architecture, with a pipeline cut after every PE.
//
// It is lift_core with a pipeline register after every PE, so the longest
// path is one PE.  The document shows this cut for a two-step chain: two
// pipeline delay registers are added and the critical path drops to one PE.
// Cutting after every PE of a longer chain is this design's generalisation.
// As in lift_core, the caller keeps the state: flip-flops in the row filter,
// the temporal line buffer in the column filter.  One call is one time slot k
// of a line, in which the pair (x[2k-1], x[2k]) enters.
//
// PE i (1-based) works i-1 slots behind the input: in slot k it computes what
// lift_core computes in slot k-(i-1).  With y0 = even input and yi = PE i's
// output, its operands are
//   C = r(i-1) = y(i-1) registered once,
//   B = s(i-1) = y(i-1) registered twice,
//   A = odd input (i = 1), even input registered twice (i = 2),
//       or t(i-2) = y(i-2) registered three times (i > 2).
// For PE 1, B is the even input registered once and C the even input itself.
// State words (NS = 3*STEPS-2 in all):
//   st[0] = e1, st[1] = e2       even input delayed by one and two slots
//   st[2+3j], st[3+3j]           r and s of PE j+1, for j = 0..STEPS-2
//   st[4+3j]                     t of PE j+1, for j = 0..STEPS-3
// st_o is the next value of every word.  Low = y(STEPS) and high =
// r(STEPS-1); both belong to sample index k - LAT, with LAT = STEPS/2 +
// STEPS - 1 (5 for (9,7)).  Symmetric extension: mirror_i[i-1] has the same
// meaning as in lift_core.  The caller raises it i-1 slots later than
// lift_core's, so PE 2p+1 mirrors in slot 3p and PE 2p+2 in slot 3p+2.
module lift_core_pipe
  import dwt_pkg::*;
#(
  parameter int        W     = DATA_W,
  parameter int        STEPS = 4,        // lifting steps (even)
  parameter coef_vec_t COEFS = COEFS_97,
  localparam int       NS    = 3 * STEPS - 2
) (
  input  logic signed [W-1:0] odd_i,
  input  logic signed [W-1:0] even_i,
  input  logic signed [W-1:0] st_i [NS],
  input  logic [STEPS-1:0]    mirror_i,
  output logic signed [W-1:0] st_o [NS],
  output logic signed [W-1:0] low_o,
  output logic signed [W-1:0] high_o
);

  // state word positions
  function automatic int ri(int j); return 2 + 3 * j; endfunction
  function automatic int si(int j); return 3 + 3 * j; endfunction
  function automatic int ti(int j); return 4 + 3 * j; endfunction

  assign st_o[0] = even_i;
  assign st_o[1] = st_i[0];

  for (genvar i = 0; i < STEPS; i++) begin : g_pe
    // PE number i+1
    logic signed [W-1:0] pa, pb0, pc0, pb, pc, yout;

    if (i == 0) begin : g_in
      assign pa  = odd_i;
      assign pb0 = st_i[0];
      assign pc0 = even_i;
    end else if (i == 1) begin : g_in
      assign pa  = st_i[1];
      assign pb0 = st_i[si(0)];
      assign pc0 = st_i[ri(0)];
    end else begin : g_in
      assign pa  = st_i[ti(i-2)];
      assign pb0 = st_i[si(i-1)];
      assign pc0 = st_i[ri(i-1)];
    end

    always_comb begin
      pb = pb0;
      pc = pc0;
      if (mirror_i[i]) begin
        if (i % 2 == 0) pc = pb0;  // odd step: right neighbour mirrored
        else            pb = pc0;  // even step: left neighbour mirrored
      end
    end

    lift_pe #(.W(W), .CAT(PE_SYM), .COEF_A(COEFS[i])) u_pe (
      .a(pa), .b(pb), .c(pc), .d(yout)
    );

    if (i < STEPS - 1) begin : g_rs
      assign st_o[ri(i)] = yout;
      assign st_o[si(i)] = st_i[ri(i)];
    end
    if (i < STEPS - 2) begin : g_t
      assign st_o[ti(i)] = st_i[si(i)];
    end
  end

  assign low_o  = g_pe[STEPS-1].yout;
  assign high_o = st_i[ri(STEPS-2)];

endmodule
