// lift_1d: 1-D lifting-based DWT architecture (the row filter module).
//
// A systolic chain of STEPS lifting PEs with temporal registers.  With
// PIPE = 0 (default) it is the document's (9,7) architecture: lift_core's
// chain of four category-(a) PEs with one temporal register each, so four
// multipliers, eight adders and four registers, and a critical path through
// all four PEs.  With PIPE = 1 it is the document's further-pipelined form:
// a pipeline register after every PE, so the critical path is one PE.
// Each enabled cycle one odd/even pair enters and one low/high pair leaves,
// so a line of N samples takes N/2 cycles in both forms.
//
// Input order: in the slot k = 0..N/2-1 of a line, odd_i = x[2k-1] and
// even_i = x[2k].  In slot 0, odd_i carries the last odd sample x[N-1] of the
// line before; for the very first line it is ignored.  The outputs are
// combinational from the inputs and registers.  In slot k, low_o/high_o are
// the low/high coefficients number idx_o = (k - LAT) mod N/2.  They belong to
// the current line if k >= LAT, else to the line before.  LAT = STEPS/2
// without pipelining and STEPS/2 + STEPS - 1 with it (2 and 5 for (9,7)).
// valid_o is high in enabled cycles that carry a real coefficient, that is,
// not before the first one after reset.  To get the last line out, LAT more
// pairs (any value) must follow it.  Line ends use symmetric extension
// (this design's choice, see lift_core).
//
// Pipelined form: lift_core_pipe, with its 3*STEPS-2 state words in
// flip-flops (10 for (9,7)).  For a two-step chain that is 4: the plain
// form's 2 plus the 2 pipeline registers the document names.  The outputs
// come STEPS-1 slots later than without pipelining.
// Reset (asynchronous, active low) clears only the slot counter and valid
// state; the data registers need none.
module lift_1d
  import dwt_pkg::*;
#(
  parameter int        W     = DATA_W,
  parameter int        STEPS = 4,
  parameter coef_vec_t COEFS = COEFS_97,
  parameter int        N     = 512,      // line width in samples (even)
  parameter bit        PIPE  = 1'b0      // 1: pipeline register after every PE
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [W-1:0]  odd_i,
  input  logic signed [W-1:0]  even_i,
  output logic signed [W-1:0]  low_o,
  output logic signed [W-1:0]  high_o,
  output logic                 valid_o,
  output logic [$clog2(N/2)-1:0] idx_o
);

  localparam int HALF = N / 2;
  localparam int KW   = $clog2(HALF);
  localparam int LAT  = PIPE ? STEPS / 2 + STEPS - 1 : STEPS / 2;

  initial begin
    assert (N % 2 == 0 && HALF > LAT) else $error("lift_1d: N too small");
  end

  logic [KW-1:0]    k;
  logic             primed;
  logic [STEPS-1:0] mirror;

  // PE g+1 mirrors in slot (g+1)/2, plus g slots when pipelined
  always_comb begin
    for (int g = 0; g < STEPS; g++)
      mirror[g] = (k == KW'((g + 1) / 2 + (PIPE ? g : 0)));
  end

  if (!PIPE) begin : g_plain
    logic signed [W-1:0] st   [STEPS];
    logic signed [W-1:0] st_d [STEPS];

    lift_core #(.W(W), .STEPS(STEPS), .COEFS(COEFS)) u_core (
      .odd_i(odd_i), .even_i(even_i), .st_i(st), .mirror_i(mirror),
      .st_o(st_d), .low_o(low_o), .high_o(high_o)
    );

    always_ff @(posedge clk) begin
      if (en) st <= st_d;
    end
  end else begin : g_pipe
    localparam int NS = 3 * STEPS - 2;
    logic signed [W-1:0] st   [NS];
    logic signed [W-1:0] st_d [NS];

    lift_core_pipe #(.W(W), .STEPS(STEPS), .COEFS(COEFS)) u_core (
      .odd_i(odd_i), .even_i(even_i), .st_i(st), .mirror_i(mirror),
      .st_o(st_d), .low_o(low_o), .high_o(high_o)
    );

    always_ff @(posedge clk) begin
      if (en) st <= st_d;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k      <= '0;
      primed <= 1'b0;
    end else if (en) begin
      k <= (k == KW'(HALF - 1)) ? '0 : k + 1'b1;
      if (k == KW'(LAT)) primed <= 1'b1;
    end
  end

  assign valid_o = en && (primed || k == KW'(LAT));
  assign idx_o   = (k >= KW'(LAT)) ? k - KW'(LAT) : KW'(HALF - LAT) + k;

endmodule
