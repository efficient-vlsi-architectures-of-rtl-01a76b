// col_filter: column filter module of the line-based 2-D framework.
//
// The same systolic lifting datapath as the row filter (lift_core), but it
// works on one column per cycle and keeps the temporal registers of each
// column in the temporal data buffer instead of in flip-flops: a column's
// STEPS register words are read from the buffer, the datapath updates them,
// and they are written back.  This sharing is the document's; the two-stage
// timing below is this design's own.
//
// Timing (all in enabled cycles):
//   cycle t   request: valid_i, high_i (0: low band of the row filter, 1: high
//             band), col_i, slot_i.  The caller issues the matching reads of
//             the intermediate buffer in the same cycle; this module drives
//             the temporal buffer's read address tb_raddr_o.
//   cycle t+1 the odd/even row samples (rodd_i, reven_i) and the register words
//             (tb_rdata_i) arrive; the datapath computes, the register words
//             are written back (tb_we_o, tb_waddr_o, tb_wdata_o).
//   cycle t+2 the result sits in the output registers: lo_o/hi_o are the
//             column low/high coefficients of row row_o and column col_o of
//             band band_o; valid_o is high for exactly one clock.
// slot_i is the column-pair slot m = 0..M/2-1 of the frame (rows 2m-1, 2m);
// boundary mirroring and the output row (m - LAT) mod M/2 follow from it,
// as in lift_1d.  LAT = STEPS/2, or STEPS/2 + STEPS - 1 with PIPE = 1.  With
// PIPE = 1 the datapath is lift_core_pipe, one PE deep.  Each column then
// keeps T = 3*STEPS-2 words instead of STEPS: the document notes that
// pipelining adds temporal memories.  Temporal buffer address: column c of
// the low band is word c, of the high band word N/2 + c.
module col_filter
  import dwt_pkg::*;
#(
  parameter int        W     = DATA_W,
  parameter int        STEPS = 4,
  parameter coef_vec_t COEFS = COEFS_97,
  parameter int        N     = 512,   // line width (columns)
  parameter int        M     = 512,   // frame height (rows)
  parameter bit        PIPE  = 1'b0,  // 1: pipelined datapath (lift_core_pipe)
  // temporal words per column
  localparam int       T     = PIPE ? 3 * STEPS - 2 : STEPS
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  // request
  input  logic                       valid_i,
  input  logic                       high_i,
  input  logic [$clog2(N/2)-1:0]     col_i,
  input  logic [$clog2(M/2)-1:0]     slot_i,
  // row pair from the intermediate buffer (one cycle after the request)
  input  logic signed [W-1:0]        rodd_i,
  input  logic signed [W-1:0]        reven_i,
  // temporal data buffer
  output logic [$clog2(N)-1:0]       tb_raddr_o,
  input  logic signed [W-1:0]        tb_rdata_i [T],
  output logic                       tb_we_o,
  output logic [$clog2(N)-1:0]       tb_waddr_o,
  output logic signed [W-1:0]        tb_wdata_o [T],
  // result
  output logic                       valid_o,
  output logic                       band_o,
  output logic [$clog2(M/2)-1:0]     row_o,
  output logic [$clog2(N/2)-1:0]     col_o,
  output logic signed [W-1:0]        lo_o,
  output logic signed [W-1:0]        hi_o
);

  localparam int HALF  = N / 2;
  localparam int MHALF = M / 2;
  localparam int AW    = $clog2(N);
  localparam int CWID  = $clog2(HALF);
  localparam int SW    = $clog2(MHALF);
  localparam int LAT   = PIPE ? STEPS / 2 + STEPS - 1 : STEPS / 2;

  initial begin
    assert (MHALF > LAT + 1 && HALF > LAT) else $error("col_filter: frame too small");
  end

  typedef struct packed {
    logic            valid;
    logic            high;
    logic [CWID-1:0] col;
    logic [SW-1:0]   slot;
    logic [AW-1:0]   addr;
  } req_t;

  req_t                req, req_q;
  logic [STEPS-1:0]    mirror;
  logic signed [W-1:0] lo, hi;

  always_comb begin
    req.valid = valid_i;
    req.high  = high_i;
    req.col   = col_i;
    req.slot  = slot_i;
    req.addr  = high_i ? AW'(HALF) + AW'(col_i) : AW'(col_i);
  end

  assign tb_raddr_o = req.addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) req_q <= '0;
    else if (en) req_q <= req;
  end

  always_comb begin
    for (int g = 0; g < STEPS; g++)
      mirror[g] = (req_q.slot == SW'((g + 1) / 2 + (PIPE ? g : 0)));
  end

  if (!PIPE) begin : g_plain
    lift_core #(.W(W), .STEPS(STEPS), .COEFS(COEFS)) u_core (
      .odd_i(rodd_i), .even_i(reven_i), .st_i(tb_rdata_i), .mirror_i(mirror),
      .st_o(tb_wdata_o), .low_o(lo), .high_o(hi)
    );
  end else begin : g_pipe
    lift_core_pipe #(.W(W), .STEPS(STEPS), .COEFS(COEFS)) u_core (
      .odd_i(rodd_i), .even_i(reven_i), .st_i(tb_rdata_i), .mirror_i(mirror),
      .st_o(tb_wdata_o), .low_o(lo), .high_o(hi)
    );
  end

  assign tb_we_o    = en;
  assign tb_waddr_o = req_q.addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= en && req_q.valid;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      band_o <= req_q.high;
      col_o  <= req_q.col;
      row_o  <= (req_q.slot >= SW'(LAT)) ? req_q.slot - SW'(LAT)
                                          : SW'(MHALF - LAT) + req_q.slot;
      lo_o   <= lo;
      hi_o   <= hi;
    end
  end

endmodule
