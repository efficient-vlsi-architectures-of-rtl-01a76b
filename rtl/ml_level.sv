// ml_level: the state of one decomposition level of the multi-level 2-D DWT.
//
// In the multi-level framework one row filter datapath and one column filter
// datapath serve all levels in turn.  Everything a level must remember between
// its turns lives here: the pair FIFO that collects its input samples, its
// row-filter temporal registers (the register buffer, STEPS words per level),
// its slot and row counters, its own intermediate line buffer (6 memories of
// NL/2 words) and temporal line buffer (STEPS memories of NL words), and the
// pending column request.  Memory sizes halve from level to level, as in the
// document; the FIFO, the counters and the timing are this design's own.
//
// Input: push_i delivers one sample of this level's NL x ML image in raster
// order (pixels for level 1, the LL band of the level above otherwise); two
// consecutive samples form an even/odd pair in the FIFO.  ready_o says a pair
// is waiting.  A step (step_i, only when ready_o) is one enabled cycle of the
// one-level framework for this level: the shared row datapath filters one pair
// using row_* and writes the low/high result into the intermediate buffer,
// and the shared column datapath computes the request issued at this level's
// previous step (col_*, res_*) and writes its temporal words back, while a new
// column request is issued.  The slot schedule, the buffer rotation and the
// boundary rules are those of dwt2d_one_level.  res_valid_o marks a step whose
// column result is a real coefficient pair.  overflow_o is a sticky flag for
// a push into a full FIFO, which the schedule of dwt2d_ml rules out.
module ml_level
  import dwt_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int STEPS = 4,
  parameter int NL    = 512,   // width of this level's image
  parameter int ML    = 512,   // height of this level's image
  parameter int N_MAX = 512,   // sizes of level 1, for the index port widths
  parameter int M_MAX = 512,
  parameter int FIFO_DEPTH = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      push_i,
  input  logic signed [W-1:0]       sample_i,
  output logic                      ready_o,
  input  logic                      step_i,
  // shared row datapath
  output logic signed [W-1:0]       row_odd_o,
  output logic signed [W-1:0]       row_even_o,
  output logic signed [W-1:0]       row_st_o [STEPS],
  output logic [STEPS-1:0]          row_mirror_o,
  input  logic signed [W-1:0]       row_st_i [STEPS],
  input  logic signed [W-1:0]       row_low_i,
  input  logic signed [W-1:0]       row_high_i,
  // shared column datapath
  output logic signed [W-1:0]       col_odd_o,
  output logic signed [W-1:0]       col_even_o,
  output logic signed [W-1:0]       col_st_o [STEPS],
  output logic [STEPS-1:0]          col_mirror_o,
  input  logic signed [W-1:0]       col_st_i [STEPS],
  // what the column result of this step is
  output logic                      res_valid_o,
  output logic                      res_band_o,
  output logic [$clog2(M_MAX/2)-1:0] res_row_o,
  output logic [$clog2(N_MAX/2)-1:0] res_col_o,
  output logic                      overflow_o
);

  localparam int HALF  = NL / 2;
  localparam int MHALF = ML / 2;
  localparam int LAT   = STEPS / 2;
  localparam int CWID  = $clog2(HALF);
  localparam int RW    = $clog2(ML);
  localparam int SW    = $clog2(MHALF);
  localparam int AW    = $clog2(NL);
  localparam int FW    = $clog2(FIFO_DEPTH);

  initial begin
    assert (HALF > LAT && MHALF > LAT + 1) else $error("ml_level: level image too small");
  end

  // ------------------------------------------------------------ pair FIFO
  typedef struct packed {
    logic signed [W-1:0] even;
    logic signed [W-1:0] odd;
  } pair_t;

  pair_t               fifo [FIFO_DEPTH];
  logic [FW-1:0]       wr_ptr, rd_ptr;
  logic [FW:0]         count;
  logic                have_even, pair_push;
  logic signed [W-1:0] even_hold;

  assign pair_push = push_i && have_even;
  assign ready_o   = (count != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_even  <= 1'b0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      count      <= '0;
      overflow_o <= 1'b0;
    end else begin
      if (push_i) have_even <= ~have_even;
      if (pair_push) wr_ptr <= wr_ptr + 1'b1;
      if (step_i)    rd_ptr <= rd_ptr + 1'b1;
      count <= count + (pair_push ? (FW+1)'(1) : '0) - (step_i ? (FW+1)'(1) : '0);
      if (pair_push && !step_i && count == (FW+1)'(FIFO_DEPTH)) overflow_o <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push_i && !have_even) even_hold <= sample_i;
    if (pair_push) fifo[wr_ptr] <= '{even: even_hold, odd: sample_i};
  end

  assert property (@(posedge clk) disable iff (!rst_n) step_i |-> ready_o);

  // ------------------------------------------------------------ row side
  logic signed [W-1:0] odd_q;
  logic signed [W-1:0] st [STEPS];
  logic [CWID-1:0]     k;
  logic [RW-1:0]       in_row, wrow;
  logic                row_primed, r_valid, row_started, col_primed;
  logic [CWID-1:0]     r_col;
  logic                c_high, c_valid;
  logic [SW-1:0]       c_slot;

  assign row_odd_o  = odd_q;
  assign row_even_o = fifo[rd_ptr].even;
  assign row_st_o   = st;

  always_comb begin
    for (int g = 0; g < STEPS; g++) row_mirror_o[g] = (k == CWID'((g + 1) / 2));
  end

  always_ff @(posedge clk) begin
    if (step_i) begin
      st    <= row_st_i;
      odd_q <= fifo[rd_ptr].odd;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k           <= '0;
      in_row      <= '0;
      row_primed  <= 1'b0;
      row_started <= 1'b0;
      col_primed  <= 1'b0;
    end else if (step_i) begin
      if (k == CWID'(HALF - 1)) begin
        k      <= '0;
        in_row <= (in_row == RW'(ML - 1)) ? '0 : in_row + 1'b1;
      end else begin
        k <= k + 1'b1;
      end
      if (k == CWID'(LAT)) row_primed <= 1'b1;
      if (r_valid) row_started <= 1'b1;
      if (c_valid) col_primed  <= 1'b1;
    end
  end

  assign r_valid = row_primed || k == CWID'(LAT);
  assign r_col   = (k >= CWID'(LAT)) ? k - CWID'(LAT) : CWID'(HALF - LAT) + k;

  always_comb begin
    if (k >= CWID'(LAT)) wrow = in_row;
    else                 wrow = (in_row == '0) ? RW'(ML - 1) : in_row - 1'b1;
  end

  // ------------------------------------------------------------ column request

  always_comb begin
    c_high = ~wrow[0];
    if (!c_high)         c_slot = SW'(wrow >> 1);
    else if (wrow == '0) c_slot = SW'(MHALF - 1);
    else                 c_slot = SW'((wrow >> 1) - 1'b1);
    c_valid = row_started && (col_primed || c_slot == SW'(LAT));
  end

  typedef struct packed {
    logic            valid;
    logic            high;
    logic [CWID-1:0] col;
    logic [SW-1:0]   slot;
    logic [AW-1:0]   addr;
  } req_t;

  req_t req, req_q;

  always_comb begin
    req.valid = c_valid;
    req.high  = c_high;
    req.col   = r_col;
    req.slot  = c_slot;
    req.addr  = c_high ? AW'(HALF) + AW'(r_col) : AW'(r_col);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      req_q <= '0;
    else if (step_i) req_q <= req;
  end

  always_comb begin
    for (int g = 0; g < STEPS; g++) col_mirror_o[g] = (req_q.slot == SW'((g + 1) / 2));
  end

  assign res_valid_o = req_q.valid;
  assign res_band_o  = req_q.high;
  assign res_col_o   = ($clog2(N_MAX/2))'(req_q.col);
  assign res_row_o   = ($clog2(M_MAX/2))'((req_q.slot >= SW'(LAT)) ? req_q.slot - SW'(LAT)
                                                                    : SW'(MHALF - LAT) + req_q.slot);

  // ------------------------------------------------------------ line buffers
  inter_buffer #(.W(W), .N(NL)) u_ibuf (
    .clk(clk), .rst_n(rst_n), .en(step_i), .col_i(r_col),
    .wlow_i(row_low_i), .whigh_i(row_high_i), .rd_high_i(c_high),
    .rodd_o(col_odd_o), .reven_o(col_even_o)
  );

  temporal_buffer #(.W(W), .T(STEPS), .DEPTH(NL)) u_tbuf (
    .clk(clk), .en(step_i), .we(step_i), .waddr(req_q.addr), .wdata(col_st_i),
    .raddr(req.addr), .rdata(col_st_o)
  );

endmodule
