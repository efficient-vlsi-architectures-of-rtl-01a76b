// dwt2d_one_level: one-level line-based 2-D lifting DWT with the (9,7) filter.
//
// Structure (the document's one-level framework):
//   row filter (lift_1d) -> intermediate data buffer (inter_buffer, 6 x N/2)
//   -> column filter (col_filter) <-> temporal data buffer (temporal_buffer,
//   STEPS x N) -> scaling (scale_unit, 2 multipliers).
// The frame enters in raster order, two horizontally adjacent pixels per
// cycle (in_even = x[r][2k], in_odd = x[r][2k+1]), so an N x M frame takes
// N*M/2 cycles.  One register delays the odd pixel so that the row filter
// sees the pairs (x[2k-1], x[2k]) its systolic schedule wants; this register
// is this design's own.  in_valid low freezes the whole datapath (a stall).
//
// Everything runs in lockstep with the input.  In the cycle the row filter
// produces column c of its row r (low and high band), that pair is written to
// the intermediate buffer and the column filter reads column c of two earlier
// rows: the low band of rows r-2, r-1 when r is odd, the high band of rows
// r-3, r-2 when r is even.  So each row pair (2m-1, 2m) is column-filtered
// across the two row times that follow it, low band first, and the column
// filter, like the row filter, makes one low/high pair per cycle.
//
// Output: out_valid marks one coefficient pair.  out_band = 0 gives
// out_low = LL and out_high = LH, out_band = 1 gives out_low = HL and
// out_high = HH, at subband position (out_row, out_col), each of size
// M/2 x N/2.  Coefficients are signed DATA_W-bit numbers with FRAC fraction
// bits, already scaled.  A frame's last coefficients come out only after
// (STEPS/2 + 2) more rows plus a few pairs of the next frame (or of filler
// data) have been pushed in.  Latency from a pixel pair to the last
// coefficient it affects is therefore a few rows; the throughput is one pixel
// pair in, one coefficient pair out, per cycle.  Boundary handling is
// symmetric extension at all four frame edges (this design's choice).
//
// PIPE = 1 selects the further-pipelined datapath in both filters
// (lift_core_pipe, one PE deep instead of four).  The temporal buffer then
// holds 3*STEPS-2 = 10 memories of N words instead of 4, and LAT = STEPS/2
// grows to STEPS/2 + STEPS - 1 = 5 slots.  The schedule itself is unchanged.
// The default is the document's main (9,7) architecture, PIPE = 0.
module dwt2d_one_level
  import dwt_pkg::*;
#(
  parameter int N = 512,   // line width in pixels (even)
  parameter int M = 512,   // frame height in rows (even)
  parameter bit PIPE = 1'b0 // 1: pipelined row and column datapaths
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [PIX_W-1:0]           in_even,
  input  logic [PIX_W-1:0]           in_odd,
  output logic                       out_valid,
  output logic                       out_band,
  output logic [$clog2(M/2)-1:0]     out_row,
  output logic [$clog2(N/2)-1:0]     out_col,
  output logic signed [DATA_W-1:0]   out_low,
  output logic signed [DATA_W-1:0]   out_high
);

  localparam int W     = DATA_W;
  localparam int STEPS = 4;
  localparam int HALF  = N / 2;
  localparam int MHALF = M / 2;
  localparam int LAT   = PIPE ? STEPS / 2 + STEPS - 1 : STEPS / 2;
  localparam int T     = PIPE ? 3 * STEPS - 2 : STEPS;
  localparam int CWID  = $clog2(HALF);
  localparam int RW    = $clog2(M);
  localparam int SW    = $clog2(MHALF);

  // ---------------------------------------------------------------- input
  logic signed [W-1:0] odd_q, x_even, x_odd;
  logic                en;

  assign en     = in_valid;
  assign x_even = W'({1'b0, in_even}) <<< FRAC;
  assign x_odd  = W'({1'b0, in_odd}) <<< FRAC;

  always_ff @(posedge clk) begin
    if (en) odd_q <= x_odd;
  end

  // ---------------------------------------------------------------- row filter
  logic signed [W-1:0] r_low, r_high;
  logic                r_valid;
  logic [CWID-1:0]     r_col;

  lift_1d #(.W(W), .STEPS(STEPS), .COEFS(COEFS_97), .N(N), .PIPE(PIPE)) u_row (
    .clk(clk), .rst_n(rst_n), .en(en), .odd_i(odd_q), .even_i(x_even),
    .low_o(r_low), .high_o(r_high), .valid_o(r_valid), .idx_o(r_col)
  );

  // input row counter and the row the row filter is writing
  logic [RW-1:0] in_row, wrow;
  logic [CWID-1:0] in_k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_k   <= '0;
      in_row <= '0;
    end else if (en) begin
      if (in_k == CWID'(HALF - 1)) begin
        in_k   <= '0;
        in_row <= (in_row == RW'(M - 1)) ? '0 : in_row + 1'b1;
      end else begin
        in_k <= in_k + 1'b1;
      end
    end
  end

  always_comb begin
    if (in_k >= CWID'(LAT)) wrow = in_row;
    else                    wrow = (in_row == '0) ? RW'(M - 1) : in_row - 1'b1;
  end

  // ---------------------------------------------------------------- schedule
  // Column slot m of the row pair being column-filtered, and its band.
  logic          c_high;
  logic [SW-1:0] c_slot;
  logic          row_started, col_primed, c_valid;

  always_comb begin
    c_high = ~wrow[0];
    if (!c_high)          c_slot = SW'(wrow >> 1);
    else if (wrow == '0)  c_slot = SW'(MHALF - 1);
    else                  c_slot = SW'((wrow >> 1) - 1'b1);
    c_valid = row_started && (col_primed || c_slot == SW'(LAT));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_started <= 1'b0;
      col_primed  <= 1'b0;
    end else if (en) begin
      if (r_valid) row_started <= 1'b1;
      if (c_valid) col_primed  <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- buffers
  logic signed [W-1:0] b_odd, b_even;

  inter_buffer #(.W(W), .N(N)) u_ibuf (
    .clk(clk), .rst_n(rst_n), .en(en), .col_i(r_col),
    .wlow_i(r_low), .whigh_i(r_high), .rd_high_i(c_high),
    .rodd_o(b_odd), .reven_o(b_even)
  );

  logic [$clog2(N)-1:0] t_raddr, t_waddr;
  logic                 t_we;
  logic signed [W-1:0]  t_rdata [T];
  logic signed [W-1:0]  t_wdata [T];

  temporal_buffer #(.W(W), .T(T), .DEPTH(N)) u_tbuf (
    .clk(clk), .en(en), .we(t_we), .waddr(t_waddr), .wdata(t_wdata),
    .raddr(t_raddr), .rdata(t_rdata)
  );

  // ---------------------------------------------------------------- column filter
  logic                c_out_valid, c_band;
  logic [SW-1:0]       c_row;
  logic [CWID-1:0]     c_col;
  logic signed [W-1:0] c_lo, c_hi;

  col_filter #(.W(W), .STEPS(STEPS), .COEFS(COEFS_97), .N(N), .M(M), .PIPE(PIPE)) u_col (
    .clk(clk), .rst_n(rst_n), .en(en),
    .valid_i(c_valid), .high_i(c_high), .col_i(r_col), .slot_i(c_slot),
    .rodd_i(b_odd), .reven_i(b_even),
    .tb_raddr_o(t_raddr), .tb_rdata_i(t_rdata),
    .tb_we_o(t_we), .tb_waddr_o(t_waddr), .tb_wdata_o(t_wdata),
    .valid_o(c_out_valid), .band_o(c_band), .row_o(c_row), .col_o(c_col),
    .lo_o(c_lo), .hi_o(c_hi)
  );

  // ---------------------------------------------------------------- scaling
  scale_unit #(.W(W)) u_scale (
    .band_i(c_band), .lo_i(c_lo), .hi_i(c_hi), .lo_o(out_low), .hi_o(out_high)
  );

  assign out_valid = c_out_valid;
  assign out_band  = c_band;
  assign out_row   = c_row;
  assign out_col   = c_col;

endmodule
