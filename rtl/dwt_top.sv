// dwt_top: the two 2-D lifting DWT frameworks side by side.
//
// u_one: dwt2d_one_level, one decomposition level, two pixels per cycle.
// u_ml:  dwt2d_ml, J dyadic levels, one pixel per cycle, with the row and
//        column datapaths shared by all levels.
// Both are built from the same (9,7) lifting processing elements, 1-D
// systolic datapath, rotating intermediate line buffer, temporal line buffer
// and two-multiplier scaling unit.  They share only clock and reset; each has
// its own ports (prefix one_ and ml_), described in its module.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int N = 512,   // image width
  parameter int M = 512,   // image height
  parameter int J = 5      // levels of the multi-level framework
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // one-level framework
  input  logic                       one_in_valid,
  input  logic [PIX_W-1:0]           one_in_even,
  input  logic [PIX_W-1:0]           one_in_odd,
  output logic                       one_out_valid,
  output logic                       one_out_band,
  output logic [$clog2(M/2)-1:0]     one_out_row,
  output logic [$clog2(N/2)-1:0]     one_out_col,
  output logic signed [DATA_W-1:0]   one_out_low,
  output logic signed [DATA_W-1:0]   one_out_high,
  // multi-level framework
  input  logic                       ml_in_valid,
  input  logic [PIX_W-1:0]           ml_in_pix,
  output logic                       ml_out_valid,
  output logic [$clog2(J+1)-1:0]     ml_out_level,
  output logic                       ml_out_band,
  output logic [$clog2(M/2)-1:0]     ml_out_row,
  output logic [$clog2(N/2)-1:0]     ml_out_col,
  output logic signed [DATA_W-1:0]   ml_out_low,
  output logic signed [DATA_W-1:0]   ml_out_high,
  output logic                       ml_overflow
);

  dwt2d_one_level #(.N(N), .M(M)) u_one (
    .clk(clk), .rst_n(rst_n),
    .in_valid(one_in_valid), .in_even(one_in_even), .in_odd(one_in_odd),
    .out_valid(one_out_valid), .out_band(one_out_band), .out_row(one_out_row),
    .out_col(one_out_col), .out_low(one_out_low), .out_high(one_out_high)
  );

  dwt2d_ml #(.N(N), .M(M), .J(J)) u_ml (
    .clk(clk), .rst_n(rst_n),
    .in_valid(ml_in_valid), .in_pix(ml_in_pix),
    .out_valid(ml_out_valid), .out_level(ml_out_level), .out_band(ml_out_band),
    .out_row(ml_out_row), .out_col(ml_out_col), .out_low(ml_out_low),
    .out_high(ml_out_high), .overflow(ml_overflow)
  );

endmodule
