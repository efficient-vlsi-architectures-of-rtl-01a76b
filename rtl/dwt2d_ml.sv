// dwt2d_ml: multi-level line-based 2-D (9,7) DWT, dyadic decomposition.
//
// One row filter datapath and one column filter datapath (lift_core each,
// four multipliers apiece) and one scaling unit (two multipliers) compute all
// J levels, ten multipliers in total, as in the document's multi-level
// framework.  The original image enters one pixel per cycle; the LL band of
// each level (after scaling) is fed back as the input image of the next level
// through the input multiplexer, which here takes the form of one input FIFO
// per level (ml_level).  Each level keeps its own line buffers, sized for its
// image width, and its own row temporal registers.
//
// Schedule: a recursive-pyramid-style interleaving with a free-running cycle
// counter c.  Level 1 owns the cycles with c even, level 2 those with c = 1
// mod 4, level 3 c = 3 mod 8 and so on; level J also takes the remaining
// cycle of each 2^J.  In its cycle a level makes one step if it has an input
// pair waiting.  Level 1 thus filters up to one pixel pair per two cycles,
// which matches the one-pixel-per-cycle input, and every deeper level gets
// exactly the share of cycles its image size needs; the FIFOs absorb the
// burstiness of the LL band.  The exact slot assignment is this design's own.
//
// Output: out_valid marks one coefficient pair of level out_level (1..J):
// out_band = 0 gives LL and LH, out_band = 1 gives HL and HH, at position
// (out_row, out_col) of that level's subbands, scaled, signed DATA_W-bit with
// FRAC fraction bits.  The LL pairs of levels below J are also shown, though
// they are consumed internally.  As in dwt2d_one_level, a frame's last
// coefficients of each level come out only when more input (the next frame or
// filler) follows; two further frames are always enough.  overflow is a sticky
// error flag (an input FIFO overflowed: input faster than one pixel a cycle).
module dwt2d_ml
  import dwt_pkg::*;
#(
  parameter int N = 512,   // image width (level 1), divisible by 2^J
  parameter int M = 512,   // image height (level 1), divisible by 2^J
  parameter int J = 5      // decomposition levels
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [PIX_W-1:0]           in_pix,
  output logic                       out_valid,
  output logic [$clog2(J+1)-1:0]     out_level,
  output logic                       out_band,
  output logic [$clog2(M/2)-1:0]     out_row,
  output logic [$clog2(N/2)-1:0]     out_col,
  output logic signed [DATA_W-1:0]   out_low,
  output logic signed [DATA_W-1:0]   out_high,
  output logic                       overflow
);

  localparam int W     = DATA_W;
  localparam int STEPS = 4;
  localparam int LW    = $clog2(J+1);
  localparam int RI    = $clog2(M/2);
  localparam int CI    = $clog2(N/2);

  // ------------------------------------------------------------ per-level signals
  logic                push   [J];
  logic signed [W-1:0] sample [J];
  logic                ready  [J];
  logic                step   [J];
  logic                ovf    [J];
  logic signed [W-1:0] l_row_odd [J], l_row_even [J], l_col_odd [J], l_col_even [J];
  logic signed [W-1:0] l_row_st [J][STEPS];
  logic signed [W-1:0] l_col_st [J][STEPS];
  logic [STEPS-1:0]    l_row_mirror [J], l_col_mirror [J];
  logic                l_res_valid [J], l_res_band [J];
  logic [RI-1:0]       l_res_row [J];
  logic [CI-1:0]       l_res_col [J];

  // shared datapath signals
  logic signed [W-1:0] row_odd, row_even, col_odd, col_even;
  logic signed [W-1:0] row_st [STEPS], row_st_d [STEPS];
  logic signed [W-1:0] col_st [STEPS], col_st_d [STEPS];
  logic [STEPS-1:0]    row_mirror, col_mirror;
  logic signed [W-1:0] row_low, row_high, col_low, col_high;

  // ------------------------------------------------------------ schedule
  logic [J-1:0] cyc;
  int           lvl;
  logic         any_step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cyc <= '0;
    else        cyc <= cyc + 1'b1;
  end

  // level = number of trailing ones of the cycle counter, at most J-1
  always_comb begin
    lvl = 0;
    for (int b = 0; b < J - 1; b++) begin
      if (lvl == b && cyc[b]) lvl = b + 1;
    end
  end

  always_comb begin
    any_step = 1'b0;
    for (int l = 0; l < J; l++) begin
      step[l]  = (lvl == l) && ready[l];
      any_step = any_step | step[l];
    end
  end

  // ------------------------------------------------------------ levels
  for (genvar l = 0; l < J; l++) begin : g_level
    ml_level #(
      .W(W), .STEPS(STEPS), .NL(N >> l), .ML(M >> l), .N_MAX(N), .M_MAX(M)
    ) u_level (
      .clk(clk), .rst_n(rst_n),
      .push_i(push[l]), .sample_i(sample[l]), .ready_o(ready[l]), .step_i(step[l]),
      .row_odd_o(l_row_odd[l]), .row_even_o(l_row_even[l]), .row_st_o(l_row_st[l]),
      .row_mirror_o(l_row_mirror[l]),
      .row_st_i(row_st_d), .row_low_i(row_low), .row_high_i(row_high),
      .col_odd_o(l_col_odd[l]), .col_even_o(l_col_even[l]), .col_st_o(l_col_st[l]),
      .col_mirror_o(l_col_mirror[l]), .col_st_i(col_st_d),
      .res_valid_o(l_res_valid[l]), .res_band_o(l_res_band[l]),
      .res_row_o(l_res_row[l]), .res_col_o(l_res_col[l]), .overflow_o(ovf[l])
    );
  end

  // ------------------------------------------------------------ shared datapaths
  always_comb begin
    row_odd    = l_row_odd[lvl];
    row_even   = l_row_even[lvl];
    row_st     = l_row_st[lvl];
    row_mirror = l_row_mirror[lvl];
    col_odd    = l_col_odd[lvl];
    col_even   = l_col_even[lvl];
    col_st     = l_col_st[lvl];
    col_mirror = l_col_mirror[lvl];
  end

  lift_core #(.W(W), .STEPS(STEPS), .COEFS(COEFS_97)) u_row_core (
    .odd_i(row_odd), .even_i(row_even), .st_i(row_st), .mirror_i(row_mirror),
    .st_o(row_st_d), .low_o(row_low), .high_o(row_high)
  );

  lift_core #(.W(W), .STEPS(STEPS), .COEFS(COEFS_97)) u_col_core (
    .odd_i(col_odd), .even_i(col_even), .st_i(col_st), .mirror_i(col_mirror),
    .st_o(col_st_d), .low_o(col_low), .high_o(col_high)
  );

  // ------------------------------------------------------------ output and feedback
  logic                q_valid, q_band;
  logic [LW-1:0]       q_level;
  logic [RI-1:0]       q_row;
  logic [CI-1:0]       q_col;
  logic signed [W-1:0] q_lo, q_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q_valid <= 1'b0;
    else        q_valid <= any_step && l_res_valid[lvl];
  end

  always_ff @(posedge clk) begin
    if (any_step) begin
      q_level <= LW'(lvl + 1);
      q_band  <= l_res_band[lvl];
      q_row   <= l_res_row[lvl];
      q_col   <= l_res_col[lvl];
      q_lo    <= col_low;
      q_hi    <= col_high;
    end
  end

  scale_unit #(.W(W)) u_scale (
    .band_i(q_band), .lo_i(q_lo), .hi_i(q_hi), .lo_o(out_low), .hi_o(out_high)
  );

  assign out_valid = q_valid;
  assign out_level = q_level;
  assign out_band  = q_band;
  assign out_row   = q_row;
  assign out_col   = q_col;

  // level 1 takes the pixels, level l+1 the scaled LL band of level l
  always_comb begin
    push[0]   = in_valid;
    sample[0] = W'({1'b0, in_pix}) <<< FRAC;
    for (int l = 1; l < J; l++) begin
      push[l]   = q_valid && !q_band && q_level == LW'(l);
      sample[l] = out_low;
    end
    overflow = 1'b0;
    for (int l = 0; l < J; l++) overflow = overflow | ovf[l];
  end

endmodule
