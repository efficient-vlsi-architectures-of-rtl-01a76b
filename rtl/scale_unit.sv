// scale_unit: subband scaling of the 2-D (9,7) transform with two multipliers.
//
// The lifting steps leave the low band short by zeta and the high band long
// by zeta in each direction.  Row and column factors combine, so only two of
// the four subbands need a multiplier: LL by zeta^2 and HH by 1/zeta^2, while
// LH and HL (zeta * 1/zeta) pass unchanged.  The document states that the
// scale factors take two multipliers and counts ten multipliers for the 2-D
// architecture; placing both after the column filter in this way is this
// design's reading of that.  Products carry CF fraction bits and are shifted
// right arithmetically.  Combinational.
//   band_i = 0: lo_i is LL, hi_i is LH (column filter on the row low band)
//   band_i = 1: lo_i is HL, hi_i is HH (column filter on the row high band)
module scale_unit
  import dwt_pkg::*;
#(
  parameter int W        = DATA_W,
  parameter int LL_SCALE = ZETA2_Q,
  parameter int HH_SCALE = INV_ZETA2_Q
) (
  input  logic                band_i,
  input  logic signed [W-1:0] lo_i,
  input  logic signed [W-1:0] hi_i,
  output logic signed [W-1:0] lo_o,
  output logic signed [W-1:0] hi_o
);

  localparam int PW = W + CW + 1;

  logic signed [PW-1:0] p_ll, p_hh;

  always_comb begin
    p_ll = (PW'(lo_i) * PW'(LL_SCALE)) >>> CF;
    p_hh = (PW'(hi_i) * PW'(HH_SCALE)) >>> CF;
    lo_o = band_i ? lo_i : p_ll[W-1:0];
    hi_o = band_i ? p_hh[W-1:0] : hi_i;
  end

endmodule
