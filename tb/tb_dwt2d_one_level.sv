// tb_dwt2d_one_level: end-to-end test of the one-level 2-D (9,7) DWT at a reduced
// frame size.  FRAMES random frames (the second one with strong edges) are
// streamed back to back, two pixels per enabled cycle with random stall
// cycles, followed by one filler frame that pushes the last coefficients out.
// Every output coefficient pair is compared bit exactly with the reference
// 2-D transform of dwt_ref_pkg and its subband, row and column fields are
// checked.  Rate and latency: the n-th output must appear after exactly
// n + LATENCY enabled input cycles.  The test also counts that each mechanism
// of the design took place: stalls, row- and column-boundary mirroring,
// rotation of the intermediate buffer, reads of a buffer row in the cycle it
// is overwritten, frames overlapping in the pipeline, and both scalings.
// A second instance with the pipelined datapaths (PIPE = 1) gets the same
// input and must give the same coefficients, with its own, longer latency.
module tb_dwt2d_one_level;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N      = 16;
  localparam int M      = 14;
  localparam int FRAMES = 3;
  localparam int HALF   = N / 2;
  localparam int MHALF  = M / 2;
  localparam int W      = DATA_W;
  localparam int PER_FRAME = N * M / 2;          // output pairs per frame
  // enabled input cycles seen before the first output: the first LL row
  // comes from column slot LAT (rows 2LAT-1, 2LAT), which is filtered during
  // row 2LAT+1, so it needs input rows 0..2LAT+1.  Add LAT slots of
  // row-filter delay, then the request cycle (buffer read) and the compute
  // cycle of the column filter.  LAT = 2 plain, 5 pipelined.
  localparam int LATS [2]    = '{2, 5};
  localparam int LATENCY [2] = '{(2 * LATS[0] + 1) * HALF + LATS[0] + 2,
                                 (2 * LATS[1] + 1) * HALF + LATS[1] + 2};

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [PIX_W-1:0] in_even = '0, in_odd = '0;
  logic out_valid, out_band;
  logic [$clog2(MHALF)-1:0] out_row;
  logic [$clog2(HALF)-1:0]  out_col;
  logic signed [W-1:0] out_low, out_high;
  logic p_valid, p_band;
  logic [$clog2(MHALF)-1:0] p_row;
  logic [$clog2(HALF)-1:0]  p_col;
  logic signed [W-1:0] p_low, p_high;

  dwt2d_one_level #(.N(N), .M(M)) dut (.*);

  dwt2d_one_level #(.N(N), .M(M), .PIPE(1'b1)) dut_pipe (
    .clk, .rst_n, .in_valid, .in_even, .in_odd,
    .out_valid(p_valid), .out_band(p_band), .out_row(p_row), .out_col(p_col),
    .out_low(p_low), .out_high(p_high)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_row_mirror = 0, n_col_mirror_top = 0, n_col_mirror_bot = 0;
  int n_rotate = 0, n_rbw = 0, n_overlap = 0, n_ll = 0, n_hh = 0;
  int en_count = 0;
  int out_count [2] = '{0, 0};

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint pix [FRAMES+1][];
  longint res [FRAMES][];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // mechanism counters, sampled on enabled cycles; en_count counts the
  // enabled clock edges before this one
  always @(posedge clk) begin
    check_output(0, out_valid, out_band, out_row, out_col, out_low, out_high);
    check_output(1, p_valid, p_band, p_row, p_col, p_low, p_high);
    if (rst_n && in_valid) begin
      en_count++;
      if (dut.u_row.k == 0) n_row_mirror++;
      if (dut.c_valid && dut.c_slot == 0) n_col_mirror_top++;
      if (dut.c_valid && dut.c_slot == 1) n_col_mirror_bot++;
      if (dut.u_ibuf.wptr == 2 && dut.r_col == HALF - 1) n_rotate++;
      if (dut.c_valid && dut.c_high) n_rbw++;
      if (dut.c_valid && dut.c_slot < 2 && dut.in_row < 2) n_overlap++;
    end
    if (rst_n && !in_valid) n_stall++;
  end

  // output checker of instance d (0: plain, 1: pipelined)
  task automatic check_output(int d, logic v, logic band_o, int row_o, int col_o,
                              longint lo, longint hi);
    if (rst_n && v) begin
      int f, idx, r, c, band;
      string tag;
      tag  = (d == 0) ? "" : "pipelined ";
      f    = out_count[d] / PER_FRAME;
      idx  = out_count[d] % PER_FRAME;
      // order inside a frame: per output row, low band columns then high band
      r    = idx / N;
      band = (idx % N) / HALF;
      c    = idx % HALF;
      chk({tag, "latency"}, en_count, out_count[d] + LATENCY[d]);
      if (f < FRAMES) begin
        chk({tag, "row"}, row_o, r);
        chk({tag, "col"}, col_o, c);
        chk({tag, "band"}, band_o, band);
        // image index of the four subbands: LL (2r,2c) LH (2r+1,2c)
        // HL (2r,2c+1) HH (2r+1,2c+1)
        chk({tag, "low"},  lo, res[f][(2*r)*N + 2*c + band]);
        chk({tag, "high"}, hi, res[f][(2*r+1)*N + 2*c + band]);
        if (d == 0) begin
          if (band == 0) n_ll++; else n_hh++;
        end
      end
      out_count[d]++;
    end
  endtask

  initial begin
    for (int f = 0; f <= FRAMES; f++) begin
      pix[f] = new[N*M];
      for (int i = 0; i < N*M; i++) pix[f][i] = longint'($urandom_range(0, 255));
    end
    for (int i = 0; i < N*M; i++) pix[1][i] = ((i / N) % 3 == 0 || (i % N) > 12) ? 255 : 0;
    for (int f = 0; f < FRAMES; f++) begin
      res[f] = new[N*M];
      for (int i = 0; i < N*M; i++) res[f][i] = pix[f][i];
      dwt2d(res[f], N, M, FRAC, W);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f <= FRAMES; f++) begin
      for (int i = 0; i < N*M; i += 2) begin
        @(negedge clk);
        while ($urandom_range(0, 7) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_even  = PIX_W'(pix[f][i]);
        in_odd   = PIX_W'(pix[f][i+1]);
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);

    chk("outputs of all frames", (out_count[0] >= FRAMES * PER_FRAME), 1);
    chk("pipelined: outputs of all frames", (out_count[1] >= FRAMES * PER_FRAME), 1);
    $display("stalls=%0d row_mirror=%0d col_mirror_top=%0d col_mirror_bot=%0d rotate=%0d read_before_write=%0d frame_overlap=%0d ll=%0d hh=%0d",
             n_stall, n_row_mirror, n_col_mirror_top, n_col_mirror_bot, n_rotate, n_rbw, n_overlap, n_ll, n_hh);
    if (n_stall == 0)          begin failures++; $display("FAIL no stall"); end
    if (n_row_mirror == 0)     begin failures++; $display("FAIL no row mirror"); end
    if (n_col_mirror_top == 0) begin failures++; $display("FAIL no column mirror (top)"); end
    if (n_col_mirror_bot == 0) begin failures++; $display("FAIL no column mirror (bottom)"); end
    if (n_rotate == 0)         begin failures++; $display("FAIL no buffer rotation"); end
    if (n_rbw == 0)            begin failures++; $display("FAIL no read-before-write"); end
    if (n_overlap == 0)        begin failures++; $display("FAIL no frame overlap"); end
    if (n_ll == 0 || n_hh == 0) begin failures++; $display("FAIL a scaling never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
