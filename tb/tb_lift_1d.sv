// tb_lift_1d: runs the 1-D lifting architecture over several lines of random
// samples with random stall cycles, in four configurations fed with the same
// inputs:
//   0: the (9,7) chain of four PEs (default configuration),
//   1: the same with a pipeline register after every PE (PIPE = 1),
//   2: a two-step chain with the (5,3) lifting coefficients -1/2 and 1/4,
//   3: that two-step chain pipelined.
// Every low/high output is compared bit exact with the reference lifting of
// dwt_ref_pkg.  It is also compared with floating point, within a small
// tolerance: for (9,7) with lifting in real numbers, and for (5,3) with the
// direct 5-tap/3-tap filters, worked out by convolution.  The rate and
// latency are checked too.  Output index j of a line appears in the enabled
// cycle of input slot j + LAT, where LAT is 2, 5, 1 and 2 for the four
// configurations: one pair per enabled cycle.
module tb_lift_1d;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W     = 22;
  localparam int N     = 16;
  localparam int HALF  = N / 2;
  localparam int LINES = 6;
  localparam int ND    = 4;
  localparam int LATS [ND] = '{2, 5, 1, 2};
  localparam coef_vec_t COEFS_53 = '{-8192, 4096, 0, 0, 0, 0, 0, 0};

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] odd_i = '0, even_i = '0;
  logic signed [W-1:0] low_o [ND], high_o [ND];
  logic                valid_o [ND];
  logic [$clog2(HALF)-1:0] idx_o [ND];
  int checks = 0, failures = 0, stalls = 0;
  int out_line [ND], out_j [ND];

  lift_1d #(.W(W), .N(N)) dut (
    .clk, .rst_n, .en, .odd_i, .even_i,
    .low_o(low_o[0]), .high_o(high_o[0]), .valid_o(valid_o[0]), .idx_o(idx_o[0])
  );

  lift_1d #(.W(W), .N(N), .PIPE(1'b1)) dut_pipe (
    .clk, .rst_n, .en, .odd_i, .even_i,
    .low_o(low_o[1]), .high_o(high_o[1]), .valid_o(valid_o[1]), .idx_o(idx_o[1])
  );

  lift_1d #(.W(W), .N(N), .STEPS(2), .COEFS(COEFS_53)) dut_53 (
    .clk, .rst_n, .en, .odd_i, .even_i,
    .low_o(low_o[2]), .high_o(high_o[2]), .valid_o(valid_o[2]), .idx_o(idx_o[2])
  );

  lift_1d #(.W(W), .N(N), .STEPS(2), .COEFS(COEFS_53), .PIPE(1'b1)) dut_53_pipe (
    .clk, .rst_n, .en, .odd_i, .even_i,
    .low_o(low_o[3]), .high_o(high_o[3]), .valid_o(valid_o[3]), .idx_o(idx_o[3])
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint x     [LINES+1][N];
  longint ref_l [2][LINES][HALF];  // [filter: 0 = (9,7), 1 = (5,3)]
  longint ref_h [2][LINES][HALF];
  real    rl    [2][LINES][HALF];
  real    rh    [2][LINES][HALF];

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // symmetric extension of line l
  function automatic real xs(int l, int i);
    if (i < 0) i = -i;
    if (i >= N) i = 2 * (N - 1) - i;
    return real'(x[l][i]);
  endfunction

  // compare one instance's outputs in the current enabled cycle
  task automatic check_out(int d, int slot);
    string tag;
    int    f, l, j;
    tag = $sformatf("config %0d ", d);
    f = d / 2;
    checks++;
    if (valid_o[d] !== (slot >= LATS[d])) begin
      failures++;
      $display("FAIL %svalid at slot %0d", tag, slot);
    end
    if (valid_o[d] && out_line[d] < LINES) begin
      l = out_line[d];
      j = out_j[d];
      // latency: index j comes out in slot j + LAT of its line
      chk({tag, "index"}, idx_o[d], j);
      chk({tag, "slot"}, slot, l * HALF + j + LATS[d]);
      chk({tag, "low"}, low_o[d], ref_l[f][l][j]);
      chk({tag, "high"}, high_o[d], ref_h[f][l][j]);
      checks++;
      if ((real'(low_o[d]) - rl[f][l][j]) ** 2 > 100.0 ||
          (real'(high_o[d]) - rh[f][l][j]) ** 2 > 100.0) begin
        failures++;
        $display("FAIL %sreal line %0d j %0d: %0d/%0d vs %f/%f", tag, l, j,
                 low_o[d], high_o[d], rl[f][l][j], rh[f][l][j]);
      end
      out_j[d]++;
      if (out_j[d] == HALF) begin
        out_j[d] = 0;
        out_line[d]++;
      end
    end
  endtask

  initial begin
    longint line [];
    longint c53 [];
    real    rline [];
    int     slot;
    line  = new[N];
    rline = new[N];
    c53   = new[2];
    c53[0] = COEFS_53[0];
    c53[1] = COEFS_53[1];
    for (int l = 0; l <= LINES; l++)
      for (int i = 0; i < N; i++)
        x[l][i] = (longint'($urandom_range(0, 255)) - 128) * 64;
    // a line with large swings at both ends exercises the mirroring
    for (int i = 0; i < N; i++) x[1][i] = (i % 2 == 0) ? 8000 : -8000;
    for (int l = 0; l < LINES; l++) begin
      // (9,7)
      for (int i = 0; i < N; i++) begin
        line[i] = x[l][i];
        rline[i] = real'(x[l][i]);
      end
      lift97(line, N, W);
      lift97_real(rline, N);
      for (int j = 0; j < HALF; j++) begin
        ref_l[0][l][j] = line[2*j];
        ref_h[0][l][j] = line[2*j+1];
        rl[0][l][j] = rline[2*j];
        rh[0][l][j] = rline[2*j+1];
      end
      // (5,3): lifting for the bit-exact values, direct filters for the real ones
      for (int i = 0; i < N; i++) line[i] = x[l][i];
      lift_steps(line, N, W, c53, 2);
      for (int j = 0; j < HALF; j++) begin
        ref_l[1][l][j] = line[2*j];
        ref_h[1][l][j] = line[2*j+1];
        rh[1][l][j] = xs(l, 2*j+1) - 0.5 * (xs(l, 2*j) + xs(l, 2*j+2));
        rl[1][l][j] = -0.125 * (xs(l, 2*j-2) + xs(l, 2*j+2))
                    + 0.25 * (xs(l, 2*j-1) + xs(l, 2*j+1)) + 0.75 * xs(l, 2*j);
      end
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    slot = 0;
    for (int d = 0; d < ND; d++) begin
      out_line[d] = 0;
      out_j[d] = 0;
    end
    // (LINES + 1) lines of pairs: the last one only flushes
    while (slot < (LINES + 1) * HALF) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        en = 0;
        stalls++;
      end else begin
        int l, k;
        l = slot / HALF;
        k = slot % HALF;
        en = 1;
        even_i = W'(x[l][2*k]);
        odd_i  = (k == 0) ? ((l == 0) ? W'(0) : W'(x[l-1][N-1])) : W'(x[l][2*k-1]);
        #1;
        for (int d = 0; d < ND; d++) check_out(d, slot);
        slot++;
      end
    end
    @(negedge clk);
    en = 0;
    for (int d = 0; d < ND; d++)
      chk($sformatf("config %0d: all lines out", d), out_line[d], LINES);
    if (stalls == 0) begin
      failures++;
      $display("FAIL no stall happened");
    end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
