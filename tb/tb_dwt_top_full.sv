// tb_dwt_top_full: the test of tb_dwt_top at the default size: dwt_top with
// all parameters at their defaults (512 x 512 image, five levels; the
// localparams below only mirror those defaults), one test frame with strong
// edges through both frameworks, stalls in the filler frames, every
// coefficient of every level compared bit exactly with the reference, and
// every mechanism counted.
module tb_dwt_top_full;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 512, M = 512, J = 5, FRAMES = 1;
  localparam int W = DATA_W, HALF = N / 2, PER_FRAME = N * M / 2;
  localparam int LATENCY = 5 * HALF + 2 + 2;   // see tb_dwt2d_one_level

  logic clk = 0, rst_n = 0;
  logic one_in_valid = 0, ml_in_valid = 0;
  logic [PIX_W-1:0] one_in_even = '0, one_in_odd = '0, ml_in_pix = '0;
  logic one_out_valid, one_out_band, ml_out_valid, ml_out_band, ml_overflow;
  logic [$clog2(M/2)-1:0] one_out_row, ml_out_row;
  logic [$clog2(N/2)-1:0] one_out_col, ml_out_col;
  logic [$clog2(J+1)-1:0] ml_out_level;
  logic signed [W-1:0] one_out_low, one_out_high, ml_out_low, ml_out_high;

  dwt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_row_mirror = 0, n_col_top = 0, n_col_bot = 0, n_rotate = 0;
  int n_rbw = 0, n_overlap = 0, n_ll = 0, n_hh = 0, n_feedback = 0, n_fifo = 0;
  int en_count = 0, one_cnt = 0;
  int ml_cnt [J];
  longint pix [FRAMES+2][];
  longint res [FRAMES][J][];
  bit one_done = 0, ml_done = 0;

  initial begin
    #100000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------- one-level checker
  always @(posedge clk) begin
    if (rst_n && one_out_valid) begin
      int f, idx, r, b, c;
      f   = one_cnt / PER_FRAME;
      idx = one_cnt % PER_FRAME;
      r   = idx / N;
      b   = (idx % N) / HALF;
      c   = idx % HALF;
      chk("one latency", en_count, one_cnt + LATENCY);
      if (f < FRAMES) begin
        chk("one row", one_out_row, r);
        chk("one col", one_out_col, c);
        chk("one band", one_out_band, b);
        chk("one low",  one_out_low,  res[f][0][(2*r)*N + 2*c + b]);
        chk("one high", one_out_high, res[f][0][(2*r+1)*N + 2*c + b]);
        if (b == 0) n_ll++; else n_hh++;
      end
      one_cnt++;
    end
    if (rst_n && one_in_valid) begin
      en_count++;
      if (dut.u_one.u_row.k == 0) n_row_mirror++;
      if (dut.u_one.c_valid && dut.u_one.c_slot == 0) n_col_top++;
      if (dut.u_one.c_valid && dut.u_one.c_slot == 1) n_col_bot++;
      if (dut.u_one.u_ibuf.wptr == 2 && dut.u_one.r_col == HALF - 1) n_rotate++;
      if (dut.u_one.c_valid && dut.u_one.c_high) n_rbw++;
      if (dut.u_one.c_valid && dut.u_one.c_slot < 2 && dut.u_one.in_row < 2) n_overlap++;
    end
    if (rst_n && !one_in_valid && !one_done) n_stall++;
  end

  // ---------------------------------------------------------- multi-level checker
  always @(posedge clk) begin
    if (rst_n && ml_out_valid) begin
      int l, nl, per, f, idx, r, b, c;
      l   = int'(ml_out_level) - 1;
      nl  = N >> l;
      per = nl * (M >> l) / 2;
      f   = ml_cnt[l] / per;
      idx = ml_cnt[l] % per;
      r   = idx / nl;
      b   = (idx % nl) / (nl / 2);
      c   = idx % (nl / 2);
      if (f < FRAMES) begin
        chk("ml row", ml_out_row, r);
        chk("ml col", ml_out_col, c);
        chk("ml band", ml_out_band, b);
        chk("ml low",  ml_out_low,  res[f][l][(2*r)*nl + 2*c + b]);
        chk("ml high", ml_out_high, res[f][l][(2*r+1)*nl + 2*c + b]);
      end
      ml_cnt[l]++;
    end
    if (rst_n && dut.u_ml.push[1]) n_feedback++;
    if (rst_n && dut.u_ml.ready[1] && !dut.u_ml.step[1]) n_fifo++;
  end

  initial begin
    for (int f = 0; f < FRAMES + 2; f++) begin
      pix[f] = new[N*M];
      for (int i = 0; i < N*M; i++) pix[f][i] = longint'($urandom_range(0, 255));
    end
    // strong vertical and horizontal edges in the first frame
    for (int i = 0; i < N*M; i++)
      if ((i / N) % 7 == 0 || (i % N) >= N - 3) pix[0][i] = 255;
    for (int f = 0; f < FRAMES; f++)
      for (int l = 0; l < J; l++) begin
        int nl, ml;
        nl = N >> l;
        ml = M >> l;
        res[f][l] = new[nl*ml];
        if (l == 0) begin
          for (int i = 0; i < nl*ml; i++) res[f][l][i] = pix[f][i];
          dwt2d(res[f][l], nl, ml, FRAC, W);
        end else begin
          for (int r = 0; r < ml; r++)
            for (int c = 0; c < nl; c++) res[f][l][r*nl+c] = res[f][l-1][(2*r)*(2*nl) + 2*c];
          dwt2d(res[f][l], nl, ml, 0, W);
        end
      end
    for (int l = 0; l < J; l++) ml_cnt[l] = 0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      begin : drive_one
        // one frame of filler is enough for the one-level framework
        for (int f = 0; f <= FRAMES; f++)
          for (int i = 0; i < N*M; i += 2) begin
            @(negedge clk);
            while (f > 0 && $urandom_range(0, 7) == 0) begin
              one_in_valid = 0;
              @(negedge clk);
            end
            one_in_valid = 1;
            one_in_even = PIX_W'(pix[f][i]);
            one_in_odd  = PIX_W'(pix[f][i+1]);
          end
        @(negedge clk);
        one_in_valid = 0;
        one_done = 1;
      end
      begin : drive_ml
        for (int f = 0; f < FRAMES + 2; f++)
          for (int i = 0; i < N*M; i++) begin
            @(negedge clk);
            while (f > 0 && $urandom_range(0, 7) == 0) begin
              ml_in_valid = 0;
              @(negedge clk);
            end
            ml_in_valid = 1;
            ml_in_pix = PIX_W'(pix[f][i]);
          end
        @(negedge clk);
        ml_in_valid = 0;
        ml_done = 1;
      end
    join
    repeat (20) @(posedge clk);

    chk("one-level outputs of all frames", one_cnt >= FRAMES * PER_FRAME, 1);
    for (int l = 0; l < J; l++)
      chk($sformatf("level %0d outputs of all frames", l + 1),
          ml_cnt[l] >= FRAMES * (N >> l) * (M >> l) / 2, 1);
    chk("no FIFO overflow", ml_overflow, 0);
    $display("stalls=%0d row_mirror=%0d col_top=%0d col_bot=%0d rotate=%0d rbw=%0d overlap=%0d ll=%0d hh=%0d feedback=%0d fifo=%0d",
             n_stall, n_row_mirror, n_col_top, n_col_bot, n_rotate, n_rbw, n_overlap, n_ll, n_hh, n_feedback, n_fifo);
    if (n_stall == 0)    begin failures++; $display("FAIL no stall"); end
    if (n_row_mirror == 0) begin failures++; $display("FAIL no row mirror"); end
    if (n_col_top == 0)  begin failures++; $display("FAIL no top mirror"); end
    if (n_col_bot == 0)  begin failures++; $display("FAIL no bottom mirror"); end
    if (n_rotate == 0)   begin failures++; $display("FAIL no rotation"); end
    if (n_rbw == 0)      begin failures++; $display("FAIL no read-before-write"); end
    if (n_overlap == 0)  begin failures++; $display("FAIL no frame overlap"); end
    if (n_ll == 0 || n_hh == 0) begin failures++; $display("FAIL a scaling unused"); end
    if (n_feedback == 0) begin failures++; $display("FAIL no LL feedback"); end
    if (n_fifo == 0)     begin failures++; $display("FAIL no FIFO buffering"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
