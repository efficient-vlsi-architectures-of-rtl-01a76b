// tb_dwt2d_ml: end-to-end test of the multi-level 2-D DWT at a reduced size
// (32 x 32, three levels).  Frame 0 is streamed at the full rate of one pixel
// per cycle with no gap, which checks the document's one-input-per-cycle
// claim (no FIFO may overflow and every coefficient must come out); the next
// frame has random stall cycles, and two filler frames follow.  Every output
// of every level is compared bit exactly with the reference: the one-level
// transform of dwt_ref_pkg applied to the image, then to its scaled LL band,
// and so on.  It also counts that each level produced output, that the LL
// feedback was used, that an input pair of level 2 waited in its FIFO for
// its time slot, and that stalls happened.
module tb_dwt2d_ml;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int N = 32, M = 32, J = 3, FRAMES = 2, W = DATA_W;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [PIX_W-1:0] in_pix = '0;
  logic out_valid, out_band, overflow;
  logic [$clog2(J+1)-1:0] out_level;
  logic [$clog2(M/2)-1:0] out_row;
  logic [$clog2(N/2)-1:0] out_col;
  logic signed [W-1:0] out_low, out_high;

  dwt2d_ml #(.N(N), .M(M), .J(J)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_stall = 0, n_feedback = 0, n_fifo_deep = 0;
  int out_cnt [J];
  longint pix [FRAMES+2][];
  longint res [FRAMES][J][];   // res[f][l]: transformed image of level l

  initial begin
    #5000000;
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

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int l, nl, ml, per, f, idx, r, b, c;
      l   = int'(out_level) - 1;
      nl  = N >> l;
      ml  = M >> l;
      per = nl * ml / 2;
      f   = out_cnt[l] / per;
      idx = out_cnt[l] % per;
      r   = idx / nl;
      b   = (idx % nl) / (nl / 2);
      c   = idx % (nl / 2);
      if (f < FRAMES) begin
        chk("row", out_row, r);
        chk("col", out_col, c);
        chk("band", out_band, b);
        chk("low",  out_low,  res[f][l][(2*r)*nl + 2*c + b]);
        chk("high", out_high, res[f][l][(2*r+1)*nl + 2*c + b]);
      end
      out_cnt[l]++;
    end
    if (rst_n && !in_valid) n_stall++;
    if (rst_n && dut.push[1]) n_feedback++;
    if (rst_n && dut.ready[1] && !dut.step[1]) n_fifo_deep++;
  end

  initial begin
    for (int f = 0; f < FRAMES + 2; f++) begin
      pix[f] = new[N*M];
      for (int i = 0; i < N*M; i++) pix[f][i] = longint'($urandom_range(0, 255));
    end
    for (int i = 0; i < N*M; i++) if ((i % N) < 5) pix[1][i] = 255;
    for (int f = 0; f < FRAMES; f++) begin
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
    end
    for (int l = 0; l < J; l++) out_cnt[l] = 0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < FRAMES + 2; f++)
      for (int i = 0; i < N*M; i++) begin
        @(negedge clk);
        while (f > 0 && $urandom_range(0, 7) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_pix = PIX_W'(pix[f][i]);
      end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(posedge clk);

    for (int l = 0; l < J; l++) begin
      chk($sformatf("outputs of level %0d", l + 1), out_cnt[l] >= FRAMES * (N >> l) * (M >> l) / 2, 1);
    end
    chk("no FIFO overflow", overflow, 0);
    $display("stalls=%0d feedback=%0d fifo_deep=%0d out=%0d/%0d/%0d", n_stall, n_feedback, n_fifo_deep,
             out_cnt[0], out_cnt[1], out_cnt[2]);
    if (n_stall == 0 || n_feedback == 0 || n_fifo_deep == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
