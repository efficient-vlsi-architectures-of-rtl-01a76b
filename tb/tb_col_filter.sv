// tb_col_filter: the column filter with a real temporal data buffer, fed as
// in the 2-D design: for each column-pair slot m of a frame the low-band
// columns and then the high-band columns are requested, one per enabled
// cycle with random stalls, and the rows 2m-1, 2m of random row-filtered data
// are supplied one cycle after each request (the intermediate buffer's
// timing).  Every output is compared with the reference lifting of its whole
// column (bit exact), together with its band, row and column fields, and the
// two-cycle latency from request to output is checked.
module tb_col_filter;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int W = DATA_W, N = 16, M = 12, HALF = N / 2, MHALF = M / 2;
  localparam int FRAMES = 3, STEPS = 4, LAT = STEPS / 2;

  logic clk = 0, rst_n = 0, en = 0;
  logic valid_i = 0, high_i = 0;
  logic [$clog2(HALF)-1:0] col_i = '0;
  logic [$clog2(MHALF)-1:0] slot_i = '0;
  logic signed [W-1:0] rodd_i = '0, reven_i = '0;
  logic [$clog2(N)-1:0] tb_raddr_o, tb_waddr_o;
  logic tb_we_o;
  logic signed [W-1:0] tb_rdata_i [STEPS];
  logic signed [W-1:0] tb_wdata_o [STEPS];
  logic valid_o, band_o;
  logic [$clog2(MHALF)-1:0] row_o;
  logic [$clog2(HALF)-1:0] col_o;
  logic signed [W-1:0] lo_o, hi_o;

  col_filter #(.W(W), .STEPS(STEPS), .N(N), .M(M)) dut (.*);
  temporal_buffer #(.W(W), .T(STEPS), .DEPTH(N)) u_tbuf (
    .clk(clk), .en(en), .we(tb_we_o), .waddr(tb_waddr_o), .wdata(tb_wdata_o),
    .raddr(tb_raddr_o), .rdata(tb_rdata_i)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, out_count = 0, req_count = 0;
  longint dat [FRAMES+1][M][N];
  longint res [FRAMES][M][N];

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (output %0d)", what, got, exp, out_count);
    end
  endtask

  // outputs: in order, per output row the low-band columns then the high band
  int en_edges = 0;
  always @(posedge clk) begin
    if (rst_n && valid_o) begin
      int f, idx, r, b, c;
      f   = out_count / (MHALF * N);
      idx = out_count % (MHALF * N);
      r   = idx / N;
      b   = (idx % N) / HALF;
      c   = idx % HALF;
      // output n belongs to request n + LAT*N (after the first frame's
      // first LAT slots) and shows two enabled edges after it
      chk("latency", en_edges, out_count + LAT * N + 2);
      if (f < FRAMES) begin
        chk("band", band_o, b);
        chk("row", row_o, r);
        chk("col", col_o, c);
        chk("low", lo_o, res[f][2*r][b*HALF+c]);
        chk("high", hi_o, res[f][2*r+1][b*HALF+c]);
      end
      out_count++;
    end
    if (rst_n && en) en_edges++;
  end

  initial begin
    longint line [];
    int     pf, pm, pb, pc;
    bit     pend;
    line = new[M];
    for (int f = 0; f <= FRAMES; f++)
      for (int r = 0; r < M; r++)
        for (int c = 0; c < N; c++)
          dat[f][r][c] = longint'($urandom_range(0, 1 << 16)) - (1 << 15);
    for (int f = 0; f < FRAMES; f++)
      for (int c = 0; c < N; c++) begin
        for (int r = 0; r < M; r++) line[r] = dat[f][r][c];
        lift97(line, M, W);
        for (int r = 0; r < M; r++) res[f][r][c] = line[r];
      end

    repeat (2) @(posedge clk);
    rst_n = 1;
    pend = 0;
    for (int f = 0; f <= FRAMES; f++)
      for (int m = 0; m < MHALF; m++)
        for (int b = 0; b < 2; b++)
          for (int c = 0; c < HALF; c++) begin
            @(negedge clk);
            while ($urandom_range(0, 5) == 0) begin
              en = 0;
              @(negedge clk);
            end
            en = 1;
            // data for the previous request
            if (pend) begin
              rodd_i  = (pm == 0) ? ((pf == 0) ? W'(0) : W'(dat[pf-1][M-1][pb*HALF+pc]))
                                  : W'(dat[pf][2*pm-1][pb*HALF+pc]);
              reven_i = W'(dat[pf][2*pm][pb*HALF+pc]);
            end
            valid_i = (f > 0) || (m >= LAT);
            high_i  = b[0];
            col_i   = c[$clog2(HALF)-1:0];
            slot_i  = m[$clog2(MHALF)-1:0];
            pf = f; pm = m; pb = b; pc = c;
            pend = 1;
            req_count++;
          end
    @(negedge clk);
    en = 0;
    repeat (3) @(posedge clk);
    chk("outputs of all frames", out_count >= FRAMES * MHALF * N, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
