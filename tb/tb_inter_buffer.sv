// tb_inter_buffer: streams rows of random low/high words into the rotating
// intermediate buffer, one column per enabled cycle with random stalls, and
// checks every read against a shadow copy of all rows: while row r is written,
// the reads must return the low band of rows r-2, r-1 (r odd) or the high
// band of rows r-3, r-2 (r even), one enabled cycle later.  The second case
// reads the memory that row r is overwriting in the same cycle.
module tb_inter_buffer;
  localparam int W = 22, N = 16, HALF = N / 2, ROWS = 20;

  logic clk = 0, rst_n = 0, en = 0, rd_high_i = 0;
  logic [$clog2(HALF)-1:0] col_i = '0;
  logic signed [W-1:0] wlow_i = '0, whigh_i = '0, rodd_o, reven_o;
  logic signed [W-1:0] lo [ROWS][HALF];
  logic signed [W-1:0] hi [ROWS][HALF];
  int checks = 0, failures = 0, stalls = 0, overwrite_reads = 0;

  inter_buffer #(.W(W), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int pr, pc;
    bit pending;
    pending = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < HALF; c++) begin
        lo[r][c] = W'($urandom());
        hi[r][c] = W'($urandom());
      end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < HALF; c++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin
          en = 0;
          stalls++;
          // data of the last request must hold through a stall
          if (pending && pr >= 3) begin
            if (pr % 2 == 1) chk("hold", rodd_o, lo[pr-2][pc]);
            else             chk("hold", rodd_o, hi[pr-3][pc]);
          end
          @(negedge clk);
        end
        en = 1;
        col_i = c[$clog2(HALF)-1:0];
        wlow_i = lo[r][c];
        whigh_i = hi[r][c];
        rd_high_i = (r % 2 == 0);
        pr = r;
        pc = c;
        pending = 1;
        @(posedge clk);
        #1;
        if (r >= 3) begin
          if (r % 2 == 1) begin
            chk("low odd row", rodd_o, lo[r-2][c]);
            chk("low even row", reven_o, lo[r-1][c]);
          end else begin
            chk("high odd row", rodd_o, hi[r-3][c]);
            chk("high even row", reven_o, hi[r-2][c]);
            overwrite_reads++;
          end
        end
      end
    end
    if (stalls == 0 || overwrite_reads == 0) begin
      failures++;
      $display("FAIL stalls=%0d overwrite_reads=%0d", stalls, overwrite_reads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
