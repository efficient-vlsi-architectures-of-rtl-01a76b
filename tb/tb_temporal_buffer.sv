// tb_temporal_buffer: writes random words to all T memories at random
// addresses, reads them back and compares with a shadow copy kept here.  Also
// checks the one-cycle read latency, that a read and a write of the same
// address in one cycle return the old word, and that a cycle with en low
// neither writes nor changes the read data.
module tb_temporal_buffer;
  localparam int W = 22, T = 4, DEPTH = 32;

  logic clk = 0, en = 0, we = 0;
  logic [$clog2(DEPTH)-1:0] waddr = '0, raddr = '0;
  logic signed [W-1:0] wdata [T];
  logic signed [W-1:0] rdata [T];
  logic signed [W-1:0] shadow [DEPTH][T];
  int checks = 0, failures = 0;

  temporal_buffer #(.W(W), .T(T), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_row(string what, int a);
    for (int t = 0; t < T; t++) begin
      checks++;
      if (rdata[t] != shadow[a][t]) begin
        failures++;
        $display("FAIL %s addr %0d word %0d: got %0d expected %0d", what, a, t, rdata[t], shadow[a][t]);
      end
    end
  endtask

  initial begin
    int a, hold;
    for (int t = 0; t < T; t++) wdata[t] = '0;
    // fill every address
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 1; we = 1; waddr = i[$clog2(DEPTH)-1:0];
      for (int t = 0; t < T; t++) begin
        wdata[t] = W'($urandom());
        shadow[i][t] = wdata[t];
      end
    end
    // random reads and writes, read and write at the same address included
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      a = $urandom_range(0, DEPTH - 1);
      en = 1; we = 1; raddr = a[$clog2(DEPTH)-1:0];
      waddr = ($urandom_range(0, 2) == 0) ? raddr : $clog2(DEPTH)'($urandom());
      for (int t = 0; t < T; t++) wdata[t] = W'($urandom());
      @(posedge clk);
      #1;
      chk_row("read", a);  // old word even when written in the same cycle
      for (int t = 0; t < T; t++) shadow[waddr][t] = wdata[t];
    end
    // en low: no write, read data hold
    @(negedge clk);
    en = 1; we = 0; raddr = 3;
    @(negedge clk);
    hold = 3;
    en = 0; we = 1; waddr = 3; raddr = 7;
    for (int t = 0; t < T; t++) wdata[t] = ~shadow[3][t];
    @(posedge clk);
    #1;
    chk_row("hold", hold);
    @(negedge clk);
    en = 1; we = 0; raddr = 3;
    @(posedge clk);
    #1;
    chk_row("no write while disabled", 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
