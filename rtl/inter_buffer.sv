// inter_buffer: intermediate data line buffer between row and column filter.
//
// Six two-port memories of N/2 words, three for the row filter's low band and
// three for its high band, used as rotating line buffers (the document's
// structure).  Row r of the row filter's output is written, low and high
// together, into memory pair r mod 3.  The rotation pointer wptr advances
// after the last column of a row is written.
//
// The column filter reads, in the same cycle and at the same column as the
// write, two memories of one band:
//   rd_high = 0 (row r odd):  low band of rows r-2 and r-1
//   rd_high = 1 (row r even): high band of rows r-3 and r-2
// In the second case row r-3 sits in the memory being written; the read sees
// the old word because the read of a column happens in the same cycle as the
// write, never after it.  This is how three memories per band suffice.
// rodd_o is the older row (odd row of the column pair), reven_o the newer;
// both arrive one enabled cycle after the request.
module inter_buffer
  import dwt_pkg::*;
#(
  parameter int W = DATA_W,
  parameter int N = 512
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  logic [$clog2(N/2)-1:0]     col_i,    // column written and read
  input  logic signed [W-1:0]        wlow_i,
  input  logic signed [W-1:0]        whigh_i,
  input  logic                       rd_high_i,
  output logic signed [W-1:0]        rodd_o,
  output logic signed [W-1:0]        reven_o
);

  localparam int HALF = N / 2;
  localparam int AW   = $clog2(HALF);

  logic [1:0]   wptr;
  logic [1:0]   sel_odd, sel_even, sel_odd_q, sel_even_q;
  logic         high_q;
  logic [W-1:0] rd_l [3];
  logic [W-1:0] rd_h [3];

  function automatic logic [1:0] inc3(input logic [1:0] p, input int n);
    int s;
    s = (int'(p) + n) % 3;
    return s[1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wptr <= '0;
    else if (en && col_i == AW'(HALF - 1)) wptr <= inc3(wptr, 1);
  end

  always_comb begin
    if (rd_high_i) begin
      sel_odd  = wptr;           // row r-3
      sel_even = inc3(wptr, 1);  // row r-2
    end else begin
      sel_odd  = inc3(wptr, 1);  // row r-2
      sel_even = inc3(wptr, 2);  // row r-1
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      sel_odd_q  <= sel_odd;
      sel_even_q <= sel_even;
      high_q     <= rd_high_i;
    end
  end

  for (genvar m = 0; m < 3; m++) begin : g_mem
    tp_ram #(.W(W), .DEPTH(HALF)) u_low (
      .clk(clk), .en(en), .we(wptr == 2'(m)), .waddr(col_i), .wdata(wlow_i),
      .raddr(col_i), .rdata(rd_l[m])
    );
    tp_ram #(.W(W), .DEPTH(HALF)) u_high (
      .clk(clk), .en(en), .we(wptr == 2'(m)), .waddr(col_i), .wdata(whigh_i),
      .raddr(col_i), .rdata(rd_h[m])
    );
  end

  assign rodd_o  = signed'(high_q ? rd_h[sel_odd_q]  : rd_l[sel_odd_q]);
  assign reven_o = signed'(high_q ? rd_h[sel_even_q] : rd_l[sel_even_q]);

endmodule
