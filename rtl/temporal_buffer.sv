// temporal_buffer: temporal data line buffer of the column filter.
//
// In the column filter the temporal registers of the 1-D lifting chain hold
// one value per column, so each register becomes a two-port memory as deep as
// the line is wide (N words, N/2 low-band and N/2 high-band columns).  The
// number of memories T equals the number of temporal registers of the 1-D
// architecture (four for the (9,7) chain); this is the document's structure.
// All T memories share one read address and one write address: word t of
// column c is read in one cycle (data one enabled cycle later) and written
// back, updated, in the next.
module temporal_buffer
  import dwt_pkg::*;
#(
  parameter int W     = DATA_W,
  parameter int T     = 4,
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic signed [W-1:0]      wdata [T],
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic signed [W-1:0]      rdata [T]
);

  for (genvar t = 0; t < T; t++) begin : g_mem
    logic [W-1:0] rd;
    tp_ram #(.W(W), .DEPTH(DEPTH)) u_ram (
      .clk(clk), .en(en), .we(we), .waddr(waddr), .wdata(wdata[t]),
      .raddr(raddr), .rdata(rd)
    );
    assign rdata[t] = signed'(rd);
  end

endmodule
