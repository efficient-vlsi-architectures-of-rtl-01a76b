// tp_ram: two-port memory, one write port and one read port.
//
// The building block of both line buffers.  Writes and reads are synchronous
// and happen only in cycles with en high.  The read data appear one enabled
// cycle after the address and hold while en is low.  A read and a write of the
// same address in the same cycle return the old contents (read before write),
// which the rotating intermediate buffer relies on.  No reset: contents are
// undefined until written.
module tp_ram #(
  parameter int W     = 22,
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[waddr] <= wdata;
      rdata <= mem[raddr];
    end
  end

endmodule
