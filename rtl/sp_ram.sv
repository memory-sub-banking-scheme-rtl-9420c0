// sp_ram: one single-port memory sub-bank.
//
// A sub-bank serves exactly one access per clock: a write when `we` is high,
// otherwise a read when `re` is high. Reads are synchronous: the word addressed
// in cycle c appears on `rdata` in cycle c+1 and holds until the next read.
// This one-access-per-cycle rule is the premise of the sub-banking scheme; the
// synchronous read is this design's model of a standard SRAM macro. The array
// is written so that synthesis can map it to a memory cell.
module sp_ram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned WIDTH = 14,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic             re,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[addr] <= wdata;
    else if (re)
      rdata <= mem[addr];
  end

endmodule
