// icache: instruction store of the IF stage, DEPTH bundles of NSLOT operations with
// their Read/Write Inhibit bits (NSLOT*35 bits per entry).
//
// Combinational read at `addr`; a synchronous write port (`we`, `waddr`, `wdata`)
// loads the program. Only the storage of the instruction cache is modelled: tags,
// refill and the miss signal belong to a cache controller that the design
// description does not detail, so the miss is an input of the core. The entry width
// (four 32-bit operations plus 12 inhibit bits) follows the description; the depth is
// this design's choice.
module icache
  import vliw_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic    clk,
  input  pc_t     addr,
  output bundle_t rdata,
  input  logic    we,
  input  pc_t     waddr,
  input  bundle_t wdata
);
  localparam int unsigned AW = $clog2(DEPTH);
  bundle_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr[AW-1:0]] <= wdata;

  assign rdata = mem[addr[AW-1:0]];
endmodule
