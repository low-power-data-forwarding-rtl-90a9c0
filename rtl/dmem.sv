// dmem: data memory behind the load/store unit, WORDS x 32 bits, word addressed.
//
// Port 0 (LSU): combinational read at addr0, synchronous write when we0.
// Port 1 (external): combinational read at addr1 and a synchronous write when we1,
// used to preload data and to inspect results; port 1 wins a same-cycle collision.
// Only the storage of the data cache is modelled; a miss is signalled to the core
// from outside, which stalls the pipeline. Size and second port are this design's own.
module dmem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [$clog2(WORDS)-1:0] addr0,
  input  logic        we0,
  input  logic [31:0] wdata0,
  output logic [31:0] rdata0,
  input  logic [$clog2(WORDS)-1:0] addr1,
  input  logic        we1,
  input  logic [31:0] wdata1,
  output logic [31:0] rdata1
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we0) mem[addr0] <= wdata0;
    if (we1) mem[addr1] <= wdata1;
  end

  assign rdata0 = mem[addr0];
  assign rdata1 = mem[addr1];
endmodule
