// lsu: load/store unit of the MEM stage (one per bundle, in slot MEM_SLOT).
//
// Takes the byte address computed by the slot's ALU in EX (rs1 + imm) and the store
// data, both held in EX/MEM. Word accesses only: an address whose two low bits are
// not zero raises `misaligned`, the MEM-stage exception, and the access is dropped.
// A store is written when `valid & is_store & ~kill & ~stall & ~misaligned`; `kill`
// drops the access of a bundle being deleted by an exception. Loads read the data
// memory combinationally and return the word on `load_data` in the same cycle, so
// the value enters MEM/WB and is visible on the MEM/EX and MEM/ID paths.
// The MEM-stage LSU follows the block diagram; alignment rule and interface are this
// design's own.
module lsu
  import vliw_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic  valid,
  input  logic  is_load,
  input  logic  is_store,
  input  logic  kill,
  input  logic  stall,
  input  word_t addr,
  input  word_t sdata,
  output logic  misaligned,
  output word_t load_data,
  output logic [$clog2(WORDS)-1:0] mem_addr,
  output logic  mem_we,
  output word_t mem_wdata,
  input  word_t mem_rdata
);
  assign misaligned = valid && (is_load || is_store) && (addr[1:0] != 2'b00);
  assign mem_addr   = addr[$clog2(WORDS)+1:2];
  assign mem_we     = valid && is_store && !kill && !stall && !misaligned;
  assign mem_wdata  = sdata;
  assign load_data  = misaligned ? '0 : mem_rdata;
endmodule
