// vliw_top: the low-power forwarding VLIW with its instruction and data stores.
//
// Connects vliw_core to an icache (instruction store, IMEM_DEPTH bundles of four
// operations plus 12 inhibit bits) and a dmem (data store, DMEM_WORDS words). The
// program is loaded through prog_we/prog_addr/prog_data; data are preloaded and
// inspected through the ext_* port of the data store. Cache misses come from outside
// (icache_miss: fetch delivers no bundle this cycle; dcache_miss: the pipeline stalls
// while a load or store is in MEM), since the cache controllers are not part of the
// design. irq is a level interrupt request acknowledged by irq_ack. retire shows each
// bundle leaving WB with its results (also the write-inhibited ones); events reports
// per cycle the RF accesses and the forwarding/inhibit mechanisms used.
// Sizes of the memories, the reset PC (0) and the exception vector are own choices.
module vliw_top
  import vliw_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter bit          EXACT      = 1'b1,
  parameter pc_t         EXC_VECTOR = 16'd512
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    prog_we,
  input  pc_t     prog_addr,
  input  bundle_t prog_data,
  input  logic    ext_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] ext_addr,
  input  word_t   ext_wdata,
  output word_t   ext_rdata,
  input  logic    icache_miss,
  input  logic    dcache_miss,
  input  logic    irq,
  output logic    irq_ack,
  input  reg_t    dbg_raddr,
  output word_t   dbg_rdata,
  output retire_t retire,
  output events_t events
);
  pc_t     imem_addr;
  bundle_t imem_bundle;
  logic [$clog2(DMEM_WORDS)-1:0] dmem_addr;
  logic    dmem_we;
  word_t   dmem_wdata, dmem_rdata;

  icache #(.DEPTH (IMEM_DEPTH)) u_icache (
    .clk, .addr (imem_addr), .rdata (imem_bundle),
    .we (prog_we), .waddr (prog_addr), .wdata (prog_data)
  );

  vliw_core #(.EXACT (EXACT), .EXC_VECTOR (EXC_VECTOR), .DMEM_WORDS (DMEM_WORDS)) u_core (
    .clk, .rst_n,
    .imem_addr, .imem_bundle, .icache_miss,
    .dmem_addr, .dmem_we, .dmem_wdata, .dmem_rdata, .dcache_miss,
    .irq, .irq_ack,
    .dbg_raddr, .dbg_rdata, .retire, .events
  );

  dmem #(.WORDS (DMEM_WORDS)) u_dmem (
    .clk,
    .addr0 (dmem_addr), .we0 (dmem_we), .wdata0 (dmem_wdata), .rdata0 (dmem_rdata),
    .addr1 (ext_addr),  .we1 (ext_we),  .wdata1 (ext_wdata),  .rdata1 (ext_rdata)
  );
endmodule
