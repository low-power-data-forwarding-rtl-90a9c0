// fetch_unit: IF stage. Program counter, next-PC selection and the IF/ID register.
//
// Each cycle the bundle at `pc` is read from the instruction store (imem_addr /
// imem_bundle) and captured in IF/ID together with its address. The PC counts in
// bundles. Priority of the next PC: `redirect` (exception entry, return from
// exception or taken branch, all decided later in the pipeline) > instruction-cache
// miss > sequential. On a redirect the bundle fetched in the same cycle is on the
// wrong path and IF/ID receives a bubble. While `icache_miss` is high no bundle is
// delivered: IF/ID receives bubbles and the PC holds. While `stall` is high (data
// cache miss) PC and IF/ID hold. Reset: PC = RESET_PC, IF/ID empty.
// The stage and its register follow the block diagram; the miss and redirect
// protocol is this design's own.
module fetch_unit
  import vliw_pkg::*;
#(
  parameter pc_t RESET_PC = '0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    stall,
  input  logic    icache_miss,
  input  logic    redirect,
  input  pc_t     redirect_pc,
  output pc_t     imem_addr,
  input  bundle_t imem_bundle,
  output logic    ifid_valid,
  output pc_t     ifid_pc,
  output bundle_t ifid_bundle,
  output pc_t     fetch_pc        // address of the next bundle to be fetched
);
  pc_t pc_q;

  assign imem_addr = pc_q;
  assign fetch_pc  = pc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q        <= RESET_PC;
      ifid_valid  <= 1'b0;
      ifid_pc     <= '0;
      ifid_bundle <= '0;
    end else if (redirect) begin
      pc_q        <= redirect_pc;
      ifid_valid  <= 1'b0;
    end else if (!stall) begin
      if (icache_miss) begin
        ifid_valid  <= 1'b0;
      end else begin
        pc_q        <= pc_q + 1'b1;
        ifid_valid  <= 1'b1;
        ifid_pc     <= pc_q;
        ifid_bundle <= imem_bundle;
      end
    end
  end
endmodule
