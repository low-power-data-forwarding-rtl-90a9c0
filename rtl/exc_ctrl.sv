// exc_ctrl: exception, interrupt and cache-miss control of the low-power pipeline.
//
// Write-inhibited results live only in the interstage registers, so any event that
// breaks the fixed producer/consumer timing must push them into the register file:
//  * force_event: raised in the cycle an exception is signalled in ID, EX or MEM, an
//    interrupt is accepted, or the instruction cache misses. Every bundle in ID, EX,
//    MEM and WB at that moment then ignores its Write Inhibit bits (the core keeps a
//    sticky force bit per stage; WB uses force_event directly in the same cycle).
//  * ri_ignore: after a force event, an exception entry or a return from exception,
//    the next FWD_DEPTH decoded bundles ignore their Read Inhibit bits and read the RF.
// Exceptions are served when the marked bundle reaches WB (`serve`): the marked bundle
// and all older ones complete, every younger bundle is deleted, the PC of the first
// younger bundle (epc_cand) is saved in EPC and fetch restarts at the handler.
//  * EXACT = 1: a synchronous exception marks the excepting bundle itself.
//  * EXACT = 0 (inexact) and interrupts: the youngest valid bundle in ID, EX or MEM is
//    marked, so everything already in the pipeline completes before the handler.
// An interrupt is accepted only outside a handler, with no exception in flight, and is
// acknowledged (irq_ack) when served. in_handler is cleared by a return from exception.
// Marks and the pending flag change only when the pipeline is not stalled.
// The forced writeback, the forced reads, the two modes and the serve point in WB
// follow the design description; the marking scheme, the EPC choice and the interrupt
// masking are this design's own.
module exc_ctrl
  import vliw_pkg::*;
#(
  parameter bit EXACT = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic stall,
  input  logic id_exc,
  input  logic ex_exc,
  input  logic mem_exc,
  input  logic irq,
  input  logic imiss,
  input  logic id_valid,
  input  logic ex_valid,
  input  logic mem_valid,
  input  logic id_advance,       // a valid bundle leaves ID this cycle
  input  logic marker_in_flight,
  input  logic wb_valid,
  input  logic wb_mark,
  input  logic wb_mark_irq,
  input  logic rfi_taken,
  input  pc_t  epc_cand,
  output logic force_event,
  output logic mark_id,
  output logic mark_ex,
  output logic mark_mem,
  output logic mark_irq,
  output logic serve,
  output logic irq_ack,
  output logic ri_ignore,
  output logic in_handler,
  output pc_t  epc
);
  logic pending_q;
  logic [1:0] ri_cnt_q;
  logic sync_any, take_young, irq_take, sync_take;

  assign sync_any  = id_exc || ex_exc || mem_exc;
  assign sync_take = !EXACT && sync_any && !pending_q && !stall;
  assign irq_take  = irq && !in_handler && !pending_q && !marker_in_flight && !sync_any
                     && (id_valid || ex_valid || mem_valid) && !stall;
  assign take_young = sync_take || irq_take;
  assign mark_irq   = irq_take;

  always_comb begin
    mark_id = 1'b0; mark_ex = 1'b0; mark_mem = 1'b0;
    if (EXACT && !stall) begin
      mark_id = id_exc; mark_ex = ex_exc; mark_mem = mem_exc;
    end
    if (take_young) begin
      if (id_valid)      mark_id  = 1'b1;
      else if (ex_valid) mark_ex  = 1'b1;
      else               mark_mem = 1'b1;
    end
  end

  assign force_event = sync_any || irq_take || imiss;
  assign serve       = wb_valid && wb_mark && !stall;
  assign irq_ack     = serve && wb_mark_irq;
  assign ri_ignore   = (ri_cnt_q != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q  <= 1'b0;
      in_handler <= 1'b0;
      epc        <= '0;
      ri_cnt_q   <= '0;
    end else begin
      if (serve) begin
        pending_q  <= 1'b0;
        in_handler <= 1'b1;
        epc        <= epc_cand;
      end else begin
        if (take_young) pending_q <= 1'b1;
        if (rfi_taken)  in_handler <= 1'b0;
      end
      if (serve || rfi_taken || force_event) ri_cnt_q <= 2'(FWD_DEPTH);
      else if (id_advance && ri_cnt_q != '0) ri_cnt_q <= ri_cnt_q - 1'b1;
    end
  end
endmodule
