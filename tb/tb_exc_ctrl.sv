// tb_exc_ctrl: directed scenarios for the exception controller, in exact mode (dut_x)
// and inexact mode (dut_i) side by side:
//  1. forced writeback on an exception signalled in ID, EX and MEM, on an accepted
//     interrupt and on an instruction-cache miss;
//  2. marking: exact marks the excepting stage, inexact and interrupts mark the
//     youngest valid stage; no marking while stalled;
//  3. serve in WB saves EPC, enters the handler and acknowledges an interrupt;
//  4. Read Inhibit is ignored for exactly FWD_DEPTH decoded bundles after an event;
//  5. interrupts are masked inside a handler and while an exception is in flight.
module tb_exc_ctrl;
  import vliw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic stall, id_exc, ex_exc, mem_exc, irq, imiss, id_valid, ex_valid, mem_valid;
  logic id_advance, marker_in_flight, wb_valid, wb_mark, wb_mark_irq, rfi_taken;
  pc_t  epc_cand;
  logic x_force, x_mid, x_mex, x_mmem, x_mirq, x_serve, x_ack, x_rii, x_inh;
  logic i_force, i_mid, i_mex, i_mmem, i_mirq, i_serve, i_ack, i_rii, i_inh;
  pc_t  x_epc, i_epc;
  int checks = 0, failures = 0, cycles = 0;

  exc_ctrl #(.EXACT (1'b1)) dut_x (
    .clk, .rst_n, .stall, .id_exc, .ex_exc, .mem_exc, .irq, .imiss, .id_valid, .ex_valid,
    .mem_valid, .id_advance, .marker_in_flight, .wb_valid, .wb_mark, .wb_mark_irq,
    .rfi_taken, .epc_cand,
    .force_event (x_force), .mark_id (x_mid), .mark_ex (x_mex), .mark_mem (x_mmem),
    .mark_irq (x_mirq), .serve (x_serve), .irq_ack (x_ack), .ri_ignore (x_rii),
    .in_handler (x_inh), .epc (x_epc));
  exc_ctrl #(.EXACT (1'b0)) dut_i (
    .clk, .rst_n, .stall, .id_exc, .ex_exc, .mem_exc, .irq, .imiss, .id_valid, .ex_valid,
    .mem_valid, .id_advance, .marker_in_flight, .wb_valid, .wb_mark, .wb_mark_irq,
    .rfi_taken, .epc_cand,
    .force_event (i_force), .mark_id (i_mid), .mark_ex (i_mex), .mark_mem (i_mmem),
    .mark_irq (i_mirq), .serve (i_serve), .irq_ack (i_ack), .ri_ignore (i_rii),
    .in_handler (i_inh), .epc (i_epc));

  always #5 clk = ~clk;

  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (t=%0t)", m, $time); end
  endtask

  task automatic idle();
    stall = 0; id_exc = 0; ex_exc = 0; mem_exc = 0; irq = 0; imiss = 0;
    id_valid = 1; ex_valid = 1; mem_valid = 1; id_advance = 1; marker_in_flight = 0;
    wb_valid = 1; wb_mark = 0; wb_mark_irq = 0; rfi_taken = 0; epc_cand = 16'd77;
  endtask

  initial begin
    idle();
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!x_rii && !x_inh && !x_force, "quiet after reset");

    // 1+2: exception in MEM, both modes
    mem_exc = 1; #1;
    check(x_force && i_force, "force on MEM exception");
    check(x_mmem && !x_mid && !x_mex, "exact marks MEM");
    check(i_mid && !i_mmem, "inexact marks youngest (ID)");
    @(negedge clk); idle();
    // ri_ignore for exactly three decoded bundles
    for (int k = 0; k < FWD_DEPTH; k++) begin
      #1; check(x_rii && i_rii, $sformatf("ri_ignore bundle %0d", k)); @(negedge clk);
    end
    #1; check(!x_rii && !i_rii, "ri_ignore over after three bundles");
    // bubbles in ID do not consume the window
    ex_exc = 1; #1; check(x_mex && x_force, "exact marks EX"); @(negedge clk); idle();
    id_advance = 0; repeat (4) @(negedge clk);
    #1; check(x_rii, "window kept while ID is empty");
    idle(); repeat (3) @(negedge clk);

    // inexact: second exception ignored while pending
    id_exc = 1; #1; check(x_mid && !i_mid, "ID exception: exact marks ID, inexact still pending"); @(negedge clk);
    idle(); ex_exc = 1; #1; check(!i_mid && !i_mex && !i_mmem, "inexact: no second mark while pending");
    check(x_mex, "exact: own stage marked again");
    @(negedge clk); idle();

    // 3: serve
    wb_mark = 1; epc_cand = 16'd123; #1;
    check(x_serve && i_serve && !x_ack, "serve");
    @(negedge clk); idle(); #1;
    check(x_epc == 16'd123 && i_epc == 16'd123, "EPC saved");
    check(x_inh && i_inh && x_rii, "handler entered, reads forced");
    // 5: interrupt masked inside handler
    irq = 1; #1; check(!x_mirq && !x_force, "irq masked in handler");
    @(negedge clk); idle(); rfi_taken = 1; @(negedge clk); idle(); #1;
    check(!x_inh, "handler left on rfi");
    // interrupt masked while an exception is in flight
    irq = 1; marker_in_flight = 1; #1; check(!x_mirq, "irq masked with exception in flight");
    marker_in_flight = 0; stall = 1; #1; check(!x_mirq && !x_mid, "no marking while stalled");
    stall = 0; id_valid = 0; #1;
    check(x_mirq && x_mex && !x_mid && x_force, "irq marks youngest valid (EX)");
    @(negedge clk); idle(); irq = 1; #1;
    check(!x_mirq, "irq not marked twice");
    @(negedge clk); idle();
    wb_mark = 1; wb_mark_irq = 1; epc_cand = 16'd9; #1;
    check(x_serve && x_ack, "interrupt acknowledged at serve");
    @(negedge clk); idle(); rfi_taken = 1; @(negedge clk); idle();

    // 1: instruction-cache miss forces writeback without marking
    imiss = 1; #1;
    check(x_force && i_force && !x_mid && !x_mex && !x_mmem, "imiss forces writeback only");
    @(negedge clk); idle(); #1; check(x_rii, "reads forced after imiss");
    repeat (4) @(negedge clk);
    // stalled exception in exact mode: force but no mark until the stall ends
    stall = 1; mem_exc = 1; #1;
    check(x_force && !x_mmem && !x_serve, "stall: force, no mark");
    wb_mark = 1; #1; check(!x_serve, "no serve while stalled");
    @(negedge clk); idle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    cycles++;
    if (cycles > 2000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
