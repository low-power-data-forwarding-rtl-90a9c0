// tb_vliw_top: end-to-end test of the low-power forwarding VLIW at its default size.
//
// A random program of basic blocks is generated and its Read/Write Inhibit bits are
// set by a liveness analysis (write inhibit for definitions whose uses all lie within
// two bundles, the limit for exact exceptions; read inhibit for sources produced
// within three bundles). The program contains loads, stores, taken and untaken
// branches and, now and then, a trap, an illegal operation or a misaligned store;
// the handler counts its entries and returns. The test drives random instruction-
// cache misses, data-cache misses and interrupts.
// Every bundle leaving WB is compared with a reference model executing the same
// program sequentially without any inhibit bits: address, each result and whether
// the handler is entered after it. At the end the register file and the data memory
// are compared with the model. Because write-inhibited values never reach the RF, a
// lost forced writeback or a wrong forwarding select shows up as a mismatch.
// Each mechanism must occur at least once: EX/EX, MEM/EX and MEM/ID forwarding,
// saved reads and writes, forced reads and writes, exceptions, interrupts, both
// cache misses, taken branches, loads and stores. The number of cycles is checked:
// with no miss, branch or exception the machine retires one bundle per cycle.
module tb_vliw_top;
  import vliw_pkg::*;
  import vliw_tb_pkg::*;

  localparam int  IMEM = 1024;
  localparam int  DMEM = 1024;
  localparam pc_t VEC  = 16'd512;
  localparam int  N_BB = 70;
  localparam int  ROUNDS = 30;
  localparam int  WATCHDOG = 400000;

  logic clk = 0, rst_n = 0;
  logic prog_we, ext_we, icache_miss, dcache_miss, irq, irq_ack;
  pc_t prog_addr;
  bundle_t prog_data;
  logic [$clog2(DMEM)-1:0] ext_addr;
  word_t ext_wdata, ext_rdata, dbg_rdata;
  reg_t dbg_raddr;
  retire_t retire;
  events_t events;

  vliw_top dut (.*);

  always #5 clk = ~clk;

  prog_gen  gen;
  ref_model rm;
  int checks = 0, failures = 0, cycles = 0;
  int retired = 0, parked = 0;
  longint n_exex, n_memex, n_memid, n_rdsave, n_wrsave, n_rdforce, n_wrforce;
  longint n_exc, n_irq, n_imiss, n_dstall, n_br, n_ld, n_st, n_reads, n_writes;
  bit running = 0, stim_on = 0;

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s (cycle %0d)", m, cycles); end
  endtask

  // lockstep comparison with the reference model
  always @(posedge clk) begin
    if (running && retire.valid) begin
      step_t st;
      bundle_t b;
      check(retire.pc == rm.pc, $sformatf("retired pc %0d, expected %0d", retire.pc, rm.pc));
      b = gen.get(int'(retire.pc));
      st = rm.step(b, retire.served);
      for (int s = 0; s < NSLOT; s++) begin
        check(retire.slots[s].we == st.we[s], $sformatf("pc %0d slot %0d write enable", retire.pc, s));
        if (st.we[s])
          check(retire.slots[s].rd == reg_t'(st.rd[s]) && retire.slots[s].data == st.data[s],
                $sformatf("pc %0d slot %0d result %h, expected r%0d=%h", retire.pc, s,
                          retire.slots[s].data, st.rd[s], st.data[s]));
      end
      if (retire.served && !retire.irq) check(st.exc, $sformatf("pc %0d unexpected exception", retire.pc));
      if (st.exc) check(retire.served, $sformatf("pc %0d exception not served", retire.pc));
      retired++;
      if (retire.pc == pc_t'(gen.end_pc)) parked++;
    end
  end

  // event counters
  always @(posedge clk) begin
    if (running) begin
      n_exex += events.fwd_exex;   n_memex += events.fwd_memex; n_memid += events.fwd_memid;
      n_rdsave += events.rd_inhibited; n_wrsave += events.wr_inhibited;
      n_rdforce += events.rd_forced;   n_wrforce += events.wr_forced;
      n_exc += events.exc_served; n_irq += events.irq_served; n_imiss += events.imiss;
      n_dstall += events.dstall; n_br += events.br_taken; n_ld += events.load; n_st += events.store;
      n_reads += events.rf_reads; n_writes += events.rf_writes;
    end
  end

  // stimulus: cache misses and interrupts
  int irq_wait = 0;
  always @(negedge clk) begin
    if (stim_on) begin
      icache_miss <= ($urandom_range(0, 99) < 4);
      dcache_miss <= ($urandom_range(0, 99) < 30);
      if (irq && irq_ack) irq <= 1'b0;
      else if (!irq && $urandom_range(0, 999) < 6) irq <= 1'b1;
    end
  end

  task automatic load_program();
    for (int a = 0; a < IMEM; a++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = pc_t'(a); prog_data = gen.get(a);
    end
    @(negedge clk); prog_we = 0;
    for (int a = 0; a < DMEM; a++) begin
      @(negedge clk);
      ext_we = 1; ext_addr = 10'(a); ext_wdata = word_t'(a * 7 + 3); rm.mem[a] = ext_wdata;
    end
    @(negedge clk); ext_we = 0;
  endtask

  // one-bundle-per-cycle check: a straight-line program without events
  task automatic throughput_check();
    int first, last;
    first = -1; last = -1;
    for (int c = 0; c < 60; c++) begin
      @(posedge clk);
      if (retire.valid && retire.pc == 16'd1) first = cycles;
      if (retire.valid && retire.pc == 16'd40) last = cycles;
    end
    check(first > 0 && last - first == 39, $sformatf("throughput: 39 bundles in %0d cycles", last - first));
  endtask

  initial begin
    prog_we = 0; ext_we = 0; icache_miss = 0; dcache_miss = 0; irq = 0;
    prog_addr = '0; prog_data = '0; ext_addr = '0; ext_wdata = '0; dbg_raddr = '0;

    // ---- phase 1: pipeline throughput on straight-line code (no events)
    gen = new(2, 0);
    for (int i = 0; i < 50; i++)
      for (int s = 1; s < NSLOT; s++) gen.prog[i][s] = ri(OP_ADD, s, s, 1);
    gen.prog[50][0] = ctl(OP_GOTO, 0, 0);
    rm = new(DMEM, VEC);
    load_program();
    repeat (2) @(negedge clk);
    rst_n = 1;
    throughput_check();
    @(negedge clk); rst_n = 0;

    // ---- phase 2: random programs with all mechanisms
    for (int round = 0; round < ROUNDS; round++) begin
      gen = new(2, 40);
      gen.generate_program(N_BB, int'(VEC));
      check(gen.n_bundles < int'(VEC), "program fits below the handler");
      rm = new(DMEM, VEC);
      @(negedge clk); rst_n = 0;
      load_program();
      // the register file is not reset: start the model from its current contents
      for (int r = 0; r < NREG; r++) begin
        dbg_raddr = reg_t'(r); #1;
        rm.regs[r] = dbg_rdata;
      end
      repeat (2) @(negedge clk);
      rst_n = 1;
      parked = 0;
      running = 1;
      stim_on = 1;
      while (parked < 3 && cycles < WATCHDOG - 100) @(posedge clk);
      // stop the stimulus, let any interrupt already accepted complete, then stop
      @(negedge clk); stim_on = 0; icache_miss = 0; dcache_miss = 0; irq = 0;
      repeat (40) @(negedge clk);
      running = 0;
      check(parked >= 3, "program reached its end");
      // architectural state
      for (int r = 0; r < NREG; r++) begin
        dbg_raddr = reg_t'(r); #1;
        check(dbg_rdata == rm.regs[r], $sformatf("r%0d = %h, expected %h", r, dbg_rdata, rm.regs[r]));
      end
      for (int a = 0; a < 64; a++) begin
        ext_addr = 10'(a); #1;
        check(ext_rdata == rm.mem[a], $sformatf("mem[%0d] = %h, expected %h", a, ext_rdata, rm.mem[a]));
      end
    end
    $display("retired %0d bundles in %0d cycles", retired, cycles);
    $display("forwarding: EX/EX %0d  MEM/EX %0d  MEM/ID %0d", n_exex, n_memex, n_memid);
    $display("RF accesses: %0d reads, %0d writes; saved %0d reads, %0d writes; forced %0d reads, %0d writes",
             n_reads, n_writes, n_rdsave, n_wrsave, n_rdforce, n_wrforce);
    $display("events: %0d exceptions, %0d interrupts, %0d I-miss cycles, %0d D-stall cycles, %0d taken branches, %0d loads, %0d stores",
             n_exc, n_irq, n_imiss, n_dstall, n_br, n_ld, n_st);
    check(n_exex > 0,   "EX/EX path used");
    check(n_memex > 0,  "MEM/EX path used");
    check(n_memid > 0,  "MEM/ID path used");
    check(n_rdsave > 0, "reads saved by Read Inhibit");
    check(n_wrsave > 0, "writes saved by Write Inhibit");
    check(n_rdforce > 0, "Read Inhibit ignored after an event");
    check(n_wrforce > 0, "forced writeback of a write-inhibited value");
    check(n_exc > 0,    "exception served");
    check(n_irq > 0,    "interrupt served");
    check(n_imiss > 0,  "instruction-cache miss");
    check(n_dstall > 0, "data-cache miss stall");
    check(n_br > 0,     "taken branch");
    check(n_ld > 0 && n_st > 0, "loads and stores");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > WATCHDOG) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
