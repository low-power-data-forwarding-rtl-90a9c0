// tb_vliw_core: directed scenarios on the pipeline core with simple memories.
//  A. A four-way DCT fragment: r18 is defined, consumed by the next bundle over the
//     EX/EX path and redefined there; its first definition is write-inhibited, so the
//     register file must still hold the old r18 after that bundle has left WB.
//  B. A short-lived variable consumed two bundles later (MEM/EX path) and one
//     consumed three bundles later (MEM/ID path), both read-inhibited, with the
//     producers write-inhibited; results and RF contents checked.
//  C. Exact exception: w(k-2) produces r5 write-inhibited, w(k-1) raises a misaligned
//     store in MEM, w(k) reads r5 read-inhibited. The exception forces r5 into the RF
//     in the same cycle, is served one cycle later when w(k-1) is in WB, the handler
//     returns, and w(k) re-executes reading r5 from the RF.
//  D. A data-cache miss of three cycles on a load delays retirement by three cycles.
// Expected values are computed here from the operation semantics.
module tb_vliw_core;
  import vliw_pkg::*;
  import vliw_tb_pkg::*;
  localparam pc_t VEC = 16'd100;

  logic clk = 0, rst_n = 0;
  pc_t imem_addr;
  bundle_t imem_bundle;
  logic icache_miss = 0, dcache_miss = 0, irq = 0, irq_ack;
  logic [9:0] dmem_addr;
  logic dmem_we;
  word_t dmem_wdata, dmem_rdata, dbg_rdata;
  reg_t dbg_raddr;
  retire_t retire;
  events_t events;

  bundle_t imem [256];
  word_t   dmem [1024];
  int checks = 0, failures = 0, cycles = 0;
  int ret_cycle [256];
  int sig_cycle, srv_cycle;
  int n_exex, n_memex, n_memid, n_wrsave, n_rdsave, n_wrforce, n_rdforce;

  vliw_core #(.EXACT (1'b1), .EXC_VECTOR (VEC)) dut (.*);

  assign imem_bundle = imem[imem_addr[7:0]];
  assign dmem_rdata  = dmem[dmem_addr];
  always @(posedge clk) if (dmem_we) dmem[dmem_addr] <= dmem_wdata;
  always #5 clk = ~clk;

  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (cycle %0d)", m, cycles); end
  endtask

  function automatic word_t rf(input int r);
    return dut.u_rf.regs[r];
  endfunction

  always @(posedge clk) begin
    cycles++;
    if (rst_n && retire.valid) ret_cycle[retire.pc[7:0]] = cycles;
    if (rst_n && dut.mem_exc && sig_cycle < 0) sig_cycle = cycles;
    if (rst_n && dut.serve && srv_cycle < 0) srv_cycle = cycles;
    if (rst_n) begin
      n_exex += events.fwd_exex; n_memex += events.fwd_memex; n_memid += events.fwd_memid;
      n_wrsave += events.wr_inhibited; n_rdsave += events.rd_inhibited;
      n_wrforce += events.wr_forced;  n_rdforce += events.rd_forced;
    end
  end

  task automatic run(input int ncyc);
    foreach (ret_cycle[i]) ret_cycle[i] = -1;
    sig_cycle = -1; srv_cycle = -1;
    n_exex = 0; n_memex = 0; n_memid = 0; n_wrsave = 0; n_rdsave = 0; n_wrforce = 0; n_rdforce = 0;
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    repeat (ncyc) @(negedge clk);
  endtask

  // program helpers
  function automatic void clear();
    foreach (imem[i]) imem[i] = '0;
    imem[VEC][0]     = ri(OP_ADD, 60, 60, 1);
    imem[VEC + 2][0] = ctl(OP_RFI, 0, 0);
  endfunction

  task automatic park(input int pc);
    imem[pc][0] = ctl(OP_GOTO, 0, 0);
  endtask

  initial begin
    word_t r16, r18, r7, r17, r19, r15, r20, r10, r8, r11, r12, r9, r3, r5v;
    dbg_raddr = '0;
    foreach (dmem[i]) dmem[i] = word_t'(i * 5);

    // ------------------------------------------------------------ A: DCT fragment
    clear();
    r16 = 32'h0000_468A; r18 = 32'h0000_7000; r7 = 32'h0000_1000; r17 = 32'h0000_0777;
    r19 = 32'h0000_3000; r15 = 32'h0000_0100; r20 = 32'h0000_0010; r10 = 32'd500;
    r8 = 32'd20; r11 = 32'd3; r12 = 32'd9; r9 = 32'd4; r3 = 32'd7;
    imem[0][0] = ri(OP_ADD, 16, 0, 14'h1345); imem[0][1] = ri(OP_ADD, 18, 0, 0);
    imem[0][2] = ri(OP_ADD, 7, 0, 14'h1000);  imem[0][3] = ri(OP_ADD, 17, 0, 14'h0777);
    imem[1][0] = ri(OP_SHL, 16, 16, 0);       imem[1][1] = ri(OP_ADD, 18, 18, 14'h1000);
    imem[1][2] = ri(OP_ADD, 19, 0, 14'h1000); imem[1][3] = ri(OP_ADD, 15, 0, 14'h0100);
    // complete the constants: r16 = 0x468A, r18 = 0x7000, r19 = 0x3000
    imem[2][0] = ri(OP_ADD, 16, 16, 14'h1000); imem[2][1] = ri(OP_ADD, 18, 18, 14'h1000);
    imem[2][2] = ri(OP_ADD, 19, 19, 14'h1000); imem[2][3] = ri(OP_ADD, 20, 0, 16);
    imem[3][0] = ri(OP_ADD, 16, 16, 14'h1000); imem[3][1] = ri(OP_ADD, 18, 18, 14'h1000);
    imem[3][2] = ri(OP_ADD, 19, 19, 14'h1000); imem[3][3] = ri(OP_ADD, 10, 0, 500);
    imem[4][0] = ri(OP_SHL, 16, 16, 0);        imem[4][1] = ri(OP_ADD, 18, 18, 14'h1000);
    imem[4][2] = ri(OP_ADD, 8, 0, 20);         imem[4][3] = ri(OP_ADD, 11, 0, 3);
    imem[5][0] = ri(OP_ADD, 16, 16, 14'h0345 - 14'h1000 + 14'h1000); imem[5][1] = ri(OP_ADD, 18, 18, 14'h1000);
    imem[5][2] = ri(OP_ADD, 12, 0, 9);         imem[5][3] = ri(OP_ADD, 9, 0, 4);
    imem[6][0] = ri(OP_ADD, 18, 18, 14'h1000); imem[6][1] = ri(OP_ADD, 3, 0, 7);
    imem[6][2] = ri(OP_ADD, 16, 16, 14'h0FFF); imem[6][3] = ri(OP_ADD, 26, 0, 0);
    imem[7][0] = ri(OP_ADD, 18, 18, 14'h1000); imem[7][1] = ri(OP_ADD, 16, 16, 14'h1);
    // registers now: r16 = 0x468A, r18 = 0x7000; bundles 8..11 are the fragment
    // n
    imem[8][0]  = ri(OP_SHR, 16, 16, 8);
    imem[8][1]  = enc(6'(OP_SUB), 18, 18, 7, 0, 1'b1, 1'b0, 1'b0);    // write-inhibited
    imem[8][2]  = rr(OP_ADD, 17, 17, 19);
    imem[8][3]  = rr(OP_SUB, 19, 19, 15);
    // n+1
    imem[9][0]  = enc(6'(OP_SHR), 18, 18, 8, 1, 1'b0, 1'b1, 1'b0);   // reads r18 over EX/EX
    imem[9][1]  = ri(OP_SHR, 17, 17, 8);
    imem[9][2]  = ri(OP_SHR, 19, 19, 8);
    imem[9][3]  = ri(OP_MUL, 20, 20, 181);
    // n+2
    imem[10][0] = rr(OP_SUB, 10, 10, 8);
    imem[10][1] = ri(OP_MUL, 11, 11, 3784);
    imem[10][2] = rr(OP_SUB, 5, 12, 9);
    // n+3
    imem[11][0] = ctl(OP_BRF, 26, 1);
    imem[11][1] = rr(OP_SUB, 10, 10, 3);
    imem[11][2] = ri(OP_ADD, 20, 20, 128);
    park(12);
    run(40);
    begin
      word_t e16, e18a, e18, e17, e19, e20, e10, e11, e5;
      e16  = word_t'($signed(r16) >>> 8);
      check(rf(16) == e16, $sformatf("A: r16 = %h, expected %h", rf(16), e16));
      e18a = r18 - r7;
      e18  = word_t'($signed(e18a) >>> 8);
      check(rf(18) == e18, $sformatf("A: r18 = %h, expected %h", rf(18), e18));
      e17  = word_t'($signed(r17 + r19) >>> 8);
      e19  = word_t'($signed(r19 - r15) >>> 8);
      e20  = r20 * 181 + 128;
      e10  = r10 - r8 - r3;
      e11  = r11 * 3784;
      e5   = r12 - r9;
      check(rf(17) == e17, $sformatf("A: r17 = %h, expected %h", rf(17), e17));
      check(rf(19) == e19, $sformatf("A: r19 = %h, expected %h", rf(19), e19));
      check(rf(20) == e20, $sformatf("A: r20 = %h, expected %h", rf(20), e20));
      check(rf(10) == e10, $sformatf("A: r10 = %h, expected %h", rf(10), e10));
      check(rf(11) == e11, $sformatf("A: r11 = %h, expected %h", rf(11), e11));
      check(rf(5)  == e5,  $sformatf("A: r5 = %h, expected %h", rf(5), e5));
      check(n_wrsave == 1, $sformatf("A: one write saved (%0d)", n_wrsave));
      check(n_rdsave == 1 && n_exex >= 1, "A: r18 read saved, EX/EX path used");
      // one bundle per cycle through the fragment
      check(ret_cycle[9] == ret_cycle[8] + 1 && ret_cycle[11] == ret_cycle[8] + 3, "A: one bundle per cycle");
      check(ret_cycle[0] > 0 && ret_cycle[8] - ret_cycle[0] == 8, "A: in-order retirement");
    end

    // A': the inhibited value never reaches the RF. Run again and stop between the
    // retirement of n and n+1 to look at r18 in the RF.
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    while (!(retire.valid && retire.pc == 16'd8)) @(negedge clk);
    @(negedge clk);
    check(rf(18) == 32'h7000, $sformatf("A': r18 in RF after write-inhibited definition = %h, expected 7000", rf(18)));
    repeat (10) @(negedge clk);

    // ------------------------------------------------------------ B: Fig. 1 patterns
    clear();
    imem[0][0] = ri(OP_ADD, 1, 0, 11); imem[0][1] = ri(OP_ADD, 2, 0, 22); imem[0][2] = ri(OP_ADD, 3, 0, 33);
    imem[1][0] = enc(6'(OP_ADD), 4, 1, 100, 1, 1'b1, 1'b0, 1'b0);  // r4 = 111, short-lived (MEM/EX)
    imem[1][1] = enc(6'(OP_ADD), 5, 2, 200, 1, 1'b1, 1'b0, 1'b0);  // r5 = 222, short-lived (MEM/ID)
    imem[2][0] = ri(OP_ADD, 6, 0, 1);
    imem[3][0] = enc(6'(OP_ADD), 7, 4, 3, 0, 1'b0, 1'b1, 1'b0);    // r7 = r4 + r3, two bundles later
    imem[4][0] = enc(6'(OP_SUB), 8, 5, 1, 0, 1'b0, 1'b1, 1'b0);    // r8 = r5 - r1, three bundles later
    imem[5][0] = ri(OP_ADD, 4, 0, 0); imem[5][1] = ri(OP_ADD, 5, 0, 0);   // redefinitions
    park(6);
    // stop right after bundle 4 retires and look at the RF
    rst_n = 0; n_memex = 0; n_memid = 0; n_rdsave = 0; n_wrsave = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    while (!(retire.valid && retire.pc == 16'd4)) @(negedge clk);
    @(negedge clk);
    check(rf(4) == 0 && rf(5) == 0 || (rf(4) != 111 && rf(5) != 222), "B: short-lived values not written to the RF");
    check(rf(7) == 144, $sformatf("B: r7 = %0d, expected 144 (MEM/EX path)", rf(7)));
    check(rf(8) == 211, $sformatf("B: r8 = %0d, expected 211 (MEM/ID path)", rf(8)));
    check(n_memex >= 1 && n_memid >= 1, "B: MEM/EX and MEM/ID paths used");
    check(n_wrsave == 2 && n_rdsave == 2, $sformatf("B: saved writes %0d, reads %0d", n_wrsave, n_rdsave));
    repeat (10) @(negedge clk);

    // ------------------------------------------------------------ C: Fig. 4 exception
    clear();
    imem[0][0] = ri(OP_ADD, 1, 0, 41); imem[0][1] = ri(OP_ADD, 60, 0, 0);
    imem[1][0] = ri(OP_ADD, 2, 0, 2);
    imem[2][1] = enc(6'(OP_ADD), 5, 1, 1, 1, 1'b1, 1'b0, 1'b0);     // w(k-2): r5 = 42, inhibited
    imem[3][0] = stw(2, 0, 13);                                      // w(k-1): misaligned store
    imem[4][1] = enc(6'(OP_ADD), 6, 5, 0, 0, 1'b0, 1'b1, 1'b0);     // w(k): r6 = r5, read-inhibited
    imem[5][1] = ri(OP_ADD, 5, 0, 7);                                // redefinition of r5
    park(6);
    run(60);
    check(srv_cycle == sig_cycle + 1, $sformatf("C: signalled at %0d, served at %0d", sig_cycle, srv_cycle));
    check(rf(60) == 1, "C: handler ran once");
    check(rf(6) == 42, $sformatf("C: r6 = %0d after re-execution, expected 42", rf(6)));
    check(rf(5) == 7, "C: r5 redefined");
    check(n_wrforce >= 1, "C: forced writeback of the inhibited r5");
    check(n_rdforce >= 1, "C: read of r5 forced after the exception");
    check(dmem[3] == 15, "C: misaligned store dropped");
    // the forced value is in the RF while the handler runs
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    while (!(retire.valid && retire.pc == VEC)) @(negedge clk);
    check(rf(5) == 42, $sformatf("C: r5 = %0d in the RF during the handler", rf(5)));
    repeat (20) @(negedge clk);

    // ------------------------------------------------------------ D: data-cache miss
    clear();
    imem[0][0] = ri(OP_ADD, 1, 0, 8);
    imem[2][0] = ldw_fix(2, 1, 4);                 // r2 = mem[3] = 15
    imem[4][0] = ri(OP_ADD, 3, 2, 1);
    park(5);
    fork
      run(30);
      begin
        wait (rst_n);
        while (!(dut.exmem.valid && dut.exmem.is_load)) @(negedge clk);
        dcache_miss = 1; repeat (3) @(negedge clk); dcache_miss = 0;
      end
    join
    check(rf(3) == 16, $sformatf("D: r3 = %0d, expected 16", rf(3)));
    check(ret_cycle[2] - ret_cycle[0] == 5, $sformatf("D: load retired %0d cycles after bundle 0, expected 2 + 3 stall cycles", ret_cycle[2] - ret_cycle[0]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
