// tb_regfile: random reads/writes against a shadow array; checks the write-inhibit
// gate (inhibited writes leave the register unchanged), register 0, same-address
// priority and the per-cycle read/write access counts.
module tb_regfile;
  import vliw_pkg::*;
  logic clk = 0;
  reg_t  [NRD-1:0] raddr;
  logic  [NRD-1:0] ren;
  word_t [NRD-1:0] rdata;
  reg_t  [NWR-1:0] waddr;
  logic  [NWR-1:0] wen, winh;
  word_t [NWR-1:0] wdata;
  reg_t  dbg_raddr;
  word_t dbg_rdata;
  logic [3:0] n_reads;
  logic [2:0] n_writes;
  word_t shadow [NREG];
  int checks = 0, failures = 0, cycles = 0, inhibited = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  initial begin
    wen = '0; winh = '0; ren = '0; raddr = '0; waddr = '0; wdata = '0; dbg_raddr = '0;
    // initialise all registers through port 0
    for (int r = 0; r < NREG; r++) begin
      @(negedge clk);
      wen = 4'b0001; waddr[0] = reg_t'(r); wdata[0] = word_t'(r * 3 + 1);
      shadow[r] = (r == 0) ? '0 : word_t'(r * 3 + 1);
    end
    @(negedge clk); wen = '0;
    for (int i = 0; i < 2000; i++) begin
      int er, ew;
      @(negedge clk);
      for (int p = 0; p < NRD; p++) begin raddr[p] = reg_t'($urandom); ren[p] = $urandom_range(0, 1); end
      for (int p = 0; p < NWR; p++) begin
        waddr[p] = reg_t'($urandom_range(0, 7));   // small range: collisions happen
        wen[p]   = $urandom_range(0, 1);
        winh[p]  = $urandom_range(0, 1);
        wdata[p] = $urandom();
      end
      dbg_raddr = reg_t'($urandom);
      #1;
      er = 0; ew = 0;
      for (int p = 0; p < NRD; p++) begin
        check(rdata[p] === shadow[raddr[p]], $sformatf("read port %0d r%0d", p, raddr[p]));
        er += ren[p];
      end
      check(dbg_rdata === shadow[dbg_raddr], "debug read");
      for (int p = 0; p < NWR; p++) ew += (wen[p] && !winh[p]);
      check(n_reads == 4'(er), "n_reads");
      check(n_writes == 3'(ew), "n_writes");
      for (int p = 0; p < NWR; p++) begin
        if (wen[p] && !winh[p] && waddr[p] != 0) shadow[waddr[p]] = wdata[p];
        if (wen[p] && winh[p]) inhibited++;
      end
    end
    @(negedge clk);
    for (int r = 0; r < NREG; r++) begin
      dbg_raddr = reg_t'(r); #1;
      check(dbg_rdata === shadow[r], $sformatf("final r%0d", r));
    end
    check(inhibited > 100, "write inhibit exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
