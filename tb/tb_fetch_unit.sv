// tb_fetch_unit: random stalls, instruction-cache misses and redirects; the PC and
// the IF/ID register are compared every cycle with a cycle model written here.
// The instruction store is modelled by a function of the address.
module tb_fetch_unit;
  import vliw_pkg::*;
  logic clk = 0, rst_n = 0;
  logic stall, icache_miss, redirect, ifid_valid;
  pc_t redirect_pc, imem_addr, ifid_pc, fetch_pc;
  bundle_t imem_bundle, ifid_bundle;
  pc_t m_pc, m_ifpc;
  logic m_valid;
  int checks = 0, failures = 0, cycles = 0, n_red = 0, n_miss = 0, n_seq = 0;

  fetch_unit #(.RESET_PC (16'd5)) dut (.*);
  always #5 clk = ~clk;

  function automatic bundle_t content(pc_t a);
    bundle_t b;
    for (int s = 0; s < NSLOT; s++) begin
      b[s].word = {a, 14'(s), 2'b01}; b[s].wi = a[0]; b[s].ri1 = a[1]; b[s].ri2 = a[2];
    end
    return b;
  endfunction
  assign imem_bundle = content(imem_addr);

  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s t=%0t pc=%0d m_pc=%0d v=%b mv=%b", m, $time, fetch_pc, m_pc, ifid_valid, m_valid); end
  endtask

  initial begin
    stall = 0; icache_miss = 0; redirect = 0; redirect_pc = '0;
    m_pc = 16'd5; m_valid = 0; m_ifpc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      #1;
      check(fetch_pc == m_pc && imem_addr == m_pc, "pc");
      check(ifid_valid == m_valid, "ifid valid");
      if (m_valid) check(ifid_pc == m_ifpc && ifid_bundle == content(m_ifpc), "ifid content");
      stall = $urandom_range(0, 7) == 0;
      icache_miss = $urandom_range(0, 5) == 0;
      redirect = !stall && $urandom_range(0, 9) == 0;
      redirect_pc = pc_t'($urandom_range(0, 999));
      // model of the next state
      if (redirect) begin m_pc = redirect_pc; m_valid = 0; n_red++; end
      else if (!stall) begin
        if (icache_miss) begin m_valid = 0; n_miss++; end
        else begin m_ifpc = m_pc; m_valid = 1; m_pc = m_pc + 1; n_seq++; end
      end
      @(negedge clk);
    end
    check(n_red > 50 && n_miss > 50 && n_seq > 500, "all cases exercised");
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
