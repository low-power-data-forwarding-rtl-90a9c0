// tb_decode_unit: random bundles and random producer destinations in EX, MEM and WB.
// Checks, against a model written here, the bypass selects (nearest producer first,
// highest slot first, never r0), read-port enables under Read Inhibit and ri_ignore,
// the held read address of an inhibited port, ri_miss, the decoded write enable with
// its Write Inhibit bit, and the illegal-operation exception.
module tb_decode_unit;
  import vliw_pkg::*;
  import vliw_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic valid, advance, ri_ignore, illegal;
  bundle_t bundle;
  logic [NSLOT-1:0] ex_we, mem_we, wb_we;
  reg_t [NSLOT-1:0] ex_rd, mem_rd, wb_rd;
  dec_t [NSLOT-1:0] ops;
  reg_t [NRD-1:0] raddr;
  logic [NRD-1:0] ren, ri_saved, ri_forced, ri_miss, rzero;
  fwd_sel_t [NRD-1:0] id_sel, ex_sel;
  reg_t held [NRD];
  int checks = 0, failures = 0, cycles = 0;
  int n_exex = 0, n_memex = 0, n_memid = 0, n_inh = 0, n_ill = 0;

  decode_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 15) $display("FAIL %s", m); end
  endtask

  initial begin
    valid = 0; advance = 0; ri_ignore = 0; bundle = '0;
    ex_we = '0; mem_we = '0; wb_we = '0; ex_rd = '0; mem_rd = '0; wb_rd = '0;
    foreach (held[p]) held[p] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      bit exp_ill;
      @(negedge clk);
      valid = $urandom_range(0, 7) != 0;
      advance = valid && $urandom_range(0, 3) != 0;
      ri_ignore = $urandom_range(0, 4) == 0;
      exp_ill = 0;
      for (int s = 0; s < NSLOT; s++) begin
        automatic int k = $urandom_range(0, 19);
        automatic int rd = $urandom_range(0, 7), r1 = $urandom_range(0, 7), r2 = $urandom_range(0, 7);
        automatic bit w = $urandom_range(0, 1), i1 = $urandom_range(0, 1), i2 = $urandom_range(0, 1);
        if (k < 12)       bundle[s] = enc(6'($urandom_range(1, 11)), rd, r1, r2, 0, w, i1, i2);
        else if (k < 15)  bundle[s] = enc(6'($urandom_range(1, 11)), rd, r1, $urandom_range(0, 99), 1, w, i1, i2);
        else if (k < 17)  begin bundle[s] = stw(rd, r1, 4); bundle[s].ri1 = i1; bundle[s].ri2 = i2; end
        else if (k < 18)  bundle[s] = nop();
        else              begin bundle[s] = ldw_fix(rd, r1, 8); bundle[s].wi = w; end
        if (s != MEM_SLOT && k >= 15 && k != 17) exp_ill = 1;
      end
      if ($urandom_range(0, 40) == 0) begin bundle[2].word[31:26] = 6'h3F; exp_ill = 1; end
      for (int q = 0; q < NSLOT; q++) begin
        ex_we[q]  = $urandom_range(0, 2) == 0; ex_rd[q]  = reg_t'($urandom_range(1, 7));
        mem_we[q] = $urandom_range(0, 2) == 0; mem_rd[q] = reg_t'($urandom_range(1, 7));
        wb_we[q]  = $urandom_range(0, 2) == 0; wb_rd[q]  = reg_t'($urandom_range(1, 7));
      end
      #1;
      check(illegal == (valid && exp_ill), "illegal");
      n_ill += illegal;
      for (int s = 0; s < NSLOT; s++) begin
        automatic logic [5:0] opc = bundle[s].word[31:26];
        automatic bit is_alu = (opc & ~OP_IMM_BIT) >= 1 && (opc & ~OP_IMM_BIT) <= 11;
        automatic bit is_ld  = (s == MEM_SLOT) && opc == 6'(OP_LDW);
        automatic bit we     = (is_alu || is_ld) && bundle[s].word[25:20] != 0;
        check(ops[s].we == we, $sformatf("we slot %0d", s));
        check(ops[s].wi == (we && bundle[s].wi), "wi");
      end
      for (int p = 0; p < NRD; p++) begin
        automatic int s = p / 2;
        automatic logic [5:0] opc = bundle[s].word[31:26];
        automatic bit is_alu = (opc & ~OP_IMM_BIT) >= 1 && (opc & ~OP_IMM_BIT) <= 11;
        automatic bit immf = opc[5];
        automatic bit st = (s == MEM_SLOT) && opc == 6'(OP_STW);
        automatic bit ld = (s == MEM_SLOT) && opc == 6'(OP_LDW);
        automatic int r  = (p % 2 == 0) ? int'(bundle[s].word[19:14]) : (st ? int'(bundle[s].word[25:20]) : int'(bundle[s].word[13:8]));
        automatic bit used = (p % 2 == 0) ? (is_alu || st || ld) : ((is_alu && !immf) || st);
        automatic bit rib  = (p % 2 == 0) ? bundle[s].ri1 : bundle[s].ri2;
        automatic bit re   = valid && used && r != 0;
        automatic bit en   = re && !(rib && !ri_ignore);
        automatic fwd_src_t es = SRC_PIPE, is = SRC_PIPE;
        automatic int eslot = 0, islot = 0;
        for (int q = NSLOT - 1; q >= 0; q--) if (es == SRC_PIPE && ex_we[q] && ex_rd[q] == r) begin es = SRC_EXEX; eslot = q; end
        for (int q = NSLOT - 1; q >= 0; q--) if (es == SRC_PIPE && mem_we[q] && mem_rd[q] == r) begin es = SRC_MEMEX; eslot = q; end
        for (int q = NSLOT - 1; q >= 0; q--) if (is == SRC_PIPE && wb_we[q] && wb_rd[q] == r) begin is = SRC_MEMEX; islot = q; end
        if (!re) begin es = SRC_PIPE; is = SRC_PIPE; eslot = 0; islot = 0; end
        check(ren[p] == en, $sformatf("ren port %0d", p));
        check(raddr[p] == (en ? reg_t'(r) : held[p]), $sformatf("raddr port %0d", p));
        check(ex_sel[p].src == es && (es == SRC_PIPE || ex_sel[p].slot == 2'(eslot)), $sformatf("ex_sel port %0d", p));
        check(id_sel[p].src == is && (is == SRC_PIPE || id_sel[p].slot == 2'(islot)), $sformatf("id_sel port %0d", p));
        if (used) check(rzero[p] == (r == 0), "rzero");
        check(ri_saved[p] == (re && rib && !ri_ignore), "ri_saved");
        check(ri_forced[p] == (re && rib && ri_ignore), "ri_forced");
        check(ri_miss[p] == (re && rib && !ri_ignore && es == SRC_PIPE && is == SRC_PIPE), "ri_miss");
        n_exex += (es == SRC_EXEX); n_memex += (es == SRC_MEMEX); n_memid += (is == SRC_MEMEX);
        n_inh += (re && rib && !ri_ignore);
      end
      @(posedge clk);
      if (advance) for (int p = 0; p < NRD; p++) held[p] = raddr[p];
    end
    check(n_exex > 0 && n_memex > 0 && n_memid > 0 && n_inh > 0 && n_ill > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
