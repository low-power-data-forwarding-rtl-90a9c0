// tb_lsu: the load/store unit against a small data store: aligned loads and stores,
// misaligned accesses (exception, no write), kill and stall suppressing the store.
module tb_lsu;
  import vliw_pkg::*;
  localparam int WORDS = 64;
  logic clk = 0;
  logic valid, is_load, is_store, kill, stall, misaligned, mem_we;
  word_t addr, sdata, load_data, mem_wdata, mem_rdata;
  logic [5:0] mem_addr;
  word_t shadow [WORDS];
  int checks = 0, failures = 0, cycles = 0, n_mis = 0;

  lsu #(.WORDS (WORDS)) dut (.*);
  dmem #(.WORDS (WORDS)) u_mem (
    .clk, .addr0 (mem_addr), .we0 (mem_we), .wdata0 (mem_wdata), .rdata0 (mem_rdata),
    .addr1 (6'd0), .we1 (1'b0), .wdata1 ('0), .rdata1 ());
  always #5 clk = ~clk;

  task automatic check(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    valid = 0; is_load = 0; is_store = 0; kill = 0; stall = 0; addr = 0; sdata = 0;
    // fill memory through stores
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); valid = 1; is_store = 1; addr = word_t'(i * 4); sdata = $urandom();
      shadow[i] = sdata;
    end
    for (int i = 0; i < 1500; i++) begin
      bit mis, wr;
      @(negedge clk);
      valid = $urandom_range(0, 7) != 0;
      is_load = $urandom_range(0, 1); is_store = !is_load && $urandom_range(0, 1);
      kill = $urandom_range(0, 9) == 0; stall = $urandom_range(0, 9) == 0;
      addr = word_t'($urandom_range(0, WORDS - 1) * 4 + (($urandom_range(0, 5) == 0) ? $urandom_range(1, 3) : 0));
      sdata = $urandom();
      #1;
      mis = valid && (is_load || is_store) && addr[1:0] != 0;
      wr  = valid && is_store && !kill && !stall && !mis;
      n_mis += mis;
      check(misaligned == mis, "misaligned flag");
      check(mem_we == wr, "store enable");
      if (valid && is_load && !mis) check(load_data === shadow[addr[7:2]], "load data");
      if (wr) shadow[addr[7:2]] = sdata;
    end
    check(n_mis > 20, "misaligned accesses exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
