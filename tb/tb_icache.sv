// tb_icache: writes random bundles (with inhibit bits) and reads them back.
module tb_icache;
  import vliw_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0;
  pc_t addr, waddr;
  bundle_t rdata, wdata;
  logic we;
  bundle_t shadow [DEPTH];
  int checks = 0, failures = 0, cycles = 0;

  icache #(.DEPTH (DEPTH)) dut (.*);
  always #5 clk = ~clk;

  function automatic bundle_t rnd();
    bundle_t b;
    for (int s = 0; s < NSLOT; s++) begin
      b[s].word = $urandom(); b[s].wi = $urandom_range(0, 1);
      b[s].ri1 = $urandom_range(0, 1); b[s].ri2 = $urandom_range(0, 1);
    end
    return b;
  endfunction

  initial begin
    we = 0; addr = '0; waddr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = pc_t'(i); wdata = rnd(); shadow[i] = wdata;
    end
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); waddr = pc_t'($urandom_range(0, DEPTH - 1)); wdata = rnd();
      addr = pc_t'($urandom_range(0, DEPTH - 1));
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL addr %0d", addr); end
      if (we) shadow[waddr] = wdata;
    end
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
