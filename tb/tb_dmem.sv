// tb_dmem: random traffic on both ports of the data store against a shadow array,
// including same-address collisions (port 1 wins).
module tb_dmem;
  localparam int WORDS = 64;
  logic clk = 0;
  logic [5:0] addr0, addr1;
  logic we0, we1;
  logic [31:0] wdata0, wdata1, rdata0, rdata1;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0, cycles = 0;

  dmem #(.WORDS (WORDS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    we0 = 0; we1 = 0; addr0 = 0; addr1 = 0; wdata0 = 0; wdata1 = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we1 = 1; addr1 = 6'(i); wdata1 = $urandom(); shadow[i] = wdata1;
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      addr0 = 6'($urandom); addr1 = 6'($urandom_range(0, 3) == 0 ? addr0 : 6'($urandom));
      we0 = $urandom_range(0, 1); we1 = $urandom_range(0, 1);
      wdata0 = $urandom(); wdata1 = $urandom();
      #1;
      checks += 2;
      if (rdata0 !== shadow[addr0]) begin failures++; $display("FAIL port0 %0d", addr0); end
      if (rdata1 !== shadow[addr1]) begin failures++; $display("FAIL port1 %0d", addr1); end
      if (we0) shadow[addr0] = wdata0;
      if (we1) shadow[addr1] = wdata1;
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
