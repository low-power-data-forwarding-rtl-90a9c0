// tb_fir_workload: an 8-tap FIR filter run on the top at its default size, with and
// without the inhibit bits, to measure the register-file traffic the scheme removes.
//
// y[n] = sum_{k=0..7} h[k] * x[n-k] for n = 0..NOUT-1 (x[n] = 0 for n < 0). The
// coefficients sit in r20..r27; the input delay line rotates through r30..r37 (x[n]
// lives in r30 + n mod 8), so each output loads one new sample. Every output takes
// seven bundles, fully unrolled (one straight-line block):
//   b0: LDW x[n]       | MUL t1=h1*x[n-1] | MUL t2=h2*x[n-2] | MUL t3=h3*x[n-3]
//   b1:                | MUL t4           | MUL t5           | MUL t6
//   b2:                | MUL t7           | MUL t0=h0*x[n]   | ADD a=t1+t2
//   b3:                | ADD b=t3+t4      | ADD c=t5+t6      | ADD d=t7+t0
//   b4:                | ADD a=a+b        | ADD c=c+d        |
//   b5:                | ADD y=a+c        |                  |
//   b6: STW y[n]       |                  |                  |
// The temporaries t0..t7, a..d and y are redefined by the next output and consumed
// one or two bundles after they are made, so the liveness analysis write-inhibits
// most of them and read-inhibits their uses (limit two bundles, exact exceptions).
// The program runs twice from the same data: once with all inhibit bits clear (the
// conventional machine) and once with the bits set. Both runs must produce the
// y[] computed here, take one cycle per bundle, and the second must use fewer RF
// reads and writes. The counts and the relative saving are printed, together with
// the RF power of the linear model P = BaseCost + n_w*P1w + n_r*P1r per cycle. The
// model is normalised to BaseCost; with a full load of 8 reads and 4 writes at 2.5
// BaseCost and equal read and write costs (this test's assumption), P1r = P1w =
// BaseCost/8, so the power in units of BaseCost/8 is 8 + n_r + n_w per cycle.
module tb_fir_workload;
  import vliw_pkg::*;
  import vliw_tb_pkg::*;

  localparam int  NOUT     = 32;
  localparam int  X_BASE   = 0;     // word address of x[0]
  localparam int  H_BASE   = 100;   // word address of h[0]
  localparam int  Y_BASE   = 200;   // word address of y[0]
  localparam int  WATCHDOG = 20000;

  logic clk = 0, rst_n = 0;
  logic prog_we, ext_we, icache_miss, dcache_miss, irq, irq_ack;
  pc_t prog_addr;
  bundle_t prog_data;
  logic [9:0] ext_addr;
  word_t ext_wdata, ext_rdata, dbg_rdata;
  reg_t dbg_raddr;
  retire_t retire;
  events_t events;

  vliw_top dut (.*);

  always #5 clk = ~clk;

  prog_gen gen;
  int checks = 0, failures = 0, cycles = 0;
  int n_bundles, end_pc;
  word_t x [NOUT];
  word_t h [8];
  longint rd_cnt, wr_cnt, rd_save, wr_save, cyc_cnt;
  int first_ret, last_ret;
  bit counting = 0;

  task automatic check(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  always @(posedge clk) begin
    cycles++;
    if (counting) begin
      rd_cnt  += events.rf_reads;     wr_cnt  += events.rf_writes;
      if (first_ret >= 0 && last_ret < 0) cyc_cnt++;
      rd_save += events.rd_inhibited; wr_save += events.wr_inhibited;
      if (retire.valid && retire.pc == 16'd0) first_ret = cycles;
      if (retire.valid && retire.pc == pc_t'(end_pc) && last_ret < 0) last_ret = cycles;
    end
  end

  function automatic int xr(int n);   // register holding x[n]
    return 30 + ((n % 8 + 8) % 8);
  endfunction

  task automatic build_program();
    int b = 0;
    gen = new(2, 0);
    // prologue: coefficients, cleared delay line
    for (int k = 0; k < 8; k++) begin
      gen.prog[b][0] = ldw_fix(20 + k, 0, (H_BASE + k) * 4);
      gen.prog[b][1] = rr(OP_ADD, 30 + k, 0, 0);
      b++;
    end
    b++;   // last coefficient load is not used by the next bundle
    for (int n = 0; n < NOUT; n++) begin
      gen.prog[b][0] = ldw_fix(xr(n), 0, (X_BASE + n) * 4);
      gen.prog[b][1] = rr(OP_MUL, 41, 21, xr(n - 1));
      gen.prog[b][2] = rr(OP_MUL, 42, 22, xr(n - 2));
      gen.prog[b][3] = rr(OP_MUL, 43, 23, xr(n - 3));
      b++;
      gen.prog[b][1] = rr(OP_MUL, 44, 24, xr(n - 4));
      gen.prog[b][2] = rr(OP_MUL, 45, 25, xr(n - 5));
      gen.prog[b][3] = rr(OP_MUL, 46, 26, xr(n - 6));
      b++;
      gen.prog[b][1] = rr(OP_MUL, 47, 27, xr(n - 7));
      gen.prog[b][2] = rr(OP_MUL, 40, 20, xr(n));
      gen.prog[b][3] = rr(OP_ADD, 48, 41, 42);
      b++;
      gen.prog[b][1] = rr(OP_ADD, 49, 43, 44);
      gen.prog[b][2] = rr(OP_ADD, 50, 45, 46);
      gen.prog[b][3] = rr(OP_ADD, 51, 47, 40);
      b++;
      gen.prog[b][1] = rr(OP_ADD, 48, 48, 49);
      gen.prog[b][2] = rr(OP_ADD, 50, 50, 51);
      b++;
      gen.prog[b][1] = rr(OP_ADD, 52, 48, 50);
      b++;
      gen.prog[b][0] = stw(52, 0, (Y_BASE + n) * 4);
      b++;
    end
    // the last output's temporaries are redefined here so that the analysis sees
    // the same pattern for every output
    for (int r = 40; r <= 52; r++) gen.prog[b + (r - 40) / 3][1 + (r - 40) % 3] = rr(OP_ADD, r, 0, 0);
    b += 5;
    end_pc = b;
    gen.prog[b][0] = ctl(OP_GOTO, 0, 0);
    n_bundles = b + 1;
    gen.bb_start = {0, end_pc};
  endtask

  task automatic run(input bit inhibit, output longint rds, output longint wrs,
                     output longint pwr);
    // program
    for (int a = 0; a < n_bundles; a++) begin
      bundle_t bb = gen.get(a);
      if (!inhibit)
        for (int s = 0; s < NSLOT; s++) begin bb[s].wi = 0; bb[s].ri1 = 0; bb[s].ri2 = 0; end
      @(negedge clk); prog_we = 1; prog_addr = pc_t'(a); prog_data = bb;
    end
    @(negedge clk); prog_we = 0;
    // data: samples, coefficients, cleared outputs
    for (int a = 0; a < Y_BASE + NOUT; a++) begin
      @(negedge clk); ext_we = 1; ext_addr = 10'(a);
      ext_wdata = (a >= X_BASE && a < X_BASE + NOUT) ? x[a - X_BASE] :
                  (a >= H_BASE && a < H_BASE + 8)    ? h[a - H_BASE] : '0;
    end
    @(negedge clk); ext_we = 0;
    rd_cnt = 0; wr_cnt = 0; rd_save = 0; wr_save = 0; cyc_cnt = 0; first_ret = -1; last_ret = -1;
    @(negedge clk); rst_n = 1; counting = 1;
    while (last_ret < 0 && cycles < WATCHDOG) @(posedge clk);
    @(negedge clk); counting = 0; rst_n = 0;
    check(last_ret - first_ret == end_pc, $sformatf("%0d bundles in %0d cycles", end_pc, last_ret - first_ret));
    for (int n = 0; n < NOUT; n++) begin
      word_t y = '0;
      for (int k = 0; k < 8; k++) if (n - k >= 0) y += h[k] * x[n - k];
      ext_addr = 10'(Y_BASE + n); #1;
      check(ext_rdata == y, $sformatf("inhibit=%0d y[%0d] = %h, expected %h", inhibit, n, ext_rdata, y));
    end
    rds = rd_cnt; wrs = wr_cnt;
    pwr = 8 * cyc_cnt + rd_cnt + wr_cnt;
    $display("inhibit bits %s: %0d RF reads, %0d RF writes (%0d reads and %0d writes inhibited)",
             inhibit ? "set  " : "clear", rd_cnt, wr_cnt, rd_save, wr_save);
  endtask

  initial begin
    longint rd0, wr0, rd1, wr1, p0, p1;
    prog_we = 0; ext_we = 0; icache_miss = 0; dcache_miss = 0; irq = 0;
    prog_addr = '0; prog_data = '0; ext_addr = '0; ext_wdata = '0; dbg_raddr = '0;
    for (int n = 0; n < NOUT; n++) x[n] = word_t'($urandom_range(0, 4095)) - 2048;
    for (int k = 0; k < 8; k++)    h[k] = word_t'($urandom_range(0, 255)) - 128;
    build_program();
    gen.analyse();
    repeat (2) @(negedge clk);
    run(0, rd0, wr0, p0);
    run(1, rd1, wr1, p1);
    check(rd1 < rd0, "Read Inhibit reduces RF reads");
    check(wr1 < wr0, "Write Inhibit reduces RF writes");
    check(p1 < p0, "RF power model shows a saving");
    $display("FIR: RF power (linear model) %0d.%0d%% lower", (p0 - p1) * 100 / p0, ((p0 - p1) * 1000 / p0) % 10);
    $display("FIR: RF reads -%0d%%, RF writes -%0d%%", (rd0 - rd1) * 100 / rd0, (wr0 - wr1) * 100 / wr0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
