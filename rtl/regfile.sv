// regfile: multiported general-purpose register file with write-inhibit gating.
//
// NREG x XLEN registers, NRD combinational read ports and NWR write ports written on
// the rising clock edge. Register 0 reads as zero and ignores writes.
// The low-power mechanism sits at the write port: the write enable of port i is
//   wen[i] & ~winh[i]
// i.e. a Write Inhibit bit, decoded from the instruction and carried to WB, deasserts
// the write enable with one gate. Read ports are enabled by ren; a disabled
// (read-inhibited) port is given an unchanged address by the decoder, so its data
// output does not switch. The per-cycle numbers of performed reads and writes,
// the n_r and n_w of the RF energy model, are reported on n_reads / n_writes.
// Port counts (8 read, 4 write) and size (64 x 32) follow the register file the
// description characterises; register 0 hard-wired to zero, write priority of the
// highest-numbered port on a same-address collision, and the extra debug read port
// (not counted as an access) are this design's choices.
module regfile
  import vliw_pkg::*;
(
  input  logic                 clk,
  input  reg_t  [NRD-1:0]      raddr,
  input  logic  [NRD-1:0]      ren,
  output word_t [NRD-1:0]      rdata,
  input  reg_t  [NWR-1:0]      waddr,
  input  logic  [NWR-1:0]      wen,
  input  logic  [NWR-1:0]      winh,
  input  word_t [NWR-1:0]      wdata,
  input  reg_t                 dbg_raddr,
  output word_t                dbg_rdata,
  output logic  [3:0]          n_reads,
  output logic  [2:0]          n_writes
);
  word_t regs [NREG];
  logic [NWR-1:0] we_eff;

  assign we_eff = wen & ~winh;   // the write-inhibit gate

  always_ff @(posedge clk) begin
    for (int i = 0; i < NWR; i++)
      if (we_eff[i] && waddr[i] != '0) regs[waddr[i]] <= wdata[i];
  end

  always_comb begin
    for (int i = 0; i < NRD; i++)
      rdata[i] = (raddr[i] == '0) ? '0 : regs[raddr[i]];
    dbg_rdata = (dbg_raddr == '0) ? '0 : regs[dbg_raddr];
  end

  always_comb begin
    n_reads  = '0;
    n_writes = '0;
    for (int i = 0; i < NRD; i++) n_reads  = n_reads  + 4'(ren[i]);
    for (int i = 0; i < NWR; i++) n_writes = n_writes + 3'(we_eff[i]);
  end
endmodule
