// decode_unit: ID-stage decoder with Read/Write Inhibit handling and bypass control.
//
// For each of the NSLOT operations of the bundle in ID it
//  * decodes the operation word into a dec_t (an undefined opcode, or a memory,
//    branch or trap operation outside slot MEM_SLOT, raises `illegal`, the ID-stage
//    exception, and the operation is executed as a no-op);
//  * decides the RF read ports: port 2s reads rs1 and port 2s+1 reads rs2 (the data
//    register for a store) of slot s. A port is enabled only if the operand is used
//    and its Read Inhibit bit is clear, or the bit is being ignored (ri_ignore, after
//    an exception or cache miss). A disabled port keeps the address it had, held in
//    a register, so the RF address lines do not toggle;
//  * produces the bypass selects: id_sel for the ID-stage multiplexer (MEM/ID path,
//    producer three bundles ahead, now in MEM/WB) and ex_sel, registered in ID/EX,
//    for the EX-stage multiplexer (EX/EX path: producer one bundle ahead, now in
//    ID/EX; MEM/EX path: producer two ahead, now in EX/MEM). The nearest producer
//    wins; inside a bundle the highest slot wins. Register 0 is never forwarded.
// `rzero` marks operands naming register 0, whose value is zero whatever the
// (possibly held) read port shows.
// `ri_miss` flags a honoured Read Inhibit with no producer inside the forwarding
// window: a scheduling error of the compiler, checked by an assertion in the core.
// Combinational except the held read addresses, which update when `advance` is set.
// The decoder location, the inhibit semantics and the bypass select signals follow
// the block diagram and text of the design; the encodings are this design's own.
module decode_unit
  import vliw_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       valid,       // bundle in ID is valid (not killed)
  input  logic                       advance,     // ID moves on this cycle
  input  bundle_t                    bundle,
  input  logic                       ri_ignore,
  input  logic  [NSLOT-1:0]          ex_we,       // destinations of the bundle in EX
  input  reg_t  [NSLOT-1:0]          ex_rd,
  input  logic  [NSLOT-1:0]          mem_we,      // ... in MEM
  input  reg_t  [NSLOT-1:0]          mem_rd,
  input  logic  [NSLOT-1:0]          wb_we,       // ... in WB
  input  reg_t  [NSLOT-1:0]          wb_rd,
  output dec_t  [NSLOT-1:0]          ops,
  output reg_t  [NRD-1:0]            raddr,
  output logic  [NRD-1:0]            ren,
  output fwd_sel_t [NRD-1:0]         id_sel,
  output fwd_sel_t [NRD-1:0]         ex_sel,
  output logic  [NRD-1:0]            ri_saved,    // read skipped thanks to Read Inhibit
  output logic  [NRD-1:0]            ri_forced,   // Read Inhibit ignored
  output logic  [NRD-1:0]            ri_miss,
  output logic  [NRD-1:0]            rzero,       // operand is r0: its value is zero
  output logic                       illegal
);
  reg_t [NRD-1:0] raddr_q;
  logic [NSLOT-1:0] ill;

  // ---------------------------------------------------------------- operation decode
  always_comb begin
    for (int s = 0; s < NSLOT; s++) begin
      logic [31:0] w;
      logic [5:0]  opc;
      logic [5:0]  base;
      logic        immf;
      w    = bundle[s].word;
      opc  = w[31:26];
      base = opc & ~OP_IMM_BIT;
      immf = (opc & OP_IMM_BIT) != '0;
      ops[s]        = '0;
      ops[s].alu_op = ALU_ADD;
      ops[s].imm    = sext14(w[13:0]);
      ill[s]        = 1'b0;
      if (base >= 6'(OP_ADD) && base <= 6'(OP_CMPLT)) begin
        unique case (base)
          6'(OP_ADD):   ops[s].alu_op = ALU_ADD;
          6'(OP_SUB):   ops[s].alu_op = ALU_SUB;
          6'(OP_AND):   ops[s].alu_op = ALU_AND;
          6'(OP_OR):    ops[s].alu_op = ALU_OR;
          6'(OP_XOR):   ops[s].alu_op = ALU_XOR;
          6'(OP_SHL):   ops[s].alu_op = ALU_SHL;
          6'(OP_SHR):   ops[s].alu_op = ALU_SHR;
          6'(OP_SHRU):  ops[s].alu_op = ALU_SHRU;
          6'(OP_MUL):   ops[s].alu_op = ALU_MUL;
          6'(OP_CMPEQ): ops[s].alu_op = ALU_CMPEQ;
          default:      ops[s].alu_op = ALU_CMPLT;
        endcase
        ops[s].we      = 1'b1;
        ops[s].rd      = w[25:20];
        ops[s].re1     = 1'b1;
        ops[s].rs1     = w[19:14];
        ops[s].use_imm = immf;
        ops[s].re2     = !immf;
        ops[s].rs2     = w[13:8];
      end else if (opc == 6'(OP_NOP)) begin
        // nothing
      end else if (s == MEM_SLOT && opc == 6'(OP_LDW)) begin
        ops[s].is_load = 1'b1;  ops[s].use_imm = 1'b1;
        ops[s].we = 1'b1;       ops[s].rd  = w[25:20];
        ops[s].re1 = 1'b1;      ops[s].rs1 = w[19:14];
      end else if (s == MEM_SLOT && opc == 6'(OP_STW)) begin
        ops[s].is_store = 1'b1; ops[s].use_imm = 1'b1;
        ops[s].re1 = 1'b1;      ops[s].rs1 = w[19:14];
        ops[s].re2 = 1'b1;      ops[s].rs2 = w[25:20];
      end else if (s == MEM_SLOT && (opc == 6'(OP_BR) || opc == 6'(OP_BRF))) begin
        ops[s].is_br  = (opc == 6'(OP_BR));
        ops[s].is_brf = (opc == 6'(OP_BRF));
        ops[s].re1 = 1'b1;      ops[s].rs1 = w[19:14];
      end else if (s == MEM_SLOT && opc == 6'(OP_GOTO)) begin
        ops[s].is_goto = 1'b1;
      end else if (s == MEM_SLOT && opc == 6'(OP_RFI)) begin
        ops[s].is_rfi = 1'b1;
      end else if (s == MEM_SLOT && opc == 6'(OP_TRAP)) begin
        ops[s].is_trap = 1'b1;
      end else begin
        ill[s] = 1'b1;
      end
      if (ops[s].rd == '0) ops[s].we = 1'b0;   // writes to r0 are dropped
      ops[s].wi  = ops[s].we  & bundle[s].wi;
      ops[s].ri1 = ops[s].re1 & bundle[s].ri1;
      ops[s].ri2 = ops[s].re2 & bundle[s].ri2;
    end
  end

  assign illegal = valid && (ill != '0);

  // ------------------------------------------------------- read ports and bypass selects
  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      int   s;
      logic re, ri;
      reg_t r;
      logic hit_ex, hit_mem, hit_wb;
      s  = p / 2;
      re = (p % 2 == 0) ? ops[s].re1 : ops[s].re2;
      ri = (p % 2 == 0) ? ops[s].ri1 : ops[s].ri2;
      r  = (p % 2 == 0) ? ops[s].rs1 : ops[s].rs2;
      rzero[p] = (r == '0);
      re = valid && re && (r != '0);

      id_sel[p] = '{src: SRC_PIPE, slot: '0};
      ex_sel[p] = '{src: SRC_PIPE, slot: '0};
      hit_ex = 1'b0; hit_mem = 1'b0; hit_wb = 1'b0;
      for (int q = 0; q < NSLOT; q++) begin
        if (wb_we[q] && wb_rd[q] == r) begin
          hit_wb = 1'b1;
          id_sel[p] = '{src: SRC_MEMEX, slot: q[$clog2(NSLOT)-1:0]};
        end
      end
      for (int q = 0; q < NSLOT; q++) begin
        if (mem_we[q] && mem_rd[q] == r) begin
          hit_mem = 1'b1;
          ex_sel[p] = '{src: SRC_MEMEX, slot: q[$clog2(NSLOT)-1:0]};
        end
      end
      for (int q = 0; q < NSLOT; q++) begin
        if (ex_we[q] && ex_rd[q] == r) begin
          hit_ex = 1'b1;
          ex_sel[p] = '{src: SRC_EXEX, slot: q[$clog2(NSLOT)-1:0]};
        end
      end
      if (!re) begin
        id_sel[p] = '{src: SRC_PIPE, slot: '0};
        ex_sel[p] = '{src: SRC_PIPE, slot: '0};
      end
      ren[p]       = re && !(ri && !ri_ignore);
      ri_saved[p]  = re && ri && !ri_ignore;
      ri_forced[p] = re && ri && ri_ignore;
      ri_miss[p]   = ri_saved[p] && !(hit_ex || hit_mem || hit_wb);
      raddr[p]     = ren[p] ? r : raddr_q[p];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       raddr_q <= '0;
    else if (advance) raddr_q <= raddr;
  end
endmodule
