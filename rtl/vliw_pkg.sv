// vliw_pkg: shared constants and types of the four-way low-power forwarding VLIW.
//
// The machine issues one bundle of NSLOT operations per cycle through a five-stage
// pipeline (IF, ID, EX, MEM, WB). Every operation carries, next to its 32-bit
// encoding, one Write Inhibit bit for its destination and one Read Inhibit bit per
// source (3 bits per operation, 12 per bundle), set by the compiler for short-lived
// values that the forwarding network can deliver instead of the register file.
// Issue width, the three-bits-per-operation inhibit encoding, the 32-bit datapath and
// the 64-entry register file follow the design description; the opcode map, field
// layout and immediate format are this design's own choice.
//
// Operation word layout (own choice):
//   [31:26] opcode   [25:20] rd (store: data register)   [19:14] rs1
//   [13:8]  rs2 (register form)  or  [13:0] signed imm14 (immediate form, memory, branch)
// Opcode bit 5 selects the immediate form of ALU operations.
package vliw_pkg;

  localparam int unsigned NSLOT     = 4;            // issue width
  localparam int unsigned XLEN      = 32;           // datapath width
  localparam int unsigned NREG      = 64;           // general-purpose registers
  localparam int unsigned RA        = $clog2(NREG); // register address width
  localparam int unsigned NRD       = 2 * NSLOT;    // RF read ports
  localparam int unsigned NWR       = NSLOT;        // RF write ports
  localparam int unsigned PCW       = 16;           // bundle address width
  localparam int unsigned FWD_DEPTH = 3;            // bundles reachable by forwarding
  localparam int unsigned MEM_SLOT  = 0;            // slot owning the LSU and branch unit

  typedef logic [XLEN-1:0] word_t;
  typedef logic [RA-1:0]   reg_t;
  typedef logic [PCW-1:0]  pc_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'h00,
    OP_ADD  = 6'h01, OP_SUB  = 6'h02, OP_AND  = 6'h03, OP_OR   = 6'h04,
    OP_XOR  = 6'h05, OP_SHL  = 6'h06, OP_SHR  = 6'h07, OP_SHRU = 6'h08,
    OP_MUL  = 6'h09, OP_CMPEQ= 6'h0A, OP_CMPLT= 6'h0B,
    OP_LDW  = 6'h10, OP_STW  = 6'h11,
    OP_BR   = 6'h12, OP_BRF  = 6'h13, OP_GOTO = 6'h14, OP_RFI  = 6'h15,
    OP_TRAP = 6'h16
  } opcode_t;
  localparam logic [5:0] OP_IMM_BIT = 6'h20;   // OP_xxx | OP_IMM_BIT: immediate form

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SHL, ALU_SHR, ALU_SHRU,
    ALU_MUL, ALU_CMPEQ, ALU_CMPLT
  } alu_op_t;

  // One encoded operation with its inhibit bits (35 bits).
  typedef struct packed {
    logic        wi;    // Write Inhibit of rd
    logic        ri1;   // Read Inhibit of rs1
    logic        ri2;   // Read Inhibit of rs2 (store: of the data register)
    logic [31:0] word;
  } slot_enc_t;

  typedef slot_enc_t [NSLOT-1:0] bundle_t;

  // Decoded operation.
  typedef struct packed {
    alu_op_t alu_op;
    logic    use_imm;
    word_t   imm;
    logic    we;       // writes rd
    reg_t    rd;
    logic    re1;      // reads rs1
    reg_t    rs1;
    logic    re2;      // reads rs2 / store data
    reg_t    rs2;
    logic    wi;
    logic    ri1;
    logic    ri2;
    logic    is_load;
    logic    is_store;
    logic    is_br;    // branch if rs1 != 0
    logic    is_brf;   // branch if rs1 == 0
    logic    is_goto;
    logic    is_rfi;
    logic    is_trap;
  } dec_t;

  // Forwarding source of an EX-stage operand.
  typedef enum logic [1:0] {
    SRC_PIPE  = 2'd0,  // value read in ID (RF or MEM/ID path)
    SRC_EXEX  = 2'd1,  // EX/MEM register (EX/EX path)
    SRC_MEMEX = 2'd2   // MEM/WB register (MEM/EX path)
  } fwd_src_t;

  typedef struct packed {
    fwd_src_t                   src;
    logic [$clog2(NSLOT)-1:0]   slot;
  } fwd_sel_t;

  // Per-slot result travelling to writeback.
  typedef struct packed {
    logic  we;
    logic  wi;
    reg_t  rd;
    word_t data;
  } wb_slot_t;

  // Retirement view of the WB stage (for observation and co-simulation).
  typedef struct packed {
    logic                 valid;   // a bundle leaves WB this cycle
    pc_t                  pc;
    logic                 served;  // exception/interrupt taken after this bundle
    logic                 irq;     // ... and it was an interrupt
    wb_slot_t [NSLOT-1:0] slots;
  } retire_t;

  // Per-cycle activity, the quantities of the RF power model and the mechanisms used.
  typedef struct packed {
    logic [3:0] rf_reads;      // RF read ports enabled (0..8)
    logic [2:0] rf_writes;     // RF writes performed (0..4)
    logic [3:0] fwd_exex;      // EX operands taken from the EX/EX path
    logic [3:0] fwd_memex;     // EX operands taken from the MEM/EX path
    logic [3:0] fwd_memid;     // ID operands taken from the MEM/ID path
    logic [3:0] rd_inhibited;  // reads saved by Read Inhibit
    logic [2:0] wr_inhibited;  // writes saved by Write Inhibit
    logic [3:0] rd_forced;     // Read Inhibit bits ignored after an event
    logic [2:0] wr_forced;     // Write Inhibit bits overridden by a forced writeback
    logic       exc_served;
    logic       irq_served;
    logic       imiss;
    logic       dstall;
    logic       br_taken;
    logic       load;
    logic       store;
  } events_t;

  function automatic word_t sext14(input logic [13:0] v);
    return {{(XLEN-14){v[13]}}, v};
  endfunction

endpackage
