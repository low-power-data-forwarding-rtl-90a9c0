// vliw_core: four-way, five-stage VLIW pipeline with low-power data forwarding.
//
// Stages: IF (fetch_unit), ID (decode_unit, regfile read, MEM/ID bypass), EX (four
// ALUs, EX/EX and MEM/EX bypass, branch resolution in slot 0), MEM (lsu in slot 0),
// WB (regfile write). Interstage registers IF/ID, ID/EX, EX/MEM, MEM/WB.
// A consumer bundle w(k) receives operands from w(k-1) over the EX/EX path, from
// w(k-2) over the MEM/EX path (both in EX), from w(k-3) over the MEM/ID path (in ID)
// and from older bundles through the register file. Values the compiler marked as
// short-lived carry a Write Inhibit bit: the WB stage then skips the RF write. A source
// with a Read Inhibit bit skips the RF read and takes the forwarded value.
// Exceptions (illegal operation in ID, trap in EX, misaligned access in MEM), interrupts
// and instruction-cache misses are handled by exc_ctrl, which forces writebacks and
// RF reads so that no value is lost when the producer/consumer timing breaks.
// Timing: one bundle per cycle. A taken branch or return from exception resolves in
// EX and deletes the two younger bundles (no delay slots). A data-cache miss
// (dcache_miss while MEM holds a load or store) freezes the whole pipeline, which
// keeps the relative timing of all bundles, so inhibit bits stay valid.
// Scheduling rules the compiler must respect (checked by assertions): a Read Inhibit
// source must have its producer within the three bundles ahead; a load result may not
// be consumed by the very next bundle (it is not in EX/MEM yet).
// Pipeline, forwarding paths, inhibit bits and exception rules follow the design
// description; branch handling, the ISA and the assertion rules are this design's own.
module vliw_core
  import vliw_pkg::*;
#(
  parameter bit          EXACT      = 1'b1,
  parameter pc_t         EXC_VECTOR = 16'd512,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic    clk,
  input  logic    rst_n,
  // instruction store
  output pc_t     imem_addr,
  input  bundle_t imem_bundle,
  input  logic    icache_miss,
  // data store
  output logic [$clog2(DMEM_WORDS)-1:0] dmem_addr,
  output logic    dmem_we,
  output word_t   dmem_wdata,
  input  word_t   dmem_rdata,
  input  logic    dcache_miss,
  // interrupt
  input  logic    irq,
  output logic    irq_ack,
  // observation
  input  reg_t    dbg_raddr,
  output word_t   dbg_rdata,
  output retire_t retire,
  output events_t events
);
  localparam int unsigned SW = $clog2(NSLOT);

  typedef struct packed {
    logic                   valid;
    pc_t                    pc;
    logic                   mark;
    logic                   mark_irq;
    logic                   force_wb;
    dec_t     [NSLOT-1:0]   op;
    word_t    [NSLOT-1:0]   opa;
    word_t    [NSLOT-1:0]   opb;
    fwd_sel_t [NSLOT-1:0]   sela;
    fwd_sel_t [NSLOT-1:0]   selb;
  } idex_t;

  typedef struct packed {
    logic                   valid;
    pc_t                    pc;
    logic                   mark;
    logic                   mark_irq;
    logic                   force_wb;
    wb_slot_t [NSLOT-1:0]   slot;
    logic                   is_load;
    logic                   is_store;
    word_t                  sdata;
  } exmem_t;

  typedef struct packed {
    logic                   valid;
    pc_t                    pc;
    logic                   mark;
    logic                   mark_irq;
    logic                   force_wb;
    wb_slot_t [NSLOT-1:0]   slot;
  } memwb_t;

  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  // ------------------------------------------------------------------ control wires
  logic stall, redirect, serve, br_taken, rfi_taken;
  pc_t  redirect_pc, br_target, epc, fetch_pc;
  logic force_event, ri_ignore, mark_id, mark_ex, mark_mem, mark_irq, in_handler;
  logic id_exc, ex_exc, mem_exc;

  // ------------------------------------------------------------------ IF
  logic    ifid_valid;
  pc_t     ifid_pc;
  bundle_t ifid_bundle;

  fetch_unit u_fetch (
    .clk, .rst_n, .stall, .icache_miss,
    .redirect, .redirect_pc,
    .imem_addr, .imem_bundle,
    .ifid_valid, .ifid_pc, .ifid_bundle, .fetch_pc
  );

  // ------------------------------------------------------------------ ID
  logic id_live, id_advance, id_force_q;
  dec_t     [NSLOT-1:0] id_ops;
  reg_t     [NRD-1:0]   rf_raddr;
  logic     [NRD-1:0]   rf_ren, ri_saved, ri_forced, ri_miss, rzero;
  fwd_sel_t [NRD-1:0]   id_sel, ex_sel;
  word_t    [NRD-1:0]   rf_rdata, id_val;
  logic     [NSLOT-1:0] ex_we_v, mem_we_v, wb_we_v;
  reg_t     [NSLOT-1:0] ex_rd_v, mem_rd_v, wb_rd_v;
  word_t    [NSLOT-1:0] exmem_res, memwb_res;
  logic                 illegal;

  assign id_live    = ifid_valid && !redirect;
  assign id_advance = id_live && !stall;

  always_comb begin
    for (int q = 0; q < NSLOT; q++) begin
      ex_we_v[q]   = idex.valid  && idex.op[q].we;
      ex_rd_v[q]   = idex.op[q].rd;
      mem_we_v[q]  = exmem.valid && exmem.slot[q].we;
      mem_rd_v[q]  = exmem.slot[q].rd;
      wb_we_v[q]   = memwb.valid && memwb.slot[q].we;
      wb_rd_v[q]   = memwb.slot[q].rd;
      exmem_res[q] = exmem.slot[q].data;
      memwb_res[q] = memwb.slot[q].data;
    end
  end

  decode_unit u_dec (
    .clk, .rst_n,
    .valid   (id_live),
    .advance (id_advance),
    .bundle  (ifid_bundle),
    .ri_ignore,
    .ex_we   (ex_we_v),  .ex_rd  (ex_rd_v),
    .mem_we  (mem_we_v), .mem_rd (mem_rd_v),
    .wb_we   (wb_we_v),  .wb_rd  (wb_rd_v),
    .ops     (id_ops),
    .raddr   (rf_raddr),
    .ren     (rf_ren),
    .id_sel, .ex_sel, .ri_saved, .ri_forced, .ri_miss, .rzero,
    .illegal
  );
  assign id_exc = illegal;

  // WB-side register file signals
  reg_t  [NWR-1:0] rf_waddr;
  logic  [NWR-1:0] rf_wen, rf_winh;
  word_t [NWR-1:0] rf_wdata;
  logic  [3:0]     n_reads;
  logic  [2:0]     n_writes;

  regfile u_rf (
    .clk,
    .raddr (rf_raddr), .ren (rf_ren), .rdata (rf_rdata),
    .waddr (rf_waddr), .wen (rf_wen), .winh (rf_winh), .wdata (rf_wdata),
    .dbg_raddr, .dbg_rdata,
    .n_reads, .n_writes
  );

  // MEM/ID path: the ID-stage bypass multiplexer in front of ID/EX
  for (genvar p = 0; p < NRD; p++) begin : g_idmux
    bypass_mux u_idmux (
      .sel (id_sel[p]), .pipe_val (rzero[p] ? '0 : rf_rdata[p]),
      .path_a (memwb_res), .path_b (memwb_res), .y (id_val[p])
    );
  end

  // ------------------------------------------------------------------ EX
  logic ex_live;
  word_t [NSLOT-1:0] ex_a, ex_b_reg, ex_b, ex_y;

  assign ex_live = idex.valid && !serve;

  for (genvar s = 0; s < NSLOT; s++) begin : g_ex
    bypass_mux u_amux (
      .sel (idex.sela[s]), .pipe_val (idex.opa[s]),
      .path_a (exmem_res), .path_b (memwb_res), .y (ex_a[s])
    );
    bypass_mux u_bmux (
      .sel (idex.selb[s]), .pipe_val (idex.opb[s]),
      .path_a (exmem_res), .path_b (memwb_res), .y (ex_b_reg[s])
    );
    assign ex_b[s] = idex.op[s].use_imm ? idex.op[s].imm : ex_b_reg[s];
    alu u_alu (.op (idex.op[s].alu_op), .a (ex_a[s]), .b (ex_b[s]), .y (ex_y[s]));
  end

  always_comb begin
    dec_t o;
    o = idex.op[MEM_SLOT];
    br_taken  = ex_live && !stall &&
                (o.is_goto || o.is_rfi ||
                 (o.is_br  && ex_a[MEM_SLOT] != '0) ||
                 (o.is_brf && ex_a[MEM_SLOT] == '0));
    br_target = o.is_rfi ? epc : idex.pc + pc_t'(o.imm);
    rfi_taken = br_taken && o.is_rfi;
  end
  assign ex_exc = ex_live && idex.op[MEM_SLOT].is_trap;

  assign redirect    = serve || br_taken;
  assign redirect_pc = serve ? EXC_VECTOR : br_target;

  // ------------------------------------------------------------------ MEM
  logic  mem_live, misaligned;
  word_t load_data;

  assign mem_live = exmem.valid && !serve;
  assign stall    = dcache_miss && exmem.valid && (exmem.is_load || exmem.is_store);

  lsu #(.WORDS (DMEM_WORDS)) u_lsu (
    .valid (mem_live), .is_load (exmem.is_load), .is_store (exmem.is_store),
    .kill (serve), .stall,
    .addr (exmem.slot[MEM_SLOT].data), .sdata (exmem.sdata),
    .misaligned, .load_data,
    .mem_addr (dmem_addr), .mem_we (dmem_we), .mem_wdata (dmem_wdata), .mem_rdata (dmem_rdata)
  );
  assign mem_exc = misaligned;

  // ------------------------------------------------------------------ WB
  always_comb begin
    for (int s = 0; s < NWR; s++) begin
      rf_waddr[s] = memwb.slot[s].rd;
      rf_wdata[s] = memwb.slot[s].data;
      rf_wen[s]   = memwb.valid && memwb.slot[s].we && !stall;
      rf_winh[s]  = memwb.slot[s].wi && !(memwb.force_wb || force_event);
    end
  end

  // ------------------------------------------------------------------ exceptions
  logic marker_in_flight;
  pc_t  epc_cand;

  assign marker_in_flight = (idex.valid && idex.mark) || (exmem.valid && exmem.mark) ||
                            (memwb.valid && memwb.mark);
  assign epc_cand = exmem.valid ? exmem.pc :
                    idex.valid  ? idex.pc  :
                    ifid_valid  ? ifid_pc  : fetch_pc;

  exc_ctrl #(.EXACT (EXACT)) u_exc (
    .clk, .rst_n, .stall,
    .id_exc, .ex_exc, .mem_exc, .irq,
    .imiss      (icache_miss),
    .id_valid   (id_live),
    .ex_valid   (ex_live),
    .mem_valid  (mem_live),
    .id_advance,
    .marker_in_flight,
    .wb_valid   (memwb.valid),
    .wb_mark    (memwb.mark),
    .wb_mark_irq(memwb.mark_irq),
    .rfi_taken,
    .epc_cand,
    .force_event, .mark_id, .mark_ex, .mark_mem, .mark_irq,
    .serve, .irq_ack, .ri_ignore, .in_handler, .epc
  );

  // ------------------------------------------------------------------ pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_force_q <= 1'b0;
      idex       <= '0;
      exmem      <= '0;
      memwb      <= '0;
    end else if (stall) begin
      // frozen: only the force bits collect a forced-writeback event
      id_force_q     <= id_force_q     | force_event;
      idex.force_wb  <= idex.force_wb  | force_event;
      exmem.force_wb <= exmem.force_wb | force_event;
      memwb.force_wb <= memwb.force_wb | force_event;
    end else begin
      id_force_q <= 1'b0;

      // ID -> EX
      idex.valid    <= id_live;
      idex.pc       <= ifid_pc;
      idex.mark     <= mark_id;
      idex.mark_irq <= mark_id && mark_irq;
      idex.force_wb <= id_force_q || force_event;
      idex.op       <= id_ops;
      for (int s = 0; s < NSLOT; s++) begin
        idex.opa[s]  <= id_val[2*s];
        idex.opb[s]  <= id_val[2*s+1];
        idex.sela[s] <= ex_sel[2*s];
        idex.selb[s] <= ex_sel[2*s+1];
      end

      // EX -> MEM
      exmem.valid    <= ex_live;
      exmem.pc       <= idex.pc;
      exmem.mark     <= idex.mark || mark_ex;
      exmem.mark_irq <= idex.mark_irq || (mark_ex && mark_irq);
      exmem.force_wb <= idex.force_wb || force_event;
      for (int s = 0; s < NSLOT; s++) begin
        exmem.slot[s].we   <= idex.op[s].we;
        exmem.slot[s].wi   <= idex.op[s].wi;
        exmem.slot[s].rd   <= idex.op[s].rd;
        exmem.slot[s].data <= ex_y[s];
      end
      exmem.is_load  <= idex.op[MEM_SLOT].is_load;
      exmem.is_store <= idex.op[MEM_SLOT].is_store;
      exmem.sdata    <= ex_b_reg[MEM_SLOT];

      // MEM -> WB
      memwb.valid    <= mem_live;
      memwb.pc       <= exmem.pc;
      memwb.mark     <= exmem.mark || mark_mem;
      memwb.mark_irq <= exmem.mark_irq || (mark_mem && mark_irq);
      memwb.force_wb <= exmem.force_wb || force_event;
      memwb.slot     <= exmem.slot;
      if (exmem.is_load) memwb.slot[MEM_SLOT].data <= load_data;
    end
  end

  // ------------------------------------------------------------------ observation
  always_comb begin
    retire.valid    = memwb.valid && !stall;
    retire.pc       = memwb.pc;
    retire.served   = serve;
    retire.irq      = irq_ack;
    retire.slots    = memwb.slot;
  end

  always_comb begin
    events = '0;
    events.rf_reads  = n_reads;
    events.rf_writes = n_writes;
    for (int p = 0; p < NRD; p++) begin
      if (id_advance) begin
        events.fwd_memid    = events.fwd_memid    + 4'(id_sel[p].src == SRC_MEMEX);
        events.rd_inhibited = events.rd_inhibited + 4'(ri_saved[p]);
        events.rd_forced    = events.rd_forced    + 4'(ri_forced[p]);
      end
    end
    for (int s = 0; s < NSLOT; s++) begin
      if (ex_live && !stall) begin
        events.fwd_exex  = events.fwd_exex  + 4'(idex.sela[s].src == SRC_EXEX)
                                            + 4'(idex.selb[s].src == SRC_EXEX);
        events.fwd_memex = events.fwd_memex + 4'(idex.sela[s].src == SRC_MEMEX)
                                            + 4'(idex.selb[s].src == SRC_MEMEX);
      end
      if (rf_wen[s] && memwb.slot[s].wi) begin
        events.wr_inhibited = events.wr_inhibited + 3'(rf_winh[s]);
        events.wr_forced    = events.wr_forced    + 3'(!rf_winh[s]);
      end
    end
    events.exc_served = serve && !irq_ack;
    events.irq_served = irq_ack;
    events.imiss      = icache_miss;
    events.dstall     = stall;
    events.br_taken   = br_taken;
    events.load       = mem_live && !stall && exmem.is_load;
    events.store      = dmem_we;
  end

  // ------------------------------------------------------------------ scheduling rules
  // A honoured Read Inhibit needs its producer inside the forwarding window.
  a_ri_window: assert property (@(posedge clk) disable iff (!rst_n)
    id_advance |-> (ri_miss == '0))
    else $error("read-inhibited operand without a producer in the forwarding window");

  // A load result cannot be forwarded over the EX/EX path.
  for (genvar s = 0; s < NSLOT; s++) begin : g_ldchk
    a_load_use: assert property (@(posedge clk) disable iff (!rst_n)
      (ex_live && exmem.valid && exmem.is_load) |->
        !((idex.sela[s].src == SRC_EXEX && idex.sela[s].slot == SW'(MEM_SLOT)) ||
          (!idex.op[s].use_imm && idex.selb[s].src == SRC_EXEX &&
           idex.selb[s].slot == SW'(MEM_SLOT)) ||
          (idex.op[s].is_store && idex.selb[s].src == SRC_EXEX &&
           idex.selb[s].slot == SW'(MEM_SLOT))))
      else $error("load result consumed by the next bundle");
  end
endmodule
