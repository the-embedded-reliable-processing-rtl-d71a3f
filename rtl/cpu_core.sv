// cpu_core -- 16-bit RISC with a 5-stage in-order pipeline (IF ID EX MEM WB),
// extended with precise checkpoint export and state reload for TERPS.
//
// Pipeline: branches and jumps resolve in EX (two younger instructions are
// squashed); results are forwarded from MEM and WB into EX; a load followed by a
// dependent instruction costs one bubble; the register file is written in WB and
// read through a WB bypass. All architectural updates happen in WB: the register
// write, and for a store its hand-over to write buffer WB0 (`st_valid`/`st_ready`).
// A load reads in MEM through `ld_addr`/`ld_data` (combinational); a store that
// is in WB and has not yet entered WB0 is forwarded to it.
//
// TERPS hooks:
//  * `hold` freezes every stage for the cycle: no register write, no store, no
//    load strobe. The checkpoint controller holds the core for the checkpoint
//    cycle and during a rollback.
//  * `state_out` is the precise state at the current cycle boundary: the register
//    file, epc and ie, plus the PC of the oldest valid instruction in the pipeline
//    (the next-to-complete one), or the fetch PC if the pipeline is empty.
//  * `restore` loads PC, registers, epc and ie from `restore_state`, makes the
//    rollback interrupt pending and squashes every instruction in flight.
//  * If WB0 is full (`st_ready` low) the whole pipeline stalls until it is not.
//  * Interrupts are precise as well. The control registers `epc` and `ie` are part
//    of the exported state. When `ie` is set and an interrupt is pending, the
//    instruction in ID is replaced by an internal TRAP carrying that
//    instruction's PC; fetch continues at the vector. The TRAP commits in WB
//    (epc = its PC, ie = 0), so a checkpoint never sees a half-taken interrupt.
//    No TRAP is injected while a TRAP, RETI or EI/DI is still in flight.
//    Sources: the rollback interrupt (pending from every `restore` until taken,
//    vector VEC_ROLLBACK, higher priority) and the level input `irq` (VEC_IRQ).
//    `trap_taken`/`trap_rb` strobe when a TRAP commits.
//
// The core is a stand-in: only its width, pipeline depth and DLX/MIPS likeness
// are the prototype's. Register count, instruction set (terps_pkg) and
// word addressing are this design's own. HALT re-executes itself forever and
// raises `halted` when it reaches WB.
module cpu_core
  import terps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       hold,
  input  logic       restore,
  input  cpu_state_t restore_state,
  output cpu_state_t state_out,
  // instruction fetch
  output word_t      imem_addr,
  input  word_t      imem_data,
  // data load
  output logic       ld_en,
  output word_t      ld_addr,
  input  word_t      ld_data,
  // store commit to WB0
  output logic       st_valid,
  output wb_entry_t  st_entry,
  input  logic       st_ready,
  // status
  input  logic       irq,         // level-sensitive device interrupt
  output logic       halted,
  output logic       retire,      // strobe: one instruction completed
  output logic       trap_taken,  // strobe: interrupt entry committed
  output logic       trap_rb      // ... and it was the rollback interrupt
);
  // ---------------------------------------------------------------- state
  typedef struct packed {
    logic  valid;
    word_t pc;
    word_t ir;
  } ifid_t;

  typedef struct packed {
    logic    valid;
    word_t   pc;
    opcode_e op;
    alufn_e  fn;
    logic [2:0] rd, s1, s2;
    word_t   a, b;      // register operands as read in ID
    word_t   imm;
    logic    wr;        // writes rd
  } idex_t;

  typedef struct packed {
    logic    valid;
    word_t   pc;
    opcode_e op;
    logic [2:0] rd;
    word_t   res;       // ALU result or memory address
    word_t   sdata;     // store data
    logic    wr;
  } exmem_t;

  typedef struct packed {
    logic    valid;
    word_t   pc;
    opcode_e op;
    logic [2:0] rd;
    word_t   res;       // value to write, or store address
    word_t   sdata;
    logic    wr;
  } memwb_t;

  word_t  pc_if;
  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;
  word_t  rf [NREGS];
  word_t  epc;
  logic   ie;
  logic   rb_pending;

  // ---------------------------------------------------------------- control
  logic  wb_store, store_block, adv;
  logic  load_use;
  logic  redirect;
  word_t redirect_pc;
  logic  ctl_busy, take_trap;

  assign wb_store    = memwb.valid && memwb.op == OP_SW;
  assign store_block = wb_store && !st_ready;
  assign adv         = !hold && !store_block && !restore;

  // ---------------------------------------------------------------- IF
  assign imem_addr = pc_if;

  // ---------------------------------------------------------------- ID
  opcode_e d_op;
  alufn_e  d_fn;
  logic [2:0] d_rd, d_rs, d_rt, d_s2;
  logic    d_wr, d_use1, d_use2;
  word_t   d_imm, d_a, d_b;

  function automatic word_t rf_read(logic [2:0] r, memwb_t w, word_t v);
    if (r == 3'd0)                       return '0;
    if (w.valid && w.wr && w.rd == r)    return w.res;
    return v;
  endfunction

  always_comb begin
    d_op = opcode_e'(ifid.ir[15:12]);
    d_fn = alufn_e'(ifid.ir[2:0]);
    d_rd = ifid.ir[11:9];
    d_rs = ifid.ir[8:6];
    d_rt = ifid.ir[5:3];
    d_s2 = (d_op == OP_ALU) ? d_rt : d_rd;
    unique case (d_op)
      OP_LI, OP_JAL: d_imm = {{7{ifid.ir[8]}}, ifid.ir[8:0]};
      OP_LUI:        d_imm = {ifid.ir[7:0], 8'h00};
      OP_ORI:        d_imm = {10'd0, ifid.ir[5:0]};
      OP_EIDI:       d_imm = {15'd0, ifid.ir[0]};
      default:       d_imm = {{10{ifid.ir[5]}}, ifid.ir[5:0]};
    endcase
    d_wr   = d_op inside {OP_ALU, OP_ADDI, OP_LI, OP_LUI, OP_LW, OP_JAL, OP_ORI};
    d_use1 = d_op inside {OP_ALU, OP_ADDI, OP_LW, OP_SW, OP_BEQ, OP_BNE, OP_JR, OP_ORI};
    d_use2 = d_op inside {OP_ALU, OP_SW, OP_BEQ, OP_BNE};
    d_a    = rf_read(d_rs, memwb, rf[d_rs]);
    d_b    = rf_read(d_s2, memwb, rf[d_s2]);
    load_use = ifid.valid && idex.valid && idex.op == OP_LW && idex.rd != 3'd0 &&
               ((d_use1 && d_rs == idex.rd) || (d_use2 && d_s2 == idex.rd));
  end

  // interrupt injection in ID
  function automatic logic is_ctl(logic v, opcode_e op);
    return v && (op inside {OP_TRAP, OP_RETI, OP_EIDI});
  endfunction

  assign ctl_busy  = is_ctl(idex.valid, idex.op) || is_ctl(exmem.valid, exmem.op) ||
                     is_ctl(memwb.valid, memwb.op);
  assign take_trap = ifid.valid && ie && (rb_pending || irq) && !ctl_busy &&
                     !redirect && !load_use;

  // ---------------------------------------------------------------- EX
  word_t x_a, x_b, x_res, x_sdata, x_epc;
  logic  x_taken;

  function automatic word_t fwd(logic [2:0] r, word_t v, exmem_t m, memwb_t w);
    if (r == 3'd0)                                     return '0;
    if (m.valid && m.wr && m.rd == r && m.op != OP_LW) return m.res;
    if (w.valid && w.wr && w.rd == r)                  return w.res;
    return v;
  endfunction

  always_comb begin
    x_a     = fwd(idex.s1, idex.a, exmem, memwb);
    x_b     = fwd(idex.s2, idex.b, exmem, memwb);
    x_res   = '0;
    x_sdata = x_b;
    x_taken = 1'b0;
    redirect_pc = idex.pc + 16'd1 + idex.imm;
    // a TRAP ahead of a RETI has not written epc yet
    if      (exmem.valid && exmem.op == OP_TRAP) x_epc = exmem.pc;
    else if (memwb.valid && memwb.op == OP_TRAP) x_epc = memwb.pc;
    else                                         x_epc = epc;
    unique case (idex.op)
      OP_ALU: begin
        unique case (idex.fn)
          FN_ADD: x_res = x_a + x_b;
          FN_SUB: x_res = x_a - x_b;
          FN_AND: x_res = x_a & x_b;
          FN_OR:  x_res = x_a | x_b;
          FN_XOR: x_res = x_a ^ x_b;
          FN_SLT: x_res = word_t'($signed(x_a) < $signed(x_b));
          FN_SLL: x_res = x_a << x_b[3:0];
          FN_SRL: x_res = x_a >> x_b[3:0];
          default: x_res = '0;
        endcase
      end
      OP_ADDI, OP_LW, OP_SW: x_res = x_a + idex.imm;
      OP_LI, OP_LUI, OP_EIDI, OP_TRAP: x_res = idex.imm;
      OP_ORI:                x_res = x_a | idex.imm;
      OP_BEQ:                x_taken = (x_a == x_b);
      OP_BNE:                x_taken = (x_a != x_b);
      OP_JAL: begin x_res = idex.pc + 16'd1; x_taken = 1'b1; end
      OP_JR:  begin x_taken = 1'b1; redirect_pc = x_a; end
      OP_HALT: begin x_taken = 1'b1; redirect_pc = idex.pc; end
      OP_RETI: begin x_taken = 1'b1; redirect_pc = x_epc; end
      default: ;
    endcase
    redirect = idex.valid && x_taken;
  end

  // ---------------------------------------------------------------- MEM
  word_t m_ldv;
  always_comb begin
    ld_addr = exmem.res;
    ld_en   = adv && exmem.valid && exmem.op == OP_LW;
    // a store one stage ahead has not reached WB0 yet
    if (wb_store && memwb.res == exmem.res && exmem.res < IO_BASE) m_ldv = memwb.sdata;
    else                                                          m_ldv = ld_data;
  end

  // ---------------------------------------------------------------- WB
  assign st_valid       = wb_store && !hold && !restore;
  assign st_entry.addr  = memwb.res;
  assign st_entry.data  = memwb.sdata;
  assign halted         = memwb.valid && memwb.op == OP_HALT;
  assign retire         = adv && memwb.valid;
  assign trap_taken     = retire && memwb.op == OP_TRAP;
  assign trap_rb        = trap_taken && memwb.res == VEC_ROLLBACK;

  // ---------------------------------------------------------------- state out
  always_comb begin
    if      (memwb.valid) state_out.pc = memwb.pc;
    else if (exmem.valid) state_out.pc = exmem.pc;
    else if (idex.valid)  state_out.pc = idex.pc;
    else if (ifid.valid)  state_out.pc = ifid.pc;
    else                  state_out.pc = pc_if;
    for (int i = 0; i < NREGS; i++) state_out.regs[i] = (i == 0) ? '0 : rf[i];
    state_out.epc = epc;
    state_out.ie  = ie;
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_if <= '0;
      ifid  <= '0;
      idex  <= '0;
      exmem <= '0;
      memwb <= '0;
      for (int i = 0; i < NREGS; i++) rf[i] <= '0;
      epc        <= '0;
      ie         <= 1'b0;
      rb_pending <= 1'b0;
    end else if (restore) begin
      pc_if       <= restore_state.pc;
      ifid.valid  <= 1'b0;
      idex.valid  <= 1'b0;
      exmem.valid <= 1'b0;
      memwb.valid <= 1'b0;
      for (int i = 0; i < NREGS; i++) rf[i] <= (i == 0) ? '0 : restore_state.regs[i];
      epc        <= restore_state.epc;
      ie         <= restore_state.ie;
      rb_pending <= 1'b1;
    end else if (adv) begin
      // WB
      if (memwb.valid && memwb.wr && memwb.rd != 3'd0) rf[memwb.rd] <= memwb.res;
      if (memwb.valid) begin
        unique case (memwb.op)
          OP_TRAP: begin
            epc <= memwb.pc;
            ie  <= 1'b0;
            if (memwb.res == VEC_ROLLBACK) rb_pending <= 1'b0;
          end
          OP_RETI: ie <= 1'b1;
          OP_EIDI: ie <= memwb.res[0];
          default: ;
        endcase
      end
      // MEM -> WB
      memwb.valid <= exmem.valid;
      memwb.pc    <= exmem.pc;
      memwb.op    <= exmem.op;
      memwb.rd    <= exmem.rd;
      memwb.res   <= (exmem.op == OP_LW) ? m_ldv : exmem.res;
      memwb.sdata <= exmem.sdata;
      memwb.wr    <= exmem.wr;
      // EX -> MEM
      exmem.valid <= idex.valid;
      exmem.pc    <= idex.pc;
      exmem.op    <= idex.op;
      exmem.rd    <= idex.rd;
      exmem.res   <= x_res;
      exmem.sdata <= x_sdata;
      exmem.wr    <= idex.wr;
      // ID -> EX, IF -> ID, fetch
      if (redirect) begin
        idex.valid <= 1'b0;
        ifid.valid <= 1'b0;
        pc_if      <= redirect_pc;
      end else if (load_use) begin
        idex.valid <= 1'b0;
      end else if (take_trap) begin
        idex       <= '0;
        idex.valid <= 1'b1;
        idex.pc    <= ifid.pc;
        idex.op    <= OP_TRAP;
        idex.imm   <= rb_pending ? VEC_ROLLBACK : VEC_IRQ;
        ifid.valid <= 1'b0;
        pc_if      <= rb_pending ? VEC_ROLLBACK : VEC_IRQ;
      end else begin
        idex.valid <= ifid.valid;
        idex.pc    <= ifid.pc;
        idex.op    <= d_op;
        idex.fn    <= d_fn;
        idex.rd    <= d_rd;
        idex.s1    <= d_use1 ? d_rs : 3'd0;
        idex.s2    <= d_use2 ? d_s2 : 3'd0;
        idex.a     <= d_a;
        idex.b     <= d_b;
        idex.imm   <= d_imm;
        idex.wr    <= d_wr;
        ifid.valid <= 1'b1;
        ifid.pc    <= pc_if;
        ifid.ir    <= imem_data;
        pc_if      <= pc_if + 16'd1;
      end
    end
  end
endmodule
