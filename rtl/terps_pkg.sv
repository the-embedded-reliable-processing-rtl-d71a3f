// terps_pkg -- types and constants shared by the TERPS checkpoint/rollback system.
//
// The system checkpoints a 16-bit, 5-stage in-order RISC core every SCLK period
// (128 FCLK cycles) into a two-bank safe storage, and buffers stores in three
// write-buffer levels (WB0..WB2) so that memory is only updated once a store can
// no longer be rolled back. The sizes that come from the prototype are the 16-bit
// data path, the 128:1 clock step-down and the 12-entry write buffers. The register
// count, the instruction set, the address map and the SCLK duty cycle are choices
// of this implementation (see the README).
package terps_pkg;

  localparam int unsigned XLEN      = 16;  // data and address width
  localparam int unsigned NREGS     = 8;   // general registers, r0 reads as zero
  localparam int unsigned WB_DEPTH  = 12;  // entries per write-buffer level
  localparam int unsigned CNT_W     = $clog2(WB_DEPTH + 1);

  // memory-mapped I/O window (word addresses)
  localparam logic [XLEN-1:0] IO_BASE     = 16'hFF00;
  localparam logic [XLEN-1:0] UART_RXDATA = 16'hFF00;
  localparam logic [XLEN-1:0] UART_RXSTAT = 16'hFF01;
  localparam logic [XLEN-1:0] UART_CTRL   = 16'hFF02;

  // interrupt vectors (word addresses)
  localparam logic [XLEN-1:0] VEC_ROLLBACK = 16'h0080;  // taken once after every rollback
  localparam logic [XLEN-1:0] VEC_IRQ      = 16'h0090;  // device interrupt

  typedef logic [XLEN-1:0] word_t;

  // one buffered store
  typedef struct packed {
    word_t addr;
    word_t data;
  } wb_entry_t;

  // the complete contents of one write-buffer level; entry 0 is the oldest
  typedef struct packed {
    logic [CNT_W-1:0]             count;
    wb_entry_t [WB_DEPTH-1:0]     e;
  } wb_level_t;

  // architectural core state that defines a precise checkpoint
  typedef struct packed {
    word_t                 pc;     // PC of the next instruction to complete
    word_t [NREGS-1:0]     regs;   // register file
    word_t                 epc;    // control register: interrupted PC
    logic                  ie;     // control register: interrupt enable
  } cpu_state_t;

  // one checkpoint: core state plus the two speculative write-buffer levels
  typedef struct packed {
    cpu_state_t cpu;
    wb_level_t  wb0;
    wb_level_t  wb1;
  } ckpt_t;

  // Interrupts: when ie is set and an interrupt is pending, the core replaces the
  // instruction in ID by an internal TRAP that commits in WB like any other
  // instruction (epc = its PC, ie = 0) and fetches from the vector. A rollback
  // interrupt is pending after every state reload and has priority.
  // instruction set: [15:12] opcode, [11:9] rd, [8:6] rs, [5:3] rt, [2:0] fn
  typedef enum logic [3:0] {
    OP_ALU  = 4'h0,  // rd = rs fn rt
    OP_ADDI = 4'h1,  // rd = rs + sext(imm6)
    OP_LI   = 4'h2,  // rd = sext(imm9)
    OP_LUI  = 4'h3,  // rd = imm8 << 8
    OP_LW   = 4'h4,  // rd = mem[rs + sext(imm6)]
    OP_SW   = 4'h5,  // mem[rs + sext(imm6)] = rd
    OP_BEQ  = 4'h6,  // if (rd == rs) pc = pc + 1 + sext(imm6)
    OP_BNE  = 4'h7,  // if (rd != rs) pc = pc + 1 + sext(imm6)
    OP_JAL  = 4'h8,  // rd = pc + 1; pc = pc + 1 + sext(imm9)
    OP_JR   = 4'h9,  // pc = rs
    OP_ORI  = 4'hA,  // rd = rs | zext(imm6)
    OP_RETI = 4'hB,  // pc = epc; ie = 1
    OP_EIDI = 4'hC,  // ie = ir[0]
    OP_TRAP = 4'hE,  // internal: interrupt entry injected by the core, not for programs
    OP_HALT = 4'hF   // jump to itself; core reports halted
  } opcode_e;

  typedef enum logic [2:0] {
    FN_ADD = 3'd0, FN_SUB = 3'd1, FN_AND = 3'd2, FN_OR  = 3'd3,
    FN_XOR = 3'd4, FN_SLT = 3'd5, FN_SLL = 3'd6, FN_SRL = 3'd7
  } alufn_e;

  // instruction encoders, used by testbenches to build programs
  function automatic word_t enc_r(alufn_e fn, int rd, int rs, int rt);
    return {OP_ALU, 3'(rd), 3'(rs), 3'(rt), fn};
  endfunction
  function automatic word_t enc_i6(opcode_e op, int rd, int rs, int imm);
    return {op, 3'(rd), 3'(rs), 6'(imm)};
  endfunction
  function automatic word_t enc_i9(opcode_e op, int rd, int imm);
    return {op, 3'(rd), 9'(imm)};
  endfunction

endpackage
