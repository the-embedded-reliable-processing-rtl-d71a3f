// terps_top -- the TERPS system: a checkpointed CPU chip, its two-bank safe storage,
// the memory controller and a UART, wired as in the system block diagram.
//
// Every SCLK period (DIV = 128 FCLK cycles) the checkpoint controller freezes the
// core for one cycle and copies the precise core state (next-to-complete PC,
// registers, epc, ie) with write buffers WB0 and WB1 into the checkpoint latch; at the same
// time WB0 -> WB1 -> WB2 are promoted and the old WB2 is handed to the memory
// controller, which writes it to DRAM. At the SCLK rising edge the latch goes to
// the older safe-storage bank, unless EMI was reported on `sensor_in` since the
// previous rising edge: then the core is held, the older bank is read back
// through the latch and, one SCLK period and one high phase later, the core,
// WB0 and WB1 are reloaded, WB2 is emptied and execution resumes from that
// checkpoint. Stores are visible to loads from the moment they enter WB0
// (search order WB0, WB1, WB2, memory-controller queue, DRAM).
//
// External parts are brought out as ports: the instruction/data DRAM (an
// asynchronous read port each for instructions and data, one synchronous write
// port), the EMI detector (`sensor_in`, active high, any width of pulse) and the
// UART's serial input. The UART interrupt drives the core's `irq`; after every
// rollback the core also takes a rollback interrupt, whose handler is where
// software reconfigures devices. Single clock: SCLK exists as a level
// for observation, and its edges act as FCLK-cycle strobes.
module terps_top
  import terps_pkg::*;
#(
  parameter int unsigned DIV          = 128,  // FCLK cycles per SCLK cycle
  parameter int unsigned SCLK_HIGH    = 28,   // FCLK cycles SCLK is high
  parameter int unsigned CLKS_PER_BIT = 128,  // UART bit time in FCLK cycles
  parameter bit          UART_READ_CLEARS = 1'b1  // 0: UART with side-effect-free reads
) (
  input  logic  clk,            // FCLK
  input  logic  rst_n,
  input  logic  sensor_in,      // EMI detector
  input  logic  serial_in,      // UART receive line
  // instruction memory
  output word_t imem_addr,
  input  word_t imem_data,
  // DRAM
  output logic  dram_we,
  output word_t dram_waddr,
  output word_t dram_wdata,
  output word_t dram_raddr,
  input  word_t dram_rdata,
  // status
  output logic  sclk,
  output logic  ckpt,
  output logic  rmode,
  output logic  det_r,
  output logic  ss_sel,         // bank a rollback would read
  output logic  ss_we,
  output logic  restore,
  output logic  rollback_start,
  output logic  wb_stall,       // core stalled on a full WB0
  output logic  retire,
  output logic  halted,
  output logic  trap_taken,    // strobe: the core entered an interrupt handler
  output logic  trap_rb,       // ... the rollback handler
  output logic  uart_irq,
  output logic  uart_frame
);
  logic       sclk_fall, sclk_rise, hold, ss_wsel, ss_oe_n, latch_from_ss;
  cpu_state_t core_state;
  ckpt_t      latch_q, ss_rdata, ckpt_d;
  wb_level_t  wb0_q, wb1_q, wb2_q;
  logic       wb0_full, wb1_full, wb2_full;
  logic       wb0_hit, wb1_hit, wb2_hit;
  word_t      wb0_hd, wb1_hd, wb2_hd;
  logic       st_valid, ld_en;
  wb_entry_t  st_entry;
  word_t      ld_addr, ld_data, mc_ld_data;
  logic       mc_busy, io_we, io_rd;
  word_t      io_waddr, io_wdata, io_raddr, io_rdata;

  sclk_gen #(.DIV(DIV), .HIGH(SCLK_HIGH)) u_sclk (
    .clk, .rst_n, .sclk, .sclk_fall, .sclk_rise
  );

  ckpt_ctrl u_ctrl (
    .clk, .rst_n, .sclk_fall, .sclk_rise, .sensor_in,
    .ckpt, .hold, .rmode, .det_r, .ss_we, .ss_wsel, .ss_rsel(ss_sel), .ss_oe_n,
    .latch_from_ss, .restore, .rollback_start
  );

  cpu_core u_core (
    .clk, .rst_n, .hold, .restore,
    .restore_state(latch_q.cpu), .state_out(core_state),
    .imem_addr, .imem_data,
    .ld_en, .ld_addr, .ld_data,
    .st_valid, .st_entry, .st_ready(!wb0_full),
    .irq(uart_irq), .halted, .retire, .trap_taken, .trap_rb
  );

  // WB0: stores being executed; emptied at a checkpoint, reloaded on rollback
  write_buffer u_wb0 (
    .clk, .rst_n, .push(st_valid), .push_entry(st_entry), .full(wb0_full),
    .load(restore), .load_level(latch_q.wb0), .clear(ckpt), .level(wb0_q),
    .lookup_addr(ld_addr), .hit(wb0_hit), .hit_data(wb0_hd)
  );
  // WB1: stores of the previous checkpoint interval
  write_buffer u_wb1 (
    .clk, .rst_n, .push(1'b0), .push_entry('0), .full(wb1_full),
    .load(ckpt || restore), .load_level(restore ? latch_q.wb1 : wb0_q), .clear(1'b0),
    .level(wb1_q), .lookup_addr(ld_addr), .hit(wb1_hit), .hit_data(wb1_hd)
  );
  // WB2: stores two intervals old, released to memory at the next checkpoint
  write_buffer u_wb2 (
    .clk, .rst_n, .push(1'b0), .push_entry('0), .full(wb2_full),
    .load(ckpt), .load_level(wb1_q), .clear(restore),
    .level(wb2_q), .lookup_addr(ld_addr), .hit(wb2_hit), .hit_data(wb2_hd)
  );

  memory_controller u_mc (
    .clk, .rst_n, .commit(ckpt), .commit_level(wb2_q), .busy(mc_busy),
    .ld_en, .ld_addr, .ld_data(mc_ld_data),
    .dram_we, .dram_waddr, .dram_wdata, .dram_raddr, .dram_rdata,
    .io_we, .io_waddr, .io_wdata, .io_rd, .io_raddr, .io_rdata
  );

  always_comb begin
    ckpt_d.cpu = core_state;
    ckpt_d.wb0 = wb0_q;
    ckpt_d.wb1 = wb1_q;
    if      (ld_addr >= IO_BASE) ld_data = mc_ld_data;
    else if (wb0_hit)            ld_data = wb0_hd;
    else if (wb1_hit)            ld_data = wb1_hd;
    else if (wb2_hit)            ld_data = wb2_hd;
    else                         ld_data = mc_ld_data;
    wb_stall = wb0_full && !hold && !restore && st_valid;
  end

  checkpoint_latch u_latch (
    .clk, .rst_n, .cap_cpu(ckpt), .cpu_d(ckpt_d),
    .cap_ss(latch_from_ss), .ss_d(ss_rdata), .q(latch_q)
  );

  safe_storage u_ss (
    .clk, .rst_n, .we(ss_we), .wsel(ss_wsel), .wdata(latch_q),
    .rsel(ss_sel), .oe_n(ss_oe_n), .rdata(ss_rdata)
  );

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT), .READ_CLEARS(UART_READ_CLEARS)) u_uart (
    .clk, .rst_n, .serial_in,
    .rd(io_rd), .raddr(io_raddr), .rdata(io_rdata),
    .we(io_we), .waddr(io_waddr), .wdata(io_wdata),
    .irq(uart_irq), .frame_done(uart_frame)
  );
endmodule
