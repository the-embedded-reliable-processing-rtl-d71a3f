// tb_terps_top -- end-to-end test of the TERPS system at its default sizes
// (SCLK = FCLK/128, 12-entry write buffers, UART bit time 128 cycles).
//
// Run A executes the shared test program (with the UART phase) without EMI and
// reports the checkpointing overhead: cycles the core lost to checkpoint freezes
// and to a full WB0. Run B executes it again with EMI injected on sensor_in:
// a single event, one that strikes during a rollback (the rollback restarts), one
// right after a rollback has completed (the same checkpoint is reloaded again) and
// a later one. In both runs the DRAM image left after HALT, once the write
// buffers have drained, must equal the independently computed one, including the
// byte received over the UART. Also checked: checkpoints exactly one SCLK period
// apart outside rollbacks, the 156-cycle rollback latency, safe-storage writes,
// and that each mechanism happened at least once. The byte is taken by the
// program's UART interrupt handler; the interrupt latency (UART interrupt to the
// handler's RxDATA read) must stay within T_LATENCY = 40 cycles, and in run B the
// rollback interrupt handler must have run.
//
// Runs C and D test the guarantee for an unmodified UART. Data is safe once it
// has been in the device for T_SAFE = 356 + 40 = 396 cycles: two full checkpoint
// intervals after a read that just missed a checkpoint, plus the interrupt
// latency budget. Run C strikes 400 cycles after the byte arrived, and the byte
// must be kept. Run D strikes right after the handler's RxDATA read. The
// rollback then returns to a state before the read, while the UART has already
// cleared data-ready. The byte must be lost: the core is not halted 3000 cycles
// after the rollback, and the UART shows no data ready.
module tb_terps_top;
  import terps_pkg::*;
  import tb_prog_pkg::*;
  localparam int N = 40, DIV = 128, HIGH = 28, CPB = 128;
  localparam logic [6:0] UART_BYTE = 7'h5b;

  logic clk = 0, rst_n = 0, sensor_in = 0, serial_in = 1;
  word_t imem_addr, imem_data, dram_waddr, dram_wdata, dram_raddr, dram_rdata;
  logic dram_we, sclk, ckpt, rmode, det_r, ss_sel, ss_we, restore, rollback_start;
  logic wb_stall, retire, halted, uart_irq, uart_frame, trap_taken, trap_rb;
  int checks = 0, failures = 0;

  terps_top dut (.*);
  // An EMI event also corrupts the stores being committed to DRAM while it
  // lasts (EMI_CORRUPT cycles); the detector may report it later than it began.
  // The reloaded write buffers must overwrite the corrupted words.
  localparam int EMI_CORRUPT = 20;
  int    corrupt_left = 0, n_corrupt = 0;
  word_t dram_wdata_emi;
  assign dram_wdata_emi = (corrupt_left > 0) ? (dram_wdata ^ 16'hDEAD) : dram_wdata;
  always @(posedge clk) begin
    if (corrupt_left > 0) corrupt_left--;
    if (dram_we && corrupt_left > 0) n_corrupt++;
  end
  dram_model u_dram (.clk, .we(dram_we), .waddr(dram_waddr), .wdata(dram_wdata_emi),
                     .raddr(dram_raddr), .rdata(dram_rdata));

  word_t prog [PROG_LEN];
  assign imem_data = (int'(imem_addr) < PROG_LEN) ? prog[imem_addr[7:0]] : {OP_HALT, 12'h000};

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- monitors
  int cyc, n_ckpt, n_sswe, n_rb, n_restart, n_restore, n_rereload, n_stall, n_frame, n_ckptfreeze;
  int last_ckpt, rb_t0, halt_cyc;
  int n_trap_irq, n_trap_rb, irq_t0, irq_lat, rd_cyc;
  logic irq_q;
  localparam int T_LATENCY = 40;
  logic in_rb, mon_on;
  word_t last_restore_pc;
  logic  have_restore;

  always @(posedge clk) if (rst_n && mon_on) begin
    cyc++;
    if (ckpt) begin
      n_ckpt++;
      if (!halted) n_ckptfreeze++;
      if (last_ckpt >= 0 && !in_rb) begin
        checks++;
        if ((cyc - last_ckpt) % DIV != 0) begin failures++; $display("checkpoint spacing %0d", cyc - last_ckpt); end
      end
      last_ckpt = cyc;
    end
    if (ss_we) n_sswe++;
    if (wb_stall) n_stall++;
    if (uart_frame) n_frame++;
    if (rollback_start) begin
      if (in_rb) n_restart++; else n_rb++;
      in_rb = 1; rb_t0 = cyc;
    end
    if (restore) begin
      n_restore++;
      checks++;
      if (cyc - rb_t0 != DIV + HIGH) begin failures++; $display("rollback took %0d cycles", cyc - rb_t0); end
      if (have_restore && dut.u_latch.q.cpu.pc == last_restore_pc) n_rereload++;
      last_restore_pc = dut.u_latch.q.cpu.pc; have_restore = 1;
      in_rb = 0;
    end
    if (halted && halt_cyc < 0 && !rmode) halt_cyc = cyc;
    if (trap_taken && !trap_rb) n_trap_irq++;
    if (trap_rb) n_trap_rb++;
    if (uart_irq && !irq_q) irq_t0 = cyc;
    if (dut.io_rd && dut.io_raddr == UART_RXDATA && irq_lat < 0) begin
      irq_lat = cyc - irq_t0; rd_cyc = cyc;
    end
    irq_q = uart_irq;
  end

  // ---------------------------------------------------------------- stimulus
  task automatic send_uart(logic [6:0] d);
    logic [9:0] f;
    f = {1'b1, ^d, d};
    for (int b = 0; b < 10; b++) begin
      serial_in = (b == 0) ? 1'b0 : f[b-1];
      repeat (CPB) @(negedge clk);
    end
    serial_in = 1'b1;
  endtask

  // EMI starting at cycle c, reported by the detector `delay` cycles later
  task automatic emi_at(int c, int delay = 0);
    while (cyc < c) @(negedge clk);
    corrupt_left = EMI_CORRUPT;
    repeat (delay) @(negedge clk);
    sensor_in = 1; @(negedge clk); sensor_in = 0;
  endtask

  task automatic reset_system();
    rst_n = 0; mon_on = 0;
    for (int i = 0; i < 65536; i++) u_dram.mem[i] = '0;
    cyc = 0; n_ckpt = 0; n_sswe = 0; n_rb = 0; n_restart = 0; n_restore = 0; n_rereload = 0;
    n_stall = 0; n_frame = 0; n_ckptfreeze = 0; last_ckpt = -1; rb_t0 = 0; halt_cyc = -1;
    in_rb = 0; have_restore = 0; last_restore_pc = '0;
    n_trap_irq = 0; n_trap_rb = 0; irq_t0 = 0; irq_lat = -1; irq_q = 0; rd_cyc = -1;
    repeat (3) @(negedge clk);
    rst_n = 1; mon_on = 1;
  endtask

  task automatic wait_done_and_check(string tag);
    while (halt_cyc < 0) @(negedge clk);
    repeat (4 * DIV) @(negedge clk);   // let the last stores pass WB1, WB2 and the controller
    for (int a = 16'h0FF0; a < 16'h2020; a++) begin
      int e;
      e = expected(word_t'(a), N, 1'b1, int'(UART_BYTE));
      if (e == -2) continue;
      checks++;
      if (u_dram.mem[a] !== ((e < 0) ? 16'h0000 : word_t'(e))) begin
        failures++;
        if (failures < 12) $display("%s: dram[%h] = %h, expected %0d", tag, a, u_dram.mem[a], e);
      end
    end
  endtask

  initial begin
    build(prog, N, 1'b1);
    // ---------------- run A: no EMI
    reset_system();
    fork
      begin repeat (200) @(negedge clk); send_uart(UART_BYTE); end
    join_none
    wait_done_and_check("run A");
    $display("run A: HALT after %0d cycles; checkpoint freezes %0d, WB0-full stall cycles %0d (%0.1f%% of the run)",
             halt_cyc, n_ckptfreeze, n_stall, 100.0 * real'(n_ckptfreeze + n_stall) / real'(halt_cyc));
    checks++; if (n_ckpt < 5 || n_sswe < 5 || n_stall < 1 || n_frame != 1 || n_rb != 0) failures++;
    $display("run A: interrupt latency %0d cycles", irq_lat);
    checks++; if (n_trap_irq != 1 || n_trap_rb != 0) begin failures++; $display("interrupts taken: %0d UART, %0d rollback", n_trap_irq, n_trap_rb); end
    checks++; if (irq_lat < 0 || irq_lat > T_LATENCY) begin failures++; $display("interrupt latency %0d", irq_lat); end

    // ---------------- run B: EMI
    reset_system();
    fork
      begin repeat (200) @(negedge clk); send_uart(UART_BYTE); end
      begin
        emi_at(516, 100);                 // single event over a DRAM commit, detected late
        emi_at(900);                      // event ...
        emi_at(1050);                     // ... and another during that rollback
        while (n_restore < 2) @(negedge clk);
        emi_at(cyc + 10);                 // right after the rollback completed
      end
    join_none
    wait_done_and_check("run B");
    $display("run B: HALT after %0d cycles; checkpoints %0d, safe-storage writes %0d, rollbacks %0d, restarts %0d, restores %0d, same-state reloads %0d, WB0-full stall cycles %0d, UART frames %0d, corrupted DRAM writes %0d",
             halt_cyc, n_ckpt, n_sswe, n_rb, n_restart, n_restore, n_rereload, n_stall, n_frame, n_corrupt);
    checks++; if (n_corrupt < 1)   begin failures++; $display("no corrupted DRAM write"); end
    // every mechanism must have happened
    checks++; if (n_ckpt < 5)      begin failures++; $display("no checkpoints"); end
    checks++; if (n_sswe < 5)      begin failures++; $display("no safe-storage writes"); end
    checks++; if (n_rb < 3)        begin failures++; $display("too few rollbacks"); end
    checks++; if (n_restart < 1)   begin failures++; $display("no rollback restart"); end
    checks++; if (n_rereload < 1)  begin failures++; $display("no repeated reload"); end
    checks++; if (n_stall < 1)     begin failures++; $display("no WB0-full stall"); end
    checks++; if (n_frame != 1)    begin failures++; $display("UART frame count %0d", n_frame); end
    checks++; if (n_trap_rb < 1)   begin failures++; $display("rollback handler never ran"); end
    checks++; if (n_trap_irq < 1)  begin failures++; $display("UART handler never ran"); end
    $display("run B: rollback handler ran %0d times, UART handler %0d times", n_trap_rb, n_trap_irq);

    // ---------------- run C: EMI T_SAFE after the byte arrived, byte kept
    reset_system();
    fork
      begin repeat (200) @(negedge clk); send_uart(UART_BYTE); end
      begin
        while (irq_lat < 0) @(negedge clk);
        emi_at(irq_t0 + 400);
      end
    join_none
    wait_done_and_check("run C");
    $display("run C: byte arrived at %0d, read at %0d, EMI at %0d; rollbacks %0d", irq_t0, rd_cyc, irq_t0 + 400, n_rb);
    checks++; if (n_rb != 1) begin failures++; $display("run C: %0d rollbacks", n_rb); end

    // ---------------- run D: EMI right after the read, byte lost
    reset_system();
    fork
      begin repeat (200) @(negedge clk); send_uart(UART_BYTE); end
      begin
        while (rd_cyc < 0) @(negedge clk);
        emi_at(rd_cyc + 5);
      end
    join_none
    while (n_restore < 1) @(negedge clk);
    repeat (3000) @(negedge clk);
    $display("run D: read at %0d, EMI at %0d; halted %0d, UART data ready %0d", rd_cyc, rd_cyc + 5, halted, dut.u_uart.dr);
    checks++; if (halted)          begin failures++; $display("run D: byte was not lost"); end
    checks++; if (dut.u_uart.dr)   begin failures++; $display("run D: UART still holds the byte"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
