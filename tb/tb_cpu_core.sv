// tb_cpu_core -- runs the shared test program on the core alone, with a
// store-immediately memory model, random hold cycles and random refusals of
// st_ready (WB0 full). At random moments it takes a checkpoint (state_out during
// a hold cycle, plus a copy of data memory) and later rolls back to it with
// `restore`; the program must still leave exactly the expected memory image,
// which shows that state_out is precise. Also checks HALT and the retire count
// of an undisturbed run. Run 3 repeats run 2 with the interrupt-driven variant
// of the program: a modelled receive device raises `irq` in the middle of the
// computation; the byte stays ready until the handler's acknowledge store to
// memory, which the tb's snapshot rolls back like all memory. The image must
// still be exact, and both the device handler and the rollback handler must
// have run.
module tb_cpu_core;
  import terps_pkg::*;
  import tb_prog_pkg::*;
  localparam int N = 30;
  logic clk = 0, rst_n = 0;
  logic hold, restore, ld_en, st_valid, st_ready, halted, retire, irq, trap_taken, trap_rb;
  cpu_state_t restore_state, state_out;
  word_t imem_addr, imem_data, ld_addr, ld_data;
  wb_entry_t st_entry;
  int checks = 0, failures = 0;

  cpu_core dut (.*);
  always #50 clk = ~clk;

  word_t prog [PROG_LEN];
  word_t dmem [word_t];
  word_t snap_mem [word_t];
  cpu_state_t snap_state;

  assign imem_data = (int'(imem_addr) < PROG_LEN) ? prog[imem_addr[7:0]] : {OP_HALT, 12'h000};
  // receive device for run 3: data ready, interrupt enable = mem[UART_CTRL][0]
  localparam word_t DEV_BYTE = 16'h0037;
  // data ready = the byte has arrived and the acknowledge flag mem[B-4] is not
  // set; memory, and so the acknowledge, is rolled back with the snapshot
  logic dev_dr;
  assign dev_dr    = dev_arrived && !(dmem.exists(BASE - 4) && dmem[BASE - 4] == 16'd1);
  assign irq       = dev_dr && dmem.exists(UART_CTRL) && dmem[UART_CTRL][0];
  assign ld_data   = (ld_addr == UART_RXDATA) ? DEV_BYTE :
                     dmem.exists(ld_addr) ? dmem[ld_addr] : 16'h0000;
  always @(posedge clk) if (rst_n && st_valid && st_ready) dmem[st_entry.addr] = st_entry.data;
  // reads have no side effect: a read is not precise, it happens in MEM before
  // the load commits
  logic dev_arrived;
  int n_trap_irq, n_trap_rb;
  always @(posedge clk) if (rst_n && trap_taken) begin
    if (trap_rb) n_trap_rb++; else n_trap_irq++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_image(string tag, bit with_uart = 1'b0);
    int e;
    for (int a = 16'h0FF0; a < 16'h2020; a++) begin
      e = expected(word_t'(a), N, with_uart, int'(DEV_BYTE));
      if (e == -2) continue;
      checks++;
      if (e < 0 ? dmem.exists(word_t'(a)) : (!dmem.exists(word_t'(a)) || dmem[word_t'(a)] !== word_t'(e))) begin
        failures++;
        if (failures < 10) $display("%s: mem[%h] = %h, expected %0d", tag, a, dmem.exists(word_t'(a)) ? dmem[word_t'(a)] : 16'hxxxx, e);
      end
    end
  endtask

  int cycles, retired, n_rb, n_snap;
  initial begin
    build(prog, N, 1'b0);
    hold = 0; restore = 0; restore_state = '0; st_ready = 1; dev_arrived = 0;
    // run 1: no disturbance, count cycles and retired instructions
    repeat (2) @(negedge clk);
    rst_n = 1;
    cycles = 0; retired = 0;
    while (!halted && cycles < 20000) begin
      @(negedge clk); cycles++;
      if (retire) retired++;
    end
    checks++; if (!halted) failures++;
    check_image("run1");
    $display("run 1: %0d cycles, %0d instructions retired before HALT", cycles, retired);
    // retired count: 4 + 7N + 1 + 16 + 2 + 8N + 1 instructions, plus the first HALT
    checks++; if (retired != 31 + 15 * N) begin failures++; $display("retired %0d", retired); end

    // run 2: random holds, WB0-full refusals, checkpoints and rollbacks
    dmem.delete();
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    snap_state = '0; snap_mem.delete(); n_rb = 0; n_snap = 0;
    cycles = 0;
    while (!(halted && !hold) && cycles < 100000) begin
      @(negedge clk); cycles++;
      restore = 0;
      hold = ($urandom_range(0, 9) == 0);
      st_ready = ($urandom_range(0, 5) != 0);
      if (hold && $urandom_range(0, 2) == 0) begin
        #1 snap_state = state_out; snap_mem = dmem; n_snap++;
      end else if (hold && $urandom_range(0, 4) == 0 && n_rb < 60) begin
        restore_state = snap_state; restore = 1; n_rb++;
        @(posedge clk); #1 dmem = snap_mem;
        @(negedge clk); restore = 0; hold = 0;
      end
    end
    hold = 0;
    checks++; if (!halted) failures++;
    check_image("run2");
    $display("run 2: %0d cycles, %0d checkpoints, %0d rollbacks", cycles, n_snap, n_rb);
    checks++; if (n_rb < 10) failures++;

    // run 3: interrupt-driven program, interrupt during the computation
    build(prog, N, 1'b1);
    dmem.delete();
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    snap_state = '0; snap_mem.delete(); n_rb = 0; n_snap = 0;
    n_trap_irq = 0; n_trap_rb = 0;
    cycles = 0;
    while (!(halted && !hold) && cycles < 100000) begin
      @(negedge clk); cycles++;
      if (cycles == 300) dev_arrived = 1'b1;
      restore = 0;
      hold = ($urandom_range(0, 9) == 0);
      st_ready = ($urandom_range(0, 5) != 0);
      if (hold && $urandom_range(0, 2) == 0) begin
        #1 snap_state = state_out; snap_mem = dmem; n_snap++;
      end else if (hold && $urandom_range(0, 4) == 0 && n_rb < 60) begin
        restore_state = snap_state; restore = 1; n_rb++;
        @(posedge clk); #1 dmem = snap_mem;
        @(negedge clk); restore = 0; hold = 0;
      end
    end
    hold = 0;
    checks++; if (!halted) failures++;
    check_image("run3", 1'b1);
    $display("run 3: %0d cycles, %0d rollbacks, device handler %0d, rollback handler %0d",
             cycles, n_rb, n_trap_irq, n_trap_rb);
    checks++; if (n_trap_irq < 1) begin failures++; $display("device handler never ran"); end
    checks++; if (n_trap_rb < 1)  begin failures++; $display("rollback handler never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
