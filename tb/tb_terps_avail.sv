// tb_terps_avail -- forward progress and availability of the TERPS system under
// periodic EMI, at its default sizes (SCLK = FCLK/128, 12-entry write buffers).
//
// The shared test program (without the UART phase) is run once without EMI to
// get its undisturbed run time T0, then once per EMI separation S, with an EMI
// event reported every S cycles from cycle 300 until the program halts. Every
// run must halt and leave exactly the expected memory image. Availability is
// reported as T0 / T(S), the share of the time spent on work that is kept.
//
// Why these separations: one event costs up to 356 cycles of discarded work
// plus the 156-cycle rollback, counted from the SCLK rising edge that acts on
// it. An event that arrives just after a rising edge waits up to 127 more
// cycles. Periodic events therefore need S of more than 640 cycles in this
// implementation. At exactly 640 this program stops advancing in its store
// burst: the trusted checkpoint holds a full WB0, so the core stalls through the
// one interval that would be kept. The runs use S = 704, where the
// phase to SCLK moves from event to event, and 768, 1280 and 2560. Availability
// must grow with S. The separations and the 640-cycle bound are this
// testbench's; the document evaluates average separations of 512 cycles and up
// with its own kernels.
module tb_terps_avail;
  import terps_pkg::*;
  import tb_prog_pkg::*;
  localparam int N = 40;
  localparam int NS = 4;
  localparam int SEP [NS] = '{704, 768, 1280, 2560};

  logic clk = 0, rst_n = 0, sensor_in = 0, serial_in = 1;
  word_t imem_addr, imem_data, dram_waddr, dram_wdata, dram_raddr, dram_rdata;
  logic dram_we, sclk, ckpt, rmode, det_r, ss_sel, ss_we, restore, rollback_start;
  logic wb_stall, retire, halted, uart_irq, uart_frame, trap_taken, trap_rb;
  int checks = 0, failures = 0;

  terps_top dut (.*);
  dram_model u_dram (.clk, .we(dram_we), .waddr(dram_waddr), .wdata(dram_wdata),
                     .raddr(dram_raddr), .rdata(dram_rdata));

  word_t prog [PROG_LEN];
  assign imem_data = (int'(imem_addr) < PROG_LEN) ? prog[imem_addr[7:0]] : {OP_HALT, 12'h000};

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, n_rb, halt_cyc;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (rollback_start) n_rb++;
    if (halted && halt_cyc < 0 && !rmode && !det_r) halt_cyc = cyc;
  end

  // one run with an EMI event every `sep` cycles (none if sep == 0);
  // returns the cycle of HALT
  task automatic run(input int sep, output int t);
    rst_n = 0;
    for (int i = 0; i < 65536; i++) u_dram.mem[i] = '0;
    cyc = 0; n_rb = 0; halt_cyc = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (halt_cyc < 0 && cyc < 100000) begin
      @(negedge clk);
      sensor_in = (sep > 0 && cyc >= 300 && (cyc - 300) % sep == 0);
    end
    sensor_in = 0;
    t = halt_cyc;
    checks++;
    if (halt_cyc < 0) begin failures++; $display("S=%0d: no forward progress", sep); end
    repeat (4 * 128) @(negedge clk);   // drain WB1, WB2 and the controller
    for (int a = 16'h0FF0; a < 16'h2020; a++) begin
      int e;
      e = expected(word_t'(a), N, 1'b0, 0);
      checks++;
      if (u_dram.mem[a] !== ((e < 0) ? 16'h0000 : word_t'(e))) begin
        failures++;
        if (failures < 12) $display("S=%0d: dram[%h] = %h, expected %0d", sep, a, u_dram.mem[a], e);
      end
    end
  endtask

  initial begin
    int t0, t;
    real avail, prev;
    build(prog, N, 1'b0);
    run(0, t0);
    $display("no EMI: HALT after %0d cycles", t0);
    prev = 0.0;
    for (int k = 0; k < NS; k++) begin
      run(SEP[k], t);
      avail = 100.0 * real'(t0) / real'(t);
      $display("EMI every %0d cycles: HALT after %0d cycles, %0d rollbacks, availability %0.1f%%",
               SEP[k], t, n_rb, avail);
      checks++; if (n_rb < 1)       begin failures++; $display("no rollback"); end
      checks++; if (avail <= prev)  begin failures++; $display("availability did not grow"); end
      prev = avail;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
