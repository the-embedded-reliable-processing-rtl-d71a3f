// tb_terps_safeio -- the TERPS system with the redesigned UART whose reads have no
// side effect (UART_READ_CLEARS = 0), all other sizes at their defaults.
//
// The interrupt handler of the shared program reads RxDATA, stores the byte and
// a flag, and acknowledges the byte by writing RxSTAT. The acknowledge is a
// store, so it reaches the UART only after it has left the write buffers, when
// no rollback can undo it. Until then the UART keeps the byte ready and its
// interrupt raised, and the handler may run more than once; every run stores
// the same byte.
//
// Run 1 has no EMI. Run 2 reports EMI 5 cycles after the handler's first RxDATA
// read: the same event that loses the byte with the unmodified UART. Here the
// rollback re-executes the handler, which must find the byte again. Both runs
// must halt with the exact memory image, including the byte, and the acknowledge
// must have cleared data ready by the end. The side-effect-free device and the
// acknowledge through the write buffers follow the document's third I/O option.
// Its other premise, a UART hardened so that EMI leaves its state intact, is a
// physical property; the UART model here is never disturbed.
module tb_terps_safeio;
  import terps_pkg::*;
  import tb_prog_pkg::*;
  localparam int N = 40, CPB = 128;
  localparam logic [6:0] UART_BYTE = 7'h2c;

  logic clk = 0, rst_n = 0, sensor_in = 0, serial_in = 1;
  word_t imem_addr, imem_data, dram_waddr, dram_wdata, dram_raddr, dram_rdata;
  logic dram_we, sclk, ckpt, rmode, det_r, ss_sel, ss_we, restore, rollback_start;
  logic wb_stall, retire, halted, uart_irq, uart_frame, trap_taken, trap_rb;
  int checks = 0, failures = 0;

  terps_top #(.UART_READ_CLEARS(1'b0)) dut (.*);
  dram_model u_dram (.clk, .we(dram_we), .waddr(dram_waddr), .wdata(dram_wdata),
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

  int cyc, rd_cyc, n_rb, n_isr, halt_cyc;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.io_rd && dut.io_raddr == UART_RXDATA && rd_cyc < 0) rd_cyc = cyc;
    if (rollback_start) n_rb++;
    if (trap_taken && !trap_rb) n_isr++;
    if (halted && !rmode && !det_r && halt_cyc < 0) halt_cyc = cyc;
  end

  task automatic send_uart(logic [6:0] d);
    logic [9:0] f;
    f = {1'b1, ^d, d};
    for (int b = 0; b < 10; b++) begin
      serial_in = (b == 0) ? 1'b0 : f[b-1];
      repeat (CPB) @(negedge clk);
    end
    serial_in = 1'b1;
  endtask

  task automatic run(input bit with_emi, input string tag);
    rst_n = 0;
    for (int i = 0; i < 65536; i++) u_dram.mem[i] = '0;
    cyc = 0; rd_cyc = -1; n_rb = 0; n_isr = 0; halt_cyc = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin repeat (200) @(negedge clk); send_uart(UART_BYTE); end
      if (with_emi) begin
        while (rd_cyc < 0) @(negedge clk);
        repeat (5) @(negedge clk);
        sensor_in = 1; @(negedge clk); sensor_in = 0;
      end
    join_none
    while (halt_cyc < 0) @(negedge clk);
    repeat (4 * 128) @(negedge clk);
    $display("%s: first RxDATA read at %0d, HALT after %0d cycles, rollbacks %0d, handler entries %0d, data ready at the end %0d",
             tag, rd_cyc, halt_cyc, n_rb, n_isr, dut.u_uart.dr);
    for (int a = 16'h0FF0; a < 16'h2020; a++) begin
      int e;
      e = expected(word_t'(a), N, 1'b1, int'(UART_BYTE));
      if (e == -2) continue;
      checks++;
      if (u_dram.mem[a] !== ((e < 0) ? 16'h0000 : word_t'(e))) begin
        failures++;
        $display("%s: dram[%h] = %h, expected %0d", tag, a, u_dram.mem[a], e);
      end
    end
    checks++; if (dut.u_uart.dr) begin failures++; $display("%s: byte never acknowledged", tag); end
    checks++; if (n_rb != (with_emi ? 1 : 0)) begin failures++; $display("%s: %0d rollbacks", tag, n_rb); end
  endtask

  initial begin
    build(prog, N, 1'b1, 1'b1);
    run(1'b0, "run 1, no EMI");
    run(1'b1, "run 2, EMI after the read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
