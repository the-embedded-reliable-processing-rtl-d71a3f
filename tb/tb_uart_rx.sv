// tb_uart_rx -- sends 7-bit + even-parity frames at 16 FCLK cycles per bit and
// checks RxDATA, the data-ready flag and interrupt, the clear-on-read side effect,
// overrun, a parity error, and that a one-sample glitch in the middle of a bit is
// outvoted. A frame must be reported within the frame time. A second receiver,
// built with READ_CLEARS = 0 and fed the same line and register accesses, must
// keep data ready through the RxDATA read and drop it on the RxSTAT acknowledge.
module tb_uart_rx;
  import terps_pkg::*;
  localparam int CPB = 16;
  logic clk = 0, rst_n = 0;
  logic serial_in, rd, we, irq, frame_done;
  word_t raddr, rdata, waddr, wdata;
  int checks = 0, failures = 0;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);
  word_t rdata2;
  logic  irq2, frame_done2;
  uart_rx #(.CLKS_PER_BIT(CPB), .READ_CLEARS(1'b0)) dut2 (
    .clk, .rst_n, .serial_in, .rd, .raddr, .rdata(rdata2), .we, .waddr, .wdata,
    .irq(irq2), .frame_done(frame_done2)
  );
  always #50 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive one frame; glitch_bit >= 0 flips one cycle in the middle of that bit
  task automatic send(logic [6:0] d, logic bad_parity, int glitch_bit);
    logic [9:0] f;
    f = {1'b1, (^d) ^ bad_parity, d};
    for (int b = 0; b < 10; b++) begin
      logic v;
      v = (b == 0) ? 1'b0 : f[b-1];
      for (int c = 0; c < CPB; c++) begin
        @(negedge clk);
        serial_in = (b == glitch_bit && c == CPB / 2) ? ~v : v;
      end
    end
    @(negedge clk); serial_in = 1'b1;
    repeat (4) @(negedge clk);
  endtask

  task automatic rreg(input word_t a, output word_t v);
    raddr = a; rd = 0; #1;
    v = rdata;
  endtask

  task automatic read_data(output word_t v);
    @(negedge clk); raddr = UART_RXDATA; rd = 1; #1; v = rdata;
    @(negedge clk); rd = 0;
  endtask

  int frames;
  always @(posedge clk) if (rst_n && frame_done) frames++;

  initial begin
    word_t v, s;
    serial_in = 1; rd = 0; we = 0; raddr = '0; waddr = '0; wdata = '0; frames = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // enable the receive interrupt
    @(negedge clk); waddr = UART_CTRL; wdata = 16'h0001; we = 1; @(negedge clk); we = 0;
    for (int k = 0; k < 40; k++) begin
      logic [6:0] d;
      int g;
      d = 7'($urandom);
      g = (k % 3 == 0) ? $urandom_range(1, 8) : -1;
      send(d, 1'b0, g);
      rreg(UART_RXSTAT, s);
      checks++; if (s[0] !== 1'b1 || s[2] !== 1'b0 || s[3] !== 1'b0) begin failures++; $display("stat %h", s); end
      checks++; if (irq !== 1'b1) begin failures++; $display("check 1 failed"); end
      read_data(v);
      checks++; if (v !== word_t'(d)) begin failures++; $display("data %h exp %h", v, d); end
      rreg(UART_RXSTAT, s);
      checks++; if (s[0] !== 1'b0 || irq !== 1'b0) begin failures++; $display("check 2 failed"); end   // cleared by the read
      // side-effect-free receiver: still ready after the read, the same word, cleared by the acknowledge
      rreg(UART_RXDATA, v);
      checks++; if (irq2 !== 1'b1 || rdata2 !== word_t'(d)) begin failures++; $display("check 8 failed"); end
      @(negedge clk); waddr = UART_RXSTAT; wdata = 16'h0001; we = 1; @(negedge clk); we = 0;
      checks++; if (irq2 !== 1'b0) begin failures++; $display("check 9 failed"); end
    end
    checks++; if (frames != 40) begin failures++; $display("check 3 failed"); end
    // overrun: two frames without a read
    send(7'h11, 1'b0, -1);
    send(7'h22, 1'b0, -1);
    rreg(UART_RXSTAT, s);
    checks++; if (s[1] !== 1'b1) begin failures++; $display("check 4 failed"); end
    read_data(v);
    checks++; if (v !== 16'h0022) begin failures++; $display("check 5 failed"); end
    // parity error
    send(7'h35, 1'b1, -1);
    rreg(UART_RXSTAT, s);
    checks++; if (s[2] !== 1'b1) begin failures++; $display("check 6 failed"); end
    // soft reset clears the flags
    @(negedge clk); waddr = UART_CTRL; wdata = 16'h0080; we = 1; @(negedge clk); we = 0;
    rreg(UART_RXSTAT, s);
    checks++; if (s[3:0] !== 4'b0000) begin failures++; $display("check 7 failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
