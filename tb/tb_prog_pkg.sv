// tb_prog_pkg -- the test program shared by the core and system testbenches, and
// an independent computation of the memory image it must leave behind.
//
// The program (word addresses, data base B = 0x1000, N iterations):
//   phase 1: for i in 0..N-1: s += i; mem[B+i] = s; read it back, branch to the
//            failure exit on a mismatch (store -> load through the buffers)
//   phase 2: 16 back-to-back stores of N to 0x2000.. (fills WB0 of 12 entries)
//   phase 3: c = 0; for i: c = subroutine(c, mem[B+i]) = 2c ^ mem[B+i]
//            (JAL / JR); mem[B-1] = c
//   phase 4 (with_uart): wait until the UART interrupt handler has set the flag
//            mem[B-4]; the handler reads RxDATA and stores it to mem[B-3]
//   HALT. The failure exit writes -1 to mem[B-2].
// Start-up (at 51, reached by a jump at 0) sets the base register and, with_uart,
// enables the UART receive interrupt and the core's interrupts. The rollback
// handler (VEC_ROLLBACK) re-enables the UART interrupt, the device's only
// configuration; both handlers save r5/r6 in mem[B-5], mem[B-6].
package tb_prog_pkg;
  import terps_pkg::*;

  localparam int unsigned PROG_LEN = 256;
  localparam word_t       BASE     = 16'h1000;
  localparam word_t       BURST    = 16'h2000;

  function automatic void build(ref word_t p [PROG_LEN], input int n, input bit with_uart,
                               input bit ack_write = 1'b0);
    for (int i = 0; i < PROG_LEN; i++) p[i] = {OP_HALT, 12'h000};
    p[0]  = enc_i9(OP_JAL, 0, 51 - 1);          // -> start-up
    p[1]  = enc_i9(OP_LI, 2, n);                // r2 = N
    p[2]  = enc_i9(OP_LI, 1, 0);
    p[3]  = enc_i9(OP_LI, 4, 0);
    p[4]  = enc_r(FN_ADD, 4, 4, 1);             // loop: s += i
    p[5]  = enc_r(FN_ADD, 5, 3, 1);
    p[6]  = enc_i6(OP_SW, 4, 5, 0);
    p[7]  = enc_i6(OP_LW, 6, 5, 0);
    p[8]  = enc_i6(OP_BNE, 6, 4, 37 - 9);       // -> fail
    p[9]  = enc_i6(OP_ADDI, 1, 1, 1);
    p[10] = enc_i6(OP_BNE, 1, 2, 4 - 11);
    p[11] = enc_i9(OP_LUI, 5, 9'h020);          // r5 = 0x2000
    for (int k = 0; k < 16; k++) p[12 + k] = enc_i6(OP_SW, 1, 5, k);
    p[28] = enc_i9(OP_LI, 1, 0);
    p[29] = enc_i9(OP_LI, 7, 0);
    p[30] = enc_r(FN_ADD, 5, 3, 1);             // loop2
    p[31] = enc_i6(OP_LW, 6, 5, 0);
    p[32] = enc_i9(OP_JAL, 4, 40 - 33);         // call sub
    p[33] = enc_i6(OP_ADDI, 1, 1, 1);
    p[34] = enc_i6(OP_BNE, 1, 2, 30 - 35);
    p[35] = enc_i6(OP_SW, 7, 3, -1);
    p[36] = with_uart ? enc_i9(OP_JAL, 0, 43 - 37) : {OP_HALT, 12'h000};
    p[37] = enc_i9(OP_LI, 7, -1);               // fail
    p[38] = enc_i6(OP_SW, 7, 3, -2);
    p[39] = {OP_HALT, 12'h000};
    p[40] = enc_r(FN_ADD, 7, 7, 7);             // sub: c = 2c ^ v
    p[41] = enc_r(FN_XOR, 7, 7, 6);
    p[42] = enc_i6(OP_JR, 0, 4, 0);
    p[43] = enc_i6(OP_LW, 7, 3, -4);            // wait for the handler's flag
    p[44] = enc_i6(OP_BEQ, 7, 0, 43 - 45);
    p[45] = {OP_HALT, 12'h000};
    p[51] = enc_i9(OP_LUI, 3, 9'h010);          // start-up: r3 = 0x1000
    if (with_uart) begin
      p[52] = enc_i9(OP_LUI, 5, 9'h0FF);
      p[53] = enc_i9(OP_LI, 6, 1);
      p[54] = enc_i6(OP_SW, 6, 5, 2);           // UART CTRL: receive interrupt on
      p[55] = {OP_EIDI, 12'h001};               // EI
    end else begin
      for (int k = 52; k < 56; k++) p[k] = enc_i6(OP_ADDI, 0, 0, 0);
    end
    p[56] = enc_i9(OP_JAL, 0, 1 - 57);
    // rollback handler
    p[VEC_ROLLBACK + 0] = enc_i6(OP_SW, 5, 3, -5);
    p[VEC_ROLLBACK + 1] = enc_i6(OP_SW, 6, 3, -6);
    p[VEC_ROLLBACK + 2] = enc_i9(OP_LUI, 5, 9'h0FF);
    p[VEC_ROLLBACK + 3] = enc_i9(OP_LI, 6, 1);
    p[VEC_ROLLBACK + 4] = enc_i6(OP_SW, 6, 5, 2);
    p[VEC_ROLLBACK + 5] = enc_i6(OP_LW, 6, 3, -6);
    p[VEC_ROLLBACK + 6] = enc_i6(OP_LW, 5, 3, -5);
    p[VEC_ROLLBACK + 7] = {OP_RETI, 12'h000};
    // UART receive handler
    p[VEC_IRQ + 0] = enc_i6(OP_SW, 5, 3, -5);
    p[VEC_IRQ + 1] = enc_i6(OP_SW, 6, 3, -6);
    p[VEC_IRQ + 2] = enc_i9(OP_LUI, 5, 9'h0FF);
    p[VEC_IRQ + 3] = enc_i6(OP_LW, 6, 5, 0);    // read RxDATA
    p[VEC_IRQ + 4] = enc_i6(OP_SW, 6, 3, -3);
    p[VEC_IRQ + 5] = enc_i9(OP_LI, 6, 1);
    p[VEC_IRQ + 6] = enc_i6(OP_SW, 6, 3, -4);
    // ack_write: acknowledge the byte by writing 1 to RxSTAT (for a UART whose
    // reads have no side effect)
    p[VEC_IRQ + 7] = ack_write ? enc_i6(OP_SW, 6, 5, 1) : enc_i6(OP_ADDI, 0, 0, 0);
    p[VEC_IRQ + 8] = enc_i6(OP_LW, 6, 3, -6);
    p[VEC_IRQ + 9] = enc_i6(OP_LW, 5, 3, -5);
    p[VEC_IRQ + 10] = {OP_RETI, 12'h000};
  endfunction

  // expected value of a data word after the program, -1 if it must be untouched,
  // -2 if any value is acceptable (handler scratch)
  function automatic int expected(word_t a, int n, bit with_uart, int uart_byte);
    word_t s, c;
    s = '0; c = '0;
    for (int i = 0; i < n; i++) begin
      s = s + word_t'(i);
      c = (c << 1) ^ s;
      if (a == BASE + word_t'(i)) return int'(s);
    end
    if (a >= BURST && a < BURST + 16) return n;
    if (a == BASE - 1) return int'(c);
    if (a == BASE - 3 && with_uart) return uart_byte;
    if (a == BASE - 4 && with_uart) return 1;
    if ((a == BASE - 5 || a == BASE - 6) && with_uart) return -2;
    return -1;
  endfunction
endpackage
