// tb_terps_intervals -- the TERPS system at other checkpoint intervals: DIV =
// 64, 256 and 512 FCLK cycles per SCLK cycle, with the SCLK high phase scaled
// in proportion to the default 28 of 128 (14, 56, 112). The three systems run
// side by side, each with its own program memory and DRAM model.
//
// Each runs the shared test program (without the UART phase). One EMI event is
// reported at cycle 700. Checks per system: HALT is reached, the DRAM image is
// exact, the rollback takes DIV + HIGH cycles, and checkpoints come every DIV
// cycles outside the rollback. Also reported: the cycle count, and the share of
// cycles lost to checkpoint freezes and a full WB0, counted until the EMI
// event. Intervals are the document's; the high phases and the program are this
// testbench's.
module tb_terps_intervals;
  import terps_pkg::*;
  import tb_prog_pkg::*;
  localparam int N = 40;
  localparam int NI = 3;
  localparam int DIVS  [NI] = '{64, 256, 512};
  localparam int HIGHS [NI] = '{14, 56, 112};
  localparam int EMI_AT = 700;

  logic clk = 0, rst_n = 0, sensor_in = 0;
  int checks = 0, failures = 0;
  int cyc = 0;
  word_t prog [PROG_LEN];

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) cyc++;

  logic [NI-1:0] done;
  int halt_at [NI];
  int lost    [NI];

  for (genvar g = 0; g < NI; g++) begin : g_sys
    word_t imem_addr, imem_data, dram_waddr, dram_wdata, dram_raddr, dram_rdata;
    logic  dram_we, sclk, ckpt, rmode, det_r, ss_sel, ss_we, restore, rollback_start;
    logic  wb_stall, retire, halted, uart_irq, uart_frame, trap_taken, trap_rb;
    int    rb_t0, last_ckpt;
    logic  in_rb;

    terps_top #(.DIV(DIVS[g]), .SCLK_HIGH(HIGHS[g])) dut (
      .clk, .rst_n, .sensor_in, .serial_in(1'b1),
      .imem_addr, .imem_data,
      .dram_we, .dram_waddr, .dram_wdata, .dram_raddr, .dram_rdata,
      .sclk, .ckpt, .rmode, .det_r, .ss_sel, .ss_we, .restore, .rollback_start,
      .wb_stall, .retire, .halted, .uart_irq, .uart_frame, .trap_taken, .trap_rb
    );
    dram_model u_dram (.clk, .we(dram_we), .waddr(dram_waddr), .wdata(dram_wdata),
                       .raddr(dram_raddr), .rdata(dram_rdata));
    assign imem_data = (int'(imem_addr) < PROG_LEN) ? prog[imem_addr[7:0]] : {OP_HALT, 12'h000};

    initial begin
      done[g] = 0; halt_at[g] = -1; lost[g] = 0; in_rb = 0; last_ckpt = -1; rb_t0 = 0;
    end

    always @(posedge clk) if (rst_n) begin
      if (ckpt && !halted && cyc < EMI_AT) lost[g]++;
      if (wb_stall && cyc < EMI_AT) lost[g]++;
      if (ckpt) begin
        if (last_ckpt >= 0 && !in_rb) begin
          checks++;
          if (cyc - last_ckpt != DIVS[g]) begin
            failures++; $display("DIV=%0d: checkpoint spacing %0d", DIVS[g], cyc - last_ckpt);
          end
        end
        last_ckpt = cyc;
      end
      if (rollback_start) begin in_rb = 1; rb_t0 = cyc; end
      if (restore) begin
        in_rb = 0; last_ckpt = -1;
        checks++;
        if (cyc - rb_t0 != DIVS[g] + HIGHS[g]) begin
          failures++; $display("DIV=%0d: rollback took %0d cycles", DIVS[g], cyc - rb_t0);
        end
      end
      if (halted && !rmode && !det_r && halt_at[g] < 0) halt_at[g] = cyc;
    end
  end

  // DRAM images, read through the generate scopes
  function automatic word_t dram_word(int g, int a);
    case (g)
      0:       return g_sys[0].u_dram.mem[a];
      1:       return g_sys[1].u_dram.mem[a];
      default: return g_sys[2].u_dram.mem[a];
    endcase
  endfunction

  initial begin
    build(prog, N, 1'b0);
    for (int a = 0; a < 65536; a++) begin
      g_sys[0].u_dram.mem[a] = '0; g_sys[1].u_dram.mem[a] = '0; g_sys[2].u_dram.mem[a] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (cyc < EMI_AT) @(negedge clk);
    sensor_in = 1; @(negedge clk); sensor_in = 0;
    while (!(halt_at[0] >= 0 && halt_at[1] >= 0 && halt_at[2] >= 0) && cyc < 50000) @(negedge clk);
    repeat (4 * 512) @(negedge clk);   // drain WB1, WB2 and the controller at the longest interval
    for (int g = 0; g < NI; g++) begin
      int bad;
      bad = 0;
      checks++;
      if (halt_at[g] < 0) begin failures++; $display("DIV=%0d: no HALT", DIVS[g]); end
      for (int a = 16'h0FF0; a < 16'h2020; a++) begin
        int e;
        e = expected(word_t'(a), N, 1'b0, 0);
        checks++;
        if (dram_word(g, a) !== ((e < 0) ? 16'h0000 : word_t'(e))) begin
          failures++; bad++;
          if (bad < 4) $display("DIV=%0d: dram[%h] = %h, expected %0d", DIVS[g], a, dram_word(g, a), e);
        end
      end
      $display("DIV=%0d: HALT after %0d cycles with one rollback; %0.1f%% of the first %0d cycles lost to checkpoints and a full WB0",
               DIVS[g], halt_at[g], 100.0 * real'(lost[g]) / real'(EMI_AT), EMI_AT);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
