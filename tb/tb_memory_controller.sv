// tb_memory_controller -- hands random WB2 levels (memory and I/O stores, repeated
// addresses) to the controller, with a DRAM array model behind it. Checks that
// the stores reach DRAM / the I/O port in program order, one per cycle, within
// WB_DEPTH cycles, and that loads see queued stores (youngest first), DRAM data
// otherwise, and the I/O port for the I/O window with a read strobe.
module tb_memory_controller;
  import terps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic commit, busy, ld_en, dram_we, io_we, io_rd;
  wb_level_t commit_level;
  word_t ld_addr, ld_data, dram_waddr, dram_wdata, dram_raddr, dram_rdata;
  word_t io_waddr, io_wdata, io_raddr, io_rdata;
  int checks = 0, failures = 0;
  word_t dram [0:63];
  word_t ref_mem [0:63];

  memory_controller dut (.*);
  always #50 clk = ~clk;
  assign dram_rdata = dram[dram_raddr[5:0]];
  assign io_rdata   = io_raddr ^ 16'h5a5a;
  always_ff @(posedge clk) if (dram_we) dram[dram_waddr[5:0]] <= dram_wdata;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wb_entry_t exp_q[$];
  int cyc_commit;

  // order of the writes leaving the controller
  always @(posedge clk) if (rst_n && (dram_we || io_we)) begin
    wb_entry_t e;
    checks++;
    if (exp_q.size() == 0) failures++;
    else begin
      e = exp_q.pop_front();
      if (dram_we && (e.addr !== dram_waddr || e.data !== dram_wdata)) failures++;
      if (io_we && (e.addr !== io_waddr || e.data !== io_wdata || e.addr < IO_BASE)) failures++;
    end
  end

  initial begin
    commit = 0; commit_level = '0; ld_en = 0; ld_addr = '0;
    for (int i = 0; i < 64; i++) begin dram[i] = word_t'(i * 3); ref_mem[i] = word_t'(i * 3); end
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      int n;
      @(negedge clk);
      n = $urandom_range(0, WB_DEPTH);
      commit_level = '0;
      commit_level.count = CNT_W'(n);
      for (int i = 0; i < n; i++) begin
        commit_level.e[i].addr = ($urandom_range(0, 7) == 0) ? (IO_BASE + word_t'($urandom_range(0, 3)))
                                                             : word_t'($urandom_range(0, 15));
        commit_level.e[i].data = word_t'($urandom);
        exp_q.push_back(commit_level.e[i]);
      end
      commit = 1;
      @(negedge clk);
      commit = 0;
      // loads while the queue drains: expected = youngest queued store, else DRAM
      for (int k = 0; k < WB_DEPTH + 2; k++) begin
        word_t a, e;
        a = word_t'($urandom_range(0, 15));
        ld_addr = a; ld_en = 1;
        #1;
        e = dram[a[5:0]];
        foreach (exp_q[j]) if (exp_q[j].addr == a) e = exp_q[j].data;
        checks++; if (ld_data !== e) begin failures++; $display("load %h got %h exp %h", a, ld_data, e); end
        ld_addr = IO_BASE + 16'd1; #1;
        checks++; if (ld_data !== ((IO_BASE + 16'd1) ^ 16'h5a5a) || !io_rd) failures++;
        ld_en = 0;
        @(negedge clk);
      end
      checks++; if (busy || exp_q.size() != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
