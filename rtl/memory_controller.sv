// memory_controller -- commits released stores to DRAM and serves data loads.
//
// At every checkpoint the content of WB2 is handed over in one cycle
// (`commit`, `commit_level`). Those stores can no longer be rolled back, so they
// are held in a commit queue that is not affected by rollbacks, and written to the
// DRAM port one per FCLK cycle in program order. A store whose address lies in the
// I/O window (>= IO_BASE) goes to the I/O port instead. A queue of WB_DEPTH entries
// drains in WB_DEPTH cycles, long before the next checkpoint (one SCLK period).
//
// Loads (`ld_addr`, combinational `ld_data`): I/O addresses are read from the I/O
// port (`io_rd` strobes when `ld_en` is set, so a device can apply its read side
// effect); other addresses are answered by the youngest queued store to that
// address, else by DRAM. The write buffers, which hold younger stores, are
// searched in front of this block. The DRAM is modelled as an array with an
// asynchronous read port and a synchronous write port.
module memory_controller
  import terps_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // checkpoint hand-over from WB2
  input  logic      commit,
  input  wb_level_t commit_level,
  output logic      busy,          // commit queue not yet drained
  // data load port
  input  logic      ld_en,
  input  word_t     ld_addr,
  output word_t     ld_data,
  // DRAM
  output logic      dram_we,
  output word_t     dram_waddr,
  output word_t     dram_wdata,
  output word_t     dram_raddr,
  input  word_t     dram_rdata,
  // memory-mapped I/O
  output logic      io_we,
  output word_t     io_waddr,
  output word_t     io_wdata,
  output logic      io_rd,
  output word_t     io_raddr,
  input  word_t     io_rdata
);
  wb_level_t        q;      // commit queue
  logic [CNT_W-1:0] head;   // next entry to write
  wb_entry_t        cur;
  logic             ld_io;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      head <= '0;
    end else if (commit) begin
      q    <= commit_level;
      head <= '0;
    end else if (busy) begin
      head <= head + 1'b1;
    end
  end

  always_comb begin
    busy       = (head < q.count);
    cur        = q.e[head];
    dram_we    = busy && (cur.addr < IO_BASE);
    dram_waddr = cur.addr;
    dram_wdata = cur.data;

    ld_io      = (ld_addr >= IO_BASE);
    io_we      = busy && (cur.addr >= IO_BASE);
    io_waddr   = cur.addr;
    io_wdata   = cur.data;
    io_rd      = ld_en && ld_io;
    io_raddr   = ld_addr;

    dram_raddr = ld_addr;
    ld_data    = dram_rdata;
    // queued stores not yet written, youngest wins
    for (int i = 0; i < WB_DEPTH; i++) begin
      if (CNT_W'(i) >= head && CNT_W'(i) < q.count && q.e[i].addr == ld_addr)
        ld_data = q.e[i].data;
    end
    if (ld_io) ld_data = io_rdata;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(commit && busy))
    else $error("memory_controller: commit while queue not drained");
endmodule
