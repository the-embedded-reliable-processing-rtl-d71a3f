// tb_write_buffer -- fills a level with random stores (with repeated addresses),
// checks the youngest-match lookup against a reference queue, the full flag at
// 12 entries, refusal of a 13th push, whole-level load and clear.
module tb_write_buffer;
  import terps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic push, load, clear, full, hit;
  wb_entry_t push_entry;
  wb_level_t load_level, level;
  word_t lookup_addr, hit_data;
  int checks = 0, failures = 0;

  write_buffer dut (.*);
  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  wb_entry_t ref_q[$];

  task automatic check_lookup(word_t a);
    logic rh; word_t rd;
    rh = 0; rd = '0;
    foreach (ref_q[i]) if (ref_q[i].addr == a) begin rh = 1; rd = ref_q[i].data; end
    lookup_addr = a;
    #1;
    checks++;
    if (hit !== rh || (rh && hit_data !== rd)) begin
      failures++;
      $display("lookup %h: hit %b/%b data %h/%h", a, hit, rh, hit_data, rd);
    end
  endtask

  initial begin
    push = 0; load = 0; clear = 0; push_entry = '0; load_level = '0; lookup_addr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      ref_q.delete();
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      for (int k = 0; k < WB_DEPTH + 2; k++) begin
        push_entry.addr = word_t'($urandom_range(0, 7));
        push_entry.data = word_t'($urandom);
        push = 1;
        @(negedge clk);
        if (ref_q.size() < WB_DEPTH) ref_q.push_back(push_entry);
        push = 0;
        checks++;
        if (full !== (ref_q.size() == WB_DEPTH)) failures++;
        for (int a = 0; a < 9; a++) check_lookup(word_t'(a));
        if (failures > 0 && failures < 3) $display("count %0d ref %0d", level.count, ref_q.size());
      end
      checks++; if (int'(level.count) != WB_DEPTH) failures++;
      // level contents in order
      foreach (ref_q[i]) begin checks++; if (level.e[i] !== ref_q[i]) failures++; end
    end
    // whole-level load
    load_level = '0;
    load_level.count = 3;
    for (int i = 0; i < 3; i++) begin load_level.e[i].addr = word_t'(100 + i); load_level.e[i].data = word_t'(i * 7 + 1); end
    load = 1; @(negedge clk); load = 0;
    ref_q.delete();
    for (int i = 0; i < 3; i++) ref_q.push_back(load_level.e[i]);
    for (int a = 99; a < 104; a++) check_lookup(word_t'(a));
    checks++; if (full !== 1'b0) failures++;
    clear = 1; @(negedge clk); clear = 0;
    ref_q.delete();
    check_lookup(word_t'(100));
    checks++; if (level.count !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
