// write_buffer -- one level of the multi-phase store commit buffer (WB0, WB1 or WB2).
//
// Stores are appended in program order (entry 0 is the oldest). At every
// checkpoint the whole level is replaced at once by the contents of the level
// below it (`load`), which is how buffered stores are promoted WB0 -> WB1 -> WB2;
// WB0 is instead cleared. A rollback loads WB0 and WB1 from the safe storage and
// clears WB2 the same way. The level is also searched by address for loads; the
// youngest matching entry wins (`hit`, `hit_data`, combinational).
// When `full` is set a new store cannot enter; the core then stalls until the next
// checkpoint empties the level. Push and load/clear in one cycle are illegal.
// The promotion scheme and the 12-entry size follow the prototype; the flat
// parallel copy and the address search are this design's choices.
module write_buffer
  import terps_pkg::*;
#(
  parameter int unsigned DEPTH = WB_DEPTH
) (
  input  logic       clk,
  input  logic       rst_n,
  // append one store
  input  logic       push,
  input  wb_entry_t  push_entry,
  output logic       full,
  // replace the whole level (promotion or reload), or empty it
  input  logic       load,
  input  wb_level_t  load_level,
  input  logic       clear,
  output wb_level_t  level,
  // load lookup
  input  word_t      lookup_addr,
  output logic       hit,
  output word_t      hit_data
);
  initial begin
    assert (DEPTH == WB_DEPTH) else $error("write_buffer: DEPTH must equal WB_DEPTH of the package");
  end

  wb_level_t q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (clear) begin
      q <= '0;
    end else if (load) begin
      q <= load_level;
    end else if (push && !full) begin
      q.e[q.count] <= push_entry;
      q.count      <= q.count + 1'b1;
    end
  end

  always_comb begin
    level    = q;
    full     = (q.count == CNT_W'(DEPTH));
    hit      = 1'b0;
    hit_data = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (CNT_W'(i) < q.count && q.e[i].addr == lookup_addr) begin
        hit      = 1'b1;
        hit_data = q.e[i].data;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && (load || clear)))
    else $error("write_buffer: push during load/clear");
endmodule
