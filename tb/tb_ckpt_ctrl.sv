// tb_ckpt_ctrl -- drives the controller with SCLK strobes (128-cycle period, 28
// high) and random EMI pulses. A reference model numbers every checkpoint and
// tracks which one is guaranteed good (written to safe storage and followed by a
// further clean write) and which one is speculative; on each rollback the bank the
// controller reads must hold the good one. Also checked: one-cycle checkpoint
// strobes only outside rollbacks, hold during the whole rollback, the rollback
// latency of DIV + HIGH cycles from the EMI decision to restore, restarts when EMI
// hits during a rollback, and alternating bank writes.
module tb_ckpt_ctrl;
  localparam int DIV = 128, HIGH = 28;
  logic clk = 0, rst_n = 0;
  logic sclk_fall, sclk_rise, sensor_in;
  logic ckpt, hold, rmode, det_r, ss_we, ss_wsel, ss_rsel, ss_oe_n, latch_from_ss, restore, rollback_start;
  int checks = 0, failures = 0;

  ckpt_ctrl dut (.*);
  always #5 clk = ~clk;

  localparam int NCYC = 400 * DIV;
  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  int ckpt_id, latch_id, bank_id [2], good_id, spec_id, pending_restore;
  int rb_t0, n_rb, n_restart, n_restore, n_write, n_ckpt, last_wsel;
  logic in_rb;

  initial begin
    sensor_in = 0; sclk_fall = 0; sclk_rise = 0;
    ckpt_id = 0; latch_id = -1; bank_id[0] = 0; bank_id[1] = 0;
    good_id = 0; spec_id = -1; pending_restore = -1;
    n_rb = 0; n_restart = 0; n_restore = 0; n_write = 0; n_ckpt = 0; last_wsel = -1;
    in_rb = 0; rb_t0 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      @(negedge clk);
      sclk_fall = (cyc % DIV) == 0;
      sclk_rise = (cyc % DIV) == DIV - HIGH;
      // EMI: rare random pulses, more often in some stretches
      sensor_in = ($urandom_range(0, ((cyc / (40 * DIV)) % 2 == 0) ? 900 : 150) == 0);
      #1;
      // reference decisions, evaluated on the values of this cycle
      checks++;
      if (ckpt !== (sclk_fall && !in_rb)) begin failures++; $display("%0d ckpt mismatch", cyc); end
      if (ckpt) begin ckpt_id++; latch_id = ckpt_id; n_ckpt++; end
      if (ss_we) begin
        n_write++;
        checks++; if (latch_id < 0) begin failures++; $display("%0d write without checkpoint", cyc); end
        checks++; if (last_wsel >= 0 && ss_wsel == last_wsel[0]) begin failures++; $display("%0d same bank", cyc); end
        last_wsel = ss_wsel;
        bank_id[ss_wsel] = latch_id;
        if (spec_id >= 0) good_id = spec_id;
        spec_id = latch_id;
      end
      if (rollback_start) begin
        if (in_rb) n_restart++; else n_rb++;
        in_rb = 1; rb_t0 = cyc;
        latch_id = -1;
      end
      if (in_rb) begin checks++; if (!hold) begin failures++; $display("%0d no hold", cyc); end end
      if (latch_from_ss) begin
        checks++;
        if (bank_id[ss_rsel] != good_id) begin
          failures++; $display("%0d restore reads id %0d, expected %0d", cyc, bank_id[ss_rsel], good_id);
        end
        checks++; if (ss_oe_n) failures++;
      end
      if (restore) begin
        n_restore++;
        checks++;
        if (cyc - rb_t0 != DIV + HIGH) begin failures++; $display("rollback latency %0d", cyc - rb_t0); end
        in_rb = 0; spec_id = -1; last_wsel = -1;
      end
    end
    $display("checkpoints=%0d writes=%0d rollbacks=%0d restarts=%0d restores=%0d", n_ckpt, n_write, n_rb, n_restart, n_restore);
    checks++; if (n_rb < 5 || n_restart < 1 || n_restore < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
