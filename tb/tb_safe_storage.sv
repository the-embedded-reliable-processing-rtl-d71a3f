// tb_safe_storage -- random writes to the two banks against a reference pair,
// reads from both banks, output gating by oe_n and the reset state.
module tb_safe_storage;
  import terps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we, wsel, rsel, oe_n;
  ckpt_t wdata, rdata;
  ckpt_t ref_b [2];
  int checks = 0, failures = 0;

  safe_storage dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ckpt_t rnd();
    ckpt_t c;
    for (int i = 0; i < $bits(ckpt_t); i += 32) c[i +: 32] = $urandom;
    return c;
  endfunction

  initial begin
    we = 0; wsel = 0; rsel = 0; oe_n = 0; wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    ref_b[0] = '0; ref_b[1] = '0;
    for (int r = 0; r < 2; r++) begin
      rsel = r[0]; #1; checks++; if (rdata !== '0) failures++;
    end
    for (int k = 0; k < 400; k++) begin
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      wsel = $urandom_range(0, 1);
      wdata = rnd();
      @(negedge clk);
      if (we) ref_b[wsel] = wdata;
      we = 0;
      for (int r = 0; r < 2; r++) begin
        rsel = r[0]; oe_n = 0; #1;
        checks++; if (rdata !== ref_b[r]) failures++;
        oe_n = 1; #1;
        checks++; if (rdata !== '0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
