// tb_checkpoint_latch -- random captures from the CPU side and the safe-storage
// side, checking hold, capture and the priority of the safe-storage side.
module tb_checkpoint_latch;
  import terps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cap_cpu, cap_ss;
  ckpt_t cpu_d, ss_d, q, exp_q;
  int checks = 0, failures = 0;

  checkpoint_latch dut (.*);
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
    cap_cpu = 0; cap_ss = 0; cpu_d = '0; ss_d = '0;
    repeat (2) @(posedge clk);
    #1; checks++; if (q !== '0) failures++;
    @(negedge clk); rst_n = 1;
    exp_q = '0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      cpu_d = rnd(); ss_d = rnd();
      cap_cpu = ($urandom_range(0, 2) == 0);
      cap_ss  = ($urandom_range(0, 3) == 0);
      @(negedge clk);
      if (cap_ss) exp_q = ss_d; else if (cap_cpu) exp_q = cpu_d;
      cap_cpu = 0; cap_ss = 0;
      checks++;
      if (q !== exp_q) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
