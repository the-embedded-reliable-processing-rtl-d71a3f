// checkpoint_latch -- holding register between the fast CPU and the slow safe storage.
//
// At a checkpoint (`cap_cpu`, the FCLK cycle of the SCLK falling edge) it takes
// the core state and WB0/WB1; the safe storage reads it at the following SCLK
// rising edge, so the data stays stable for most of an SCLK period. In the other
// direction, during a rollback it takes the safe storage's output (`cap_ss`, at an
// SCLK rising edge) and presents it to the core and write buffers, which load it
// at the next falling edge. `cap_ss` has priority. Reset clears it.
module checkpoint_latch
  import terps_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cap_cpu,
  input  ckpt_t cpu_d,
  input  logic  cap_ss,
  input  ckpt_t ss_d,
  output ckpt_t q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (cap_ss)  q <= ss_d;
    else if (cap_cpu) q <= cpu_d;
  end
endmodule
