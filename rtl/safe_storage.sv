// safe_storage -- the two-bank checkpoint memory (SSA = bank 0, SSB = bank 1).
//
// Each bank holds one complete checkpoint (core PC, registers and control
// registers, WB0, WB1).
// A write (`we`, at an SCLK rising edge) stores `wdata` into bank `wsel`; the
// other bank is left alone, so the two most recent checkpoints are always held
// and one of them is known to be uncorrupted. Reading is asynchronous from bank
// `rsel` and is gated by the active-low output enable `oe_n` (the output is zero
// while it is high). Reset puts the reset state (all zeros: PC 0, registers 0,
// empty buffers) into both banks, so a rollback before the first checkpoint
// restarts the program. In the prototype this is a separate chip built in an older
// process for EMI tolerance; here it is plain storage and only its logical
// behaviour is modelled.
module safe_storage
  import terps_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  logic  wsel,
  input  ckpt_t wdata,
  input  logic  rsel,
  input  logic  oe_n,
  output ckpt_t rdata
);
  ckpt_t bank [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank[0] <= '0;
      bank[1] <= '0;
    end else if (we) begin
      bank[wsel] <= wdata;
    end
  end

  assign rdata = oe_n ? '0 : bank[rsel];
endmodule
