// sclk_gen -- step-down circuit that derives the slow checkpoint clock SCLK from FCLK.
//
// One SCLK period spans DIV FCLK cycles (128 in the prototype). SCLK is low for
// DIV-HIGH cycles and high for HIGH cycles. The falling edge of SCLK is the
// checkpoint instant and the rising edge is the EMI decision / safe-storage write
// instant. Everything in this implementation runs on FCLK, so the edges are also
// given as one-cycle strobes:
//   sclk_fall - high in the FCLK cycle in which SCLK goes low (checkpoint)
//   sclk_rise - high in the FCLK cycle in which SCLK goes high (decision)
// The 128:1 ratio is the prototype's. HIGH = 28 is this design's reading of the
// quoted times: a falling edge to the third rising edge is 356 cycles, i.e.
// 2*128 + (128-28), and a rollback (rising edge to the falling edge one period
// later) is 128 + 28 = 156 cycles. After reset the counter starts at the first
// cycle of a low phase.
module sclk_gen #(
  parameter int unsigned DIV  = 128,
  parameter int unsigned HIGH = 28
) (
  input  logic clk,
  input  logic rst_n,
  output logic sclk,
  output logic sclk_fall,
  output logic sclk_rise
);
  localparam int unsigned W   = $clog2(DIV);
  localparam int unsigned LOW = DIV - HIGH;

  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    cnt <= '0;
    else if (cnt == W'(DIV - 1))   cnt <= '0;
    else                           cnt <= cnt + 1'b1;
  end

  // strobes mark the cycle at which the new level begins
  always_comb begin
    sclk      = (cnt >= W'(LOW));
    sclk_fall = (cnt == '0);
    sclk_rise = (cnt == W'(LOW));
  end

  initial begin
    assert (HIGH > 0 && HIGH < DIV) else $error("sclk_gen: HIGH must lie in 1..DIV-1");
  end
endmodule
