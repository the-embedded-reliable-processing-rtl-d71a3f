// tb_sclk_gen -- checks the SCLK step-down: period DIV, high time HIGH, and that
// the fall/rise strobes sit on the first FCLK cycle of each level. Runs the
// defaults (128 / 28) for 20 SCLK periods.
module tb_sclk_gen;
  localparam int DIV = 128, HIGH = 28;
  logic clk = 0, rst_n = 0;
  logic sclk, sclk_fall, sclk_rise;
  int checks = 0, failures = 0;

  sclk_gen #(.DIV(DIV), .HIGH(HIGH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc, last_fall, last_rise, n_fall;
  logic prev;
  initial begin
    last_fall = -1; last_rise = -1; n_fall = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    prev = 1'b0;
    for (cyc = 0; cyc < 20 * DIV; cyc++) begin
      #1;
      // reference: position inside the period
      checks++;
      if (sclk !== ((cyc % DIV) >= DIV - HIGH)) begin failures++; if (failures < 5) $display("cyc %0d sclk %b", cyc, sclk); end
      checks++;
      if (sclk_fall !== ((cyc % DIV) == 0)) failures++;
      checks++;
      if (sclk_rise !== ((cyc % DIV) == DIV - HIGH)) failures++;
      if (sclk_fall) begin
        if (last_fall >= 0) begin checks++; if (cyc - last_fall != DIV) failures++; end
        last_fall = cyc; n_fall++;
      end
      if (sclk_rise) begin
        checks++; if (cyc - last_fall != DIV - HIGH) failures++;
        last_rise = cyc;
      end
      @(negedge clk);
    end
    checks++; if (n_fall != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
