// dram_model -- behavioural model of the system DRAM for simulation only: a
// 64K x 16-bit word array with an asynchronous read port and a synchronous write
// port, as seen by the memory controller. Unwritten words read as zero.
module dram_model (
  input  logic        clk,
  input  logic        we,
  input  logic [15:0] waddr,
  input  logic [15:0] wdata,
  input  logic [15:0] raddr,
  output logic [15:0] rdata
);
  logic [15:0] mem [0:65535];
  initial for (int i = 0; i < 65536; i++) mem[i] = '0;
  always @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = mem[raddr];
endmodule
