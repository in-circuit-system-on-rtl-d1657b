// sram_model: behavioural model of one synchronous SRAM chip of the
// acquisition memory (W bits x 2**AW words), for simulation only.
//
// A write (we high) stores wdata at addr on the rising clock edge. The word
// at addr is returned on rdata after the same edge (read-before-write), so
// read data is valid one cycle after the address. Contents start at zero.
module sram_model #(
  parameter int unsigned AW = 18,
  parameter int unsigned W  = 32
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    rdata = '0;
  end

  always @(posedge clk) begin
    rdata <= mem[addr];
    if (we) mem[addr] <= wdata;
  end
endmodule
