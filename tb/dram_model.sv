// dram_model: behavioural model of the PN's external 4 Mbit byte-wide DRAM.
//
// Not synthesizable logic of the PN: it stands in for the commercial memory
// chip. 2^19 bytes; a write happens at the clock edge when cs and we are high;
// read data follow the address combinationally (one access per 100 ns clock,
// as assumed for the PN's memory port). Testbenches load and inspect the
// array `mem` directly. Refresh is not modelled.
module dram_model #(
  parameter int unsigned AW = 19
) (
  input  logic          clk,
  input  logic          cs,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);
  logic [7:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 8'h00;

  assign rdata = mem[addr];

  always @(posedge clk) if (cs && we) mem[addr] <= wdata;
endmodule
