// out_addr_translate: Address Translation Logic of one BH level.
//
// Holds the level's BH base address in a dedicated register, loaded over PIO
// during initialisation, and forms the originator address of an outgoing
// packet as base + internal CN number, truncated to the level's address width
// (6, 8, 11 or 13 bits). The packet {OUT, address} goes to the level's output
// FIFO. The register resets to 0 (this implementation's choice).
module out_addr_translate
  import pn_pkg::*;
#(
  parameter int unsigned AW = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              base_we,
  input  logic [AW-1:0]     base_wdata,
  output logic [AW-1:0]     base,
  input  logic [CN_W-1:0]   cn_num,
  input  logic [DATA_W-1:0] out_val,
  output logic [DATA_W+AW-1:0] pkt
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       base <= '0;
    else if (base_we) base <= base_wdata;
  end

  logic [AW-1:0] addr;
  assign addr = base + AW'(cn_num);
  assign pkt  = {out_val, addr};
endmodule
