// in_addr_conv: Internal Address Conversion Logic of one BH level.
//
// Turns a received packet {data, originator address} into the PN-internal
// form {data, IDB address}. Inputs are numbered 1..10560 inside the PN; the
// architecture obtains that number by adding a level-dependent offset (0, 64,
// 320, 2368 for the internal level and BH levels 1..3) to the level address.
// Level addresses here count from 0, so one is added as well, keeping IDB
// address 0 free as the "no input" marker of the 2-codon Products Table (this
// reading of the numbering is this implementation's choice).
// Purely combinational.
module in_addr_conv
  import pn_pkg::*;
#(
  parameter int unsigned AW     = 6,  // originator address width of the level
  parameter int unsigned OFFSET = 0   // level offset
) (
  input  logic [DATA_W+AW-1:0] pkt,       // {data, level address}
  output logic [DATA_W-1:0]    data,
  output logic [IDB_AW-1:0]    idb_addr
);
  assign data     = pkt[DATA_W+AW-1 -: DATA_W];
  assign idb_addr = IDB_AW'(pkt[AW-1:0]) + IDB_AW'(OFFSET) + IDB_AW'(1);
endmodule
