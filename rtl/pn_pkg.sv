// pn_pkg: sizes, address maps and shared types of the Physical Node (PN).
//
// A PN emulates 64 Connection Nodes (CNs). Each CN output is
//   out = f( sum_k w_k * in_k1 * in_k2 ),  f = upper 8 bits of the 41-bit sum.
// Inputs arrive over four Broadcast Hierarchy (BH) levels (internal, 1, 2, 3)
// as packets {8-bit data, originator address}; the address field width depends
// on the level (6, 8, 11, 13 bits). Inputs are numbered 1..10560 inside the PN
// by adding a per-level offset (0, 64, 320, 2368). The sizes and offsets are
// the architecture's own; the DRAM layout (region base addresses and element
// sizes) and the byte order are choices of this implementation.
package pn_pkg;

  localparam int unsigned N_CN       = 64;     // CNs per PN
  localparam int unsigned CN_W       = 6;
  localparam int unsigned N_LEVELS   = 4;      // internal, BH1, BH2, BH3
  localparam int unsigned DATA_W     = 8;      // CN value width
  localparam int unsigned IDB_ENTRIES = 10560; // input CNs
  localparam int unsigned IDB_AW     = 14;     // IDB address (1..10560, 0 = none)
  localparam int unsigned PT_ENTRIES = 8192;   // 2-codon Products Table
  localparam int unsigned PT_AW      = 13;     // pointer into the Products Table
  localparam int unsigned UT_ENTRIES = 512;    // 2-codons Used / Weight Table entries per CN
  localparam int unsigned UT_AW      = 9;
  localparam int unsigned CODON_W    = 16;     // 8x8 product
  localparam int unsigned WEIGHT_W   = 16;
  localparam int unsigned SUM_W      = 41;     // 512 sums of 32-bit products
  localparam int unsigned MEM_AW     = 19;     // 4 Mbit byte-addressed DRAM

  // Originator address width per BH level and the packet width {data, address}.
  localparam int unsigned LVL_AW [N_LEVELS] = '{6, 8, 11, 13};
  localparam int unsigned LVL_PW [N_LEVELS] = '{14, 16, 19, 21};
  // Offset added to a level address to number the inputs sequentially.
  localparam int unsigned LVL_OFFSET [N_LEVELS] = '{0, 64, 320, 2368};

  // DRAM regions, selected by the code a requester passes to the memory
  // controller. The controller scales the logical index by the element size
  // (a left shift) and adds the region base.
  typedef enum logic [2:0] {
    RGN_IDB = 3'd0,   // 1 byte per input CN, index = IDB address
    RGN_ICF = 3'd1,   // 8 bytes per input CN (64 flag bits, byte j = CNs 8j..8j+7)
    RGN_PT  = 3'd2,   // 4 bytes per entry: IDBADDR1 (2 bytes LE), IDBADDR2 (2 bytes LE)
    RGN_UT  = 3'd3,   // 2 bytes per entry (13-bit pointer LE), index = cn*512 + k
    RGN_WT  = 3'd4    // 2 bytes per entry (16-bit weight LE), index = cn*512 + k
  } region_e;

  localparam logic [MEM_AW-1:0] RGN_BASE [8] = '{
    19'h00000,  // IDB : 10561 bytes
    19'h04000,  // ICF : 84488 bytes
    19'h20000,  // PT  : 32768 bytes
    19'h28000,  // UT  : 65536 bytes
    19'h38000,  // WT  : 65536 bytes
    19'h00000, 19'h00000, 19'h00000  // unused codes
  };
  localparam int unsigned RGN_SHIFT [8] = '{0, 3, 2, 1, 1, 0, 0, 0};

  localparam int unsigned IDX_W  = 16;  // logical index passed to the controller
  localparam int unsigned CNT_W  = 4;   // bytes per block transfer (1..8)

  // One request to the external memory controller: `cnt` bytes (block
  // transfer) starting at element `idx` of region `code`. Writes carry one byte.
  typedef struct packed {
    logic [2:0]        code;
    logic [IDX_W-1:0]  idx;
    logic [CNT_W-1:0]  cnt;
    logic              we;
    logic [DATA_W-1:0] wdata;
  } mem_req_t;

  // Requester numbers, in falling priority. The input logic must be able to
  // fetch ICFs while the update logic is busy, so it comes first; the sum logic
  // precedes the products logic so that a weight is always fetched before the
  // next 2-codon can be strobed.
  localparam int unsigned REQ_INPUT = 0;
  localparam int unsigned REQ_SUM   = 1;
  localparam int unsigned REQ_PROD  = 2;
  localparam int unsigned N_REQ     = 3;

  // Byte address of element `idx` in region `code`.
  function automatic logic [MEM_AW-1:0] mem_addr_of(input logic [2:0] code,
                                                    input logic [IDX_W-1:0] idx);
    logic [MEM_AW-1:0] off;
    off = MEM_AW'(idx) << RGN_SHIFT[code];
    return RGN_BASE[code] + off;
  endfunction

  // Firing function: binary division, the upper eight bits of the sum.
  function automatic logic [DATA_W-1:0] fire(input logic [SUM_W-1:0] s);
    return s[SUM_W-1 -: DATA_W];
  endfunction

endpackage
