// emc: the PN's centralised External Memory Controller.
//
// Every DRAM access of the PN goes through this block. A requester names a
// region code, a logical element index and a byte count; the controller looks
// up the region's base address, scales the index by the region's element size
// (a left shift, the "barrel shifter" of the architecture) and adds the base.
// It then runs a block transfer of `cnt` consecutive bytes, one byte per clock,
// with automatic address increment and count decrement. Requests are served
// whole, in fixed priority (requester 0 first); HOLD stops all DRAM accesses,
// also in the middle of a block, so that another master can use the DRAM.
//
// Timing: the first byte is issued in the cycle the request is granted (`gnt`
// pulses then). For reads, `rvalid` marks each cycle whose byte is on `rdata`,
// `rlast` the final one. The DRAM port is byte-wide with the read data valid in
// the same cycle as the address (a 100 ns DRAM cycle equal to the clock, as the
// architecture's performance estimates assume). Writes are single-byte.
// The RAS/CAS address multiplexing and refresh of a real DRAM are left outside:
// the architecture gives refresh to the board's I/O controller.
module emc
  import pn_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hold,
  input  logic [N_REQ-1:0]     req,
  input  mem_req_t             mreq [N_REQ],
  output logic [N_REQ-1:0]     gnt,
  output logic [N_REQ-1:0]     rvalid,
  output logic [N_REQ-1:0]     rlast,
  output logic [DATA_W-1:0]    rdata,
  // byte-wide DRAM port
  output logic                 mem_cs,
  output logic                 mem_we,
  output logic [MEM_AW-1:0]    mem_addr,
  output logic [DATA_W-1:0]    mem_wdata,
  input  logic [DATA_W-1:0]    mem_rdata
);
  localparam int unsigned OW = $clog2(N_REQ);

  logic [CNT_W-1:0]  remain_q;   // bytes still to issue in the current block
  logic [MEM_AW-1:0] addr_q;
  logic [OW-1:0]     owner_q;
  logic              we_q;
  logic [DATA_W-1:0] wdata_q;

  logic              busy, start;
  logic [OW-1:0]     sel;

  assign busy = (remain_q != '0);

  always_comb begin
    sel = '0;
    for (int i = N_REQ - 1; i >= 0; i--) if (req[i]) sel = OW'(i);
  end

  assign start = !busy && !hold && (req != '0);

  always_comb begin
    gnt       = '0;
    rvalid    = '0;
    rlast     = '0;
    mem_cs    = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    if (busy && !hold) begin
      mem_cs           = 1'b1;
      mem_we           = we_q;
      mem_addr         = addr_q;
      mem_wdata        = wdata_q;
      rvalid[owner_q]  = !we_q;
      rlast[owner_q]   = (remain_q == CNT_W'(1));
    end else if (start) begin
      mem_cs           = 1'b1;
      mem_we           = mreq[sel].we;
      mem_addr         = mem_addr_of(mreq[sel].code, mreq[sel].idx);
      mem_wdata        = mreq[sel].wdata;
      gnt[sel]         = 1'b1;
      rvalid[sel]      = !mreq[sel].we;
      rlast[sel]       = (mreq[sel].cnt == CNT_W'(1));
    end
  end

  assign rdata = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain_q <= '0;
      addr_q   <= '0;
      owner_q  <= '0;
      we_q     <= 1'b0;
      wdata_q  <= '0;
    end else if (busy) begin
      if (!hold) begin
        remain_q <= remain_q - 1'b1;
        addr_q   <= addr_q + 1'b1;
      end
    end else if (start) begin
      remain_q <= mreq[sel].cnt - 1'b1;
      addr_q   <= mem_addr + 1'b1;
      owner_q  <= sel;
      we_q     <= mreq[sel].we;
      wdata_q  <= mreq[sel].wdata;
    end
  end

  // Block transfers are at least one byte long; writes are single bytes.
  for (genvar i = 0; i < N_REQ; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     req[i] |-> (mreq[i].cnt != '0) && (!mreq[i].we || mreq[i].cnt == CNT_W'(1)))
      else $error("emc: malformed request from requester %0d", i);
  end
endmodule
