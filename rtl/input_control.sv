// input_control: the Input Control Logic of the PN.
//
// Serves the four BH level input FIFOs (internal, BH1..BH3) in round-robin
// order; the order is this implementation's choice. For every packet, which
// already carries its internal IDB address, it
//   1. writes the data byte into the Input Data Buffer (IDB) in DRAM,
//   2. reads the input's 64-bit Input Contributor Flags (ICF, 8 bytes),
//   3. pulses CN Update Required for every CN whose ICF bit is set.
// That is nine DRAM bytes per input, as in the architecture's estimate.
// Timing: one cycle to take the packet, one write cycle and eight read cycles
// when the memory controller is free (the input logic has top priority), then
// upd_pulse is high for exactly one cycle. New packets are taken only while the
// PN runs (START given, no HALT).
module input_control
  import pn_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  // from the level FIFOs, after address conversion
  input  logic [N_LEVELS-1:0]  fifo_empty,
  input  logic [DATA_W-1:0]    fifo_data [N_LEVELS],
  input  logic [IDB_AW-1:0]    fifo_addr [N_LEVELS],
  output logic [N_LEVELS-1:0]  fifo_pop,
  // memory controller port
  output logic                 mreq_valid,
  output mem_req_t             mreq,
  input  logic                 mgnt,
  input  logic                 mrvalid,
  input  logic                 mrlast,
  input  logic [DATA_W-1:0]    mrdata,
  // CN Update Required, one-cycle pulse per input
  output logic [N_CN-1:0]      upd_pulse,
  output logic                 idle
);
  typedef enum logic [1:0] {S_IDLE, S_WRITE, S_ICF} state_e;

  localparam int unsigned LW = $clog2(N_LEVELS);

  state_e              state;
  logic [LW-1:0]       rr;          // level served first in the next round
  logic [DATA_W-1:0]   data_q;
  logic [IDB_AW-1:0]   addr_q;
  logic [2:0]          byte_q;
  logic [N_CN-1:0]     icf_q;
  logic                pick_ok;
  logic                icf_started; // ICF block transfer granted
  logic [LW-1:0]       pick;

  // Round-robin choice among the non-empty FIFOs, starting at `rr`.
  always_comb begin
    pick_ok = 1'b0;
    pick    = '0;
    for (int j = N_LEVELS - 1; j >= 0; j--) begin
      if (!fifo_empty[LW'(32'(rr) + j)]) begin
        pick_ok = 1'b1;
        pick    = LW'(32'(rr) + j);
      end
    end
  end

  always_comb begin
    fifo_pop = '0;
    if (state == S_IDLE && run && pick_ok) fifo_pop[pick] = 1'b1;
  end

  always_comb begin
    mreq_valid = (state == S_WRITE) || (state == S_ICF && !icf_started);
    mreq       = '0;
    mreq.idx   = IDX_W'(addr_q);
    if (state == S_WRITE) begin
      mreq.code  = RGN_IDB;
      mreq.cnt   = CNT_W'(1);
      mreq.we    = 1'b1;
      mreq.wdata = data_q;
    end else begin
      mreq.code  = RGN_ICF;
      mreq.cnt   = CNT_W'(8);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      rr          <= '0;
      data_q      <= '0;
      addr_q      <= '0;
      byte_q      <= '0;
      icf_q       <= '0;
      icf_started <= 1'b0;
      upd_pulse   <= '0;
    end else begin
      upd_pulse <= '0;
      unique case (state)
        S_IDLE: if (run && pick_ok) begin
          data_q <= fifo_data[pick];
          addr_q <= fifo_addr[pick];
          rr     <= pick + 1'b1;
          state  <= S_WRITE;
        end
        S_WRITE: if (mgnt) begin
          byte_q      <= '0;
          icf_started <= 1'b0;
          state       <= S_ICF;
        end
        S_ICF: begin
          if (mgnt) icf_started <= 1'b1;
          if (mrvalid) begin
            icf_q[8*byte_q +: 8] <= mrdata;
            byte_q               <= byte_q + 1'b1;
            if (mrlast) begin
              upd_pulse <= {mrdata, icf_q[N_CN-9:0]};
              state     <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign idle = (state == S_IDLE);
endmodule
