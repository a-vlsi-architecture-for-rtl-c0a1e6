// pn_top: the Physical Node (PN), one chip emulating 64 Connection Nodes.
//
// Dataflow (input to output):
//   BH serial inputs -> deserialiser -> 4-deep input FIFO -> address
//   conversion (per level) -> input control (IDB write, ICF read, CN Update
//   Required pulses) -> update products (2-codons) -> update sum (weights,
//   41-bit sums, firing function) -> output control (compare with last OUT)
//   -> address translation -> 4-deep output FIFO -> network controller
//   (per level) -> BH serial outputs.
// The internal level's output is wired back to its input inside the chip, so
// CNs of one PN can feed each other. All tables (IDB, ICF, 2-codon Products
// Table, 2-codons Used Tables, Weight Tables) are in the external byte-wide
// DRAM, reached only through the memory controller.
// Control: START sets and HALT clears the run state (HALT wins); while halted
// no new packet, CN or broadcast is started, and PIO may access the internal
// registers. HOLD stops all DRAM accesses. `busy` is high while any work is
// queued or in progress (an addition for observing the chip).
// Ports bh_* are indexed 0..2 for BH levels 1..3. The serial framing,
// arbitration wires, PIO data buses and the memory port timing are this
// implementation's choices (see the respective blocks).
module pn_top
  import pn_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 halt,
  input  logic                 hold,
  output logic                 running,
  output logic                 busy,
  // BH levels 1..3
  input  logic [2:0]           bh_rx_bit,
  input  logic [2:0]           bh_rx_frame,
  output logic [2:0]           bh_tx_bit,
  output logic [2:0]           bh_tx_frame,
  output logic [2:0]           bh_tx_req,
  input  logic [2:0]           bh_tx_gnt,
  // external DRAM
  output logic                 mem_cs,
  output logic                 mem_we,
  output logic [MEM_AW-1:0]    mem_addr,
  output logic [DATA_W-1:0]    mem_wdata,
  input  logic [DATA_W-1:0]    mem_rdata,
  // PIO
  input  logic                 pio_req,
  input  logic                 pio_we,
  input  logic [9:0]           pio_addr,
  input  logic [15:0]          pio_wdata,
  output logic [15:0]          pio_rdata,
  output logic                 pio_ack
);
  // ---------------------------------------------------------------- control
  logic run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     run <= 1'b0;
    else if (halt)  run <= 1'b0;
    else if (start) run <= 1'b1;
  end
  assign running = run;

  // ---------------------------------------------------------------- nets
  logic [N_LEVELS-1:0] rx_bit, rx_frame, tx_bit, tx_frame, tx_req, tx_gnt;
  logic [N_LEVELS-1:0] in_empty, in_pop, in_overflow, out_full, out_empty, nc_idle;
  logic [DATA_W-1:0]   in_data [N_LEVELS];
  logic [IDB_AW-1:0]   in_addr [N_LEVELS];
  logic [12:0]         base_rd [N_LEVELS];
  logic [N_LEVELS-1:0] base_we;
  logic [12:0]         base_wdata;

  logic [N_REQ-1:0]    m_req, m_gnt, m_rvalid, m_rlast;
  mem_req_t            m_mreq [N_REQ];
  logic [DATA_W-1:0]   m_rdata;

  logic [N_CN-1:0]     upd_pulse, cn_active, out_avail, out_accepted;
  logic                codon_avail, restart, sum_idle, fire_load;
  logic [CODON_W-1:0]  codon_product;
  logic [SUM_W-1:0]    sum;
  logic [DATA_W-1:0]   out_val, new_out;
  logic                bcast, unchanged;
  logic [CN_W-1:0]     cn_num;
  logic                lo_we;
  logic [CN_W-1:0]     lo_addr;
  logic [DATA_W-1:0]   lo_wdata, lo_rdata;
  logic                ic_idle, up_idle, oc_idle;

  // Internal level loops back on chip; BH levels 1..3 go to the pins.
  assign rx_bit   = {bh_rx_bit, tx_bit[0]};
  assign rx_frame = {bh_rx_frame, tx_frame[0]};
  assign tx_gnt   = {bh_tx_gnt, 1'b1};
  assign bh_tx_bit   = tx_bit[3:1];
  assign bh_tx_frame = tx_frame[3:1];
  assign bh_tx_req   = tx_req[3:1];

  // ---------------------------------------------------------------- per level
  for (genvar l = 0; l < N_LEVELS; l++) begin : g_lvl
    localparam int unsigned PW = LVL_PW[l];
    localparam int unsigned AW = LVL_AW[l];

    logic [PW-1:0] rx_pkt, in_q, out_pkt, out_q;
    logic          rx_valid, frame_err, in_full, out_ovf;

    bh_deserializer #(.W(PW)) u_deser (
      .clk, .rst_n, .rx_bit(rx_bit[l]), .rx_frame(rx_frame[l]),
      .pkt(rx_pkt), .pkt_valid(rx_valid), .frame_err(frame_err)
    );

    packet_fifo #(.W(PW), .DEPTH(4)) u_in_fifo (
      .clk, .rst_n, .push(rx_valid), .wdata(rx_pkt), .pop(in_pop[l]),
      .rdata(in_q), .empty(in_empty[l]), .full(in_full), .overflow(in_overflow[l])
    );

    in_addr_conv #(.AW(AW), .OFFSET(LVL_OFFSET[l])) u_conv (
      .pkt(in_q), .data(in_data[l]), .idb_addr(in_addr[l])
    );

    logic [AW-1:0] base;
    out_addr_translate #(.AW(AW)) u_xlat (
      .clk, .rst_n, .base_we(base_we[l]), .base_wdata(base_wdata[AW-1:0]),
      .base(base), .cn_num(cn_num), .out_val(new_out), .pkt(out_pkt)
    );
    assign base_rd[l] = 13'(base);

    logic out_pop;
    packet_fifo #(.W(PW), .DEPTH(4)) u_out_fifo (
      .clk, .rst_n, .push(bcast), .wdata(out_pkt), .pop(out_pop),
      .rdata(out_q), .empty(out_empty[l]), .full(out_full[l]), .overflow(out_ovf)
    );

    network_controller #(.W(PW)) u_net (
      .clk, .rst_n, .run, .fifo_empty(out_empty[l]), .fifo_data(out_q),
      .fifo_pop(out_pop), .tx_req(tx_req[l]), .tx_gnt(tx_gnt[l]),
      .tx_bit(tx_bit[l]), .tx_frame(tx_frame[l]), .idle(nc_idle[l])
    );
  end

  // ---------------------------------------------------------------- core
  input_control u_in_ctl (
    .clk, .rst_n, .run,
    .fifo_empty(in_empty), .fifo_data(in_data), .fifo_addr(in_addr), .fifo_pop(in_pop),
    .mreq_valid(m_req[REQ_INPUT]), .mreq(m_mreq[REQ_INPUT]), .mgnt(m_gnt[REQ_INPUT]),
    .mrvalid(m_rvalid[REQ_INPUT]), .mrlast(m_rlast[REQ_INPUT]), .mrdata(m_rdata),
    .upd_pulse(upd_pulse), .idle(ic_idle)
  );

  update_products u_prod (
    .clk, .rst_n, .run, .upd_pulse, .sum_idle,
    .mreq_valid(m_req[REQ_PROD]), .mreq(m_mreq[REQ_PROD]), .mgnt(m_gnt[REQ_PROD]),
    .mrvalid(m_rvalid[REQ_PROD]), .mrlast(m_rlast[REQ_PROD]), .mrdata(m_rdata),
    .cn_active, .codon_avail, .codon_product, .restart, .idle(up_idle)
  );

  update_sum u_sum (
    .clk, .rst_n, .upd_pulse, .cn_active, .codon_avail, .codon_product,
    .mreq_valid(m_req[REQ_SUM]), .mreq(m_mreq[REQ_SUM]), .mgnt(m_gnt[REQ_SUM]),
    .mrvalid(m_rvalid[REQ_SUM]), .mrlast(m_rlast[REQ_SUM]), .mrdata(m_rdata),
    .out_avail, .out_accepted, .fire_load, .sum, .sum_idle
  );

  firing_function u_fire (
    .clk, .rst_n, .load(fire_load), .sum, .out(out_val)
  );

  output_control u_out_ctl (
    .clk, .rst_n, .out_avail, .out_val, .out_accepted,
    .fifo_full(out_full), .bcast, .cn_num, .new_out, .unchanged,
    .pio_we(lo_we), .pio_addr(lo_addr), .pio_wdata(lo_wdata), .pio_rdata(lo_rdata),
    .idle(oc_idle)
  );

  emc u_emc (
    .clk, .rst_n, .hold, .req(m_req), .mreq(m_mreq), .gnt(m_gnt),
    .rvalid(m_rvalid), .rlast(m_rlast), .rdata(m_rdata),
    .mem_cs, .mem_we, .mem_addr, .mem_wdata, .mem_rdata
  );

  pio_regs u_pio (
    .clk, .rst_n, .run, .busy,
    .pio_req, .pio_we, .pio_addr, .pio_wdata, .pio_rdata, .pio_ack,
    .lo_we, .lo_addr, .lo_wdata, .lo_rdata,
    .base_we, .base_wdata, .base_rd, .in_overflow
  );

  assign busy = !(ic_idle && up_idle && sum_idle && oc_idle && (out_avail == '0)
                  && (in_empty == '1) && (nc_idle == '1));
endmodule
