// pio_regs: Programmed I/O access to the PN's internal registers.
//
// An external master (the board microprocessor or I/O controller) reads and
// writes PN registers through a 10-bit register address, a read/write line and
// a two-wire request/acknowledge handshake, the signal set the architecture
// counts for its PIO pins. Data travels on separate 16-bit buses here (the
// architecture does not say how data crosses the interface).
// Register map (this implementation's):
//   0x000..0x03F  Table of Last OUT Values, CN 0..63 (8 bits, R/W)
//   0x040..0x043  BH base address of the internal level and BH levels 1..3 (R/W)
//   0x044         status: bit 0 running, bit 1 busy (read only)
//   0x045..0x048  dropped input packets of each level, saturating (read only)
// Protocol: the master raises pio_req with address, direction and data; the
// access is made and pio_ack rises (read data valid with it); the master drops
// pio_req, then pio_ack falls. Accesses other than the status read are only
// carried out while the PN is halted; until then pio_ack stays low.
module pio_regs
  import pn_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  logic                 busy,
  input  logic                 pio_req,
  input  logic                 pio_we,
  input  logic [9:0]           pio_addr,
  input  logic [15:0]          pio_wdata,
  output logic [15:0]          pio_rdata,
  output logic                 pio_ack,
  // Table of Last OUT Values
  output logic                 lo_we,
  output logic [CN_W-1:0]      lo_addr,
  output logic [DATA_W-1:0]    lo_wdata,
  input  logic [DATA_W-1:0]    lo_rdata,
  // BH base address registers
  output logic [N_LEVELS-1:0]  base_we,
  output logic [12:0]          base_wdata,
  input  logic [12:0]          base_rd [N_LEVELS],
  // input FIFO overflow pulses
  input  logic [N_LEVELS-1:0]  in_overflow
);
  localparam logic [9:0] A_BASE   = 10'h040;
  localparam logic [9:0] A_STATUS = 10'h044;
  localparam logic [9:0] A_DROP   = 10'h045;

  logic [15:0] drop_cnt [N_LEVELS];
  logic        go;

  assign go         = pio_req && !pio_ack && (!run || (pio_addr == A_STATUS && !pio_we));
  assign lo_addr    = pio_addr[CN_W-1:0];
  assign lo_wdata   = pio_wdata[DATA_W-1:0];
  assign lo_we      = go && pio_we && (pio_addr < 10'h040);
  assign base_wdata = pio_wdata[12:0];
  always_comb begin
    base_we = '0;
    if (go && pio_we && pio_addr >= A_BASE && pio_addr < A_STATUS)
      base_we[pio_addr[1:0]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pio_ack   <= 1'b0;
      pio_rdata <= '0;
      for (int i = 0; i < N_LEVELS; i++) drop_cnt[i] <= '0;
    end else begin
      for (int i = 0; i < N_LEVELS; i++)
        if (in_overflow[i] && drop_cnt[i] != 16'hFFFF) drop_cnt[i] <= drop_cnt[i] + 1'b1;
      if (!pio_req) pio_ack <= 1'b0;
      else if (go) begin
        pio_ack <= 1'b1;
        if (!pio_we) begin
          if (pio_addr < A_BASE)                              pio_rdata <= 16'(lo_rdata);
          else if (pio_addr < A_STATUS)                       pio_rdata <= 16'(base_rd[pio_addr[1:0]]);
          else if (pio_addr == A_STATUS)                      pio_rdata <= {14'd0, busy, run};
          else if (pio_addr < A_DROP + 10'(N_LEVELS))         pio_rdata <= drop_cnt[2'(pio_addr - A_DROP)];
          else                                                pio_rdata <= '0;
        end
      end
    end
  end
endmodule
