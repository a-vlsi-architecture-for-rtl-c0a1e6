// output_control: the Output Buffer Control Logic with the Table of Last OUT
// Values and the comparator.
//
// When a CN raises OUT Available, the block waits one cycle (the skew time),
// latches OUT and raises OUT Accepted for that CN. It then compares the new
// value with the CN's last broadcast value. Equal values end the job: the CN's
// state has not changed. Different values assert Broadcast Required for one
// cycle: the CN number goes to the four address translators, {OUT, address}
// is pushed into the four output FIFOs, and the new value is written into the
// table. The comparison is an exact XOR compare, as in the architecture.
// OUT Accepted falls when OUT Available does (full four-phase handshake).
// If an output FIFO is full the block waits before pushing (this
// implementation's choice: a computed output is not thrown away).
// The table is also reachable over PIO (write port, combinational read port).
module output_control
  import pn_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_CN-1:0]      out_avail,
  input  logic [DATA_W-1:0]    out_val,
  output logic [N_CN-1:0]      out_accepted,
  // to the address translators and output FIFOs
  input  logic [N_LEVELS-1:0]  fifo_full,
  output logic                 bcast,       // Broadcast Required: push into all FIFOs
  output logic [CN_W-1:0]      cn_num,
  output logic [DATA_W-1:0]    new_out,
  output logic                 unchanged,   // one-cycle pulse: no broadcast needed
  // PIO access to the Table of Last OUT Values
  input  logic                 pio_we,
  input  logic [CN_W-1:0]      pio_addr,
  input  logic [DATA_W-1:0]    pio_wdata,
  output logic [DATA_W-1:0]    pio_rdata,
  output logic                 idle
);
  typedef enum logic [1:0] {S_IDLE, S_LATCH, S_CMP} state_e;

  state_e             state;
  logic [DATA_W-1:0]  last_out [N_CN];
  logic [CN_W-1:0]    cn;
  logic [DATA_W-1:0]  nv;
  logic [N_CN-1:0]    waiting;
  logic [CN_W-1:0]    pick;
  logic               differ;

  assign waiting = out_avail & ~out_accepted;
  always_comb begin
    pick = '0;
    for (int i = N_CN - 1; i >= 0; i--) if (waiting[i]) pick = CN_W'(i);
  end

  assign differ    = ((nv ^ last_out[cn]) != '0);
  assign bcast     = (state == S_CMP) && differ && (fifo_full == '0);
  assign unchanged = (state == S_CMP) && !differ;
  assign cn_num    = cn;
  assign new_out   = nv;
  assign pio_rdata = last_out[pio_addr];
  assign idle      = (state == S_IDLE) && (waiting == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cn           <= '0;
      nv           <= '0;
      out_accepted <= '0;
      for (int i = 0; i < N_CN; i++) last_out[i] <= '0;
    end else begin
      out_accepted <= out_accepted & out_avail;
      unique case (state)
        S_IDLE: if (waiting != '0) begin
          cn    <= pick;
          state <= S_LATCH;
        end
        S_LATCH: begin
          nv               <= out_val;
          out_accepted[cn] <= 1'b1;
          state            <= S_CMP;
        end
        S_CMP: begin
          if (bcast) last_out[cn] <= nv;
          if (bcast || !differ) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
      if (pio_we) last_out[pio_addr] <= pio_wdata;
    end
  end
endmodule
