// network_controller: BH level Network Controller (output side).
//
// When the level's output FIFO holds a packet and the PN runs, it requests the
// BH network (tx_req); once tx_gnt is seen it pops the packet and sends its W
// bits serially, MSB (data MSB) first, one per clock with tx_frame high. tx_req
// stays high until the last bit, so the arbiter keeps the network granted for
// the whole packet. One idle cycle separates packets. The framing and the
// request/grant arbitration are this implementation's choices; the
// architecture only says that each controller arbitrates for its network and
// does the parallel-to-serial conversion. The format matches bh_deserializer.
module network_controller #(
  parameter int unsigned W = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  input  logic         fifo_empty,
  input  logic [W-1:0] fifo_data,
  output logic         fifo_pop,
  output logic         tx_req,
  input  logic         tx_gnt,
  output logic         tx_bit,
  output logic         tx_frame,
  output logic         idle
);
  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_SEND} state_e;

  state_e        state;
  logic [W-1:0]  shreg;
  logic [CW-1:0] cnt;

  assign fifo_pop = (state == S_REQ) && tx_gnt;
  assign tx_req   = (state == S_REQ) || (state == S_SEND);
  assign tx_frame = (state == S_SEND);
  assign tx_bit   = (state == S_SEND) ? shreg[W-1] : 1'b0;
  assign idle     = (state == S_IDLE) && fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      shreg <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (run && !fifo_empty) state <= S_REQ;
        S_REQ: if (tx_gnt) begin
          shreg <= fifo_data;
          cnt   <= '0;
          state <= S_SEND;
        end
        S_SEND: begin
          shreg <= shreg << 1;
          cnt   <= cnt + 1'b1;
          if (cnt == CW'(W - 1)) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
