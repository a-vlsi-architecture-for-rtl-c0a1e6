// bh_deserializer: Interface Bus and Deserialization Logic of one BH level.
//
// Converts a serial BH transmission packet into a parallel word
// {data[7:0], originator address}. The packet width W is fixed per level
// (14, 16, 19, 21 bits for the internal level and BH levels 1..3), so the
// circuit is a plain shift register and bit counter; this follows the
// architecture's choice of dedicated per-level deserialisers.
// The serial protocol is this implementation's own, as the architecture leaves
// it open: while rx_frame is high, one bit per clock arrives on rx_bit, most
// significant bit (data MSB) first. After the W-th bit, pkt_valid pulses for one
// cycle with the whole packet on pkt (registered). A frame that ends early is
// discarded and counted on frame_err (one-cycle pulse).
module bh_deserializer #(
  parameter int unsigned W = 14
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rx_bit,
  input  logic         rx_frame,
  output logic [W-1:0] pkt,
  output logic         pkt_valid,
  output logic         frame_err
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  shreg;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      cnt       <= '0;
      pkt       <= '0;
      pkt_valid <= 1'b0;
      frame_err <= 1'b0;
    end else begin
      pkt_valid <= 1'b0;
      frame_err <= 1'b0;
      if (rx_frame) begin
        if (cnt == CW'(W - 1)) begin
          pkt       <= {shreg[W-2:0], rx_bit};
          pkt_valid <= 1'b1;
          cnt       <= '0;
        end else begin
          shreg <= {shreg[W-2:0], rx_bit};
          cnt   <= cnt + 1'b1;
        end
      end else begin
        if (cnt != '0) frame_err <= 1'b1;
        cnt <= '0;
      end
    end
  end
endmodule
