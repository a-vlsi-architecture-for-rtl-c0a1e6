// firing_function: the CN firing function f.
//
// The architecture's f is a binary division: OUT is the upper eight bits of
// the 41-bit weighted sum. The block takes the sum when `load` pulses (the
// rising of OUT Available) and keeps OUT steady in a register until the next
// load, so that OUT stays valid for the whole OUT Available / OUT Accepted
// handshake. One cycle from load to OUT.
module firing_function
  import pn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [SUM_W-1:0]  sum,
  output logic [DATA_W-1:0] out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    out <= '0;
    else if (load) out <= fire(sum);
  end
endmodule
