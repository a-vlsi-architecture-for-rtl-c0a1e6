// packet_fifo: the four-packet-deep FIFO buffer of one BH level.
//
// Used on the input side (between deserialiser and address conversion) and on
// the output side (between address translation and network controller). The
// depth of four packets is the architecture's; it notes that losing a packet on
// overflow is tolerable. A push into a full FIFO is therefore dropped and
// reported by a one-cycle `overflow` pulse; the writer may also look at `full`
// and wait instead (the output side does).
// Interface: push/wdata write at the clock edge; rdata shows the oldest entry
// whenever `empty` is low and pop removes it at the clock edge. Push and pop in
// the same cycle are allowed, also when full (then the push is accepted).
module packet_fifo #(
  parameter int unsigned W     = 14,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] wdata,
  input  logic         pop,
  output logic [W-1:0] rdata,
  output logic         empty,
  output logic         full,
  output logic         overflow
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          do_push, do_pop;

  assign empty   = (cnt == '0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rdata   = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      overflow <= push && !do_push;
      if (do_push) begin
        mem[wp] <= wdata;
        wp      <= inc(wp);
      end
      if (do_pop) rp <= inc(rp);
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  // A pop is only meaningful when there is something to pop.
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty)
    else $error("packet_fifo: pop while empty");
endmodule
