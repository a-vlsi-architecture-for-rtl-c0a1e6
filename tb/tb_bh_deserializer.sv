// tb_bh_deserializer: random serial packets into the BH deserialiser; checks
// every parallel packet against what was sent (MSB first), the number of
// pulses, and that a frame cut short is discarded and flagged.
// Timing: one bit per clock; the packet appears the cycle after its last bit.
// The packet layout (data then address) follows the architecture; the serial
// framing checked here is this design's own.
module tb_bh_deserializer;
  localparam int W = 21;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rx_bit = 0, rx_frame = 0, pkt_valid, frame_err;
  logic [W-1:0] pkt;
  int checks = 0, failures = 0, got = 0, errs = 0;
  logic [W-1:0] q[$];

  bh_deserializer #(.W(W)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(posedge clk) begin
    if (rst_n && pkt_valid) begin
      logic [W-1:0] e;
      e = q.pop_front();
      checks++; got++;
      if (pkt !== e) begin failures++; $display("FAIL: got %h expected %h at %0t (%0d)", pkt, e, $time, got); end
    end
    if (rst_n && frame_err) errs++;
  end

  task automatic send(logic [W-1:0] p, int nbits);
    for (int i = W - 1; i >= W - nbits; i--) begin
      rx_bit <= p[i]; rx_frame <= 1; @(posedge clk);
    end
    rx_frame <= 0; rx_bit <= 0; @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      automatic logic [W-1:0] p = W'($urandom);
      q.push_back(p);
      send(p, W);
      if (n % 3 == 0) repeat ($urandom % 4) @(posedge clk);
    end
    send(W'($urandom), 7);   // truncated frame
    repeat (5) @(posedge clk);
    checks++; if (got != 50) begin failures++; $display("FAIL: %0d packets", got); end
    checks++; if (errs != 1) begin failures++; $display("FAIL: frame errors %0d", errs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
