// tb_network_controller: a BH level-1 (16-bit) network controller fed from a
// queue-model FIFO. Checks that each packet is requested, waits for a randomly
// delayed grant, is sent MSB first in one frame of 16 bits, is popped exactly
// once, and that nothing is sent while `run` is low.
// Request/grant arbitration and MSB-first framing are this design's protocol;
// the architecture only requires serial transmission after arbitration.
module tb_network_controller;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run = 0, fifo_empty, fifo_pop, tx_req, tx_gnt = 0, tx_bit, tx_frame, idle;
  logic [W-1:0] fifo_data;
  logic [W-1:0] q[$], sent[$];
  int checks = 0, failures = 0, waits = 0;

  network_controller #(.W(W)) dut (.*);

  assign fifo_empty = (q.size() == 0);
  assign fifo_data  = fifo_empty ? '0 : q[0];

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  // FIFO pop and grant model
  always @(posedge clk) if (rst_n) begin
    if (fifo_pop) begin
      chk(!fifo_empty, "pop while empty");
      sent.push_back(q.pop_front());
    end
    if (tx_req && !tx_frame && !tx_gnt) waits++;
    tx_gnt <= tx_req && !tx_frame && ($urandom % 4 == 0);
  end

  // serial receiver
  initial begin
    logic [W-1:0] r;
    int n;
    n = 0;
    forever begin
      @(posedge clk);
      if (rst_n && tx_frame) begin
        chk(run, "frame while halted");
        r = '0;
        for (int i = 0; i < W; i++) begin
          chk(tx_frame && tx_req, "frame dropped inside packet");
          r = {r[W-2:0], tx_bit};
          @(posedge clk);
        end
        chk(!tx_frame, "frame longer than the packet");
        chk(sent.size() != 0 && r == sent[0], $sformatf("packet %0d: %h", n, r));
        if (sent.size() != 0) void'(sent.pop_front());
        n++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 3; i++) q.push_back(W'($urandom));
    repeat (50) @(posedge clk);
    chk(!tx_req && q.size() == 3, "sent while run low");
    run = 1;
    for (int n = 0; n < 100; n++) begin
      if ($urandom % 3 == 0) repeat ($urandom % 40) @(posedge clk);
      q.push_back(W'($urandom));
      @(posedge clk);
    end
    wait (idle);
    repeat (30) @(posedge clk);
    chk(idle && q.size() == 0 && sent.size() == 0, "not all packets delivered");
    chk(waits > 0, "grant wait never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
