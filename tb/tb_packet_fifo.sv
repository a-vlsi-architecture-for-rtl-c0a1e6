// tb_packet_fifo: random pushes and pops against a queue model of a
// four-deep FIFO; checks data order, empty/full flags, and that a push into a
// full FIFO is dropped and flagged as overflow.
// The four-entry depth is the architecture's; dropping on overflow is this
// design's reading of 'losing some packets could be tolerated'.
module tb_packet_fifo;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full, overflow;
  logic [W-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0, n_ovf = 0, n_full = 0;
  logic [W-1:0] q[$];

  packet_fifo #(.W(W), .DEPTH(4)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    bit exp_ovf;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      automatic bit ps = ($urandom % 100) < ((n / 200) % 2 ? 70 : 35);
      automatic bit pp = ($urandom % 2) && (q.size() != 0) && !empty;
      automatic logic [W-1:0] d = W'($urandom);
      chk(empty == (q.size() == 0), "empty flag");
      chk(full == (q.size() == 4), "full flag");
      if (q.size() != 0) chk(rdata == q[0], $sformatf("rdata %h expected %h", rdata, q[0]));
      if (full) n_full++;
      push <= ps; pop <= pp; wdata <= d;
      exp_ovf = 0;
      if (pp) void'(q.pop_front());
      if (ps) begin
        if (q.size() < 4) q.push_back(d);
        else exp_ovf = 1;
      end
      @(posedge clk);
      push <= 0; pop <= 0;
      #1;
      chk(overflow == exp_ovf, "overflow flag");
      if (exp_ovf) n_ovf++;
    end
    chk(n_ovf > 0 && n_full > 0, "overflow never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
