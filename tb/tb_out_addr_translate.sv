// tb_out_addr_translate: base register load and BH address = base + CN number
// (modulo the level's address width) for a BH level 2 (11-bit) translator.
// Base + CN number is the architecture's rule; the register load port is this
// design's. The packet is valid in the cycle the CN number is applied.
module tb_out_addr_translate;
  import pn_pkg::*;
  logic clk = 0, rst_n = 0, base_we = 0;
  always #5 clk = ~clk;
  logic [10:0] base_wdata = 0, base;
  logic [5:0] cn_num = 0;
  logic [7:0] out_val = 0;
  logic [18:0] pkt;
  int checks = 0, failures = 0;
  out_addr_translate #(.AW(11)) dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      automatic logic [10:0] b = (n == 0) ? 11'd2040 : 11'($urandom);
      base_wdata <= b; base_we <= 1; @(posedge clk); base_we <= 0; @(posedge clk);
      checks++; if (base != b) failures++;
      for (int c = 0; c < 64; c += 7) begin
        automatic logic [7:0] v = 8'($urandom);
        cn_num <= 6'(c); out_val <= v; @(posedge clk); #1;
        checks++;
        if (pkt != {v, 11'(b + 11'(c))}) begin failures++; $display("FAIL: base %0d cn %0d pkt %h", b, c, pkt); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
