// tb_firing_function: OUT must be bits 40..33 of the loaded 41-bit sum and
// must hold between loads.
// The function (upper eight bits) is the architecture's; the one-cycle load is
// this design's.
module tb_firing_function;
  logic clk = 0, rst_n = 0, load = 0;
  always #5 clk = ~clk;
  logic [40:0] sum = 0;
  logic [7:0] out;
  int checks = 0, failures = 0;
  firing_function dut (.*);
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [7:0] exp;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      automatic logic [40:0] s = {$urandom, $urandom};
      if (n == 0) s = 41'h1FF_FFFF_FFFF;
      if (n == 1) s = 41'h1_FFFF_FFFF;          // just below 2^33
      sum <= s; load <= 1; @(posedge clk); load <= 0;
      exp = 8'(s / (64'd1 << 33));            // binary division by 2^33
      sum <= ~s; @(posedge clk); #1;
      checks++;
      if (out != exp) begin failures++; $display("FAIL: sum %h out %h expected %h", s, out, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
