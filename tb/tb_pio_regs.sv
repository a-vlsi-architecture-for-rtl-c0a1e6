// tb_pio_regs: PIO register file. Checks the four-phase req/ack handshake,
// Last OUT table and base-address writes/reads through small models, the
// status word, the drop counters, and that every access except the status read
// is held off (no ack) while the PN is running.
// Ten address bits, a direction line and a two-wire handshake follow the
// architecture; the register map and the 16-bit data buses are this design's.
module tb_pio_regs;
  import pn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run = 0, busy = 0, pio_req = 0, pio_we = 0, pio_ack;
  logic [9:0] pio_addr = 0;
  logic [15:0] pio_wdata = 0, pio_rdata;
  logic lo_we; logic [5:0] lo_addr; logic [7:0] lo_wdata, lo_rdata;
  logic [3:0] base_we; logic [12:0] base_wdata; logic [12:0] base_rd [4];
  logic [3:0] in_overflow = 0;
  logic [7:0] lo_mem [64];
  int checks = 0, failures = 0;

  pio_regs dut (.*);

  assign lo_rdata = lo_mem[lo_addr];
  always @(posedge clk) begin
    if (lo_we) lo_mem[lo_addr] <= lo_wdata;
    for (int i = 0; i < 4; i++) if (base_we[i]) base_rd[i] <= base_wdata;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic access(bit we, logic [9:0] a, logic [15:0] d, output logic [15:0] r);
    pio_req <= 1; pio_we <= we; pio_addr <= a; pio_wdata <= d;
    do @(posedge clk); while (!pio_ack);
    r = pio_rdata;
    pio_req <= 0;
    do @(posedge clk); while (pio_ack);
  endtask

  initial begin
    logic [15:0] r;
    logic [7:0] lo_exp [64];
    logic [12:0] b_exp [4];
    for (int i = 0; i < 64; i++) lo_mem[i] = 0;
    for (int i = 0; i < 4; i++) base_rd[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin lo_exp[i] = 8'($urandom); access(1, 10'(i), 16'(lo_exp[i]), r); end
    for (int i = 0; i < 4; i++) begin b_exp[i] = 13'($urandom); access(1, 10'h40 + 10'(i), 16'(b_exp[i]), r); end
    for (int i = 63; i >= 0; i--) begin access(0, 10'(i), 0, r); chk(r == 16'(lo_exp[i]), $sformatf("last OUT %0d = %h", i, r)); end
    for (int i = 0; i < 4; i++) begin access(0, 10'h40 + 10'(i), 0, r); chk(r == 16'(b_exp[i]), "base"); end
    // drop counters
    for (int i = 0; i < 4; i++) begin
      for (int k = 0; k <= i; k++) begin
        @(negedge clk) in_overflow = 4'(1 << i);
        @(negedge clk) in_overflow = 0;
      end
    end
    @(posedge clk);
    for (int i = 0; i < 4; i++) begin access(0, 10'h45 + 10'(i), 0, r); chk(r == 16'(i + 1), $sformatf("drop %0d = %0d", i, r)); end
    // status, and holding off while running
    busy = 1; access(0, 10'h44, 0, r); chk(r == 16'h2, "status halted/busy");
    run = 1;  access(0, 10'h44, 0, r); chk(r == 16'h3, "status running");
    pio_req <= 1; pio_we <= 1; pio_addr <= 10'd5; pio_wdata <= 16'hAA;
    repeat (20) begin @(posedge clk); chk(!pio_ack && !lo_we, "access while running"); end
    run = 0;
    do @(posedge clk); while (!pio_ack);
    pio_req <= 0; @(posedge clk); @(posedge clk);
    access(0, 10'd5, 0, r); chk(r == 16'hAA, "held write completed after HALT");
    access(0, 10'h3FF, 0, r); chk(r == 0, "unmapped address reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
