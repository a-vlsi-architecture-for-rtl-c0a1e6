// tb_output_control: the output logic against a model of the Table of Last OUT
// Values. A producer offers new OUT values one CN at a time with the
// out_avail/out_accepted handshake. Checks that a broadcast request is made
// exactly when the value differs from the last one sent, never while a FIFO is
// full, carries the right CN number and value, and that PIO writes and reads of
// the table work.
// Exact-equality suppression and the Last OUT table follow the architecture;
// stalling (not dropping) on a full output FIFO is this design's choice.
module tb_output_control;
  import pn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [63:0] out_avail = 0, out_accepted;
  logic [7:0] out_val = 0, new_out, pio_wdata = 0, pio_rdata;
  logic [3:0] fifo_full = 0;
  logic bcast, unchanged, pio_we = 0, idle;
  logic [5:0] cn_num, pio_addr = 0;
  logic [7:0] model [64];
  int checks = 0, failures = 0, n_b = 0, n_u = 0, n_stall = 0;
  bit latched = 0;
  int exp_b[$], exp_cn[$]; logic [7:0] exp_v[$];

  output_control dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (bcast || unchanged) begin
      chk(exp_b.size() != 0, "unexpected decision");
      if (exp_b.size() != 0) begin
        chk(bcast == exp_b[0] && cn_num == exp_cn[0], $sformatf("cn %0d bcast %0d", cn_num, bcast));
        if (bcast) chk(new_out == exp_v[0], "broadcast value");
        void'(exp_b.pop_front()); void'(exp_cn.pop_front()); void'(exp_v.pop_front());
      end
      if (bcast) begin chk(fifo_full == 0, "broadcast into a full FIFO"); n_b++; end
      else n_u++;
    end
    // a value that must be broadcast has been taken but a FIFO is full
    if (out_accepted != 0) latched = 1;
    if (bcast || unchanged) latched = 0;
    if (latched && fifo_full != 0 && exp_b.size() != 0 && exp_b[0]) n_stall++;
    fifo_full <= ($urandom % 8 == 0) ? 4'(1 << ($urandom % 4)) : 4'd0;
  end

  initial begin
    logic [7:0] r;
    for (int i = 0; i < 64; i++) model[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      automatic int c = $urandom % 64;
      automatic logic [7:0] v = ($urandom % 3 == 0) ? model[c] : 8'($urandom % 4);
      exp_b.push_back(v != model[c]); exp_cn.push_back(c); exp_v.push_back(v);
      model[c] = v;
      out_val <= v; out_avail[c] <= 1'b1;
      do @(posedge clk); while (!out_accepted[c]);
      out_avail[c] <= 1'b0;
      @(posedge clk); #1;
      chk(!out_accepted[c], "accepted not withdrawn");
    end
    wait (idle && exp_b.size() == 0);
    // PIO access to the table
    @(posedge clk);
    for (int i = 0; i < 64; i++) begin
      pio_we <= 1; pio_addr <= 6'(i); pio_wdata <= 8'(i * 3); model[i] = 8'(i * 3);
      @(posedge clk);
    end
    pio_we <= 0;
    for (int i = 0; i < 64; i++) begin
      pio_addr <= 6'(i); @(posedge clk); #1;
      chk(pio_rdata == model[i], "PIO read back");
    end
    // a value equal to the PIO-written one is not broadcast
    exp_b.push_back(0); exp_cn.push_back(9); exp_v.push_back(27);
    out_val <= 27; out_avail[9] <= 1'b1;
    do @(posedge clk); while (!out_accepted[9]);
    out_avail[9] <= 1'b0;
    repeat (5) @(posedge clk);
    chk(exp_b.size() == 0, "decisions missing");
    chk(n_b > 100 && n_u > 100 && n_stall > 0, $sformatf("coverage b=%0d u=%0d stall=%0d", n_b, n_u, n_stall));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
