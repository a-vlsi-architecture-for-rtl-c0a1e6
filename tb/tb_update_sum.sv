// tb_update_sum: sum logic with the memory controller and DRAM model. A model
// of the products logic activates one CN at a time and strobes its 2-codon
// products (never before the previous weight has been read); a model of the
// output logic accepts OUT Available after random delays. The Weight Table
// holds random weights. Checks every fired sum against the 41-bit reference,
// including a worst-case CN (512 entries of 255*255 times 65535), that a CN
// Update Required pulse for the active CN clears its partial sum, that a sum
// is not fired while an earlier OUT has not been accepted, and the
// OUT Available / accepted handshake.
// The 16x16 multiply, 41-bit accumulation and OUT handshake follow the
// architecture; clearing the sum on a restart is this design's choice.
module tb_update_sum;
  import pn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hold = 0, sum_idle, fire_load, codon_avail = 0;
  logic [63:0] upd_pulse = 0, cn_active = 0, out_avail, out_accepted = 0;
  logic [15:0] codon_product = 0;
  logic [40:0] sum;
  logic [2:0] req, gnt, rvalid, rlast;
  mem_req_t mreq [3];
  logic [7:0] rdata, mem_wdata, mem_rdata;
  logic mem_cs, mem_we;
  logic [18:0] mem_addr;
  logic [40:0] exp_q [$];
  int exp_cn [$];
  int checks = 0, failures = 0, n_fire = 0, n_clear = 0, n_wait = 0;

  update_sum dut (
    .clk, .rst_n, .upd_pulse, .cn_active, .codon_avail, .codon_product,
    .mreq_valid(req[1]), .mreq(mreq[1]), .mgnt(gnt[1]), .mrvalid(rvalid[1]),
    .mrlast(rlast[1]), .mrdata(rdata), .out_avail, .out_accepted, .fire_load, .sum, .sum_idle);
  assign req[0] = 1'b0;
  assign req[2] = 1'b0;
  assign mreq[0] = '0;
  assign mreq[2] = '0;
  emc u_emc (.clk, .rst_n, .hold, .req, .mreq, .gnt, .rvalid, .rlast, .rdata,
             .mem_cs, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);
  dram_model u_mem (.clk, .cs(mem_cs), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [15:0] wt(int c, int k);
    return {u_mem.mem[19'h38000 + 19'(2*(c*512 + k) + 1)], u_mem.mem[19'h38000 + 19'(2*(c*512 + k))]};
  endfunction

  // output logic model
  always @(posedge clk) if (rst_n) begin
    hold <= ($urandom % 8 == 0);
    out_accepted <= out_accepted & out_avail;
    if (fire_load) begin
      chk(exp_q.size() != 0, "unexpected fire");
      if (exp_q.size() != 0) begin
        chk(sum == exp_q[0], $sformatf("CN %0d sum %0d expected %0d", exp_cn[0], sum, exp_q[0]));
        #1 chk(out_avail[exp_cn[0]], "OUT Available not raised");
        void'(exp_q.pop_front()); void'(exp_cn.pop_front());
      end
      n_fire++;
    end
    if ((out_avail & ~out_accepted) != 0) begin
      if (cn_active == 0 && !sum_idle) n_wait++;   // a finished sum may be waiting to fire
      if ($urandom % 40 == 0)
        for (int i = 0; i < 64; i++) if (out_avail[i] && !out_accepted[i]) begin out_accepted[i] <= 1'b1; break; end
    end
  end

  // strobe one product, then wait until its weight has been read
  task automatic strobe(logic [15:0] p);
    codon_product <= p; codon_avail <= 1'b1; @(posedge clk); codon_avail <= 1'b0;
    do @(posedge clk); while (!(rvalid[1] && rlast[1]));
    repeat ($urandom % 3) @(posedge clk);
  endtask

  task automatic run_cn(int c, int n, bit worst, bit do_restart);
    logic [40:0] s;
    logic [15:0] p;
    wait (sum_idle);
    @(posedge clk);
    cn_active <= 64'(1) << c;
    @(posedge clk);
    if (do_restart) begin
      for (int k = 0; k < n / 2; k++) strobe(16'($urandom));
      upd_pulse <= 64'(1) << c; @(posedge clk); upd_pulse <= 0;
      n_clear++;
    end
    s = 0;
    for (int k = 0; k < n; k++) begin
      p = worst ? 16'd65025 : 16'($urandom % 65026);
      s += 41'(p) * 41'(wt(c, k));
      strobe(p);
    end
    exp_q.push_back(s); exp_cn.push_back(c);
    cn_active <= 0;
    @(posedge clk);
  endtask

  initial begin
    for (int c = 0; c < 64; c++)
      for (int k = 0; k < 512; k++)
        {u_mem.mem[19'h38000 + 19'(2*(c*512 + k) + 1)], u_mem.mem[19'h38000 + 19'(2*(c*512 + k))]} =
          (c == 7) ? 16'hFFFF : 16'($urandom);
    repeat (2) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    run_cn(7, 512, 1, 0);      // worst case
    run_cn(0, 0, 0, 0);        // empty CN fires a zero sum
    for (int n = 0; n < 80; n++) run_cn($urandom % 64, 1 + $urandom % 30, 0, n % 6 == 0);
    wait (exp_q.size() == 0 && sum_idle);
    repeat (3) @(posedge clk);
    // every OUT is eventually accepted
    wait ((out_avail & ~out_accepted) == 0);
    repeat (3) @(posedge clk);
    chk(out_avail == 0, "OUT Available not withdrawn");
    chk(n_fire == 82 && n_clear > 5 && n_wait > 0, $sformatf("coverage fire=%0d clear=%0d wait=%0d", n_fire, n_clear, n_wait));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
