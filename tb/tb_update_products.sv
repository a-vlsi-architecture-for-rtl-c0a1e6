// tb_update_products: products logic (full size, 512 Used Table entries per
// CN) with the memory controller and DRAM model. The DRAM holds random IDB
// values, random Products Table entries (with pass-through entries that have
// only one input) and Used Tables of random length, including an empty one
// and a full 512-entry one. CN Update Required pulses arrive at random, some
// for the CN being computed. Checks the stream of 2-codon products of every
// completed CN against a model, one CN Active at a time, that every pulsed CN
// is computed, that a pulse for the active CN restarts it, and that no CN is
// started while `sum_idle` is low.
// Zero-pointer termination, pass-through entries and restart follow the
// architecture; lowest-CN-first service and the sum_idle gate are this design's.
module tb_update_products;
  import pn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run = 0, hold = 0, sum_idle = 1, idle;
  logic [63:0] upd_pulse = 0, cn_active;
  logic codon_avail, restart;
  logic [15:0] codon_product;
  logic [2:0] req, gnt, rvalid, rlast;
  mem_req_t mreq [3];
  logic [7:0] rdata, mem_wdata, mem_rdata;
  logic mem_cs, mem_we;
  logic [18:0] mem_addr;
  int len [64];
  logic [15:0] expv [64][$];
  logic [15:0] got [$];
  bit   want [64];
  int checks = 0, failures = 0, n_done = 0, n_restart = 0, n_pass = 0;

  update_products dut (
    .clk, .rst_n, .run, .upd_pulse, .sum_idle,
    .mreq_valid(req[2]), .mreq(mreq[2]), .mgnt(gnt[2]), .mrvalid(rvalid[2]),
    .mrlast(rlast[2]), .mrdata(rdata), .cn_active, .codon_avail, .codon_product,
    .restart, .idle);
  assign req[1:0] = '0;
  assign mreq[0] = '0;
  assign mreq[1] = '0;
  emc u_emc (.clk, .rst_n, .hold, .req, .mreq, .gnt, .rvalid, .rlast, .rdata,
             .mem_cs, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);
  dram_model u_mem (.clk, .cs(mem_cs), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [7:0] mb(int a); return u_mem.mem[19'(a)]; endfunction

  // product of Products Table entry p, computed from the DRAM contents
  function automatic logic [15:0] prod_of(int p);
    int a1, a2;
    a1 = {mb(32'h20000 + 4*p + 1), mb(32'h20000 + 4*p)};
    a2 = {mb(32'h20000 + 4*p + 3), mb(32'h20000 + 4*p + 2)};
    if (a1 != 0 && a2 != 0) return 16'(mb(a1) * mb(a2));
    if (a1 != 0) return 16'(mb(a1));
    if (a2 != 0) return 16'(mb(a2));
    return 16'd0;
  endfunction

  logic [63:0] prev_active = 0;
  bit prev_sum_idle = 1;
  always @(posedge clk) if (rst_n) begin
    chk($onehot0(cn_active), "CN Active not one-hot");
    if (cn_active != 0 && prev_active == 0) chk(prev_sum_idle, "started while sum busy");
    prev_sum_idle <= sum_idle;
    if (restart) begin got.delete(); n_restart++; end
    if (codon_avail) begin
      chk(cn_active != 0, "product without an active CN");
      got.push_back(codon_product);
    end
    if (prev_active != 0 && cn_active != prev_active) begin
      automatic int c = $clog2(prev_active);
      chk(got.size() == expv[c].size(), $sformatf("CN %0d: %0d products, expected %0d", c, got.size(), expv[c].size()));
      foreach (got[i]) if (i < expv[c].size()) chk(got[i] == expv[c][i], $sformatf("CN %0d product %0d", c, i));
      want[c] = 0;
      got.delete();
      n_done++;
    end
    prev_active <= cn_active;
    hold <= ($urandom % 8 == 0);
    sum_idle <= ($urandom % 4 != 0);
  end

  initial begin
    for (int a = 1; a <= 10560; a++) u_mem.mem[19'(a)] = 8'($urandom);
    for (int p = 1; p < 8192; p++) begin
      automatic int a1 = 1 + $urandom % 10560, a2 = 1 + $urandom % 10560;
      if (p % 7 == 0) a2 = 0;
      if (p % 11 == 0) a1 = 0;
      {u_mem.mem[19'h20000 + 19'(4*p + 1)], u_mem.mem[19'h20000 + 19'(4*p)]}     = 16'(a1);
      {u_mem.mem[19'h20000 + 19'(4*p + 3)], u_mem.mem[19'h20000 + 19'(4*p + 2)]} = 16'(a2);
      if (p % 77 == 0) n_pass++;
    end
    for (int c = 0; c < 64; c++) begin
      len[c] = (c == 3) ? 0 : (c == 5) ? 512 : 1 + $urandom % 40;
      for (int k = 0; k < 512; k++) begin
        automatic int p = (k < len[c]) ? 1 + $urandom % 8191 : 0;
        {u_mem.mem[19'h28000 + 19'(2*(c*512 + k) + 1)], u_mem.mem[19'h28000 + 19'(2*(c*512 + k))]} = 16'(p);
        if (k < len[c]) expv[c].push_back(prod_of(p));
      end
      want[c] = 0;
    end
    repeat (2) @(posedge clk); rst_n = 1;
    upd_pulse <= 64'h8; @(posedge clk); upd_pulse <= 0;
    repeat (30) @(posedge clk);
    chk(cn_active == 0 && !idle, "started while halted");
    run = 1;
    for (int n = 0; n < 150; n++) begin
      automatic int c = (n % 10 == 0 && cn_active != 0) ? $clog2(cn_active) : $urandom % 64;
      if (n == 20) c = 5;
      want[c] = 1;
      upd_pulse <= 64'(1) << c; @(posedge clk); upd_pulse <= 0;
      repeat ($urandom % 300) @(posedge clk);
    end
    wait (idle);
    repeat (10) @(posedge clk);
    foreach (want[c]) chk(!want[c], $sformatf("CN %0d never computed", c));
    chk(n_restart > 0 && n_done > 50, $sformatf("coverage restarts=%0d done=%0d", n_restart, n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
