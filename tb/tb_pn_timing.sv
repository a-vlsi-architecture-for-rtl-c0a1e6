// tb_pn_timing: response time of the Physical Node at its default sizes for
// the small and medium workloads of the architecture's timing model,
//   R = 900 ns * I + 1000 ns * N * L + 700 ns * N   (10 MHz clock),
// where I inputs change, N CNs are affected and each has L 2-codons.
// For each workload the DRAM model is loaded with N CNs of L two-input
// 2-codons over I inputs (every input flagged for every CN), the I input
// packets are queued in the BH input FIFOs while the PN is halted, and the
// Table of Last OUT Values is preset to 255 so that every CN broadcasts.
// R is measured from START to the first bit of the N-th output packet on BH
// level 1 (grant always given). Checks: the number of DRAM byte accesses is
// exactly 9 per input plus 10 per 2-codon plus 11 per CN (Used Table end
// marker, and the CN's own OUT returning over the internal level), every OUT
// value matches the model, and R is at least the timing model and at most the
// model plus 9 cycles per CN (this implementation's per-CN overhead is 16
// cycles where the model counts 7), with 2 % margin. The measured numbers are
// printed for each workload. MEDIUM uses 12 inputs instead of 15 because at
// most 12 can be queued in the three external input FIFOs before START.
module tb_pn_timing;
  import pn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #50 clk = ~clk;   // 10 MHz

  logic start = 0, halt = 0, hold = 0, running, busy;
  logic [2:0] bh_rx_bit = 0, bh_rx_frame = 0, bh_tx_bit, bh_tx_frame, bh_tx_req;
  logic [2:0] bh_tx_gnt = 3'b111;
  logic mem_cs, mem_we;
  logic [MEM_AW-1:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic pio_req = 0, pio_we = 0, pio_ack;
  logic [9:0] pio_addr = 0;
  logic [15:0] pio_wdata = 0, pio_rdata;

  pn_top dut (.*);

  dram_model #(.AW(MEM_AW)) dram (.clk, .cs(mem_cs), .we(mem_we), .addr(mem_addr),
                                  .wdata(mem_wdata), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pio(input bit we, input logic [9:0] a, input logic [15:0] wd);
    pio_we <= we; pio_addr <= a; pio_wdata <= wd; pio_req <= 1'b1;
    @(posedge clk);
    while (!pio_ack) @(posedge clk);
    pio_req <= 1'b0;
    @(posedge clk);
    while (pio_ack) @(posedge clk);
  endtask

  task automatic send_pkt(int l, logic [7:0] d, int unsigned a);
    logic [20:0] p;
    p = (21'(d) << LVL_AW[l]) | 21'(a);
    for (int i = int'(LVL_PW[l]) - 1; i >= 0; i--) begin
      bh_rx_bit[l-1] <= p[i]; bh_rx_frame[l-1] <= 1'b1; @(posedge clk);
    end
    bh_rx_frame[l-1] <= 1'b0; bh_rx_bit[l-1] <= 1'b0; @(posedge clk);
  endtask

  // counters
  int n_mem = 0, n_restart = 0, n_frames = 0, t_now = 0;
  int rcv [N_CN];
  logic [15:0] sh;
  int nb = 0;
  always @(posedge clk) begin
    t_now++;
    if (mem_cs) n_mem++;
    if (dut.u_prod.restart) n_restart++;
    if (bh_tx_frame[0]) begin
      if (nb == 0) n_frames++;
      sh = {sh[14:0], bh_tx_bit[0]};
      nb++;
      if (nb == 16) begin rcv[sh[7:0]] = sh[15:8]; nb = 0; end
    end
  end

  function automatic int unsigned ba(int code, int unsigned idx);
    return int'(RGN_BASE[code]) + (idx << RGN_SHIFT[code]);
  endfunction

  task automatic workload(string name, int I, int N, int L);
    int unsigned inp [$];
    logic [7:0]  val [$];
    int t0, t1, extra, eq4, mem0;
    logic [63:0] s;
    logic [7:0] exp_out [N_CN];
    // reset and clear the DRAM image
    rst_n = 1'b0;
    for (int a = 0; a < (1 << MEM_AW); a++) dram.mem[a] = 8'h00;
    for (int j = 0; j < I; j++) begin
      inp.push_back(LVL_OFFSET[1 + j % 3] + j / 3 + 1);
      val.push_back(8'(200 + $urandom % 56));
    end
    for (int c = 0; c < N; c++) begin
      s = 0;
      for (int k = 0; k < L; k++) begin
        automatic int p = 1 + (c * L + k) % (PT_ENTRIES - 1);   // 13-bit pointers, 0 = end
        automatic int x = $urandom % I, y = $urandom % I;
        automatic int unsigned w = 60000 + $urandom % 5536;
        dram.mem[ba(RGN_PT, p)+0] = 8'(inp[x]); dram.mem[ba(RGN_PT, p)+1] = 8'(inp[x] >> 8);
        dram.mem[ba(RGN_PT, p)+2] = 8'(inp[y]); dram.mem[ba(RGN_PT, p)+3] = 8'(inp[y] >> 8);
        dram.mem[ba(RGN_UT, c*512+k)+0] = 8'(p); dram.mem[ba(RGN_UT, c*512+k)+1] = 8'(p >> 8);
        dram.mem[ba(RGN_WT, c*512+k)+0] = 8'(w); dram.mem[ba(RGN_WT, c*512+k)+1] = 8'(w >> 8);
        s += 64'(val[x]) * 64'(val[y]) * 64'(w);
      end
      exp_out[c] = s[40:33];
      for (int j = 0; j < I; j++) dram.mem[ba(RGN_ICF, inp[j]) + c/8][c%8] = 1'b1;
    end
    for (int c = 0; c < N_CN; c++) rcv[c] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int c = 0; c < N_CN; c++) pio(1, 10'(c), 16'hFF);
    for (int l = 0; l < 4; l++) pio(1, 10'h040 + 10'(l), 16'd0);
    // queue the inputs: at most four per level
    fork
      for (int j = 0; j < I; j += 3) send_pkt(1, val[j], j / 3);
      for (int j = 1; j < I; j += 3) send_pkt(2, val[j], j / 3);
      for (int j = 2; j < I; j += 3) send_pkt(3, val[j], j / 3);
    join
    repeat (3) @(posedge clk);
    n_frames = 0; n_restart = 0; mem0 = n_mem;
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    t0 = t_now;
    while (n_frames < N) @(posedge clk);
    t1 = t_now;
    while (busy) @(posedge clk);
    repeat (40) @(posedge clk);
    halt <= 1'b1; @(posedge clk); halt <= 1'b0;
    // DRAM bytes: 9 per input, 10 per 2-codon, and per CN 2 for the Used
    // Table end marker plus 9 for its own OUT, which returns over the internal
    // level as an input. A restart would repeat fetches; none happens here.
    extra = (n_mem - mem0) - (9 * I + 10 * N * L + 11 * N);
    eq4 = 9 * I + 10 * N * L + 7 * N;
    $display("%s: I=%0d N=%0d L=%0d  measured %0d cycles = %0.1f us, timing model %0.1f us (ratio %0.3f), DRAM bytes %0d",
             name, I, N, L, t1 - t0, (t1 - t0) / 10.0, eq4 / 10.0, real'(t1 - t0) / eq4, n_mem - mem0);
    check(n_restart == 0 && extra == 0, $sformatf("%s: DRAM byte count %0d", name, n_mem - mem0));
    // this implementation spends 9 cycles more per CN than the model's 7
    check((t1 - t0) >= eq4 && real'(t1 - t0) <= real'(eq4 + 9 * N) * 1.02 + 5,
          $sformatf("%s: response time %0d cycles", name, t1 - t0));
    for (int c = 0; c < N; c++) check(rcv[c] == int'(exp_out[c]), $sformatf("%s: CN %0d OUT %0d expected %0d", name, c, rcv[c], exp_out[c]));
  endtask

  initial begin
    workload("MINIMUM", 1, 1, 1);
    workload("LIGHT-a", 5, 5, 20);
    workload("LIGHT-b", 5, 10, 20);
    workload("MEDIUM",  12, 32, 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
