// tb_pn_top: end-to-end test of the Physical Node at its default sizes.
//
// A small two-layer network is loaded into the DRAM model: CNs 0..7 combine
// external inputs (BH levels 1..3), CNs 8..11 combine the outputs of CNs 0..7
// that return over the on-chip internal level, CN 12 has an empty table. The
// testbench sends input packets serially, decodes the serial outputs of BH
// levels 1..3, and compares, after each batch has settled, every CN's last OUT
// value and the last packet seen for it on each level with an independent
// model of the Sigma-Pi function f(sum w_k * in_k1 * in_k2).
// It also provokes and counts: HOLD (no DRAM access while held), input FIFO
// overflow, a CN restart (second input while the CN is being computed),
// output FIFO back-pressure, suppressed broadcasts (unchanged OUT),
// internal-level loopback, pass-through 2-codons, HALT/START and PIO access
// being held off while running.
// Timing: 10 MHz clock, one serial bit and one DRAM byte per clock; the run
// takes about 7 ms of simulated time. The CN function, ICF/2-codon structures
// and broadcast-on-change rule follow the architecture; the test network,
// the serial framing and the DRAM layout it writes are this design's own.
module tb_pn_top;
  import pn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #50 clk = ~clk;   // 10 MHz

  logic start, halt, hold, running, busy;
  logic [2:0] bh_rx_bit, bh_rx_frame, bh_tx_bit, bh_tx_frame, bh_tx_req, bh_tx_gnt;
  logic mem_cs, mem_we;
  logic [MEM_AW-1:0] mem_addr;
  logic [7:0] mem_wdata, mem_rdata;
  logic pio_req, pio_we, pio_ack;
  logic [9:0] pio_addr;
  logic [15:0] pio_wdata, pio_rdata;

  pn_top dut (.*);

  dram_model #(.AW(MEM_AW)) dram (.clk, .cs(mem_cs), .we(mem_we), .addr(mem_addr),
                                  .wdata(mem_wdata), .rdata(mem_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ model
  localparam int NC = 13;           // CNs given tables
  int unsigned nent [N_CN];
  int unsigned ent_a1 [N_CN][$];
  int unsigned ent_a2 [N_CN][$];
  int unsigned ent_w  [N_CN][$];
  logic [7:0]  idb [IDB_ENTRIES+1];
  logic [7:0]  model_out [N_CN];
  int unsigned pt_next = 1;
  logic [12:0] base_l [4] = '{13'd0, 13'd128, 13'd1000, 13'd5000};

  function automatic logic [15:0] codon(int unsigned a1, int unsigned a2);
    if (a1 != 0 && a2 != 0) return 16'(idb[a1]) * 16'(idb[a2]);
    if (a1 != 0)            return 16'(idb[a1]);
    if (a2 != 0)            return 16'(idb[a2]);
    return 16'd0;
  endfunction

  function automatic logic [7:0] eval_cn(int c);
    logic [63:0] s = 0;
    for (int k = 0; k < int'(nent[c]); k++) s += 64'(codon(ent_a1[c][k], ent_a2[c][k])) * 64'(ent_w[c][k]);
    return s[40:33];
  endfunction

  // Settled state: layer 1, loop back over the internal level, then layer 2.
  task automatic model_settle();
    for (int c = 0; c < 8; c++) begin model_out[c] = eval_cn(c); idb[c+1] = model_out[c]; end
    for (int c = 8; c < N_CN; c++) begin model_out[c] = eval_cn(c); idb[c+1] = model_out[c]; end
  endtask

  // DRAM image writers
  function automatic int unsigned ba(int code, int unsigned idx);
    return int'(RGN_BASE[code]) + (idx << RGN_SHIFT[code]);
  endfunction
  task automatic add_entry(int c, int unsigned a1, int unsigned a2, int unsigned w);
    int unsigned k = nent[c];
    int unsigned p = pt_next++;
    ent_a1[c].push_back(a1); ent_a2[c].push_back(a2); ent_w[c].push_back(w);
    dram.mem[ba(RGN_PT, p)+0] = 8'(a1);  dram.mem[ba(RGN_PT, p)+1] = 8'(a1 >> 8);
    dram.mem[ba(RGN_PT, p)+2] = 8'(a2);  dram.mem[ba(RGN_PT, p)+3] = 8'(a2 >> 8);
    dram.mem[ba(RGN_UT, c*512+k)+0] = 8'(p); dram.mem[ba(RGN_UT, c*512+k)+1] = 8'(p >> 8);
    dram.mem[ba(RGN_WT, c*512+k)+0] = 8'(w); dram.mem[ba(RGN_WT, c*512+k)+1] = 8'(w >> 8);
    if (a1 != 0) dram.mem[ba(RGN_ICF, a1) + c/8][c%8] = 1'b1;
    if (a2 != 0) dram.mem[ba(RGN_ICF, a2) + c/8][c%8] = 1'b1;
    nent[c] = k + 1;
  endtask

  // external inputs: level l (1..3), level address a -> IDB address
  function automatic int unsigned ext(int l, int a);
    return LVL_OFFSET[l] + a + 1;
  endfunction

  // ------------------------------------------------------------ serial in
  task automatic send_pkt(int l, logic [7:0] d, int unsigned a);
    logic [20:0] p;
    int w = LVL_PW[l];
    p = (21'(d) << LVL_AW[l]) | 21'(a & ((1 << LVL_AW[l]) - 1));
    for (int i = w - 1; i >= 0; i--) begin
      bh_rx_bit[l-1]   <= p[i];
      bh_rx_frame[l-1] <= 1'b1;
      @(posedge clk);
    end
    bh_rx_frame[l-1] <= 1'b0;
    bh_rx_bit[l-1]   <= 1'b0;
    @(posedge clk);
  endtask

  task automatic send_in(int l, int a, logic [7:0] d);
    idb[ext(l, a)] = d;
    send_pkt(l, d, a);
  endtask

  // ------------------------------------------------------------ serial out
  logic [7:0]  rx_last [3][N_CN];
  int          rx_cnt  [3];
  logic [20:0] rx_sh   [3];
  int          rx_n    [3];
  int          gnt_wait [3];
  always @(posedge clk) begin
    for (int j = 0; j < 3; j++) begin
      if (bh_tx_req[j] && !bh_tx_gnt[j]) gnt_wait[j]++;
      if (bh_tx_frame[j]) begin
        logic [20:0] s;
        s = {rx_sh[j][19:0], bh_tx_bit[j]};
        rx_sh[j] = s;
        rx_n[j]++;
        if (rx_n[j] == int'(LVL_PW[j+1])) begin
          automatic int unsigned addr = s & ((1 << LVL_AW[j+1]) - 1);
          automatic int unsigned cn = (addr - base_l[j+1]) & ((1 << LVL_AW[j+1]) - 1);
          automatic logic [7:0] d = 8'(s >> LVL_AW[j+1]);
          if (cn < N_CN) rx_last[j][cn] = d;
          else begin failures++; $display("FAIL: packet for unknown address %0d", addr); end
          rx_cnt[j]++;
          rx_n[j] = 0;
        end
      end else rx_n[j] = 0;
    end
  end

  // ------------------------------------------------------------ mechanism counters
  int n_hold_cycles = 0, n_hold_viol = 0, n_restart = 0, n_ovf = 0, n_outstall = 0;
  int n_unchanged = 0, n_internal = 0, n_bcast = 0, n_codons = 0, n_pass = 0, n_mem = 0;
  always @(posedge clk) if (rst_n) begin
    if (hold) begin n_hold_cycles++; if (mem_cs) n_hold_viol++; end
    if (dut.u_prod.restart) n_restart++;
    if (dut.in_overflow != 0) n_ovf++;
    if (dut.u_out_ctl.state == 2'd2 && dut.u_out_ctl.differ && !dut.bcast) n_outstall++;
    if (dut.unchanged) n_unchanged++;
    if (dut.g_lvl[0].rx_valid) n_internal++;
    if (dut.bcast) n_bcast++;
    if (dut.codon_avail) n_codons++;
    if (dut.u_prod.state inside {3'd2, 3'd3, 3'd4} && dut.u_prod.fetch_done &&
        ((dut.u_prod.state == 3'd2 && (dut.u_prod.pt_a1 == 0) != (dut.u_prod.pt_a2 == 0)) ||
         (dut.u_prod.state == 3'd3 && dut.u_prod.a2 == 0))) n_pass++;
    if (mem_cs) n_mem++;
  end

  // ------------------------------------------------------------ PIO
  task automatic pio(input bit we, input logic [9:0] a, input logic [15:0] wd, output logic [15:0] rd);
    pio_we <= we; pio_addr <= a; pio_wdata <= wd; pio_req <= 1'b1;
    @(posedge clk);
    while (!pio_ack) @(posedge clk);
    rd = pio_rdata;
    pio_req <= 1'b0;
    @(posedge clk);
    while (pio_ack) @(posedge clk);
  endtask

  task automatic wait_quiet();
    int q = 0;
    while (q < 60) begin
      @(posedge clk);
      if (busy || bh_rx_frame != 0) q = 0; else q++;
    end
  endtask

  task automatic compare(string tag);
    model_settle();
    for (int c = 0; c < 12; c++) $write("%0d ", model_out[c]); $display(" <- %s model OUT of CNs 0..11", tag);
    for (int c = 0; c < N_CN; c++) begin
      check(dut.u_out_ctl.last_out[c] == model_out[c],
            $sformatf("%s: CN %0d last OUT %0d expected %0d", tag, c, dut.u_out_ctl.last_out[c], model_out[c]));
      for (int j = 0; j < 3; j++)
        if (c < NC || rx_last[j][c] != 0)
          check(rx_last[j][c] == model_out[c],
                $sformatf("%s: CN %0d level %0d last packet %0d expected %0d", tag, c, j+1, rx_last[j][c], model_out[c]));
    end
  endtask

  // ------------------------------------------------------------ stimulus
  logic [15:0] rd;
  initial begin
    start = 0; halt = 0; hold = 0; bh_rx_bit = 0; bh_rx_frame = 0; bh_tx_gnt = 3'b111;
    pio_req = 0; pio_we = 0; pio_addr = 0; pio_wdata = 0;
    for (int j = 0; j < 3; j++) begin rx_cnt[j] = 0; rx_n[j] = 0; rx_sh[j] = 0; gnt_wait[j] = 0;
      for (int c = 0; c < N_CN; c++) rx_last[j][c] = 0; end
    for (int i = 0; i <= IDB_ENTRIES; i++) idb[i] = 0;
    for (int c = 0; c < N_CN; c++) begin nent[c] = 0; model_out[c] = 0; end

    // Network. Layer 1: CNs 0..7 on the external inputs (4 per level).
    for (int c = 0; c < 8; c++) begin
      automatic int L = (c == 5) ? 60 : 12 + (c * 5) % 17;
      for (int k = 0; k < L; k++) begin
        automatic int l1 = 1 + ($urandom % 3), l2 = 1 + ($urandom % 3);
        automatic int unsigned a1 = ext(l1, 1 + $urandom % 3), a2 = ext(l2, 1 + $urandom % 3);
        if (k % 5 == 4) a2 = 0;                    // pass-through 2-codon
        if (c == 5 && k == 0) a1 = ext(1, 0);      // X: only CN 5
        if (c == 5 && k == 1) a1 = ext(2, 0);      // Y: only CN 5
        add_entry(c, a1, a2, 40000 + $urandom % 25536);
      end
    end
    // Layer 2: CNs 8..11 on CN outputs returned over the internal level.
    for (int c = 8; c < 12; c++)
      for (int k = 0; k < 480; k++)
        add_entry(c, 1 + $urandom % 8, (k % 8 == 7) ? 1 + $urandom % 8 : ext(3, 1 + $urandom % 3),
                  50000 + $urandom % 15535);
    // CN 12: pulsed by an input but with an empty table (always 0).
    dram.mem[ba(RGN_ICF, ext(3, 2)) + 1][4] = 1'b1;

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // PIO while halted: BH base addresses, read back.
    for (int l = 0; l < 4; l++) pio(1, 10'h040 + 10'(l), 16'(base_l[l]), rd);
    for (int l = 0; l < 4; l++) begin
      pio(0, 10'h040 + 10'(l), 0, rd);
      check(rd == 16'(base_l[l]), $sformatf("PIO base %0d read %0d", l, rd));
    end

    // A packet sent before START waits in its FIFO.
    send_in(1, 1, 8'd200);
    repeat (20) @(posedge clk);
    check(dram.mem[ba(RGN_IDB, ext(1, 1))] == 0, "input processed while halted");
    start <= 1; @(posedge clk); start <= 0;

    // Batch 1: all external inputs; level 3 network withheld for a while so
    // that the output FIFOs fill up.
    bh_tx_gnt[2] <= 1'b0;
    for (int a = 1; a <= 3; a++) for (int l = 1; l <= 3; l++)
      send_in(l, a, 8'(150 + $urandom % 106));
    send_in(1, 0, 8'd90);
    send_in(2, 0, 8'd77);
    repeat (3000) @(posedge clk);
    bh_tx_gnt[2] <= 1'b1;
    wait_quiet();
    compare("batch1");

    // Batch 2: some inputs change, one to the same value.
    send_in(2, 2, 8'd255);
    send_in(3, 1, idb[ext(3, 1)]);
    send_in(1, 3, 8'd17);
    wait_quiet();
    compare("batch2");

    // Batch 3: restart. X starts CN 5 (60 entries); Y arrives mid-way.
    send_in(1, 0, 8'd250);
    repeat (200) @(posedge clk);
    send_in(2, 0, 8'd251);
    wait_quiet();
    compare("batch3");
    check(n_restart > 0, "no CN restart happened");

    // Batch 4: HOLD, input FIFO overflow on an unused level-3 input.
    hold <= 1'b1;
    for (int i = 0; i < 8; i++) send_pkt(3, 8'(i), 20);
    repeat (20) @(posedge clk);
    check(n_hold_viol == 0, "DRAM accessed during HOLD");
    hold <= 1'b0;
    send_in(3, 2, 8'd5);   // pulses CN 12 (empty table): unchanged
    wait_quiet();
    compare("batch4");

    // PIO held off while running, done after HALT.
    fork
      pio(0, 10'h005, 0, rd);
      begin
        repeat (30) @(posedge clk);
        check(!pio_ack, "PIO served while running");
        halt <= 1; @(posedge clk); halt <= 0;
      end
    join
    check(rd == 16'(model_out[5]), "PIO read of CN 5 after HALT");
    check(!running, "HALT did not stop the PN");
    for (int c = 0; c < NC; c++) begin
      pio(0, 10'(c), 0, rd);
      check(rd == 16'(model_out[c]), $sformatf("PIO last OUT of CN %0d = %0d, expected %0d", c, rd, model_out[c]));
    end
    pio(0, 10'h048, 0, rd);
    check(rd > 0, "level 3 drop counter is zero");
    pio(0, 10'h044, 0, rd);
    check(rd[0] == 1'b0, "status shows running after HALT");

    // Mechanism coverage.
    $display("mechanisms: hold=%0d overflow=%0d restart=%0d out_stall=%0d unchanged=%0d internal=%0d bcast=%0d codons=%0d pass=%0d gnt_wait=%0d mem=%0d",
             n_hold_cycles, n_ovf, n_restart, n_outstall, n_unchanged, n_internal, n_bcast, n_codons, n_pass, gnt_wait[2], n_mem);
    check(n_hold_cycles > 0, "HOLD never asserted");
    check(n_ovf > 0, "input FIFO never overflowed");
    check(n_outstall > 0, "output FIFO back-pressure never happened");
    check(n_unchanged > 0, "no broadcast was ever suppressed");
    check(n_internal > 0, "internal loopback never used");
    check(n_pass > 0, "no pass-through 2-codon");
    check(gnt_wait[2] > 0, "network arbitration wait never happened");
    check(rx_cnt[0] == n_bcast && rx_cnt[1] == n_bcast && rx_cnt[2] == n_bcast,
          "packets on each level differ from broadcasts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
