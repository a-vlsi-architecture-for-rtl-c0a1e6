// tb_input_control: input logic with the memory controller and DRAM model.
// Four queue-model FIFOs hold converted inputs {IDB address, data}; the ICF
// region is preloaded with random flags. Checks that every input is written to
// its IDB byte, that one CN Update Required pulse per input carries exactly
// that input's 64 ICF bits, that levels are served round-robin, that nothing
// is taken while `run` is low. HOLD is asserted at random to stretch the
// memory transfers.
// The 9 DRAM bytes per input (1 write, 8 ICF) and the pulse per set ICF bit
// follow the architecture; round-robin service is this design's choice.
module tb_input_control;
  import pn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic run = 0, hold = 0, idle;
  logic [3:0] fifo_empty, fifo_pop;
  logic [7:0] fifo_data [4];
  logic [13:0] fifo_addr [4];
  logic [63:0] upd_pulse;
  logic [2:0] req, gnt, rvalid, rlast;
  mem_req_t mreq [3];
  logic [7:0] rdata, mem_wdata, mem_rdata;
  logic mem_cs, mem_we;
  logic [18:0] mem_addr;
  logic [21:0] q [4][$];          // {addr, data}
  logic [63:0] icf [10561];
  logic [21:0] popped [$];
  int checks = 0, failures = 0, n_pulse = 0, n_rr = 0;

  input_control dut (
    .clk, .rst_n, .run, .fifo_empty, .fifo_data, .fifo_addr, .fifo_pop,
    .mreq_valid(req[0]), .mreq(mreq[0]), .mgnt(gnt[0]), .mrvalid(rvalid[0]),
    .mrlast(rlast[0]), .mrdata(rdata), .upd_pulse, .idle);
  assign req[2:1] = '0;
  assign mreq[1] = '0;
  assign mreq[2] = '0;
  emc u_emc (.clk, .rst_n, .hold, .req, .mreq, .gnt, .rvalid, .rlast, .rdata,
             .mem_cs, .mem_we, .mem_addr, .mem_wdata, .mem_rdata);
  dram_model u_mem (.clk, .cs(mem_cs), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  for (genvar l = 0; l < 4; l++) begin : g_f
    assign fifo_empty[l] = (q[l].size() == 0);
    assign fifo_data[l]  = fifo_empty[l] ? 8'd0 : q[l][0][7:0];
    assign fifo_addr[l]  = fifo_empty[l] ? 14'd0 : q[l][0][21:8];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  int last_lvl = -1;
  always @(posedge clk) if (rst_n) begin
    chk($onehot0(fifo_pop), "more than one pop");
    for (int l = 0; l < 4; l++) if (fifo_pop[l]) begin
      chk(!fifo_empty[l] && run, "bad pop");
      // round robin: no non-empty level between the previous and this one was skipped
      if (last_lvl >= 0) begin
        for (int j = 1; j < 4; j++) begin
          automatic int m = (last_lvl + j) % 4;
          if (m == l) break;
          chk(fifo_empty[m], $sformatf("level %0d skipped", m));
        end
        n_rr++;
      end
      last_lvl = l;
      popped.push_back(q[l].pop_front());
    end
    hold <= ($urandom % 6 == 0);
  end

  // every input produces one update pulse, in the cycle after its last ICF byte
  always @(posedge clk) if (rst_n && rvalid[0] && rlast[0]) begin   // only ICF blocks are read
    logic [21:0] e;
    e = popped.pop_front();
    #1;
    chk(upd_pulse == icf[e[21:8]], $sformatf("pulse for input %0d: %h", e[21:8], upd_pulse));
    chk(u_mem.mem[19'(e[21:8])] == e[7:0], "IDB byte");
    n_pulse++;
  end

  initial begin
    for (int a = 0; a <= 10560; a++) begin
      icf[a] = {$urandom, $urandom};
      for (int j = 0; j < 8; j++) u_mem.mem[19'h04000 + 19'(a * 8 + j)] = icf[a][8*j +: 8];
    end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 12; n++) q[n % 4].push_back({14'(1 + $urandom % 10560), 8'($urandom)});
    repeat (40) @(posedge clk);
    chk(popped.size() == 0 && idle, "inputs taken while halted");
    run = 1;
    for (int n = 0; n < 400; n++) begin
      automatic int l = $urandom % 4;
      if (q[l].size() < 4) q[l].push_back({14'(1 + $urandom % 10560), 8'($urandom)});
      repeat ($urandom % 12) @(posedge clk);
    end
    wait (fifo_empty == 4'hF);
    repeat (60) @(posedge clk);
    chk(idle && popped.size() == 0 && n_pulse > 150 && n_rr > 150, $sformatf("pulses %0d", n_pulse));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
