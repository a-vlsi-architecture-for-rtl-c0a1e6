// tb_emc: external memory controller with three requesters and the DRAM model.
// Each requester issues random reads (1..8-byte blocks) and single-byte writes
// to random regions. Checks priority (input > sum > products), that every
// block returns the right bytes from the right byte address (region base +
// scaled index), rlast on the last byte, writes land in memory, and that HOLD
// freezes the port mid-block.
// Code-selected base plus scaled index and block transfers follow the
// architecture; the region map, the same-cycle read and the priority order
// among the sum and products logic are this design's.
module tb_emc;
  import pn_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hold = 0;
  logic [2:0] req = 0, gnt, rvalid, rlast;
  mem_req_t mreq [3];
  logic [7:0] rdata, mem_wdata, mem_rdata;
  logic mem_cs, mem_we;
  logic [18:0] mem_addr;
  logic [7:0] shadow [logic [18:0]];
  int checks = 0, failures = 0, n_hold = 0, n_blk = 0, n_wr = 0;
  logic [2:0] inblk = 0;   // requester between grant and last byte

  emc dut (.*);
  dram_model u_mem (.clk, .cs(mem_cs), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  function automatic logic [7:0] pat(logic [18:0] a);
    return shadow.exists(a) ? shadow[a] : 8'(a ^ (a >> 8) ^ 8'h5A);
  endfunction

  always @(posedge clk) if (rst_n) begin
    chk(!(mem_cs && hold), "memory access during HOLD");
    if (hold && inblk != 0) n_hold++;   // HOLD inside a block transfer
    for (int i = 0; i < 3; i++) if (gnt[i]) for (int j = 0; j < i; j++) chk(!req[j], "priority");
    hold <= ($urandom % 10 == 0);
  end

  // one process per requester
  for (genvar r = 0; r < 3; r++) begin : g_req
    initial begin
      mreq[r] = '0;
      wait (rst_n);
      repeat (300) begin
        automatic logic [2:0] code = 3'($urandom % 5);
        automatic logic [15:0] idx = (code == 3'd1) ? 16'($urandom % 10561) : 16'($urandom % 8192);
        automatic bit we = ($urandom % 4 == 0);
        automatic int cnt = we ? 1 : 1 + $urandom % 8;
        automatic logic [18:0] a = mem_addr_of(code, idx);
        automatic logic [7:0] wd = 8'($urandom);
        automatic int got = 0;
        mreq[r] <= '{code: code, idx: idx, cnt: 4'(cnt), we: we, wdata: wd};
        req[r] <= 1'b1;
        @(posedge clk);
        while (!gnt[r]) @(posedge clk);
        req[r] <= 1'b0;
        if (we) begin
          shadow[a] = wd; n_wr++;
          chk(!rvalid[r], "rvalid on a write");
        end else begin
          // first byte comes in the grant cycle
          inblk[r] = (cnt > 1);
          forever begin
            if (rvalid[r]) begin
              chk(rdata == pat(19'(a + 19'(got))), $sformatf("req %0d byte %0d of %h", r, got, a));
              got++;
              chk(rlast[r] == (got == cnt), "rlast");
              if (rlast[r]) begin inblk[r] = 0; break; end
            end
            @(posedge clk);
          end
          chk(got == cnt, "block length");
          n_blk++;
        end
        @(posedge clk);
        repeat ($urandom % 3) @(posedge clk);
      end
      mreq[r] <= '0;
    end
  end

  initial begin
    for (int a = 0; a < (1 << 19); a++) u_mem.mem[a] = pat(19'(a));
    repeat (2) @(posedge clk); rst_n = 1;
  end

  initial begin
    #1;
    wait (rst_n);
    // end when all three requesters are done
    forever begin
      @(posedge clk);
      if (n_blk + n_wr == 900) break;
    end
    repeat (5) @(posedge clk);
    // written bytes are in memory
    foreach (shadow[a]) chk(u_mem.mem[a] == shadow[a], $sformatf("write at %h", a));
    chk(n_hold > 0 && n_wr > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
