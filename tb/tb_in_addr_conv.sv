// tb_in_addr_conv: every level's conversion of originator addresses into IDB
// addresses 1..10560 (offsets 0, 64, 320, 2368 plus one), and the data field.
// The offsets are the architecture's; the +1 (IDB address 0 = no input) is this
// design's own numbering. Purely combinational.
module tb_in_addr_conv;
  import pn_pkg::*;
  int checks = 0, failures = 0;
  logic [13:0] pk0; logic [15:0] pk1; logic [18:0] pk2; logic [20:0] pk3;
  logic [7:0]  d [4];
  logic [13:0] a [4];
  in_addr_conv #(.AW(6),  .OFFSET(0))    u0 (.pkt(pk0), .data(d[0]), .idb_addr(a[0]));
  in_addr_conv #(.AW(8),  .OFFSET(64))   u1 (.pkt(pk1), .data(d[1]), .idb_addr(a[1]));
  in_addr_conv #(.AW(11), .OFFSET(320))  u2 (.pkt(pk2), .data(d[2]), .idb_addr(a[2]));
  in_addr_conv #(.AW(13), .OFFSET(2368)) u3 (.pkt(pk3), .data(d[3]), .idb_addr(a[3]));
  initial begin
    int size [4] = '{64, 256, 2048, 8192};
    int off  [4] = '{1, 65, 321, 2369};
    for (int l = 0; l < 4; l++) begin
      for (int n = 0; n < 200; n++) begin
        automatic int x = (n == 0) ? 0 : (n == 1) ? size[l] - 1 : $urandom % size[l];
        automatic logic [7:0] v = 8'($urandom);
        pk0 = {v, 6'(x)}; pk1 = {v, 8'(x)}; pk2 = {v, 11'(x)}; pk3 = {v, 13'(x)};
        #1;
        checks++;
        if (a[l] != 14'(x + off[l]) || d[l] != v) begin
          failures++; $display("FAIL: level %0d addr %0d -> %0d", l, x, a[l]);
        end
      end
    end
    // the last input CN of the PN is number 10560
    pk3 = {8'd0, 13'd8191}; #1;
    checks++; if (a[3] != 14'd10560) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
