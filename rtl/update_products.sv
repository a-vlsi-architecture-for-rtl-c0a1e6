// update_products: the UPDATE PRODUCTS LOGIC (Product Update Control Logic,
// its 512 x 13-bit internal buffer and the 8 x 8 multiplier).
//
// CN Update Required pulses are latched into per-CN pending bits. When the PN
// runs, the sum logic is idle and some CN is pending, the lowest-numbered such
// CN is taken: its CN Active bit is raised and its 2-codons Used Table is copied
// from DRAM into the internal buffer, entry by entry, until a zero pointer or
// the 512th entry. Then, for each buffered entry, the two IDB addresses are read
// from the 2-codon Products Table, the two input bytes are read from the IDB,
// and their product is presented on codon_product with codon_avail high for
// one cycle. A zero IDB address means "no second input": the other byte is
// passed unchanged (both zero gives a product of 0, this implementation's
// choice). After the last product the CN Active bit is dropped.
// If the CN being computed is pulsed again, all its products are recomputed
// from the first entry (the buffered table is reused; the sum logic discards
// its partial sum on the same pulse) and `restart` pulses.
// Memory cost per 2-codon: 2 bytes of Used Table, 4 of Products Table and up to
// 2 input bytes, the architecture's eight byte accesses. Holding back a new CN
// until the sum logic is idle (sum_idle) is this implementation's addition: the
// architecture shows no such signal but needs the ordering.
module update_products
  import pn_pkg::*;
#(
  parameter int unsigned ENTRIES = UT_ENTRIES   // Used Table entries per CN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                run,
  input  logic [N_CN-1:0]     upd_pulse,
  input  logic                sum_idle,
  // memory controller port
  output logic                mreq_valid,
  output mem_req_t            mreq,
  input  logic                mgnt,
  input  logic                mrvalid,
  input  logic                mrlast,
  input  logic [DATA_W-1:0]   mrdata,
  // to the sum logic
  output logic [N_CN-1:0]     cn_active,
  output logic                codon_avail,
  output logic [CODON_W-1:0]  codon_product,
  output logic                restart,
  output logic                idle
);
  localparam int unsigned KW = $clog2(ENTRIES + 1);
  localparam int unsigned BW = $clog2(ENTRIES);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_PT, S_D1, S_D2, S_DONE} state_e;

  state_e              state;
  logic [N_CN-1:0]     pending;
  logic [CN_W-1:0]     cn;
  logic [KW-1:0]       k;          // load index, then compute index
  logic [KW-1:0]       n;          // number of entries in the buffer
  logic [1:0]          bc;         // byte counter within a transfer
  logic                granted;    // current transfer has been granted
  logic [DATA_W-1:0]   b0, b1, b2; // bytes collected from a transfer
  logic [IDB_AW-1:0]   a1, a2;
  logic [DATA_W-1:0]   d1;
  logic                restart_q;
  logic [PT_AW-1:0]    ubuf [ENTRIES];   // internal 2-codons Used Table buffer

  logic                pick_ok;
  logic [CN_W-1:0]     pick;
  logic                restart_now;
  logic                fetch_done;   // last byte of the current transfer
  logic [PT_AW-1:0]    ut_entry;
  logic [IDB_AW-1:0]   pt_a1, pt_a2;

  always_comb begin
    pick_ok = (pending != '0);
    pick    = '0;
    for (int i = N_CN - 1; i >= 0; i--) if (pending[i]) pick = CN_W'(i);
  end

  assign restart_now = restart_q || upd_pulse[cn];
  assign fetch_done  = mrvalid && mrlast;
  logic [15:0] w_ut, w_a1, w_a2;   // little-endian 16-bit fields
  assign w_ut        = {mrdata, b0};
  assign w_a1        = {b1, b0};
  assign w_a2        = {mrdata, b2};
  assign ut_entry    = w_ut[PT_AW-1:0];
  assign pt_a1       = w_a1[IDB_AW-1:0];
  assign pt_a2       = w_a2[IDB_AW-1:0];

  always_comb begin
    mreq       = '0;
    mreq_valid = 1'b0;
    unique case (state)
      S_LOAD: begin
        mreq_valid = !granted;
        mreq.code  = RGN_UT;
        mreq.idx   = IDX_W'({cn, k[BW-1:0]});
        mreq.cnt   = CNT_W'(2);
      end
      S_PT: begin
        mreq_valid = !granted;
        mreq.code  = RGN_PT;
        mreq.idx   = IDX_W'(ubuf[k[BW-1:0]]);
        mreq.cnt   = CNT_W'(4);
      end
      S_D1: begin
        mreq_valid = !granted;
        mreq.code  = RGN_IDB;
        mreq.idx   = IDX_W'(a1);
        mreq.cnt   = CNT_W'(1);
      end
      S_D2: begin
        mreq_valid = !granted;
        mreq.code  = RGN_IDB;
        mreq.idx   = IDX_W'(a2);
        mreq.cnt   = CNT_W'(1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      pending       <= '0;
      cn            <= '0;
      k             <= '0;
      n             <= '0;
      bc            <= '0;
      granted       <= 1'b0;
      b0            <= '0;
      b1            <= '0;
      b2            <= '0;
      a1            <= '0;
      a2            <= '0;
      d1            <= '0;
      restart_q     <= 1'b0;
      restart       <= 1'b0;
      cn_active     <= '0;
      codon_avail   <= 1'b0;
      codon_product <= '0;
      for (int i = 0; i < ENTRIES; i++) ubuf[i] <= '0;
    end else begin
      logic              fin;   // the fetch of one 2-codon ends this cycle
      logic [CODON_W-1:0] pv;   // its product
      fin = 1'b0;
      pv  = '0;
      codon_avail <= 1'b0;
      restart     <= 1'b0;
      // Pulses for the CN in progress restart it; others wait as pending.
      if (state == S_IDLE) pending <= pending | upd_pulse;
      else                 pending <= pending | (upd_pulse & ~(N_CN'(1) << cn));
      if (state != S_IDLE && upd_pulse[cn]) restart_q <= 1'b1;

      if (mgnt) granted <= 1'b1;
      if (mrvalid) begin
        bc <= bc + 1'b1;
        unique case (bc)
          2'd0: b0 <= mrdata;
          2'd1: b1 <= mrdata;
          2'd2: b2 <= mrdata;
          default: ;
        endcase
      end
      if (fetch_done) begin
        granted <= 1'b0;
        bc      <= '0;
      end

      unique case (state)
        S_IDLE: if (run && sum_idle && pick_ok) begin
          cn                 <= pick;
          pending            <= (pending | upd_pulse) & ~(N_CN'(1) << pick);
          cn_active          <= N_CN'(1) << pick;
          k                  <= '0;
          granted            <= 1'b0;
          bc                 <= '0;
          state              <= S_LOAD;
        end
        S_LOAD: if (fetch_done) begin
          if (ut_entry == '0 || k == KW'(ENTRIES - 1)) begin
            if (ut_entry != '0) ubuf[k[BW-1:0]] <= ut_entry;
            n         <= (ut_entry == '0) ? k : KW'(ENTRIES);
            k         <= '0;
            restart_q <= 1'b0;   // nothing computed yet
            state     <= (ut_entry == '0 && k == '0) ? S_DONE : S_PT;
          end else begin
            ubuf[k[BW-1:0]] <= ut_entry;
            k               <= k + 1'b1;
          end
        end
        S_PT: if (fetch_done) begin
          a1 <= pt_a1;
          a2 <= pt_a2;
          if (pt_a1 != '0)      state <= S_D1;
          else if (pt_a2 != '0) state <= S_D2;
          else                  fin = 1'b1;
        end
        S_D1: if (fetch_done) begin
          d1 <= mrdata;
          if (a2 != '0) state <= S_D2;
          else begin
            fin = 1'b1;
            pv  = CODON_W'(mrdata);
          end
        end
        S_D2: if (fetch_done) begin
          fin = 1'b1;
          pv  = (a1 != '0) ? CODON_W'(d1 * mrdata) : CODON_W'(mrdata);
        end
        S_DONE: begin
          if (restart_now && n != '0) begin
            restart_q <= 1'b0;
            restart   <= 1'b1;
            k         <= '0;
            state     <= S_PT;
          end else begin
            restart_q <= 1'b0;
            cn_active <= '0;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase

      // End of one 2-codon: strobe its product, or start the CN over.
      if (fin) begin
        if (restart_now) begin
          restart_q <= 1'b0;
          restart   <= 1'b1;
          k         <= '0;
          state     <= S_PT;
        end else begin
          codon_avail   <= 1'b1;
          codon_product <= pv;
          k             <= k + 1'b1;
          state         <= (k + 1'b1 == n) ? S_DONE : S_PT;
        end
      end
    end
  end

  assign idle = (state == S_IDLE) && (pending == '0);

  // At most one CN is active at a time.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(cn_active))
    else $error("update_products: more than one CN Active");
endmodule
