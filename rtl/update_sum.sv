// update_sum: the UPDATE SUM LOGIC (Update Sum Control Logic, 16 x 16
// multiplier and 41-bit accumulating adder).
//
// When a CN Active bit rises (the products logic has taken a CN whose
// CN Update Required was pulsed), the block follows that CN: every 2-codon strobed in by
// codon_avail is latched, the matching entry of the CN's Weight Table is read
// from DRAM (2 bytes; entry k for the k-th 2-codon), and product * weight
// (32 bits) goes through a pipeline register into the 41-bit accumulator.
// When CN Active falls and the pipeline has drained, the sum is loaded into the
// firing function and OUT Available is raised for the CN; it stays high until
// the output logic answers with OUT Accepted. A new OUT Available waits until
// the previous one was accepted, since the firing function holds one OUT.
// A CN Update Required pulse for the followed CN while it is active clears the
// partial sum: the products logic restarts the CN on the same pulse.
// Values are unsigned, as the 41-bit sum width (512 x 32 bits) implies.
// sum_idle tells the products logic that a new CN may begin.
module update_sum
  import pn_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_CN-1:0]     upd_pulse,
  input  logic [N_CN-1:0]     cn_active,
  input  logic                codon_avail,
  input  logic [CODON_W-1:0]  codon_product,
  // memory controller port
  output logic                mreq_valid,
  output mem_req_t            mreq,
  input  logic                mgnt,
  input  logic                mrvalid,
  input  logic                mrlast,
  input  logic [DATA_W-1:0]   mrdata,
  // handshake with the output logic, and the firing function
  output logic [N_CN-1:0]     out_avail,
  input  logic [N_CN-1:0]     out_accepted,
  output logic                fire_load,
  output logic [SUM_W-1:0]    sum,
  output logic                sum_idle
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_FIRE} state_e;

  state_e                         state;
  logic [CN_W-1:0]                cn;
  logic [UT_AW:0]                 k;          // weight index
  logic                           have_p;     // product latched, weight fetch pending
  logic                           granted;
  logic                           discard;    // weight in flight belongs to a cleared sum
  logic [CODON_W-1:0]             p_q;
  logic [DATA_W-1:0]              w_lo;
  logic [CODON_W+WEIGHT_W-1:0]    mul_q;
  logic                           mul_v;
  logic [SUM_W-1:0]               acc;
  logic                           clear_now;
  logic                           act_ok;
  logic [CN_W-1:0]                act_cn;
  logic [WEIGHT_W-1:0]            weight;

  always_comb begin
    act_ok = (cn_active != '0);
    act_cn = '0;
    for (int i = N_CN - 1; i >= 0; i--) if (cn_active[i]) act_cn = CN_W'(i);
  end

  assign clear_now = (state == S_RUN) && upd_pulse[cn] && cn_active[cn];
  assign weight    = {mrdata, w_lo};

  always_comb begin
    mreq       = '0;
    mreq_valid = (state == S_RUN) && have_p && !granted;
    mreq.code  = RGN_WT;
    mreq.idx   = IDX_W'({cn, k[UT_AW-1:0]});
    mreq.cnt   = CNT_W'(2);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cn        <= '0;
      k         <= '0;
      have_p    <= 1'b0;
      granted   <= 1'b0;
      discard   <= 1'b0;
      p_q       <= '0;
      w_lo      <= '0;
      mul_q     <= '0;
      mul_v     <= 1'b0;
      acc       <= '0;
      out_avail <= '0;
      fire_load <= 1'b0;
      sum       <= '0;
    end else begin
      fire_load <= 1'b0;
      // OUT Available is withdrawn once accepted.
      out_avail <= out_avail & ~out_accepted;

      unique case (state)
        S_IDLE: if (act_ok) begin
          cn      <= act_cn;
          k       <= '0;
          acc     <= '0;
          have_p  <= 1'b0;
          granted <= 1'b0;
          discard <= 1'b0;
          mul_v   <= 1'b0;
          state   <= S_RUN;
        end
        S_RUN: begin
          // weight fetch
          if (mgnt) granted <= 1'b1;
          if (mrvalid && !mrlast) begin
            w_lo   <= mrdata;
          end
          mul_v <= 1'b0;
          if (mrvalid && mrlast) begin
            granted <= 1'b0;
              have_p  <= 1'b0;
            if (!discard && !clear_now) begin
              mul_q <= p_q * weight;
              mul_v <= 1'b1;
              k     <= k + 1'b1;
            end
            discard <= 1'b0;
          end
          // a new 2-codon
          if (codon_avail && !clear_now) begin
            p_q    <= codon_product;
            have_p <= 1'b1;
          end
          // accumulate
          if (mul_v && !clear_now) acc <= acc + SUM_W'(mul_q);
          // restart of this CN: drop the partial sum
          if (clear_now) begin
            acc   <= '0;
            k     <= '0;
            mul_v <= 1'b0;
            if (have_p && !(mrvalid && mrlast)) begin
              if (granted || mgnt) discard <= 1'b1;  // let the transfer end, drop it
              else                 have_p  <= 1'b0;  // not started: withdraw
            end
          end
          // the CN is complete
          if (!cn_active[cn] && !have_p && !mul_v && !codon_avail) state <= S_FIRE;
        end
        S_FIRE: if ((out_avail & ~out_accepted) == '0) begin
          sum           <= acc;
          fire_load     <= 1'b1;
          out_avail[cn] <= 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign sum_idle = (state == S_IDLE);

  // The products logic never strobes a 2-codon before the previous weight is in.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_RUN && codon_avail) |-> !have_p || (mrvalid && mrlast))
    else $error("update_sum: 2-codon strobed while the previous one is pending");
endmodule
