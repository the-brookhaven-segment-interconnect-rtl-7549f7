// si_path: relays one master's transaction from a source segment to a
// destination segment (one instance per direction).
//
// When AS rises on the source segment with an address that is to be passed on
// (hit_i, decided by the caller from the address range), the path asserts
// WAIT on the source segment, which only stops the master's AS timeout, and
// asks for control of the destination segment. Once it holds it, the path
// puts the address on the destination A/D lines and, DESKEW_CYC cycles later,
// asserts AS. If neither AK nor WAIT comes back within TIMEOUT_CYC cycles it
// negates WAIT on the source (the master then times out) and withdraws AS;
// WAIT from the destination restarts the count. Normally AK comes back and is
// passed to the source; from then on the data cycles are relayed (DS and RD
// towards the slave, DK back, write data forward, read data back). When the
// master drops AS the path drops AS on the destination, waits for AK to go,
// drops AK on the source and gives the destination segment back.
// abort_i (from the deadlock resolver) makes a path that is still waiting for
// the destination segment give up: it negates WAIT and lets the segment go.
// This sequence is the document's; the clocked form, the relay register
// stage (one cycle per direction) and dropping WAIT once AK is passed are this
// design's choices. Outputs are registered; reset is synchronous, active low.
module si_path
  import si_pkg::*;
#(
  parameter int unsigned DESKEW_CYC  = 3,
  parameter int unsigned TIMEOUT_CYC = 200
) (
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    hit_i,      // source address is for the destination side
  input  logic    inhibit_i,  // do not start (the interconnect itself is master on the source)
  input  logic    abort_i,    // give up while still waiting for the destination
  input  fb_bus_t src_i,
  output fb_bus_t src_o,
  input  fb_bus_t dst_i,
  output fb_bus_t dst_o,
  output logic    acq_req_o,  // wants the destination segment
  input  logic    acq_gnt_i,  // holds the destination segment
  output logic    waiting_o,  // waiting for the destination segment
  output logic    busy_o,
  output logic    fwd_o,      // pulse: AK passed back to the source
  output logic    timeout_o,  // pulse: no AK/WAIT within the timeout
  output logic    aborted_o   // pulse: abort_i took effect
);
  typedef enum logic [2:0] {P_IDLE, P_ACQ, P_DESK, P_AWAIT, P_CONN, P_CLOSE, P_ERR, P_ABORT} st_e;
  st_e  st_q;
  logic as_q;
  ad_t  addr_q;
  logic [$clog2(DESKEW_CYC+1)-1:0]  dcnt_q;
  logic [$clog2(TIMEOUT_CYC+1)-1:0] tcnt_q;
  logic s_wt_q, s_ak_q, s_dk_q, d_as_q, d_ds_q, d_rd_q, d_adoe_q, req_q;
  ad_t  s_ad_q, d_ad_q;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      st_q <= P_IDLE; as_q <= 1'b0; addr_q <= '0; dcnt_q <= '0; tcnt_q <= '0;
      s_wt_q <= 1'b0; s_ak_q <= 1'b0; s_dk_q <= 1'b0; s_ad_q <= '0;
      d_as_q <= 1'b0; d_ds_q <= 1'b0; d_rd_q <= 1'b0; d_adoe_q <= 1'b0; d_ad_q <= '0;
      req_q <= 1'b0; fwd_o <= 1'b0; timeout_o <= 1'b0; aborted_o <= 1'b0;
    end else begin
      as_q      <= src_i.as;
      fwd_o     <= 1'b0;
      timeout_o <= 1'b0;
      aborted_o <= 1'b0;
      unique case (st_q)
        P_IDLE: if (src_i.as && !as_q && hit_i && !inhibit_i) begin
          addr_q <= src_i.ad;
          s_wt_q <= 1'b1;
          req_q  <= 1'b1;
          st_q   <= P_ACQ;
        end
        P_ACQ: begin
          if (abort_i) begin
            s_wt_q <= 1'b0; req_q <= 1'b0; aborted_o <= 1'b1;
            st_q   <= P_ABORT;
          end else if (!src_i.as) begin
            s_wt_q <= 1'b0; req_q <= 1'b0;
            st_q   <= P_IDLE;
          end else if (acq_gnt_i) begin
            d_ad_q <= addr_q; d_adoe_q <= 1'b1;
            dcnt_q <= '0;
            st_q   <= P_DESK;
          end
        end
        P_DESK: begin
          if (dcnt_q == DESKEW_CYC[$bits(dcnt_q)-1:0] - 1'b1) begin
            d_as_q <= 1'b1;
            tcnt_q <= '0;
            st_q   <= P_AWAIT;
          end else begin
            dcnt_q <= dcnt_q + 1'b1;
          end
        end
        P_AWAIT: begin
          if (!src_i.as) begin
            d_as_q <= 1'b0; d_adoe_q <= 1'b0; s_wt_q <= 1'b0;
            st_q   <= P_CLOSE;
          end else if (dst_i.ak) begin
            s_ak_q <= 1'b1; s_wt_q <= 1'b0; fwd_o <= 1'b1;
            d_adoe_q <= 1'b0;
            st_q   <= P_CONN;
          end else if (dst_i.wt) begin
            tcnt_q <= '0;
          end else if (tcnt_q == TIMEOUT_CYC[$bits(tcnt_q)-1:0] - 1'b1) begin
            s_wt_q <= 1'b0; d_as_q <= 1'b0; d_adoe_q <= 1'b0; timeout_o <= 1'b1;
            req_q  <= 1'b0;
            st_q   <= P_ERR;
          end else begin
            tcnt_q <= tcnt_q + 1'b1;
          end
        end
        P_CONN: begin
          d_ds_q   <= src_i.ds;
          d_rd_q   <= src_i.rd;
          d_adoe_q <= !src_i.rd;
          d_ad_q   <= src_i.ad;
          s_dk_q   <= dst_i.dk;
          s_ad_q   <= (src_i.rd && dst_i.dk) ? dst_i.ad : '0;
          if (!src_i.as) begin
            d_as_q <= 1'b0; d_ds_q <= 1'b0; d_rd_q <= 1'b0; d_adoe_q <= 1'b0;
            s_ad_q <= '0;   s_dk_q <= 1'b0;
            st_q   <= P_CLOSE;
          end
        end
        P_CLOSE: if (!dst_i.ak) begin
          s_ak_q <= 1'b0; s_dk_q <= 1'b0; req_q <= 1'b0;
          st_q   <= P_IDLE;
        end
        P_ERR, P_ABORT: if (!src_i.as) st_q <= P_IDLE;
        default: st_q <= P_IDLE;
      endcase
    end
  end

  always_comb begin
    src_o    = FB_IDLE;
    src_o.wt = s_wt_q;
    src_o.ak = s_ak_q;
    src_o.dk = s_dk_q;
    src_o.ad = s_ad_q;
    dst_o    = FB_IDLE;
    dst_o.as = d_as_q;
    dst_o.ds = d_ds_q;
    dst_o.rd = d_rd_q;
    dst_o.ad = d_adoe_q ? d_ad_q : '0;
    acq_req_o = req_q;
    waiting_o = (st_q == P_ACQ);
    busy_o    = (st_q != P_IDLE);
  end

  // AS is only driven on the destination while the segment is held.
  a_as_held: assert property (@(posedge clk_i) disable iff (!rst_ni) d_as_q |-> acq_gnt_i);

endmodule
