// si_seg_acquire: gains and holds control of one segment for the interconnect.
//
// Up to N_CLIENTS internal clients (transaction relay, broadcast units) ask
// for the segment with req_i; the lowest-numbered one wins inside the
// interconnect and keeps the segment until it drops its request.
// Getting the segment follows FASTBUS arbitration: assert AR; on each rising
// edge of AG from the segment's arbitration timing control, drive the
// arbitration level ARB_LEVEL on the AL lines with the usual self-selection
// rule (a competitor stops driving its lower bits while a higher AL bit is
// seen that it does not drive), let the lines settle for SETTLE_CYC cycles,
// and win if the AL lines then equal ARB_LEVEL; a loser waits for the next
// AG. The winner takes the segment (asserts GK, drops AR) as soon as GK and
// AK of the previous master are both low.
// The owner may drop GK early with gk_rel_i while still using the segment:
// the broadcast sequence does this so the next arbitration can start; the
// next master then waits for AK low.
// The document only names this step ("request control of the lower segment",
// "drops GK"); AR/AG/AL self-selection is the FASTBUS scheme, and the
// settle window, the client priority and the per-edge AG retry are this
// design's choices. All outputs are registered; reset is synchronous and active low.
module si_seg_acquire
  import si_pkg::*;
#(
  parameter int unsigned N_CLIENTS  = 3,
  parameter al_t         ARB_LEVEL  = 6'h21,
  parameter int unsigned SETTLE_CYC = 8
) (
  input  logic                 clk_i,
  input  logic                 rst_ni,
  input  logic [N_CLIENTS-1:0] req_i,
  output logic [N_CLIENTS-1:0] gnt_o,     // segment is held for this client
  input  logic                 gk_rel_i,  // owner lets GK go early
  input  fb_bus_t              bus_i,     // lines seen on the segment
  output fb_bus_t              drv_o,     // AR, GK and AL driven
  output logic                 won_o      // one-cycle pulse per arbitration won
);
  typedef enum logic [2:0] {A_IDLE, A_REQ, A_COMPETE, A_WON, A_HOLD} st_e;
  st_e st_q;
  logic [N_CLIENTS-1:0] owner_q;
  al_t  al_q;
  logic gk_q, ar_q, ag_q;
  logic [$clog2(SETTLE_CYC+1)-1:0] cnt_q;

  // Self-selection: drop every bit below a seen 1 that we do not assert.
  function automatic al_t al_select(al_t code, al_t seen);
    al_t r;
    logic beaten;
    beaten = 1'b0;
    for (int i = AL_W-1; i >= 0; i--) begin
      r[i] = code[i] & ~beaten;
      if (seen[i] & ~code[i]) beaten = 1'b1;
    end
    return r;
  endfunction

  // Lowest-numbered requester.
  function automatic logic [N_CLIENTS-1:0] pick(logic [N_CLIENTS-1:0] r);
    return r & (~r + 1'b1);
  endfunction

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      st_q    <= A_IDLE;
      owner_q <= '0;
      al_q    <= '0;
      gk_q    <= 1'b0;
      ar_q    <= 1'b0;
      ag_q    <= 1'b0;
      cnt_q   <= '0;
      won_o   <= 1'b0;
    end else begin
      ag_q  <= bus_i.ag;
      won_o <= 1'b0;
      unique case (st_q)
        A_IDLE: if (req_i != '0) begin
          owner_q <= pick(req_i);
          ar_q    <= 1'b1;
          st_q    <= A_REQ;
        end
        A_REQ: begin
          if ((req_i & owner_q) == '0) begin           // request withdrawn
            ar_q <= 1'b0;
            st_q <= A_IDLE;
          end else if (bus_i.ag && !ag_q) begin         // new arbitration cycle
            al_q  <= ARB_LEVEL;
            cnt_q <= '0;
            st_q  <= A_COMPETE;
          end
        end
        A_COMPETE: begin
          al_q <= al_select(ARB_LEVEL, bus_i.al);
          if (cnt_q == SETTLE_CYC[$bits(cnt_q)-1:0]) begin
            al_q <= '0;
            if (bus_i.al == ARB_LEVEL) begin
              st_q  <= A_WON;
              won_o <= 1'b1;
            end else begin
              st_q  <= A_REQ;                          // lost: wait for next AG
            end
          end else begin
            cnt_q <= cnt_q + 1'b1;
          end
        end
        A_WON: begin
          if ((req_i & owner_q) == '0) begin
            ar_q <= 1'b0;
            st_q <= A_IDLE;
          end else if (!bus_i.gk && !bus_i.ak) begin
            gk_q  <= 1'b1;
            ar_q  <= 1'b0;
            st_q  <= A_HOLD;
          end
        end
        A_HOLD: begin
          if (gk_rel_i) gk_q <= 1'b0;
          if ((req_i & owner_q) == '0) begin
            gk_q    <= 1'b0;
            owner_q <= '0;
            st_q    <= A_IDLE;
          end
        end
        default: st_q <= A_IDLE;
      endcase
    end
  end

  always_comb begin
    drv_o    = FB_IDLE;
    drv_o.ar = ar_q;
    drv_o.gk = gk_q;
    drv_o.al = al_q;
    gnt_o    = (st_q == A_HOLD) ? owner_q : '0;
  end

  // The granted client is always a single one.
  a_onehot_gnt: assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(gnt_o));
  // GK is only held while a client owns the segment.
  a_gk_owner: assert property (@(posedge clk_i) disable iff (!rst_ni) gk_q |-> (st_q == A_HOLD));

endmodule
