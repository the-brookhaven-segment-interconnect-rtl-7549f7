// si_bcast_relay: passes a global broadcast from the upper segment down to the
// lower segment.
//
// A global broadcast is seen on the upper segment as BC with AK and the
// global bit (A/D MSB) set. The relay then asserts BW on the upper segment
// (WAIT if the upper segment is a crate segment), asks for the lower segment,
// and when it holds it drives the word on the lower A/D lines with BC and AK.
// If the lower segment is the last one (its LS line is low: no interconnect
// hangs below) it drops BW at once, after the deskew time; otherwise it waits
// GUARD_CYC cycles more (for BW to come back along a cable) and then until
// BW (or WAIT) on the lower segment goes low, so the upper BW is the OR of
// all segments below. GK on the lower segment is dropped at the same
// moment. From then on DS of the upper segment is repeated on the lower one;
// when BC goes low above, BC and DS drop below and DESKEW_CYC cycles later AK
// and the A/D lines, and the lower segment is given back.
// The BW/LS protocol is the document's; repeating DS one cycle late, the
// deskew count and the guard time are this design's choices.
// UP_CABLE/LOW_CABLE say which segments are cable segments. Outputs registered; synchronous reset.
module si_bcast_relay
  import si_pkg::*;
#(
  parameter bit          UP_CABLE   = 1'b1,
  parameter bit          LOW_CABLE  = 1'b0,
  parameter int unsigned DESKEW_CYC = 3,
  parameter int unsigned GUARD_CYC  = 25
) (
  input  logic    clk_i,
  input  logic    rst_ni,
  input  fb_bus_t up_i,
  output fb_bus_t up_o,       // BW or WAIT
  input  fb_bus_t low_i,
  output fb_bus_t low_o,      // BC, AK, DS, A/D
  output logic    acq_req_o,
  input  logic    acq_gnt_i,
  output logic    gk_rel_o,
  output logic    busy_o,
  output logic    last_o,     // pulse: relayed as the last segment
  output logic    done_o      // pulse: relay finished
);
  typedef enum logic [2:0] {L_IDLE, L_ACQ, L_DESK1, L_GUARD, L_BWAIT, L_RUN, L_DESK2} st_e;
  st_e  st_q;
  ad_t  word_q;
  logic bc_q, bwo_q, req_q, rel_q, drive_q, lbc_q, lds_q;
  logic [$clog2(DESKEW_CYC+GUARD_CYC+1)-1:0] cnt_q;
  logic low_bw;

  assign low_bw = LOW_CABLE ? low_i.bw : low_i.wt;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      st_q <= L_IDLE; word_q <= '0; bc_q <= 1'b0; bwo_q <= 1'b0; req_q <= 1'b0;
      rel_q <= 1'b0; drive_q <= 1'b0; lbc_q <= 1'b0; lds_q <= 1'b0; cnt_q <= '0;
      last_o <= 1'b0; done_o <= 1'b0;
    end else begin
      bc_q   <= up_i.bc;
      last_o <= 1'b0;
      done_o <= 1'b0;
      unique case (st_q)
        L_IDLE: if (up_i.bc && !bc_q && up_i.ak && up_i.ad[AD_W-1]) begin
          word_q <= up_i.ad; bwo_q <= 1'b1; req_q <= 1'b1;
          st_q   <= L_ACQ;
        end
        L_ACQ: if (acq_gnt_i) begin
          drive_q <= 1'b1; lbc_q <= 1'b1; cnt_q <= '0;
          st_q    <= L_DESK1;
        end
        L_DESK1: begin
          if (cnt_q == DESKEW_CYC[$bits(cnt_q)-1:0] - 1'b1) begin
            if (!low_i.ls) begin
              bwo_q <= 1'b0; rel_q <= 1'b1; last_o <= 1'b1;
              st_q  <= L_RUN;
            end else begin
              cnt_q <= '0;
              st_q  <= L_GUARD;
            end
          end else cnt_q <= cnt_q + 1'b1;
        end
        L_GUARD: begin                       // BW from far along a cable
          if (cnt_q == GUARD_CYC[$bits(cnt_q)-1:0]) st_q <= L_BWAIT;
          else cnt_q <= cnt_q + 1'b1;
        end
        L_BWAIT: if (!low_bw) begin
          bwo_q <= 1'b0; rel_q <= 1'b1;
          st_q  <= L_RUN;
        end
        L_RUN: begin
          lds_q <= up_i.ds;
          if (!up_i.bc) begin
            lbc_q <= 1'b0; lds_q <= 1'b0; cnt_q <= '0;
            st_q  <= L_DESK2;
          end
        end
        L_DESK2: begin
          if (cnt_q == DESKEW_CYC[$bits(cnt_q)-1:0] - 1'b1) begin
            drive_q <= 1'b0; req_q <= 1'b0; rel_q <= 1'b0; done_o <= 1'b1;
            st_q    <= L_IDLE;
          end else cnt_q <= cnt_q + 1'b1;
        end
        default: st_q <= L_IDLE;
      endcase
    end
  end

  always_comb begin
    up_o     = FB_IDLE;
    up_o.bw  = UP_CABLE  ? bwo_q : 1'b0;
    up_o.wt  = !UP_CABLE ? bwo_q : 1'b0;
    low_o    = FB_IDLE;
    low_o.bc = lbc_q;
    low_o.ds = lds_q;
    low_o.ak = drive_q;
    low_o.ad = drive_q ? word_q : '0;
    acq_req_o = req_q;
    gk_rel_o  = rel_q;
    busy_o    = (st_q != L_IDLE);
  end

  // BW is held up while this relay is busy in the first phases only.
  a_bw_phase: assert property (@(posedge clk_i) disable iff (!rst_ni)
                               bwo_q |-> (st_q inside {L_ACQ, L_DESK1, L_GUARD, L_BWAIT}));
endmodule
