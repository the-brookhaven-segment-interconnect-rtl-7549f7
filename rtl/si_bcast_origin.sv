// si_bcast_origin: runs a broadcast that this interconnect originates on its
// lower segment.
//
// On start_i (the broadcast register was written) it asks for the lower
// segment. Holding it, it drives the broadcast word on the A/D lines and
// asserts BC and AK. AK has to be asserted because the next arbitration winner
// may take the segment as soon as AK is low. For a local broadcast GK is
// dropped at once, so arbitration for the next cycle can begin, and DS follows
// DESKEW_CYC cycles later. For a global broadcast the interconnects below
// hold BW (WAIT on a crate segment) until every segment below has the word;
// after the deskew time and a further GUARD_CYC cycles (long enough for BW
// to come back along the longest cable: 250 ns covers a 75-foot cable both
// ways) this block waits for that line to be low, then drops GK and asserts
// DS. The modules latch the word on BC and DS together. After
// DS_CYC cycles (100 ns at the 10 ns clock this design assumes) BC and DS
// drop, and DESKEW_CYC cycles later AK and the A/D lines.
// The sequence is the document's; the clock period, the deskew count and the
// guard time are this design's choices. LOW_CABLE selects which line is watched: BW on a cable
// segment, WAIT on a crate segment. Outputs registered; synchronous reset.
module si_bcast_origin
  import si_pkg::*;
#(
  parameter bit          LOW_CABLE  = 1'b0,
  parameter int unsigned DESKEW_CYC = 3,
  parameter int unsigned DS_CYC     = 10,
  parameter int unsigned GUARD_CYC  = 25
) (
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    start_i,
  input  ad_t     data_i,
  input  logic    global_i,
  output logic    acq_req_o,
  input  logic    acq_gnt_i,
  output logic    gk_rel_o,
  input  fb_bus_t bus_i,      // lower segment lines
  output fb_bus_t drv_o,
  output logic    busy_o,
  output logic    done_o      // pulse: broadcast finished
);
  typedef enum logic [2:0] {O_IDLE, O_ACQ, O_DESK1, O_GUARD, O_BWAIT, O_DS, O_DESK2} st_e;
  st_e  st_q;
  ad_t  word_q;
  logic glob_q, req_q, rel_q, drive_q, bc_q, ds_q;
  logic [$clog2(DESKEW_CYC+DS_CYC+GUARD_CYC+1)-1:0] cnt_q;
  logic bw_seen;

  assign bw_seen = LOW_CABLE ? bus_i.bw : bus_i.wt;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      st_q <= O_IDLE; word_q <= '0; glob_q <= 1'b0; req_q <= 1'b0; rel_q <= 1'b0;
      drive_q <= 1'b0; bc_q <= 1'b0; ds_q <= 1'b0; cnt_q <= '0; done_o <= 1'b0;
    end else begin
      done_o <= 1'b0;
      unique case (st_q)
        O_IDLE: if (start_i) begin
          word_q <= data_i; glob_q <= global_i; req_q <= 1'b1;
          st_q   <= O_ACQ;
        end
        O_ACQ: if (acq_gnt_i) begin
          drive_q <= 1'b1; bc_q <= 1'b1;
          rel_q   <= !glob_q;
          cnt_q   <= '0;
          st_q    <= O_DESK1;
        end
        O_DESK1: begin
          if (cnt_q == DESKEW_CYC[$bits(cnt_q)-1:0] - 1'b1) begin
            cnt_q <= '0;
            if (glob_q) st_q <= O_GUARD;
            else begin ds_q <= 1'b1; st_q <= O_DS; end
          end else cnt_q <= cnt_q + 1'b1;
        end
        O_GUARD: begin                       // BW from far along a cable
          if (cnt_q == GUARD_CYC[$bits(cnt_q)-1:0]) begin
            cnt_q <= '0;
            st_q  <= O_BWAIT;
          end else cnt_q <= cnt_q + 1'b1;
        end
        O_BWAIT: if (!bw_seen) begin
          rel_q <= 1'b1; ds_q <= 1'b1;
          st_q  <= O_DS;
        end
        O_DS: begin
          if (cnt_q == DS_CYC[$bits(cnt_q)-1:0] - 1'b1) begin
            bc_q <= 1'b0; ds_q <= 1'b0; cnt_q <= '0;
            st_q <= O_DESK2;
          end else cnt_q <= cnt_q + 1'b1;
        end
        O_DESK2: begin
          if (cnt_q == DESKEW_CYC[$bits(cnt_q)-1:0] - 1'b1) begin
            drive_q <= 1'b0; req_q <= 1'b0; rel_q <= 1'b0; done_o <= 1'b1;
            st_q    <= O_IDLE;
          end else cnt_q <= cnt_q + 1'b1;
        end
        default: st_q <= O_IDLE;
      endcase
    end
  end

  always_comb begin
    drv_o    = FB_IDLE;
    drv_o.bc = bc_q;
    drv_o.ds = ds_q;
    drv_o.ak = drive_q;
    drv_o.ad = drive_q ? word_q : '0;
    acq_req_o = req_q;
    gk_rel_o  = rel_q;
    busy_o    = (st_q != O_IDLE);
  end

  // BC and DS are only driven while the lower segment is held.
  a_bc_held: assert property (@(posedge clk_i) disable iff (!rst_ni) (bc_q || ds_q) |-> acq_gnt_i);

endmodule
