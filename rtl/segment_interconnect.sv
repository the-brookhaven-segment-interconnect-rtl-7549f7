// segment_interconnect: a FASTBUS segment interconnect joining an upper and a
// lower segment.
//
// Transactions: a master on the upper segment whose address lies in the
// interconnect's range is answered with WAIT while the interconnect gains the
// lower segment and repeats the address there (si_path, downwards); an
// address on the lower segment outside the range goes up the same way. To the
// master the interconnect is transparent, apart from the WAIT that keeps its
// AS timeout from firing. If both directions wait for each other's segment,
// si_deadlock makes the lower master back off with BK.
// Broadcasts: a write to the broadcast register (si_bcast_reg) on the upper
// segment starts a broadcast on the lower segment (si_bcast_origin), local or,
// with the word's MSB set, global. A global broadcast arriving from above is
// passed down by si_bcast_relay, using the LS and BW lines to know when all
// segments below have it. The interconnect marks its upper segment with LS.
// Segment control comes from one si_seg_acquire per side.
// Two variants exist: UPPER_IS_CABLE = 1 has a cable segment above and a
// crate segment below, 0 the reverse. On the cable side each logical AL
// line runs as two physical lines (si_al_expander): the fb_bus_t al field
// carries direction A and the *_al_b_* ports direction B; on a crate side
// al is the ordinary wired-OR line and the *_al_b_* ports are unused.
// Interface: *_i are the lines seen on a segment, *_o what the interconnect
// asserts there (1 = asserted; the bus wire-ORs it). ev_o gives one-cycle
// event pulses. The design is clocked; every bus input is taken as already
// synchronised to clk_i, and every output is a register or an OR of
// registers. The address range and broadcast register address stand for the
// module's wire jumpers; all cycle counts assume a 10 ns clock.
module segment_interconnect
  import si_pkg::*;
#(
  parameter bit          UPPER_IS_CABLE = 1'b1,
  parameter ad_t         RANGE_BASE     = 32'h0100_0000,
  parameter ad_t         RANGE_MASK     = 32'hFF00_0000,
  parameter ad_t         BCAST_ADDR     = 32'h00FF_FFF0,
  parameter al_t         ARB_LEVEL_UP   = 6'h21,
  parameter al_t         ARB_LEVEL_LOW  = 6'h3E,
  parameter int unsigned DESKEW_CYC     = 3,
  parameter int unsigned TIMEOUT_CYC    = 200,
  parameter int unsigned DS_CYC         = 10,
  parameter int unsigned GUARD_CYC      = 25,
  parameter int unsigned SETTLE_CYC     = 8,
  parameter int unsigned DETECT_CYC     = 4
) (
  input  logic       clk_i,
  input  logic       rst_ni,
  input  fb_bus_t    up_i,
  output fb_bus_t    up_o,
  input  al_t        up_al_b_i,
  output al_t        up_al_b_o,
  input  fb_bus_t    low_i,
  output fb_bus_t    low_o,
  input  al_t        low_al_b_i,
  output al_t        low_al_b_o,
  output si_events_t ev_o
);
  localparam bit LOW_IS_CABLE = !UPPER_IS_CABLE;

  // ---------------- address decoding ----------------
  logic up_in_range, up_bcast_hit, low_in_range, low_bcast_hit;

  si_addr_decode #(.RANGE_BASE(RANGE_BASE), .RANGE_MASK(RANGE_MASK), .BCAST_ADDR(BCAST_ADDR))
    u_dec_up  (.addr_i(up_i.ad),  .in_range_o(up_in_range),  .bcast_hit_o(up_bcast_hit));
  si_addr_decode #(.RANGE_BASE(RANGE_BASE), .RANGE_MASK(RANGE_MASK), .BCAST_ADDR(BCAST_ADDR))
    u_dec_low (.addr_i(low_i.ad), .in_range_o(low_in_range), .bcast_hit_o(low_bcast_hit));

  // ---------------- AL lines (cable side is split in two directions) -------
  fb_bus_t up_seen, low_seen;      // lines with the logical AL value
  fb_bus_t up_acq_drv, low_acq_drv;
  al_t     up_al_a, low_al_a;

  if (UPPER_IS_CABLE) begin : g_up_cable
    al_t up_al_log;
    si_al_expander u_al_up (.al_drive_i(up_acq_drv.al), .al_a_o(up_al_a), .al_b_o(up_al_b_o),
                            .al_a_i(up_i.al), .al_b_i(up_al_b_i), .al_o(up_al_log));
    always_comb begin
      up_seen    = up_i;
      up_seen.al = up_al_log;
    end
  end else begin : g_up_crate
    assign up_al_a   = up_acq_drv.al;
    assign up_al_b_o = '0;
    assign up_seen   = up_i;
  end

  if (LOW_IS_CABLE) begin : g_low_cable
    al_t low_al_log;
    si_al_expander u_al_low (.al_drive_i(low_acq_drv.al), .al_a_o(low_al_a), .al_b_o(low_al_b_o),
                             .al_a_i(low_i.al), .al_b_i(low_al_b_i), .al_o(low_al_log));
    always_comb begin
      low_seen    = low_i;
      low_seen.al = low_al_log;
    end
  end else begin : g_low_crate
    assign low_al_a   = low_acq_drv.al;
    assign low_al_b_o = '0;
    assign low_seen   = low_i;
  end

  // ---------------- segment control ----------------
  localparam int unsigned C_PATH = 0, C_RELAY = 1, C_ORIGIN = 2;
  logic       up_req, up_gnt;
  logic [2:0] low_req, low_gnt;
  logic       low_gk_rel, relay_rel, origin_rel;

  si_seg_acquire #(.N_CLIENTS(1), .ARB_LEVEL(ARB_LEVEL_UP), .SETTLE_CYC(SETTLE_CYC)) u_acq_up (
    .clk_i, .rst_ni, .req_i(up_req), .gnt_o(up_gnt), .gk_rel_i(1'b0),
    .bus_i(up_seen), .drv_o(up_acq_drv), .won_o(ev_o.arb_up));

  assign low_gk_rel = (relay_rel && low_gnt[C_RELAY]) || (origin_rel && low_gnt[C_ORIGIN]);

  si_seg_acquire #(.N_CLIENTS(3), .ARB_LEVEL(ARB_LEVEL_LOW), .SETTLE_CYC(SETTLE_CYC)) u_acq_low (
    .clk_i, .rst_ni, .req_i(low_req), .gnt_o(low_gnt), .gk_rel_i(low_gk_rel),
    .bus_i(low_seen), .drv_o(low_acq_drv), .won_o(ev_o.arb_low));

  // ---------------- transaction relay, both directions ----------------
  fb_bus_t dn_up_drv, dn_low_drv, upp_up_drv, upp_low_drv;
  logic    dn_wait, up_wait, dn_busy, up_busy, abort_up, bk;
  logic    dn_timeout, up_timeout, up_aborted, dn_aborted;

  si_path #(.DESKEW_CYC(DESKEW_CYC), .TIMEOUT_CYC(TIMEOUT_CYC)) u_down (
    .clk_i, .rst_ni,
    .hit_i(up_in_range && !up_bcast_hit), .inhibit_i(up_gnt), .abort_i(1'b0),
    .src_i(up_i), .src_o(dn_up_drv), .dst_i(low_i), .dst_o(dn_low_drv),
    .acq_req_o(low_req[C_PATH]), .acq_gnt_i(low_gnt[C_PATH]),
    .waiting_o(dn_wait), .busy_o(dn_busy), .fwd_o(ev_o.down_fwd),
    .timeout_o(dn_timeout), .aborted_o(dn_aborted));

  si_path #(.DESKEW_CYC(DESKEW_CYC), .TIMEOUT_CYC(TIMEOUT_CYC)) u_up (
    .clk_i, .rst_ni,
    .hit_i(!low_in_range), .inhibit_i(low_gnt != '0), .abort_i(abort_up),
    .src_i(low_i), .src_o(upp_low_drv), .dst_i(up_i), .dst_o(upp_up_drv),
    .acq_req_o(up_req), .acq_gnt_i(up_gnt),
    .waiting_o(up_wait), .busy_o(up_busy), .fwd_o(ev_o.up_fwd),
    .timeout_o(up_timeout), .aborted_o(up_aborted));

  assign ev_o.timeout = dn_timeout || up_timeout;

  si_deadlock #(.DETECT_CYC(DETECT_CYC)) u_deadlock (
    .clk_i, .rst_ni, .down_wait_i(dn_wait), .up_wait_i(up_wait), .lower_as_i(low_i.as),
    .abort_up_o(abort_up), .bk_o(bk), .event_o(ev_o.deadlock));

  // ---------------- broadcast ----------------
  fb_bus_t reg_drv, org_drv, rel_up_drv, rel_low_drv;
  ad_t     bc_word;
  logic    bc_global, bc_start, org_busy, org_done, rel_busy;

  si_bcast_reg u_breg (
    .clk_i, .rst_ni, .sel_i(up_bcast_hit && !up_gnt), .bus_i(up_i), .drv_o(reg_drv),
    .data_o(bc_word), .global_o(bc_global), .start_o(bc_start));

  si_bcast_origin #(.LOW_CABLE(LOW_IS_CABLE), .DESKEW_CYC(DESKEW_CYC), .DS_CYC(DS_CYC),
                    .GUARD_CYC(GUARD_CYC)) u_borg (
    .clk_i, .rst_ni, .start_i(bc_start), .data_i(bc_word), .global_i(bc_global),
    .acq_req_o(low_req[C_ORIGIN]), .acq_gnt_i(low_gnt[C_ORIGIN]), .gk_rel_o(origin_rel),
    .bus_i(low_i), .drv_o(org_drv), .busy_o(org_busy), .done_o(org_done));

  // Which kind of broadcast the origin unit has just finished.
  logic org_glob_q;
  always_ff @(posedge clk_i) begin
    if (!rst_ni)       org_glob_q <= 1'b0;
    else if (bc_start) org_glob_q <= bc_global;
  end
  assign ev_o.bcast_local  = org_done && !org_glob_q;
  assign ev_o.bcast_global = org_done &&  org_glob_q;

  si_bcast_relay #(.UP_CABLE(UPPER_IS_CABLE), .LOW_CABLE(LOW_IS_CABLE), .DESKEW_CYC(DESKEW_CYC),
                   .GUARD_CYC(GUARD_CYC)) u_brel (
    .clk_i, .rst_ni, .up_i(up_i), .up_o(rel_up_drv), .low_i(low_i), .low_o(rel_low_drv),
    .acq_req_o(low_req[C_RELAY]), .acq_gnt_i(low_gnt[C_RELAY]), .gk_rel_o(relay_rel),
    .busy_o(rel_busy), .last_o(ev_o.relay_last), .done_o(ev_o.relay_done));

  // ---------------- wired-OR of everything this module asserts ----------------
  always_comb begin
    up_o     = fb_bus_t'(dn_up_drv | upp_up_drv | reg_drv | rel_up_drv | up_acq_drv);
    up_o.al  = up_al_a;
    up_o.ls  = 1'b1;                       // marks the upper segment: a segment lies below
    low_o    = fb_bus_t'(dn_low_drv | upp_low_drv | org_drv | rel_low_drv | low_acq_drv);
    low_o.al = low_al_a;
    low_o.bk = bk;
  end

  // Only one unit drives the lower A/D lines at a time.
  a_low_ad_single: assert property (@(posedge clk_i) disable iff (!rst_ni)
    $onehot0({dn_low_drv.ad != '0, org_drv.ad != '0, rel_low_drv.ad != '0}));

endmodule
