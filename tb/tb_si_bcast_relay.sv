// tb_si_bcast_relay: a global broadcast arriving on an upper cable segment is
// passed to a lower crate segment. The test plays the originating
// interconnect above (BC, AK, word; DS for 10 cycles once BW is low) and,
// below, a latching module plus optionally a further interconnect that
// marks LS and holds WAIT for a while.
// Checks: a local broadcast is ignored; BW is raised on the upper segment;
// with LS low below, BW drops after the deskew time and the "last" pulse
// fires; with LS high below, BW stays up exactly until WAIT below is low and
// GK is kept until then; the word is latched below on BC and DS; AK and A/D
// below drop a deskew after BC.
module tb_si_bcast_relay;
  import si_pkg::*;
  localparam int DESKEW = 3, HOLD_BELOW = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fb_bus_t up, low, up_drv, low_drv, above, below;
  logic req, gnt, rel, busy, last, done;

  si_bcast_relay #(.UP_CABLE(1'b1), .LOW_CABLE(1'b0), .DESKEW_CYC(DESKEW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .up_i(up), .up_o(up_drv), .low_i(low), .low_o(low_drv),
    .acq_req_o(req), .acq_gnt_i(gnt), .gk_rel_o(rel), .busy_o(busy),
    .last_o(last), .done_o(done));

  assign up  = fb_bus_t'(above | up_drv);
  assign low = fb_bus_t'(below | low_drv);

  int gc;
  always_ff @(posedge clk) begin
    if (!rst_n || !req) begin gc <= 0; gnt <= 0; end
    else if (gc == 6) gnt <= 1;
    else gc <= gc + 1;
  end

  // below: LS marker and WAIT holder
  logic ls_below = 0;
  int   wc;
  logic lbc_q;
  ad_t  latched;
  logic lds_q;
  always_ff @(posedge clk) begin
    lbc_q <= low.bc; lds_q <= low.ds;
    if (!rst_n) begin below <= FB_IDLE; wc <= 0; latched <= '0; end
    else begin
      below.ls <= ls_below;
      if (ls_below && low.bc && !lbc_q && low.ad[31]) begin below.wt <= 1; wc <= HOLD_BELOW; end
      else if (wc > 1) wc <= wc - 1;
      else if (wc == 1) begin below.wt <= 0; wc <= 0; end
      if (low.bc && low.ds && !lds_q) latched <= low.ad;
    end
  end

  int cyc, t_bw_dn, t_wt_dn, t_rel, t_bc_dn, t_ak_dn, lasts;
  logic bw_q, wt_q, rel_q, bcq, akq;
  always_ff @(posedge clk) begin
    if (!rst_n) begin cyc <= 0; lasts <= 0; end
    else begin
      cyc <= cyc + 1;
      bw_q <= up.bw; wt_q <= low.wt; rel_q <= rel; bcq <= low.bc; akq <= low.ak;
      if (!up.bw && bw_q) t_bw_dn <= cyc;
      if (!low.wt && wt_q) t_wt_dn <= cyc;
      if (rel && !rel_q) t_rel <= cyc;
      if (!low.bc && bcq) t_bc_dn <= cyc;
      if (!low.ak && akq) t_ak_dn <= cyc;
      if (last) lasts <= lasts + 1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // the originator above
  task automatic broadcast(ad_t w);
    above.ad = w; above.bc = 1; above.ak = 1;
    repeat (DESKEW + 1) @(posedge clk);
    while (up.bw) @(posedge clk);
    #1 above.ds = 1;
    repeat (10) @(posedge clk);
    #1 above.ds = 0; above.bc = 0;
    repeat (DESKEW) @(posedge clk);
    #1 above.ak = 0; above.ad = '0;
    repeat (DESKEW + 4) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0;
  initial begin
    above = FB_IDLE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);
    // local broadcast above: not for us
    broadcast(32'h0000_0042);
    check("local broadcast ignored", !busy && latched == '0 && lasts == 0);
    // global, last segment
    fork
      broadcast(32'h8000_0001);
      begin
        repeat (2) @(posedge clk); #1;
        check("BW raised on the upper segment", up.bw);
      end
    join
    check("last segment: word latched below", latched == 32'h8000_0001);
    check("last segment: last pulse", lasts == 1);
    check("last segment: BW and GK together", t_rel == t_bw_dn);
    check("AK below a deskew after BC", t_ak_dn - t_bc_dn == DESKEW);
    check("released", !busy && !req);
    // global, another segment below
    ls_below = 1;
    repeat (3) @(posedge clk);
    broadcast(32'h8000_0002);
    check("chained: word latched below", latched == 32'h8000_0002);
    check("chained: no last pulse", lasts == 1);
    check("chained: BW held until WAIT below low", t_bw_dn - t_wt_dn >= 0 && t_bw_dn - t_wt_dn <= 2);
    check("chained: GK kept until then", t_rel == t_bw_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
