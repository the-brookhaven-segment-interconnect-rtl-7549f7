// tb_si_bcast_origin: the broadcast sequence on a lower cable segment, with a
// model of the segment grant, of a module that latches A/D on BC and DS
// together, and of an interconnect below that holds BW for a while after a
// global broadcast appears.
// Checks (local): GK let go together with BC/AK; DS exactly DESKEW cycles
// after BC; DS high for DS cycles (100 ns at 10 ns); BC and DS drop together;
// AK and A/D drop DESKEW cycles later; the word is latched.
// Checks (global): GK and DS held back while BW is up; DS follows BW low.
module tb_si_bcast_origin;
  import si_pkg::*;
  localparam int DESKEW = 3, DSC = 10, BW_HOLD = 30;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, glob = 0, req, gnt, rel, busy, done;
  ad_t  word = '0;
  fb_bus_t bus, drv, below;

  si_bcast_origin #(.LOW_CABLE(1'b1), .DESKEW_CYC(DESKEW), .DS_CYC(DSC)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start), .data_i(word), .global_i(glob),
    .acq_req_o(req), .acq_gnt_i(gnt), .gk_rel_o(rel), .bus_i(bus), .drv_o(drv),
    .busy_o(busy), .done_o(done));

  assign bus = fb_bus_t'(drv | below);

  int gc;
  always_ff @(posedge clk) begin
    if (!rst_n || !req) begin gc <= 0; gnt <= 0; end
    else if (gc == 4) gnt <= 1;
    else gc <= gc + 1;
  end

  // an interconnect below: BW for BW_HOLD cycles after a global BC appears
  int   bwc;
  logic bc_q;
  always_ff @(posedge clk) begin
    bc_q <= bus.bc;
    if (!rst_n) begin below <= FB_IDLE; bwc <= 0; end
    else begin
      if (bus.bc && !bc_q && bus.ad[31]) begin below.bw <= 1; bwc <= BW_HOLD; end
      else if (bwc > 1) bwc <= bwc - 1;
      else if (bwc == 1) begin below.bw <= 0; bwc <= 0; end
    end
  end

  // receiving module and cycle stamps
  ad_t latched;
  int  cyc, t_bc_up, t_ds_up, t_ds_dn, t_bc_dn, t_ak_dn, t_bw_dn, t_rel;
  logic ds_q, ak_q, bw_q, rel_q, bcq2, ds_before_bw;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0; latched <= '0; ds_q <= 0; ak_q <= 0; bw_q <= 0; rel_q <= 0; bcq2 <= 0;
      ds_before_bw <= 0;
    end else begin
      cyc <= cyc + 1;
      ds_q <= bus.ds; ak_q <= bus.ak; bw_q <= bus.bw; rel_q <= rel; bcq2 <= bus.bc;
      if (bus.bc && bus.ds && !ds_q) latched <= bus.ad;
      if (bus.bc && !bcq2) t_bc_up <= cyc;
      if (!bus.bc && bcq2) t_bc_dn <= cyc;
      if (bus.ds && !ds_q) t_ds_up <= cyc;
      if (!bus.ds && ds_q) t_ds_dn <= cyc;
      if (!bus.ak && ak_q) t_ak_dn <= cyc;
      if (!bus.bw && bw_q) t_bw_dn <= cyc;
      if (rel && !rel_q) t_rel <= cyc;
      if (bus.ds && bus.bw) ds_before_bw <= 1;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // local broadcast
    word = 32'h0000_1234; glob = 0; start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) @(posedge clk);
    @(posedge clk); #1;
    check("local: word latched on BC*DS", latched == 32'h0000_1234);
    check("local: GK released with BC", t_rel == t_bc_up);
    check("local: DS a deskew after BC", t_ds_up - t_bc_up == DESKEW);
    check("local: DS lasts 100 ns", t_ds_dn - t_ds_up == DSC);
    check("local: BC drops with DS", t_bc_dn == t_ds_dn);
    check("local: AK a deskew after BC", t_ak_dn - t_bc_dn == DESKEW);
    check("local: segment released", !req && !busy && bus.ad == '0);
    repeat (5) @(posedge clk);
    // global broadcast
    word = 32'h8000_00AB; glob = 1; start = 1;
    @(posedge clk); #1 start = 0;
    while (!done) @(posedge clk);
    @(posedge clk); #1;
    check("global: word latched", latched == 32'h8000_00AB);
    check("global: no DS while BW is up", !ds_before_bw);
    check("global: GK held until BW low", t_rel > t_bw_dn);
    check("global: DS soon after BW low", t_ds_up - t_bw_dn <= 2 && t_ds_up > t_bw_dn);
    check("global: DS lasts 100 ns", t_ds_dn - t_ds_up == DSC);
    check("global: AK a deskew after BC", t_ak_dn - t_bc_dn == DESKEW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
