// tb_segment_interconnect_full: one interconnect with every parameter at its
// default (a cable segment M above, a crate segment L below), with a master,
// slave, broadcast receiver and arbitration model on each segment.
// Besides the real models it plays two neighbours by hand: an interconnect
// below L (it marks LS on L and holds WAIT there for a while when a global
// broadcast arrives) and an interconnect above that originates a global
// broadcast on M. It runs a write and a read from M to L, a write from L to
// M, the cross-addressing deadlock, a local and a global broadcast
// originated here, and a global broadcast relayed from M down to L.
module tb_segment_interconnect_full;
  import si_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int M = 0, L = 1;

  fb_bus_t    seg [2], mdrv [2], sdrv [2];
  logic       ag [2];
  fb_bus_t    up_o, low_o, above, below;
  al_t        up_b_o, low_b_o;
  si_events_t ev;

  segment_interconnect dut (
    .clk_i(clk), .rst_ni(rst_n),
    .up_i(seg[M]), .up_o(up_o), .up_al_b_i('0), .up_al_b_o(up_b_o),
    .low_i(seg[L]), .low_o(low_o), .low_al_b_i('0), .low_al_b_o(low_b_o),
    .ev_o(ev));

  always_comb begin
    seg[M]    = fb_bus_t'(mdrv[M] | sdrv[M] | up_o | above);
    seg[M].ag = ag[M];
    seg[L]    = fb_bus_t'(mdrv[L] | sdrv[L] | low_o | below);
    seg[L].ag = ag[L];
  end

  logic       mstart [2], mrd [2], mbusy [2], mdone [2];
  ad_t        maddr [2], mwdata [2], mrdata [2];
  logic [1:0] mstatus [2];
  int         saccess [2], rxcount [2];
  ad_t        rxword [2];
  localparam logic [7:0] SBYTE [2] = '{8'h02, 8'h01};

  for (genvar s = 0; s < 2; s++) begin : g_seg
    tb_fb_master #(.AS_TIMEOUT(40)) u_m (
      .clk_i(clk), .rst_ni(rst_n), .bus_i(seg[s]), .drv_o(mdrv[s]),
      .start_i(mstart[s]), .addr_i(maddr[s]), .rd_i(mrd[s]), .wdata_i(mwdata[s]),
      .rdata_o(mrdata[s]), .status_o(mstatus[s]), .busy_o(mbusy[s]), .done_o(mdone[s]));
    tb_fb_slave #(.BASE_BYTE(SBYTE[s])) u_s (
      .clk_i(clk), .rst_ni(rst_n), .bus_i(seg[s]), .drv_o(sdrv[s]), .accesses_o(saccess[s]));
    tb_fb_atc u_atc (.clk_i(clk), .rst_ni(rst_n), .bus_i(seg[s]), .ag_o(ag[s]));
    tb_fb_bcast_rx u_rx (.clk_i(clk), .rst_ni(rst_n), .bus_i(seg[s]),
                         .word_o(rxword[s]), .count_o(rxcount[s]));
  end

  // the interconnect below L: LS, and WAIT for 60 cycles on a global broadcast
  logic below_present = 0;
  int   wc;
  logic lbc_q;
  always_ff @(posedge clk) begin
    lbc_q <= seg[L].bc;
    if (!rst_n) begin below <= FB_IDLE; wc <= 0; end
    else begin
      below.ls <= below_present;
      if (below_present && seg[L].bc && !lbc_q && seg[L].ad[31]) begin below.wt <= 1; wc <= 60; end
      else if (wc > 1) wc <= wc - 1;
      else if (wc == 1) begin below.wt <= 0; wc <= 0; end
    end
  end

  int n_down, n_up, n_dead, n_bloc, n_bglob, n_relay, n_wait_l, n_bw_m, n_ds_in_wait;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_down <= 0; n_up <= 0; n_dead <= 0; n_bloc <= 0; n_bglob <= 0; n_relay <= 0;
      n_wait_l <= 0; n_bw_m <= 0; n_ds_in_wait <= 0;
    end else begin
      n_down   <= n_down   + int'(ev.down_fwd);
      n_up     <= n_up     + int'(ev.up_fwd);
      n_dead   <= n_dead   + int'(ev.deadlock);
      n_bloc   <= n_bloc   + int'(ev.bcast_local);
      n_bglob  <= n_bglob  + int'(ev.bcast_global);
      n_relay  <= n_relay  + int'(ev.relay_done);
      n_wait_l <= n_wait_l + int'(below.wt);
      n_bw_m   <= n_bw_m   + int'(up_o.bw);
      n_ds_in_wait <= n_ds_in_wait + int'(seg[L].ds && below.wt);
    end
  end

  int checks = 0, failures = 0;
  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic launch(int s, ad_t a, logic rd, ad_t wd);
    maddr[s] = a; mrd[s] = rd; mwdata[s] = wd; mstart[s] = 1;
    @(posedge clk); #1 mstart[s] = 0;
  endtask
  task automatic finish_of(int s);
    @(posedge clk);
    while (mbusy[s]) @(posedge clk);
    #1;
  endtask
  task automatic xfer(int s, ad_t a, logic rd, ad_t wd);
    launch(s, a, rd, wd);
    finish_of(s);
  endtask
  task automatic idle(int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  // an interconnect above originating a global broadcast on M
  task automatic broadcast_from_above(ad_t w);
    while (seg[M].gk || seg[M].ak || seg[M].as) @(posedge clk);
    #1 above.gk = 1; above.ad = w; above.bc = 1; above.ak = 1;
    idle(4);
    while (seg[M].bw) @(posedge clk);
    #1 above.ds = 1; above.gk = 0;
    idle(10);
    above.ds = 0; above.bc = 0;
    idle(3);
    above.ak = 0; above.ad = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int acc0;
  initial begin
    above = FB_IDLE;
    for (int s = 0; s < 2; s++) begin
      mstart[s] = 0; maddr[s] = '0; mrd[s] = 0; mwdata[s] = '0;
    end
    idle(3);
    rst_n = 1;
    idle(3);

    xfer(M, 32'h0100_0004, 0, 32'h0BAD_F00D);
    check("M->L write", mstatus[M] == 0 && saccess[L] == 1);
    xfer(M, 32'h0100_0004, 1, '0);
    check("M->L read back", mstatus[M] == 0 && mrdata[M] == 32'h0BAD_F00D);
    xfer(L, 32'h0200_0008, 0, 32'h0000_ABCD);
    check("L->M write", mstatus[L] == 0 && saccess[M] == 1);
    idle(10);

    acc0 = saccess[L];
    fork
      launch(M, 32'h0100_0010, 0, 32'h1111_2222);
      launch(L, 32'h0200_0010, 0, 32'h3333_4444);
    join
    fork finish_of(M); finish_of(L); join
    check("deadlock: lower master backed off", mstatus[L] == 2);
    check("deadlock: upper master completed", mstatus[M] == 0 && saccess[L] == acc0 + 1);
    idle(10);
    xfer(L, 32'h0200_0010, 0, 32'h3333_4444);
    check("deadlock: retry completed", mstatus[L] == 0);
    idle(10);

    xfer(M, 32'h00FF_FFF0, 0, 32'h0000_0011);
    idle(60);
    check("local broadcast on L", rxcount[L] == 1 && rxword[L] == 32'h0000_0011);

    below_present = 1;
    idle(3);
    xfer(M, 32'h00FF_FFF0, 0, 32'h8000_0022);
    idle(120);
    check("global broadcast on L", rxcount[L] == 2 && rxword[L] == 32'h8000_0022);
    check("global broadcast waited for WAIT below", n_wait_l > 0 && n_ds_in_wait == 0);

    broadcast_from_above(32'h8000_0033);
    idle(80);
    check("relayed broadcast on L", rxcount[L] == 3 && rxword[L] == 32'h8000_0033);
    check("BW held on M while relaying", n_bw_m > 0 && !seg[M].bw);

    check("all mechanisms seen", n_down > 0 && n_up > 0 && n_dead > 0 && n_bloc > 0 &&
                                 n_bglob > 0 && n_relay > 0);
    $display("mechanisms: down=%0d up=%0d deadlock=%0d local=%0d global=%0d relay=%0d",
             n_down, n_up, n_dead, n_bloc, n_bglob, n_relay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
