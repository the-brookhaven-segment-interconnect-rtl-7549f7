// tb_segment_interconnect: end-to-end test of two interconnects in a chain,
// as in a three-segment system:
//
//   U (crate) --[si_a: crate above, cable below]-- M (cable)
//             --[si_b: cable above, crate below]-- L (crate)
//
// si_b keeps every default; si_a claims addresses 0x00..0x03 (upper byte)
// so that M (slaves at 0x02) and L (slaves at 0x01, the default range of
// si_b) are reached from U, and has its broadcast register at 0x04FFFFF0.
// Each segment has a master, a slave, a broadcast receiver and a model of its
// arbitration timing control; the cable segment M carries its AL lines as two
// directions. The test runs: a write from U to L (two hops down), a read from
// U of M, a write from L to U (two hops up), an address nobody answers (the
// interconnect's timeout, then the master's AS timeout), the deadlock of two
// masters addressing across si_b at once (BK, back-off and retry), a local
// broadcast from si_a, a global broadcast from si_a relayed by si_b to the
// last segment, and a broadcast started in si_b's register from U.
// Every mechanism is counted from the interconnects' event outputs and must
// have happened at least once.
module tb_segment_interconnect;
  import si_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int U = 0, M = 1, L = 2;

  fb_bus_t    seg [3];
  fb_bus_t    mdrv [3], sdrv [3];
  logic       ag [3];
  fb_bus_t    a_up_o, a_low_o, b_up_o, b_low_o;
  al_t        a_up_b_o, a_low_b_o, b_up_b_o, b_low_b_o, m_al_b;
  si_events_t ev_a, ev_b;

  segment_interconnect #(
    .UPPER_IS_CABLE(1'b0), .RANGE_BASE(32'h0000_0000), .RANGE_MASK(32'hFC00_0000),
    .BCAST_ADDR(32'h04FF_FFF0), .TIMEOUT_CYC(60)
  ) si_a (
    .clk_i(clk), .rst_ni(rst_n),
    .up_i(seg[U]), .up_o(a_up_o), .up_al_b_i('0), .up_al_b_o(a_up_b_o),
    .low_i(seg[M]), .low_o(a_low_o), .low_al_b_i(m_al_b), .low_al_b_o(a_low_b_o),
    .ev_o(ev_a));

  segment_interconnect si_b (
    .clk_i(clk), .rst_ni(rst_n),
    .up_i(seg[M]), .up_o(b_up_o), .up_al_b_i(m_al_b), .up_al_b_o(b_up_b_o),
    .low_i(seg[L]), .low_o(b_low_o), .low_al_b_i('0), .low_al_b_o(b_low_b_o),
    .ev_o(ev_b));

  // wired-OR segments
  assign m_al_b = a_low_b_o | b_up_b_o;
  always_comb begin
    seg[U]    = fb_bus_t'(mdrv[U] | sdrv[U] | a_up_o);
    seg[U].ag = ag[U];
    seg[M]    = fb_bus_t'(mdrv[M] | sdrv[M] | a_low_o | b_up_o);
    seg[M].ag = ag[M];
    seg[L]    = fb_bus_t'(mdrv[L] | sdrv[L] | b_low_o);
    seg[L].ag = ag[L];
  end

  // per-segment models
  logic       mstart [3], mrd [3], mbusy [3], mdone [3];
  ad_t        maddr [3], mwdata [3], mrdata [3];
  logic [1:0] mstatus [3];
  int         saccess [3], rxcount [3];
  ad_t        rxword [3];
  localparam logic [7:0] SBYTE [3] = '{8'h05, 8'h02, 8'h01};

  for (genvar s = 0; s < 3; s++) begin : g_seg
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

  // mechanism counters
  int n_down, n_up, n_tmo, n_dead, n_bloc, n_bglob, n_relay, n_last, n_arb_up, n_arb_low, n_bw, n_bk;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_down <= 0; n_up <= 0; n_tmo <= 0; n_dead <= 0; n_bloc <= 0; n_bglob <= 0;
      n_relay <= 0; n_last <= 0; n_arb_up <= 0; n_arb_low <= 0; n_bw <= 0; n_bk <= 0;
    end else begin
      n_down    <= n_down    + int'(ev_a.down_fwd)     + int'(ev_b.down_fwd);
      n_up      <= n_up      + int'(ev_a.up_fwd)       + int'(ev_b.up_fwd);
      n_tmo     <= n_tmo     + int'(ev_a.timeout)      + int'(ev_b.timeout);
      n_dead    <= n_dead    + int'(ev_a.deadlock)     + int'(ev_b.deadlock);
      n_bloc    <= n_bloc    + int'(ev_a.bcast_local)  + int'(ev_b.bcast_local);
      n_bglob   <= n_bglob   + int'(ev_a.bcast_global) + int'(ev_b.bcast_global);
      n_relay   <= n_relay   + int'(ev_a.relay_done)   + int'(ev_b.relay_done);
      n_last    <= n_last    + int'(ev_a.relay_last)   + int'(ev_b.relay_last);
      n_arb_up  <= n_arb_up  + int'(ev_a.arb_up)       + int'(ev_b.arb_up);
      n_arb_low <= n_arb_low + int'(ev_a.arb_low)      + int'(ev_b.arb_low);
      n_bw      <= n_bw      + int'(seg[M].bw);
      n_bk      <= n_bk      + int'(seg[L].bk);
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

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int acc0;
  initial begin
    for (int s = 0; s < 3; s++) begin
      mstart[s] = 0; maddr[s] = '0; mrd[s] = 0; mwdata[s] = '0;
    end
    idle(3);
    rst_n = 1;
    idle(3);

    // two hops down: U writes L, then reads it back
    xfer(U, 32'h0100_0008, 0, 32'hA5A5_0001);
    check("U->L write done", mstatus[U] == 0 && saccess[L] == 1);
    xfer(U, 32'h0100_0008, 1, '0);
    check("U->L read back", mstatus[U] == 0 && mrdata[U] == 32'hA5A5_0001);
    check("LS marks segment M and U", seg[M].ls && seg[U].ls && !seg[L].ls);
    idle(5);

    // one hop: U reads a word of M
    xfer(U, 32'h0200_0004, 1, '0);
    check("U reads M", mstatus[U] == 0 && mrdata[U] == 32'h0200_0001);
    idle(5);

    // two hops up: L writes U, U's slave has it
    xfer(L, 32'h0500_000C, 0, 32'h1234_5678);
    check("L->U write done", mstatus[L] == 0 && saccess[U] == 1);
    xfer(U, 32'h0500_000C, 1, '0);
    check("L->U data arrived", mrdata[U] == 32'h1234_5678);
    idle(5);

    // nobody answers on M: si_a times out, then the master
    xfer(U, 32'h0300_0000, 0, 32'h0);
    check("unanswered address ends in an AS timeout", mstatus[U] == 1);
    idle(10);

    // deadlock across si_b: M master to L, L master to M, at the same time
    acc0 = saccess[L];
    fork
      launch(M, 32'h0100_0010, 0, 32'hBEEF_0002);
      launch(L, 32'h0200_0014, 0, 32'hBEEF_0003);
    join
    fork finish_of(M); finish_of(L); join
    check("lower master told to back off", mstatus[L] == 2);
    check("upper master completed", mstatus[M] == 0 && saccess[L] == acc0 + 1);
    idle(10);
    xfer(L, 32'h0200_0014, 0, 32'hBEEF_0003);
    check("lower master retry succeeds", mstatus[L] == 0);
    xfer(M, 32'h0200_0014, 1, '0);
    check("retried data arrived", mrdata[M] == 32'hBEEF_0003);
    idle(10);

    // local broadcast from si_a: M gets it, L does not
    xfer(U, 32'h04FF_FFF0, 0, 32'h0000_0055);
    check("broadcast register written", mstatus[U] == 0);
    idle(60);
    check("local broadcast reached M", rxcount[M] == 1 && rxword[M] == 32'h0000_0055);
    check("local broadcast stayed off L", rxcount[L] == 0);

    // global broadcast from si_a: M and L (relayed by si_b) get it
    xfer(U, 32'h04FF_FFF0, 0, 32'h8000_0077);
    idle(150);
    check("global broadcast reached M", rxcount[M] == 2 && rxword[M] == 32'h8000_0077);
    check("global broadcast relayed to L", rxcount[L] == 1 && rxword[L] == 32'h8000_0077);
    check("BW held on the cable segment", n_bw > 0 && !seg[M].bw);

    // si_b's broadcast register, written from U through si_a
    xfer(U, 32'h00FF_FFF0, 0, 32'h0000_0099);
    check("si_b register written through si_a", mstatus[U] == 0);
    idle(80);
    check("si_b local broadcast reached L", rxcount[L] == 2 && rxword[L] == 32'h0000_0099);
    check("no extra broadcast on M", rxcount[M] == 2);

    // the segments are free again: one more plain transfer
    xfer(U, 32'h0100_0000, 1, '0);
    check("system usable afterwards", mstatus[U] == 0 && mrdata[U] == 32'h0100_0000);

    // every mechanism happened
    check("downward relay happened", n_down > 0);
    check("upward relay happened", n_up > 0);
    check("interconnect timeout happened", n_tmo > 0);
    check("deadlock resolution happened", n_dead > 0 && n_bk > 0);
    check("local broadcast happened", n_bloc > 0);
    check("global broadcast happened", n_bglob > 0);
    check("global relay happened", n_relay > 0 && n_last > 0);
    check("arbitration won on both sides", n_arb_up > 0 && n_arb_low > 0);
    $display("mechanisms: down=%0d up=%0d timeout=%0d deadlock=%0d bk_cycles=%0d local=%0d global=%0d relay=%0d last=%0d arb_up=%0d arb_low=%0d bw_cycles=%0d",
             n_down, n_up, n_tmo, n_dead, n_bk, n_bloc, n_bglob, n_relay, n_last, n_arb_up, n_arb_low, n_bw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
