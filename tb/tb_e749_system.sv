// tb_e749_system: a five-segment system of three crate segments and two
// cable segments joined by four interconnects in a chain:
//
//   C0 -[si0]- K1 -[si1]- C1 -[si2]- K2 -[si3]- C2
//   (crate)   (cable)   (crate)   (cable)   (crate)
//
// si0 and si2 have a crate above and a cable below (UPPER_IS_CABLE = 0),
// si1 and si3 the reverse. Slaves answer at upper address bytes C0 0x05,
// K1 0x11, C1 0x14, K2 0x16, C2 0x17; each interconnect's range covers
// exactly the segments below it (0x10/F0, 0x14/FC, 0x16/FE, 0x17/FF) and its
// broadcast register sits in the range of the interconnect above it.
// The test runs a write and read from C0 to C2 (four hops down), a write from
// C2 to C0 (four hops up), a global broadcast from si0 that must pass three
// relays (two that wait for BW/WAIT below and one last segment), a local
// broadcast from si0, a global broadcast from si2 that reaches K2 and C2
// only, and the deadlock across si2. Every mechanism is counted.
module tb_e749_system;
  import si_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NS = 5, NI = 4;
  localparam logic [7:0] SBYTE [NS] = '{8'h05, 8'h11, 8'h14, 8'h16, 8'h17};
  localparam ad_t BASE  [NI] = '{32'h1000_0000, 32'h1400_0000, 32'h1600_0000, 32'h1700_0000};
  localparam ad_t MASK  [NI] = '{32'hF000_0000, 32'hFC00_0000, 32'hFE00_0000, 32'hFF00_0000};
  localparam ad_t BADR  [NI] = '{32'h08FF_FFF0, 32'h12FF_FFF0, 32'h15FF_FFF0, 32'h16FF_FFF0};

  fb_bus_t    seg [NS], mdrv [NS], sdrv [NS];
  logic       ag [NS];
  fb_bus_t    si_up_o [NI], si_low_o [NI];
  al_t        si_up_b_o [NI], si_low_b_o [NI], al_b [NS];
  si_events_t ev [NI];

  for (genvar i = 0; i < NI; i++) begin : g_si
    segment_interconnect #(
      .UPPER_IS_CABLE(i % 2 == 1), .RANGE_BASE(BASE[i]), .RANGE_MASK(MASK[i]), .BCAST_ADDR(BADR[i])
    ) u_si (
      .clk_i(clk), .rst_ni(rst_n),
      .up_i(seg[i]), .up_o(si_up_o[i]), .up_al_b_i(al_b[i]), .up_al_b_o(si_up_b_o[i]),
      .low_i(seg[i+1]), .low_o(si_low_o[i]), .low_al_b_i(al_b[i+1]), .low_al_b_o(si_low_b_o[i]),
      .ev_o(ev[i]));
  end

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      seg[s] = fb_bus_t'(mdrv[s] | sdrv[s]);
      al_b[s] = '0;
      if (s > 0) begin
        seg[s] = fb_bus_t'(seg[s] | si_low_o[s-1]);
        al_b[s] = al_b[s] | si_low_b_o[s-1];
      end
      if (s < NI) begin
        seg[s] = fb_bus_t'(seg[s] | si_up_o[s]);
        al_b[s] = al_b[s] | si_up_b_o[s];
      end
      seg[s].ag = ag[s];
    end
  end

  logic       mstart [NS], mrd [NS], mbusy [NS], mdone [NS];
  ad_t        maddr [NS], mwdata [NS], mrdata [NS];
  logic [1:0] mstatus [NS];
  int         saccess [NS], rxcount [NS];
  ad_t        rxword [NS];

  for (genvar s = 0; s < NS; s++) begin : g_seg
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

  int n_down, n_up, n_dead, n_bloc, n_bglob, n_relay, n_last;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      n_down <= 0; n_up <= 0; n_dead <= 0; n_bloc <= 0; n_bglob <= 0; n_relay <= 0; n_last <= 0;
    end else begin
      int d, u, dl, bl, bg, r, l;
      d = 0; u = 0; dl = 0; bl = 0; bg = 0; r = 0; l = 0;
      for (int i = 0; i < NI; i++) begin
        d += int'(ev[i].down_fwd); u += int'(ev[i].up_fwd); dl += int'(ev[i].deadlock);
        bl += int'(ev[i].bcast_local); bg += int'(ev[i].bcast_global);
        r += int'(ev[i].relay_done); l += int'(ev[i].relay_last);
      end
      n_down <= n_down + d; n_up <= n_up + u; n_dead <= n_dead + dl; n_bloc <= n_bloc + bl;
      n_bglob <= n_bglob + bg; n_relay <= n_relay + r; n_last <= n_last + l;
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int relay0, acc0;
  initial begin
    for (int s = 0; s < NS; s++) begin
      mstart[s] = 0; maddr[s] = '0; mrd[s] = 0; mwdata[s] = '0;
    end
    idle(3);
    rst_n = 1;
    idle(3);

    xfer(0, 32'h1700_0010, 0, 32'h7490_0001);
    check("C0 -> C2 write over four interconnects", mstatus[0] == 0 && saccess[4] == 1);
    xfer(0, 32'h1700_0010, 1, '0);
    check("C0 -> C2 read back", mstatus[0] == 0 && mrdata[0] == 32'h7490_0001);
    xfer(4, 32'h0500_0020, 0, 32'h7490_0002);
    check("C2 -> C0 write over four interconnects", mstatus[4] == 0 && saccess[0] == 1);
    xfer(2, 32'h1100_0004, 1, '0);
    check("C1 reads K1", mstatus[2] == 0 && mrdata[2] == 32'h1100_0001);
    idle(10);

    // global broadcast from si0: K1, C1, K2, C2
    relay0 = n_relay;
    xfer(0, 32'h08FF_FFF0, 0, 32'h8000_0749);
    idle(400);
    for (int s = 1; s < NS; s++)
      check($sformatf("global broadcast reached segment %0d", s),
            rxcount[s] == 1 && rxword[s] == 32'h8000_0749);
    check("nothing broadcast on C0", rxcount[0] == 0);
    check("three relays, one of them last", n_relay - relay0 == 3 && n_last == 1);

    // local broadcast from si0: K1 only
    xfer(0, 32'h08FF_FFF0, 0, 32'h0000_0011);
    idle(80);
    check("local broadcast on K1 only", rxcount[1] == 2 && rxcount[2] == 1 && rxword[1] == 32'h0000_0011);

    // global broadcast from si2, written from C0 through si0 and si1
    xfer(0, 32'h15FF_FFF0, 0, 32'h8000_0022);
    idle(300);
    check("si2 global broadcast on K2 and C2", rxcount[3] == 2 && rxcount[4] == 2 &&
          rxword[4] == 32'h8000_0022);
    check("si2 global broadcast not above it", rxcount[1] == 2 && rxcount[2] == 1);

    // deadlock across si2: C1 master to K2, K2 master to C1
    acc0 = saccess[3];
    fork
      launch(2, 32'h1600_0008, 0, 32'h0000_D00D);
      launch(3, 32'h1400_0008, 0, 32'h0000_F00D);
    join
    fork finish_of(2); finish_of(3); join
    check("deadlock: K2 master backed off", mstatus[3] == 2);
    check("deadlock: C1 master completed", mstatus[2] == 0 && saccess[3] == acc0 + 1);
    idle(10);
    xfer(3, 32'h1400_0008, 0, 32'h0000_F00D);
    check("deadlock: retry completed", mstatus[3] == 0);

    check("mechanisms: relays, broadcasts, deadlock",
          n_down > 0 && n_up > 0 && n_dead == 1 && n_bloc == 1 && n_bglob == 2);
    $display("mechanisms: down=%0d up=%0d deadlock=%0d local=%0d global=%0d relay=%0d last=%0d",
             n_down, n_up, n_dead, n_bloc, n_bglob, n_relay, n_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
