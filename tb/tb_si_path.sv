// tb_si_path: one relay path between a modelled master on the source segment
// and a modelled slave on the destination segment, with a simple model that
// grants the destination segment a few cycles after it is requested.
// Checks: WAIT on the source while the destination is being won; address on
// the destination A/D lines exactly DESKEW cycles before AS; AK passed back;
// write data reaching the slave and read data reaching the master; the
// timeout (WAIT negated exactly TIMEOUT cycles after AS when no slave
// answers); WAIT from the destination stretching the timeout; no action
// without an address hit; and abort while waiting for the segment.
module tb_si_path;
  import si_pkg::*;
  localparam int DESKEW = 3, TIMEOUT = 20, GNT_DLY = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  fb_bus_t src, dst, src_drv, dst_drv, m_drv, s_drv;
  logic hit = 1, inhibit = 0, abort = 0;
  logic req, gnt, waiting, busy, fwd, tmo, aborted;
  logic gnt_block = 0;

  si_path #(.DESKEW_CYC(DESKEW), .TIMEOUT_CYC(TIMEOUT)) dut (
    .clk_i(clk), .rst_ni(rst_n), .hit_i(hit), .inhibit_i(inhibit), .abort_i(abort),
    .src_i(src), .src_o(src_drv), .dst_i(dst), .dst_o(dst_drv),
    .acq_req_o(req), .acq_gnt_i(gnt), .waiting_o(waiting), .busy_o(busy),
    .fwd_o(fwd), .timeout_o(tmo), .aborted_o(aborted));

  assign src = fb_bus_t'(m_drv | src_drv);
  assign dst = fb_bus_t'(s_drv | dst_drv);

  // destination segment granted GNT_DLY cycles after the request
  int gcnt;
  always_ff @(posedge clk) begin
    if (!rst_n || !req || gnt_block) begin gcnt <= 0; gnt <= 0; end
    else if (gcnt == GNT_DLY) gnt <= 1;
    else gcnt <= gcnt + 1;
  end

  // slave on the destination segment
  logic slave_en = 1;
  int   slave_wait = 0;            // cycles of WAIT before AK
  ad_t  slave_mem, slave_rdata = 32'hCAFE_0001;
  int   scnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_drv <= FB_IDLE; scnt <= 0; slave_mem <= '0;
    end else begin
      if (dst.as && slave_en && !s_drv.ak) begin
        if (scnt < slave_wait) begin s_drv.wt <= 1; scnt <= scnt + 1; end
        else begin s_drv.wt <= 0; s_drv.ak <= 1; end
      end
      if (!dst.as) begin s_drv.ak <= 0; s_drv.wt <= 0; scnt <= 0; end
      if (dst.ds && s_drv.ak && !s_drv.dk) begin
        if (dst.rd) s_drv.ad <= slave_rdata; else slave_mem <= dst.ad;
        s_drv.dk <= 1;
      end
      if (!dst.ds) begin s_drv.dk <= 0; s_drv.ad <= '0; end
    end
  end

  int checks = 0, failures = 0;
  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // cycle counters measured on the destination side
  int ad_cyc, as_cyc, cyc;
  always_ff @(posedge clk) cyc <= rst_n ? cyc + 1 : 0;

  task automatic addr_cycle(ad_t a, logic rd);
    m_drv.ad = a; m_drv.rd = rd;
    @(posedge clk); #1 m_drv.as = 1;
  endtask

  task automatic end_cycle();
    m_drv.as = 0; m_drv.ad = '0; m_drv.rd = 0;
    while (src.ak) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ad_t got;
  int  t0;
  initial begin
    m_drv = FB_IDLE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // 1: write through the path
    addr_cycle(32'h0123_4567, 0);
    @(posedge clk); #1;
    check("WAIT asserted on the source", src.wt && req);
    while (dst_drv.ad != 32'h0123_4567) @(posedge clk);
    ad_cyc = cyc;
    while (!dst.as) @(posedge clk);
    as_cyc = cyc;
    check("deskew between address and AS", as_cyc - ad_cyc == DESKEW);
    check("address valid with AS", dst.ad == 32'h0123_4567);
    while (!src.ak) @(posedge clk);
    #1;
    check("WAIT dropped once AK passed", !src.wt);
    m_drv.ad = 32'hDEAD_BEEF; m_drv.ds = 1;
    while (!src.dk) @(posedge clk);
    #1;
    check("write data reached the slave", slave_mem == 32'hDEAD_BEEF);
    m_drv.ds = 0; m_drv.ad = '0;
    while (src.dk) @(posedge clk);
    end_cycle();
    repeat (3) @(posedge clk); #1;
    check("segment released after the transaction", !req && !busy && !dst.as);

    // 2: read through the path
    addr_cycle(32'h0100_0040, 1);
    while (!src.ak) @(posedge clk);
    #1 m_drv.ds = 1; m_drv.ad = '0;
    while (!src.dk) @(posedge clk);
    #1 got = src.ad;
    check("read data reached the master", got == 32'hCAFE_0001);
    m_drv.ds = 0;
    while (src.dk) @(posedge clk);
    end_cycle();
    repeat (3) @(posedge clk);

    // 3: no slave answers: timeout
    slave_en = 0;
    addr_cycle(32'h0100_0080, 0);
    while (!dst.as) @(posedge clk);
    t0 = cyc;
    while (src.wt) @(posedge clk);
    check("WAIT negated after the timeout", cyc - t0 == TIMEOUT);
    @(posedge clk); #1;
    check("AS withdrawn on the destination after the timeout", !dst.as);
    end_cycle();
    repeat (3) @(posedge clk); #1;
    check("idle after timeout", !busy && !req);

    // 4: slave holds WAIT longer than the timeout, then answers
    slave_en = 1; slave_wait = 2 * TIMEOUT;
    addr_cycle(32'h0100_00C0, 0);
    while (!src.ak && !tmo) @(posedge clk);
    #1;
    check("destination WAIT stretched the timeout", src.ak);
    end_cycle();
    slave_wait = 0;
    repeat (3) @(posedge clk);

    // 5: no hit, nothing happens
    hit = 0;
    addr_cycle(32'h7700_0000, 0);
    repeat (10) @(posedge clk); #1;
    check("no relay without a hit", !src.wt && !req && !dst.as);
    end_cycle();
    hit = 1;
    repeat (3) @(posedge clk);

    // 6: abort while waiting for the destination segment
    gnt_block = 1;
    addr_cycle(32'h0100_0100, 0);
    repeat (10) @(posedge clk); #1;
    check("waiting for the destination", waiting && src.wt);
    abort = 1;
    @(posedge clk); #1 abort = 0;
    @(posedge clk); #1;
    check("abort negates WAIT and the request", !src.wt && !req);
    end_cycle();
    repeat (3) @(posedge clk); #1;
    check("idle after abort", !busy);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
