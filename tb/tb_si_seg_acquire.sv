// tb_si_seg_acquire: segment acquisition against a model of the segment's
// arbitration timing control (AG pulses while AR is asserted) and a second
// competing master with its own arbitration level.
// Checks: a lone request is granted and shows GK; a win is held off while
// another master still holds GK or AK; the higher arbitration level wins
// (the competitor first when its level is higher, the interconnect first
// when it is lower); clients are served lowest index first; gk_rel drops GK
// but keeps the grant; dropping the request frees GK and AR.
module tb_si_seg_acquire;
  import si_pkg::*;
  localparam al_t LEVEL = 6'h21;
  localparam int  AG_LEN = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] req = '0, gnt;
  logic       gk_rel = 0, won;
  fb_bus_t    bus, drv;

  // other bus users
  logic other_gk = 0, other_ak = 0;
  logic ag;
  logic comp_want = 0, comp_ar, comp_gk, comp_won;
  al_t  comp_code = '0, comp_al;

  int checks = 0, failures = 0;
  int comp_gk_cycles;

  si_seg_acquire #(.N_CLIENTS(3), .ARB_LEVEL(LEVEL), .SETTLE_CYC(8)) dut (
    .clk_i(clk), .rst_ni(rst_n), .req_i(req), .gnt_o(gnt), .gk_rel_i(gk_rel),
    .bus_i(bus), .drv_o(drv), .won_o(won));

  assign comp_ar = comp_want && !comp_gk && !comp_won;

  always_comb begin
    bus    = FB_IDLE;
    bus.ar = drv.ar | comp_ar;
    bus.ag = ag;
    bus.gk = drv.gk | comp_gk | other_gk;
    bus.ak = other_ak;
    bus.al = drv.al | comp_al;
  end

  // Arbitration timing control: a pulse of AG when AR is up, then nothing
  // more until a new GK appears or AR is withdrawn.
  int  ag_cnt, hold_cnt;
  logic hold_off, gk_q;
  always_ff @(posedge clk) begin
    gk_q <= bus.gk;
    if (!rst_n) begin
      ag <= 0; ag_cnt <= 0; hold_off <= 0; hold_cnt <= 0;
    end else if (ag_cnt != 0) begin
      ag_cnt <= ag_cnt - 1;
      if (ag_cnt == 1) begin ag <= 0; hold_off <= 1; hold_cnt <= 0; end
    end else if (hold_off) begin
      // a new arbitration after a GK edge, AR withdrawn, or 40 idle cycles
      hold_cnt <= hold_cnt + 1;
      if ((bus.gk && !gk_q) || !bus.ar || hold_cnt == 40) hold_off <= 0;
    end else if (bus.ar) begin
      ag <= 1; ag_cnt <= AG_LEN;
    end
  end

  // Competing master: bit-serial self-selection written out per bit.
  logic ag_q;
  always_ff @(posedge clk) begin
    ag_q <= ag;
    if (!rst_n) begin
      comp_al <= '0; comp_gk <= 0; comp_won <= 0; comp_gk_cycles <= 0;
    end else begin
    if (ag && comp_ar) begin
      al_t nxt;
      logic stop;
      stop = 0;
      for (int k = AL_W-1; k >= 0; k--) begin
        nxt[k] = stop ? 1'b0 : comp_code[k];
        if (!comp_code[k] && bus.al[k]) stop = 1;
      end
      comp_al <= nxt;
    end else comp_al <= '0;
    if (!ag && ag_q && comp_ar && bus.al == comp_code) comp_won <= 1;
    if (comp_won && !bus.gk && !bus.ak) begin comp_gk <= 1; comp_won <= 0; end
    if (comp_gk) begin
      comp_gk_cycles <= comp_gk_cycles + 1;
      if (comp_gk_cycles == 20) begin comp_gk <= 0; comp_gk_cycles <= 0; end
    end
    end
  end
  // the competitor wants the bus only once per request of the test
  always @(negedge comp_gk) comp_want = 0;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic wait_gnt(input logic [2:0] which, input int limit, output int n);
    n = 0;
    while (gnt != which && n < limit) begin @(posedge clk); n++; end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n, wins;
  always_ff @(posedge clk) if (!rst_n) wins <= 0; else if (won) wins <= wins + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // 1: lone request
    req = 3'b001;
    wait_gnt(3'b001, 100, n);
    check("lone request granted", gnt == 3'b001);
    check("GK asserted with grant", drv.gk && !drv.ar);
    check("arbitration took at least the settle time", n >= 8);
    req = 3'b000;
    @(posedge clk); #1;
    check("GK dropped with request", !drv.gk && gnt == 0);
    repeat (5) @(posedge clk);
    // 2: previous master still holds GK, then AK
    other_gk = 1; other_ak = 1;
    req = 3'b001;
    repeat (40) @(posedge clk);
    check("no grant while GK held by another", gnt == 0);
    other_gk = 0;
    repeat (10) @(posedge clk);
    check("no grant while AK held by another", gnt == 0);
    other_ak = 0;
    wait_gnt(3'b001, 5, n);
    check("grant soon after bus free", gnt == 3'b001);
    req = 0;
    repeat (5) @(posedge clk);
    // 3: competitor with a higher level wins first
    comp_code = 6'h30; comp_want = 1;
    req = 3'b001;
    wait (comp_gk);
    @(posedge clk);
    check("higher-level competitor wins first", gnt == 0);
    wait_gnt(3'b001, 300, n);
    check("interconnect gets the segment after the competitor", gnt == 3'b001 && !comp_gk);
    req = 0;
    repeat (5) @(posedge clk);
    // 4: competitor with a lower level loses
    comp_code = 6'h05; comp_want = 1;
    req = 3'b001;
    wait_gnt(3'b001, 100, n);
    check("interconnect wins over a lower level", gnt == 3'b001 && !comp_gk);
    repeat (3) @(posedge clk);
    req = 0;
    wait (comp_gk);
    wait (!comp_gk);
    repeat (5) @(posedge clk);
    // 5: two clients, lowest index first
    req = 3'b110;
    wait_gnt(3'b010, 100, n);
    check("client 1 served first", gnt == 3'b010);
    // 6: early GK release keeps the grant
    gk_rel = 1;
    @(posedge clk); #1;
    gk_rel = 0;
    check("GK released early", !drv.gk);
    repeat (3) @(posedge clk);
    check("grant kept after GK release", gnt == 3'b010);
    req = 3'b100;
    wait_gnt(3'b100, 100, n);
    check("client 2 served next", gnt == 3'b100 && drv.gk);
    req = 0;
    @(posedge clk); #1;
    check("all released", !drv.gk && !drv.ar && gnt == 0);
    check("one arbitration win per grant", wins == 6);
    if (wins != 6) $display("wins=%0d", wins);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
