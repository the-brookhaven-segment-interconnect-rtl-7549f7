// tb_si_deadlock: drives the "waiting" flags of the two relay paths and the
// lower AS line. Checks that a short overlap is ignored, that a lasting one
// (DETECT+1 cycles) gives exactly one abort pulse to the lower-to-upper path
// plus BK, that BK stays until the lower master drops AS, and that a single
// waiting path never triggers.
module tb_si_deadlock;
  localparam int DETECT = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic dn_wait = 0, up_wait = 0, low_as = 0;
  logic abort, bk, ev;
  int   checks = 0, failures = 0, aborts, events;

  si_deadlock #(.DETECT_CYC(DETECT)) dut (
    .clk_i(clk), .rst_ni(rst_n), .down_wait_i(dn_wait), .up_wait_i(up_wait),
    .lower_as_i(low_as), .abort_up_o(abort), .bk_o(bk), .event_o(ev));

  always_ff @(posedge clk) begin
    if (!rst_n) begin aborts <= 0; events <= 0; end
    else begin
      if (abort) aborts <= aborts + 1;
      if (ev)    events <= events + 1;
    end
  end

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // short overlap
    dn_wait = 1; up_wait = 1; low_as = 1;
    repeat (DETECT - 1) @(posedge clk);
    #1 dn_wait = 0;
    repeat (5) @(posedge clk); #1;
    check("short overlap ignored", !bk && aborts == 0);
    // only one path waiting
    up_wait = 1; dn_wait = 0;
    repeat (20) @(posedge clk); #1;
    check("one waiting path is no deadlock", !bk && aborts == 0);
    // real deadlock
    dn_wait = 1;
    t = 0;
    while (!bk) begin @(posedge clk); #1; t++; end
    check("deadlock detected after DETECT+1 cycles", t == DETECT + 1);
    check("abort pulse given", abort);
    @(posedge clk); #1;
    check("abort is one cycle", !abort);
    up_wait = 0;                       // the path gave up
    repeat (10) @(posedge clk); #1;
    check("BK held while lower AS is up", bk);
    low_as = 0;
    @(posedge clk); #1;
    check("BK dropped after AS", !bk);
    dn_wait = 0;
    repeat (3) @(posedge clk); #1;
    check("one abort and one event", aborts == 1 && events == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
