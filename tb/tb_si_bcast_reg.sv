// tb_si_bcast_reg: a modelled master writes and reads the broadcast register
// on the upper segment. Checks: AK only when the register is selected; the
// written word and its global bit; DK handshake; read-back; start pulses
// exactly once, after the master releases AS, and only after a write.
module tb_si_bcast_reg;
  import si_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  fb_bus_t bus, m, drv;
  logic sel, glob, start;
  ad_t  data;
  int   checks = 0, failures = 0, starts;

  si_bcast_reg dut (.clk_i(clk), .rst_ni(rst_n), .sel_i(sel), .bus_i(bus), .drv_o(drv),
                    .data_o(data), .global_o(glob), .start_o(start));

  assign bus = fb_bus_t'(m | drv);
  assign sel = (bus.ad == 32'h00FF_FFF0);

  always_ff @(posedge clk) if (!rst_n) starts <= 0; else if (start) starts <= starts + 1;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic xfer(ad_t addr, logic rd, ad_t wdata, output ad_t rdata, output logic acked);
    m.ad = addr; m.rd = rd;
    @(posedge clk); #1 m.as = 1;
    repeat (6) @(posedge clk);
    #1 acked = bus.ak;
    if (acked) begin
      m.ad = rd ? '0 : wdata; m.ds = 1;
      while (!bus.dk) @(posedge clk);
      #1 rdata = bus.ad;
      m.ds = 0;
      while (bus.dk) @(posedge clk);
    end
    #1 m.as = 0; m.ad = '0; m.rd = 0;
    while (bus.ak) @(posedge clk);
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  ad_t  r;
  logic ak;
  initial begin
    m = FB_IDLE;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    xfer(32'h0100_0000, 0, 32'h1111_1111, r, ak);
    check("no AK for another address", !ak && starts == 0);
    xfer(32'h00FF_FFF0, 0, 32'h1234_5678, r, ak);
    check("AK for the register", ak);
    check("local word stored", data == 32'h1234_5678 && !glob);
    check("one start after a write", starts == 1);
    xfer(32'h00FF_FFF0, 1, '0, r, ak);
    check("read-back", r == 32'h1234_5678);
    check("no start after a read", starts == 1);
    xfer(32'h00FF_FFF0, 0, 32'h8000_00A5, r, ak);
    check("global bit taken from the MSB", glob && data == 32'h8000_00A5);
    check("second start", starts == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
