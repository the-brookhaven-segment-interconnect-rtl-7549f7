// tb_si_addr_decode: checks the range and broadcast-register decoding against
// a reference written as a comparison of the upper address byte, on directed
// corner addresses and 2000 random ones. Non-default jumper settings are used
// so a decoder that ignored its parameters would fail.
module tb_si_addr_decode;
  import si_pkg::*;
  localparam ad_t BASE = 32'h4200_0000, MASK = 32'hFF00_0000, BADR = 32'h0012_3450;
  ad_t  addr;
  logic in_range, bcast_hit;
  int   checks = 0, failures = 0;

  si_addr_decode #(.RANGE_BASE(BASE), .RANGE_MASK(MASK), .BCAST_ADDR(BADR)) dut (
    .addr_i(addr), .in_range_o(in_range), .bcast_hit_o(bcast_hit));

  task automatic check(ad_t a);
    logic exp_in, exp_bc;
    addr = a;
    #1;
    exp_in = (a[31:24] == 8'h42);
    exp_bc = (a == 32'h0012_3450);
    checks++;
    if (in_range !== exp_in || bcast_hit !== exp_bc) begin
      failures++;
      $display("FAIL addr=%h in_range=%b/%b bcast=%b/%b", a, in_range, exp_in, bcast_hit, exp_bc);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h4200_0000); check(32'h42FF_FFFF); check(32'h4300_0000); check(32'h41FF_FFFF);
    check(32'h0012_3450); check(32'h0012_3451); check(32'h0000_0000); check(32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) begin
      ad_t a;
      a = $urandom;
      if (i % 4 == 0) a[31:24] = 8'h42;
      check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
