// tb_fb_slave: behavioural FASTBUS slave for testbenches: 16 words of memory
// answering addresses BASE_BYTE_0000 to BASE_BYTE_00FF (word index in bits 5:2).
// AK a few cycles after AS, DK one cycle after DS; counts its accesses.
module tb_fb_slave
  import si_pkg::*;
#(
  parameter logic [7:0] BASE_BYTE = 8'h05
) (
  input  logic    clk_i,
  input  logic    rst_ni,
  input  fb_bus_t bus_i,
  output fb_bus_t drv_o,
  output int      accesses_o
);
  ad_t        mem [16];
  logic [3:0] idx;
  logic       sel;
  int         dly;
  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      drv_o <= FB_IDLE; sel <= 0; dly <= 0; accesses_o <= 0; idx <= '0;
      for (int i = 0; i < 16; i++) mem[i] <= {BASE_BYTE, 24'h0} | ad_t'(i);
    end else begin
      if (bus_i.as && !sel && !drv_o.ak && bus_i.ad[31:24] == BASE_BYTE && bus_i.ad[23:8] == 16'h0 &&
          !bus_i.bc) begin
        sel <= 1; idx <= bus_i.ad[5:2]; dly <= 2;
      end
      if (sel && !drv_o.ak) begin
        if (dly == 0) drv_o.ak <= 1; else dly <= dly - 1;
      end
      if (!bus_i.as) begin sel <= 0; drv_o.ak <= 0; end
      if (sel && drv_o.ak && bus_i.ds && !drv_o.dk) begin
        if (bus_i.rd) drv_o.ad <= mem[idx]; else mem[idx] <= bus_i.ad;
        drv_o.dk <= 1; accesses_o <= accesses_o + 1;
      end
      if (!bus_i.ds) begin drv_o.dk <= 0; drv_o.ad <= '0; end
    end
  end
endmodule
