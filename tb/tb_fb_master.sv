// tb_fb_master: behavioural FASTBUS master for testbenches.
//
// On a start pulse it takes its segment (GK, once GK, AK, AS and AR are all
// low), runs one single-word transaction and releases the segment:
// address with AS; it waits for AK, counting an AS timeout of AS_TIMEOUT
// cycles that is frozen while WAIT is asserted; a BK from the segment makes
// it give up at once ("try again later"). After AK it runs one data cycle
// (DS, wait DK), then drops AS and waits for AK to go.
// status_o: 0 = done, 1 = AS timeout, 2 = backed off on BK, 3 = DK timeout.
module tb_fb_master
  import si_pkg::*;
#(
  parameter int AS_TIMEOUT = 40
) (
  input  logic    clk_i,
  input  logic    rst_ni,
  input  fb_bus_t bus_i,
  output fb_bus_t drv_o,
  input  logic    start_i,
  input  ad_t     addr_i,
  input  logic    rd_i,
  input  ad_t     wdata_i,
  output ad_t     rdata_o,
  output logic [1:0] status_o,
  output logic    busy_o,
  output logic    done_o
);
  initial begin
    drv_o = FB_IDLE; busy_o = 0; done_o = 0; status_o = 0; rdata_o = '0;
    forever begin
      @(posedge clk_i);
      done_o = 0;
      if (rst_ni && start_i && !busy_o) begin
        int t;
        busy_o = 1;
        while (bus_i.gk || bus_i.ak || bus_i.as || bus_i.ar) @(posedge clk_i);
        #1 drv_o.gk = 1;
        drv_o.ad = addr_i; drv_o.rd = rd_i;
        @(posedge clk_i); #1 drv_o.as = 1;
        t = 0;
        status_o = 0;
        while (!bus_i.ak) begin
          @(posedge clk_i);
          if (bus_i.bk) begin status_o = 2; break; end
          if (!bus_i.wt) t++;
          if (t > AS_TIMEOUT) begin status_o = 1; break; end
        end
        #1;
        if (status_o == 0) begin
          drv_o.ad = rd_i ? '0 : wdata_i; drv_o.ds = 1;
          t = 0;
          while (!bus_i.dk && t < 4 * AS_TIMEOUT) begin @(posedge clk_i); t++; end
          #1;
          if (!bus_i.dk) status_o = 3;
          rdata_o = bus_i.ad;
          drv_o.ds = 0; drv_o.ad = '0;
          while (bus_i.dk) @(posedge clk_i);
          #1;
        end
        drv_o.as = 0; drv_o.ad = '0; drv_o.rd = 0;
        t = 0;
        while (bus_i.ak && t < 4 * AS_TIMEOUT) begin @(posedge clk_i); t++; end
        #1 drv_o.gk = 0;
        busy_o = 0; done_o = 1;
      end
    end
  end
endmodule
