// tb_fb_atc: behavioural arbitration timing control of one segment. While AR
// is asserted it gives AG for AG_LEN cycles, then waits for a new GK, for AR
// to be withdrawn, or for 40 idle cycles before the next arbitration.
module tb_fb_atc
  import si_pkg::*;
#(
  parameter int AG_LEN = 12
) (
  input  logic    clk_i,
  input  logic    rst_ni,
  input  fb_bus_t bus_i,
  output logic    ag_o
);
  int   cnt, hold_cnt;
  logic hold_off, gk_q;
  always_ff @(posedge clk_i) begin
    gk_q <= bus_i.gk;
    if (!rst_ni) begin
      ag_o <= 0; cnt <= 0; hold_off <= 0; hold_cnt <= 0;
    end else if (cnt != 0) begin
      cnt <= cnt - 1;
      if (cnt == 1) begin ag_o <= 0; hold_off <= 1; hold_cnt <= 0; end
    end else if (hold_off) begin
      hold_cnt <= hold_cnt + 1;
      if ((bus_i.gk && !gk_q) || !bus_i.ar || hold_cnt == 40) hold_off <= 0;
    end else if (bus_i.ar) begin
      ag_o <= 1; cnt <= AG_LEN;
    end
  end
endmodule
