// tb_fb_bcast_rx: behavioural broadcast receiver: latches the A/D lines when
// BC and DS are first seen together, and counts the broadcasts received.
module tb_fb_bcast_rx
  import si_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_ni,
  input  fb_bus_t bus_i,
  output ad_t     word_o,
  output int      count_o
);
  logic hit_q;
  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin word_o <= '0; count_o <= 0; hit_q <= 0; end
    else begin
      hit_q <= bus_i.bc && bus_i.ds;
      if (bus_i.bc && bus_i.ds && !hit_q) begin
        word_o  <= bus_i.ad;
        count_o <= count_o + 1;
      end
    end
  end
endmodule
