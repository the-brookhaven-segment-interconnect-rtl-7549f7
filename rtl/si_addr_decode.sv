// si_addr_decode: address decoding of the segment interconnect.
//
// The interconnect claims a range of FASTBUS addresses; in the original module
// the range and the broadcast register address are set with wire jumpers, here
// they are parameters. An address is inside the range when its bits selected
// by RANGE_MASK equal RANGE_BASE (a base/mask jumper field is this design's
// choice of how a range is encoded). Purely combinational.
//   addr_i       address on the A/D lines
//   in_range_o   1 when addr_i lies in the range of the lower segments
//   bcast_hit_o  1 when addr_i is the broadcast register address
module si_addr_decode
  import si_pkg::*;
#(
  parameter ad_t RANGE_BASE = 32'h0100_0000,
  parameter ad_t RANGE_MASK = 32'hFF00_0000,
  parameter ad_t BCAST_ADDR = 32'h00FF_FFF0
) (
  input  ad_t  addr_i,
  output logic in_range_o,
  output logic bcast_hit_o
);
  always_comb begin
    in_range_o  = ((addr_i & RANGE_MASK) == (RANGE_BASE & RANGE_MASK));
    bcast_hit_o = (addr_i == BCAST_ADDR);
  end
endmodule
