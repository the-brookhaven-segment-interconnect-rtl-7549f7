// si_al_expander: AL arbitration lines on a cable segment.
//
// A long cable cannot carry a wire-OR, so each logical AL line is carried by
// two physical lines that run in opposite directions along the cable. A
// station asserting a logical AL line drives it on both physical lines, and
// the logical value it receives is the OR of its two receivers (both as the
// document describes). Purely combinational; the 100-ohm terminations and ECL
// drivers are outside the logic.
//   al_drive_i  logical AL lines this station asserts
//   al_a_o/al_b_o  drives of the two physical directions
//   al_a_i/al_b_i  receivers of the two physical directions
//   al_o        logical AL value seen on the segment
module si_al_expander
  import si_pkg::*;
(
  input  al_t al_drive_i,
  output al_t al_a_o,
  output al_t al_b_o,
  input  al_t al_a_i,
  input  al_t al_b_i,
  output al_t al_o
);
  always_comb begin
    al_a_o = al_drive_i;
    al_b_o = al_drive_i;
    al_o   = al_a_i | al_b_i | al_drive_i;
  end
endmodule
