// si_deadlock: resolves the deadlock between the two transaction directions.
//
// If a master on the upper segment addresses something below while a master
// holding the lower segment addresses something above, each relay path waits
// for the segment the other master holds and both segments hang. This block
// sees both paths waiting for DETECT_CYC consecutive cycles, then tells the
// lower-to-upper path to give up (which negates WAIT on the lower segment)
// and asserts BK on the lower segment until the lower master has dropped AS,
// telling that master to let the bus go and try again later. The upper
// master then gets the lower segment and completes its transaction.
// The rule is the document's; the confirmation window DETECT_CYC (a
// transient overlap is not a deadlock) is this design's choice.
// Interface: down_wait_i / up_wait_i from the two paths, lower_as_i the AS
// line of the lower segment; abort_up_o and bk_o are registered.
module si_deadlock #(
  parameter int unsigned DETECT_CYC = 4
) (
  input  logic clk_i,
  input  logic rst_ni,
  input  logic down_wait_i,  // upper-to-lower path waits for the lower segment
  input  logic up_wait_i,    // lower-to-upper path waits for the upper segment
  input  logic lower_as_i,   // AS on the lower segment
  output logic abort_up_o,   // make the lower-to-upper path give up
  output logic bk_o,         // BK driven on the lower segment
  output logic event_o       // pulse: a deadlock was broken
);
  logic [$clog2(DETECT_CYC+1)-1:0] cnt_q;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      cnt_q <= '0; abort_up_o <= 1'b0; bk_o <= 1'b0; event_o <= 1'b0;
    end else begin
      event_o <= 1'b0;
      if (bk_o) begin
        abort_up_o <= 1'b0;
        if (!lower_as_i) bk_o <= 1'b0;
      end else if (down_wait_i && up_wait_i) begin
        if (cnt_q == DETECT_CYC[$bits(cnt_q)-1:0]) begin
          abort_up_o <= 1'b1;
          bk_o       <= 1'b1;
          event_o    <= 1'b1;
          cnt_q      <= '0;
        end else begin
          cnt_q <= cnt_q + 1'b1;
        end
      end else begin
        cnt_q <= '0;
      end
    end
  end
endmodule
