// si_bcast_reg: the broadcast register, a slave on the upper segment.
//
// A master starts a broadcast by writing a word into this register. The
// register answers AS with AK when the address on the A/D lines is its own
// (sel_i, from the address decoder), stores the A/D lines on DS of a write
// and answers with DK; a read returns the stored word. When the master ends
// the transaction (AS low) after at least one write, start_o pulses for one
// cycle and the broadcast units take the word from data_o. The most
// significant bit of the word is the global bit: 1 = global broadcast to all
// segments below, 0 = local broadcast to the lower segment only.
// The register and the global bit are the document's; the slave handshake
// is plain FASTBUS, the start-after-AS-release rule and the read-back are this
// design's choices. Outputs are registered; reset is synchronous.
module si_bcast_reg
  import si_pkg::*;
(
  input  logic    clk_i,
  input  logic    rst_ni,
  input  logic    sel_i,      // A/D lines hold the broadcast register address
  input  fb_bus_t bus_i,      // upper segment lines
  output fb_bus_t drv_o,      // AK, DK, read data
  output ad_t     data_o,     // broadcast word
  output logic    global_o,   // global bit of the word
  output logic    start_o     // pulse: start a broadcast
);
  typedef enum logic [1:0] {R_IDLE, R_ADDR, R_DATA} st_e;
  st_e  st_q;
  logic as_q, ak_q, dk_q, wrote_q;
  ad_t  reg_q, rdata_q;

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      st_q <= R_IDLE; as_q <= 1'b0; ak_q <= 1'b0; dk_q <= 1'b0; wrote_q <= 1'b0;
      reg_q <= '0; rdata_q <= '0; start_o <= 1'b0;
    end else begin
      as_q    <= bus_i.as;
      start_o <= 1'b0;
      unique case (st_q)
        R_IDLE: if (bus_i.as && !as_q && sel_i) begin
          ak_q <= 1'b1; wrote_q <= 1'b0;
          st_q <= R_ADDR;
        end
        R_ADDR: begin                                    // waiting for a DS edge
          if (!bus_i.as) begin
            ak_q <= 1'b0; start_o <= wrote_q;
            st_q <= R_IDLE;
          end else if (bus_i.ds) begin
            if (bus_i.rd) rdata_q <= reg_q;
            else begin reg_q <= bus_i.ad; wrote_q <= 1'b1; end
            dk_q <= 1'b1;
            st_q <= R_DATA;
          end
        end
        R_DATA: if (!bus_i.ds) begin
          dk_q <= 1'b0; rdata_q <= '0;
          st_q <= R_ADDR;
        end
        default: st_q <= R_IDLE;
      endcase
    end
  end

  always_comb begin
    drv_o    = FB_IDLE;
    drv_o.ak = ak_q;
    drv_o.dk = dk_q;
    drv_o.ad = rdata_q;
    data_o   = reg_q;
    global_o = reg_q[AD_W-1];
  end
endmodule
