// si_pkg: shared types and constants of the segment interconnect.
//
// A FASTBUS segment is a set of wired-OR lines. Each block of the interconnect
// drives a "what I assert" copy of the lines (fb_bus_t, 1 = asserted) and the
// top ORs those copies together, which is what the open-collector bus itself
// does; the lines seen on the bus come back in as another fb_bus_t. The line
// names (AS, AK, DS, DK, WAIT, BK, BC, BW, LS, GK, AL, A/D) follow the
// document; RD (read/write), AR (arbitration request) and AG (arbitration
// grant) are the FASTBUS standard lines this design uses beside them.
// The 32-bit A/D width and the 6 AL lines are FASTBUS figures; the clocked
// model of the asynchronous handshake is this design's choice.
package si_pkg;

  localparam int unsigned AD_W = 32;  // multiplexed address/data lines
  localparam int unsigned AL_W = 6;   // arbitration level lines

  typedef logic [AD_W-1:0] ad_t;
  typedef logic [AL_W-1:0] al_t;

  // One segment's lines, asserted high.
  typedef struct packed {
    logic as;   // address sync
    logic ak;   // address acknowledge
    logic ds;   // data sync
    logic dk;   // data acknowledge
    logic rd;   // read (1) / write (0), valid with AS and DS
    logic wt;   // WAIT: inhibits the master's AS timeout
    logic bk;   // back off: "relinquish the bus and try again later"
    logic bc;   // broadcast
    logic bw;   // broadcast wait (cable segments)
    logic ls;   // last segment marker
    logic gk;   // grant acknowledge: the current bus master holds it
    logic ar;   // arbitration request
    logic ag;   // arbitration grant (driven by the segment's timing control)
    al_t  al;   // arbitration level lines (logical value)
    ad_t  ad;   // address / data
  } fb_bus_t;

  localparam fb_bus_t FB_IDLE = '0;

  // One-cycle event pulses of the interconnect, for monitoring.
  typedef struct packed {
    logic down_fwd;     // an upper-to-lower transaction was acknowledged
    logic up_fwd;       // a lower-to-upper transaction was acknowledged
    logic timeout;      // a relayed address got neither AK nor WAIT in time
    logic deadlock;     // the cross-addressing deadlock was broken with BK
    logic bcast_local;  // a local broadcast was completed
    logic bcast_global; // a global broadcast was completed (as originator)
    logic relay_done;   // a global broadcast was relayed downwards
    logic relay_last;   // ... as the last segment (LS low below)
    logic arb_up;       // arbitration won on the upper segment
    logic arb_low;      // arbitration won on the lower segment
  } si_events_t;

endpackage
