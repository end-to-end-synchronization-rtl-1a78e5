// e2e_pkg: types and constants shared by the end-to-end synchronization
// test system. A cell is 47 payload bytes with no header; the transmitter
// and receiver exchange it over a byte-wide parallel bus clocked at the
// network byte rate (155.52 Mbit/s / 8 = 19.44 Mbyte/s, one Tbyte per cycle).
// The receiver's clock-recovery state machine has three states: it first
// fills the elastic buffer to half, then tracks the fill-level trend while
// the level is between the two thresholds, and corrects on the absolute
// level once a threshold is crossed.
package e2e_pkg;

  localparam int unsigned CELL_PAYLOAD = 47;  // payload bytes per cell
  localparam int unsigned BYTE_W     = 8;   // parallel bus width

  // One bus beat: a byte strobe, a start-of-cell marker and the byte.
  typedef struct packed {
    logic              sop;
    logic              wr;
    logic [BYTE_W-1:0] data;
  } cell_bus_t;

  typedef enum logic [1:0] {
    ST_FILL  = 2'd0,  // buffer re-centring: reset word loaded, no reads
    ST_TRACK = 2'd1,  // level between thresholds: trend corrections
    ST_LIMIT = 2'd2   // level beyond a threshold: absolute corrections
  } rec_state_e;

endpackage
