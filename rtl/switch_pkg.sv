// switch_pkg: types and constants shared by the IQ and CIOQ packet routers.
//
// A cell is the fixed-size unit moved by the switching fabric in one slot.
// Each cell carries two framing flags (first / last cell of its packet) and a
// payload word. One clock cycle of every module is one slot.
// The maximum packet length of 192 cells (an IP-over-ATM MTU of 9180 octets
// after LLC/SNAP and AAL5) and the 16-port size follow the evaluated
// configuration; the payload width is this design's choice.
package switch_pkg;

  // Payload bits carried by one cell (a tag rather than a 48-octet payload).
  localparam int unsigned CELL_DATA_W = 32;

  // Largest packet, in cells.
  localparam int unsigned MAX_PKT_CELLS = 192;

  typedef struct packed {
    logic                   first;  // first cell of its packet
    logic                   last;   // last cell of its packet
    logic [CELL_DATA_W-1:0] data;   // payload tag
  } cell_t;

  // Operating mode of a matching scheduler.
  typedef enum logic {
    CELL_MODE   = 1'b0,  // every slot is matched afresh
    PACKET_MODE = 1'b1   // a connection is held until the last cell of a packet
  } sched_mode_e;

endpackage
