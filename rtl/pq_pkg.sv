// pq_pkg: types and constants shared by the priority queue accelerator.
//
// A queue entry is 64 bits: a 32-bit priority value and a 32-bit identifier
// that travels with it (for a router, the identifier names the graph vertex
// or partial solution the priority belongs to). The widths follow the
// accelerator's stated entry format. Lower priority values are served first,
// as a shortest-path search extracts the smallest tentative cost; that
// ordering is this design's choice.
package pq_pkg;

  localparam int unsigned PRIO_W = 32;
  localparam int unsigned ID_W   = 32;

  typedef struct packed {
    logic [PRIO_W-1:0] prio;
    logic [ID_W-1:0]   id;
  } pq_entry_t;

  // An entry with a valid flag: a held cell value or a travelling token.
  typedef struct packed {
    logic      valid;
    pq_entry_t entry;
  } pq_slot_t;

  localparam pq_slot_t PQ_SLOT_EMPTY = '0;

  // Avalon register map (word addresses of the 32-bit slave port).
  localparam logic [1:0] REG_PRIO   = 2'd0;  // W: staged priority, R: extracted priority
  localparam logic [1:0] REG_ID     = 2'd1;  // W: staged identifier, R: extracted identifier
  localparam logic [1:0] REG_CMD    = 2'd2;  // W: bit0 INSERT, bit1 EXTRACT; R: same as STATUS
  localparam logic [1:0] REG_STATUS = 2'd3;  // R: status word; W: clear sticky flags

  // Bits of the status word.
  localparam int unsigned ST_EMPTY    = 0;   // queue holds no entry
  localparam int unsigned ST_FULL     = 1;   // queue holds its capacity of entries
  localparam int unsigned ST_RVALID   = 2;   // last EXTRACT returned an entry
  localparam int unsigned ST_REJECTED = 3;   // sticky: an INSERT was refused because full
  localparam int unsigned ST_UNDERRUN = 4;   // sticky: an EXTRACT found the queue empty
  localparam int unsigned ST_COUNT_LO = 16;  // bits 31:16 hold the entry count

endpackage
