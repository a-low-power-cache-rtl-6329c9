// cache_pkg: types and constants shared by the instruction and data caches.
//
// Both caches use 16-byte lines on a 32-bit byte address. A line address is
// the byte address without its 4 offset bits (28 bits). Inside a line the
// instruction cache works in eight 16-bit half-words and the data cache in
// four 32-bit words; each data-cache line carries two dirty bits, one per
// 8-byte half line. The line size and the half-line dirty granularity follow
// the cache description; the bus widths and the encodings of the maintenance
// operations are this design's choices.
package cache_pkg;

  localparam int unsigned ADDR_W     = 32;
  localparam int unsigned LINE_BYTES = 16;
  localparam int unsigned OFF_W      = 4;               // log2(LINE_BYTES)
  localparam int unsigned LADDR_W    = ADDR_W - OFF_W;  // line address width
  localparam int unsigned LINE_W     = 8 * LINE_BYTES;  // 128 bits
  localparam int unsigned HW_W       = 16;              // instruction fetch unit
  localparam int unsigned WORD_W     = 32;              // data access unit
  localparam int unsigned HALVES     = 2;               // dirty bits per line

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [LINE_W-1:0]  line_t;
  typedef logic [HALVES-1:0]  dirty_t;

  // Instruction cache maintenance.
  typedef enum logic [0:0] {
    IC_INV_ALL  = 1'b0,
    IC_INV_LINE = 1'b1
  } ic_op_e;

  // Data cache maintenance: {scope, write back, invalidate}.
  //   invalidate   : drop the line(s), dirty data is lost
  //   synchronize  : write dirty data back, keep the line(s) valid and clean
  //   flush        : write dirty data back and invalidate
  typedef enum logic [2:0] {
    DC_INV_ALL    = 3'b001,
    DC_SYNC_ALL   = 3'b010,
    DC_FLUSH_ALL  = 3'b011,
    DC_INV_LINE   = 3'b101,
    DC_SYNC_LINE  = 3'b110,
    DC_FLUSH_LINE = 3'b111
  } dc_op_e;

  // Single-cycle event pulses, for power and performance accounting.
  typedef struct packed {
    logic lrb_hit;     // fetch served by the line reuse buffer, arrays idle
    logic l1_hit;      // fetch hit in the direct-mapped array
    logic mc_hit;      // L1 miss that hit in the miss cache
    logic fill;        // line fetched from memory
    logic locked_fill; // fill placed in the miss cache because L1 line is locked
    logic fill_stream; // sequential fetch served from a line still being filled
  } ic_events_t;

  typedef struct packed {
    logic l1_hit;      // access hit in the direct-mapped array
    logic mc_hit;      // L1 miss that hit in the miss cache
    logic fill;        // line fetched from memory
    logic locked_fill; // fill placed in the miss cache because L1 line is locked
    logic wt_store;    // store sent to the write-through buffer
    logic wb_push;     // dirty line sent to the write-back buffer
    logic stall_buf;   // cycle stalled on a full write buffer
  } dc_events_t;

endpackage
