// calm_cache_system: the instruction and data caches of a 32-bit embedded
// processor, side by side.
//
// The instruction cache (icache) serves 16-bit fetches from a 16 KB
// direct-mapped array, skipping the array entirely for sequential fetches
// that stay in the last line (line reuse buffer), and backs the array with a
// 32-entry miss cache. The data cache (dcache) serves 32-bit loads and stores
// from a 16 KB direct-mapped array with a 32-entry miss cache, per-page or
// global write-through/write-back, two dirty bits per line and write-back and
// write-through buffers. See those modules for timing.
//
// Each cache has its own memory port here (ic_mem_* reads half-words,
// dc_mem_* reads and writes words); how the two share the external bus is
// outside this design. The processor, the MMU that supplies the per-page
// write-through attribute (dc_wt) and the control register bit (dccr_wt) are
// also outside; their signals are ports. The pairing of the two caches
// follows the cache description; the separate memory ports are this design's
// choice.
module calm_cache_system
  import cache_pkg::*;
#(
  parameter int unsigned IC_BYTES      = 16384,
  parameter int unsigned DC_BYTES      = 16384,
  parameter int unsigned MC_ENTRIES    = 32,
  parameter int unsigned WBB_DEPTH     = 2,
  parameter int unsigned WTB_DEPTH     = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction fetch
  input  logic              if_req,
  input  addr_t             if_addr,
  input  logic              if_seq,
  output logic              if_ready,
  output logic              if_rvalid,
  output logic [HW_W-1:0]   if_rdata,
  input  logic              ic_lock_fill,
  input  logic              ic_m_req,
  input  ic_op_e            ic_m_op,
  input  addr_t             ic_m_addr,
  output logic              ic_m_done,
  output logic              ic_mem_req,
  output addr_t             ic_mem_addr,
  input  logic              ic_mem_gnt,
  input  logic              ic_mem_rvalid,
  input  logic [HW_W-1:0]   ic_mem_rdata,
  output ic_events_t        ic_events,
  // data access
  input  logic              d_req,
  input  logic              d_we,
  input  addr_t             d_addr,
  input  logic [WORD_W-1:0] d_wdata,
  input  logic [3:0]        d_be,
  input  logic              d_wt,
  output logic              d_ready,
  output logic              d_rvalid,
  output logic [WORD_W-1:0] d_rdata,
  input  logic              dccr_wt,
  input  logic              dc_lock_fill,
  input  logic              dc_m_req,
  input  dc_op_e            dc_m_op,
  input  addr_t             dc_m_addr,
  output logic              dc_m_done,
  output logic              dc_mem_req,
  output logic              dc_mem_we,
  output addr_t             dc_mem_addr,
  output logic [WORD_W-1:0] dc_mem_wdata,
  output logic [3:0]        dc_mem_be,
  input  logic              dc_mem_gnt,
  input  logic              dc_mem_rvalid,
  input  logic [WORD_W-1:0] dc_mem_rdata,
  output dc_events_t        dc_events
);

  icache #(.CACHE_BYTES(IC_BYTES), .MC_ENTRIES(MC_ENTRIES)) u_icache (
    .clk, .rst_n,
    .if_req, .if_addr, .if_seq, .if_ready, .if_rvalid, .if_rdata,
    .lock_fill(ic_lock_fill), .m_req(ic_m_req), .m_op(ic_m_op), .m_addr(ic_m_addr),
    .m_done(ic_m_done),
    .mem_req(ic_mem_req), .mem_addr(ic_mem_addr), .mem_gnt(ic_mem_gnt),
    .mem_rvalid(ic_mem_rvalid), .mem_rdata(ic_mem_rdata),
    .events(ic_events)
  );

  dcache #(.CACHE_BYTES(DC_BYTES), .MC_ENTRIES(MC_ENTRIES),
           .WBB_DEPTH(WBB_DEPTH), .WTB_DEPTH(WTB_DEPTH)) u_dcache (
    .clk, .rst_n,
    .d_req, .d_we, .d_addr, .d_wdata, .d_be, .d_wt, .d_ready, .d_rvalid, .d_rdata,
    .dccr_wt, .lock_fill(dc_lock_fill), .m_req(dc_m_req), .m_op(dc_m_op),
    .m_addr(dc_m_addr), .m_done(dc_m_done),
    .mem_req(dc_mem_req), .mem_we(dc_mem_we), .mem_addr(dc_mem_addr),
    .mem_wdata(dc_mem_wdata), .mem_be(dc_mem_be), .mem_gnt(dc_mem_gnt),
    .mem_rvalid(dc_mem_rvalid), .mem_rdata(dc_mem_rdata),
    .events(dc_events)
  );

endmodule
