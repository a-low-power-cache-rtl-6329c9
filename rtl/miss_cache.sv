// miss_cache: small fully-associative cache of lines replaced from a
// direct-mapped cache (a victim cache that is looked up only after a miss).
//
// Each entry holds a valid bit, a 28-bit line address (the CAM tag), a 128-bit
// line and DIRTY_W dirty bits (two, one per half line, in the data cache;
// none in the instruction cache). The CAM is compared only in a cycle where
// lk_en is high, so it draws no power on accesses that hit in the main array.
//
// Timing:
//   lookup : lk_en/lk_laddr in cycle N; hit_q/idx_q valid in cycle N+1.
//   read   : rd_idx -> rd_* combinationally (the data is read in the cycle
//            after the CAM compare, giving the 3-cycle miss-cache hit).
//   update : wr_en rewrites entry wr_idx at the clock edge (used for the
//            swap with the main array and for writes into a held line).
//   alloc  : alloc_en writes the entry at the FIFO pointer and advances it.
//            ev_* shows that entry before it is overwritten, so the caller
//            can save a dirty line it is about to lose.
//   inv    : inv_all clears every valid bit; inv_en clears entry inv_idx.
// The entry count is the documented 32; FIFO replacement and the port set are
// this design's choices.
module miss_cache
  import cache_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned DIRTY_W = 2,
  localparam int unsigned IW     = $clog2(ENTRIES),
  localparam int unsigned DW     = (DIRTY_W == 0) ? 1 : DIRTY_W
) (
  input  logic          clk,
  input  logic          rst_n,
  // CAM lookup
  input  logic          lk_en,
  input  laddr_t        lk_laddr,
  output logic          hit_q,
  output logic [IW-1:0] idx_q,
  // read
  input  logic [IW-1:0] rd_idx,
  output logic          rd_valid,
  output laddr_t        rd_laddr,
  output line_t         rd_line,
  output logic [DW-1:0] rd_dirty,
  // rewrite one entry
  input  logic          wr_en,
  input  logic [IW-1:0] wr_idx,
  input  logic          wr_valid,
  input  laddr_t        wr_laddr,
  input  line_t         wr_line,
  input  logic [DW-1:0] wr_dirty,
  // allocate at the FIFO pointer
  input  logic          alloc_en,
  input  laddr_t        alloc_laddr,
  input  line_t         alloc_line,
  input  logic [DW-1:0] alloc_dirty,
  output logic          ev_valid,
  output laddr_t        ev_laddr,
  output line_t         ev_line,
  output logic [DW-1:0] ev_dirty,
  // invalidation
  input  logic          inv_all,
  input  logic          inv_en,
  input  logic [IW-1:0] inv_idx
);

  logic [ENTRIES-1:0] valid;
  laddr_t             tags  [ENTRIES];
  line_t              lines [ENTRIES];
  logic [DW-1:0]      dirty [ENTRIES];
  logic [IW-1:0]      fifo_ptr;

  // CAM compare, gated by lk_en.
  logic          match_any;
  logic [IW-1:0] match_idx;
  always_comb begin
    match_any = 1'b0;
    match_idx = '0;
    if (lk_en) begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (valid[i] && tags[i] == lk_laddr) begin
          match_any = 1'b1;
          match_idx = IW'(i);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hit_q <= 1'b0;
      idx_q <= '0;
    end else if (lk_en) begin
      hit_q <= match_any;
      idx_q <= match_idx;
    end
  end

  assign rd_valid = valid[rd_idx];
  assign rd_laddr = tags[rd_idx];
  assign rd_line  = lines[rd_idx];
  assign rd_dirty = dirty[rd_idx];

  assign ev_valid = valid[fifo_ptr];
  assign ev_laddr = tags[fifo_ptr];
  assign ev_line  = lines[fifo_ptr];
  assign ev_dirty = dirty[fifo_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      fifo_ptr <= '0;
    end else begin
      if (inv_all) begin
        valid <= '0;
      end else begin
        if (inv_en) valid[inv_idx] <= 1'b0;
        if (wr_en) valid[wr_idx] <= wr_valid;
        if (alloc_en) valid[fifo_ptr] <= 1'b1;
      end
      if (alloc_en) fifo_ptr <= (fifo_ptr == IW'(ENTRIES - 1)) ? '0 : fifo_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      tags[wr_idx]  <= wr_laddr;
      lines[wr_idx] <= wr_line;
      dirty[wr_idx] <= wr_dirty;
    end
    if (alloc_en) begin
      tags[fifo_ptr]  <= alloc_laddr;
      lines[fifo_ptr] <= alloc_line;
      dirty[fifo_ptr] <= alloc_dirty;
    end
  end

endmodule
