// dcache: low-traffic direct-mapped data cache with miss cache, dual dirty
// bits and write buffers.
//
// Organisation: CACHE_BYTES of 16-byte lines in a tag array (valid, lock, two
// dirty bits, tag) and a data array, both single-port SRAM macros one line
// wide; a MC_ENTRIES-entry fully associative miss cache that keeps replaced
// lines with their dirty bits; a 2-entry write-back buffer and a 4-entry
// write-through buffer in front of the memory port. Accesses are 32-bit words
// with byte enables.
//
// Write policy: a store is write-through when the page attribute from the
// MMU (d_wt) or the write-through bit of the control register (dccr_wt) is
// set, and write-back otherwise. Lines are allocated on read and write
// misses. A write-back store sets the dirty bit of the half line it touches;
// a write-through store updates the cache and queues the word in the
// write-through buffer. Dirty lines leave the cache only when the miss cache
// drops them (or on synchronize/flush), and then only their dirty halves are
// written.
//
// Access flow and latency (cycles from the accepting edge to d_rvalid):
//   L1 hit      1  tag and data arrays read together. A read hit may
//                  overlap the next access; a store hit writes the arrays in
//                  that cycle, so the next access is accepted a cycle later.
//   miss-cache  3  cycle 1 L1 miss, cycle 2 CAM compare, cycle 3 data. The
//   hit            line swaps with the L1 victim unless the victim is locked,
//                  in which case it stays in (and is updated in) the miss cache.
//   fill        -  four word reads, hot word first, wrapping in the line.
//                  The access completes when the hot word arrives: a load
//                  gets that word, a store is acknowledged and its data is
//                  merged when the line is placed. The fill waits while
//                  a write buffer still holds data of that line. The L1 victim
//                  moves to the miss cache; if the L1 line is locked the new
//                  line goes to the miss cache. A dirty entry pushed out of the
//                  miss cache goes to the write-back buffer.
// d_rvalid acknowledges stores as well as returning load data.
//
// Maintenance (m_req held until the m_done pulse): invalidate, synchronize
// (write dirty halves back, keep the line) and flush (write back and
// invalidate), each for the whole cache (array and miss cache) or for the line
// holding m_addr; synchronize and flush finish only when both write buffers
// are empty. After reset the cache invalidates itself.
// Memory port: one word per grant (mem_req, mem_we, mem_addr, mem_wdata,
// mem_be, taken when mem_gnt is high); reads return in order with mem_rvalid.
// Priority: line fill, then write-through buffer, then write-back buffer.
//
// Sizes, allocation policy, per-page/DCCR write policy, dual dirty bits, the
// miss cache, buffer depths, hot-word-first fill with early start, locking
// and the maintenance operations follow the cache description. The swap on a
// miss-cache hit, lock_fill, FIFO replacement, the buffer priority and the
// bus protocol are this design's choices.
module dcache
  import cache_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned MC_ENTRIES  = 32,
  parameter int unsigned WBB_DEPTH   = 2,
  parameter int unsigned WTB_DEPTH   = 4,
  localparam int unsigned LINES      = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned IDX_W      = $clog2(LINES),
  localparam int unsigned TAG_W      = LADDR_W - IDX_W,
  localparam int unsigned MC_IW      = $clog2(MC_ENTRIES),
  localparam int unsigned BE_W       = WORD_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor data port
  input  logic              d_req,
  input  logic              d_we,
  input  addr_t             d_addr,
  input  logic [WORD_W-1:0] d_wdata,
  input  logic [BE_W-1:0]   d_be,
  input  logic              d_wt,       // page is write-through (MMU)
  output logic              d_ready,
  output logic              d_rvalid,
  output logic [WORD_W-1:0] d_rdata,
  // control
  input  logic              dccr_wt,    // control register: force write-through
  input  logic              lock_fill,
  input  logic              m_req,
  input  dc_op_e            m_op,
  input  addr_t             m_addr,
  output logic              m_done,
  // memory port
  output logic              mem_req,
  output logic              mem_we,
  output addr_t             mem_addr,
  output logic [WORD_W-1:0] mem_wdata,
  output logic [BE_W-1:0]   mem_be,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  logic [WORD_W-1:0] mem_rdata,
  // accounting
  output dc_events_t        events
);

  typedef struct packed {
    logic             valid;
    logic             lock;
    dirty_t           dirty;
    logic [TAG_W-1:0] tag;
  } tag_entry_t;

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_MC_CAM, S_MC_DATA, S_FILL, S_PLACE,
    S_M_INV, S_M_RD, S_M_CHK, S_M_MC, S_M_MC_CHK, S_M_DRAIN
  } state_e;

  function automatic line_t merge(line_t l, logic [1:0] w, logic [WORD_W-1:0] d,
                                  logic [BE_W-1:0] be);
    line_t r = l;
    for (int unsigned b = 0; b < BE_W; b++)
      if (be[b]) r[w*WORD_W + b*8 +: 8] = d[b*8 +: 8];
    return r;
  endfunction

  state_e state, state_d;

  // ------------------------------------------------------------- registers
  logic              rq_we, rq_wt;
  addr_t             rq_addr;
  logic [WORD_W-1:0] rq_wdata;
  logic [BE_W-1:0]   rq_be;
  logic              vic_valid, vic_lock;
  dirty_t            vic_dirty;
  logic [TAG_W-1:0]  vic_tag;
  line_t             vic_line;
  line_t             fill_line;
  logic [2:0]        fill_issued, fill_rcvd;
  logic [IDX_W-1:0]  cnt;
  logic [MC_IW-1:0]  mcnt;
  logic              init_q;
  logic              mop_all, mop_wb, mop_inv;
  addr_t             mop_addr;

  laddr_t            rq_laddr;
  logic [IDX_W-1:0]  rq_idx;
  logic [TAG_W-1:0]  rq_tag;
  logic [1:0]        rq_word;
  dirty_t            rq_half;
  assign rq_laddr = rq_addr[ADDR_W-1:OFF_W];
  assign rq_idx   = rq_laddr[IDX_W-1:0];
  assign rq_tag   = rq_laddr[LADDR_W-1:IDX_W];
  assign rq_word  = rq_addr[OFF_W-1:2];
  assign rq_half  = rq_addr[OFF_W-1] ? 2'b10 : 2'b01;

  // ---------------------------------------------------------------- arrays
  logic             tag_en, tag_we, dat_en, dat_we;
  logic [IDX_W-1:0] arr_addr;
  tag_entry_t       tag_wdata, tag_rdata;
  line_t            dat_wdata, dat_wmask, dat_rdata;

  sram_sp #(.DEPTH(LINES), .WIDTH($bits(tag_entry_t))) u_tag (
    .clk, .en(tag_en), .we(tag_we), .addr(arr_addr), .wdata(tag_wdata),
    .wmask('1), .rdata(tag_rdata)
  );

  sram_sp #(.DEPTH(LINES), .WIDTH(LINE_W)) u_data (
    .clk, .en(dat_en), .we(dat_we), .addr(arr_addr), .wdata(dat_wdata),
    .wmask(dat_wmask), .rdata(dat_rdata)
  );

  // ------------------------------------------------------------ miss cache
  logic             mc_lk_en;
  laddr_t           mc_lk_laddr;
  logic             mc_hit_q;
  logic [MC_IW-1:0] mc_idx_q, mc_idx;
  logic             mc_rd_valid;
  laddr_t           mc_rd_laddr;
  line_t            mc_rd_line;
  dirty_t           mc_rd_dirty;
  logic             mc_wr_en, mc_wr_valid;
  laddr_t           mc_wr_laddr;
  line_t            mc_wr_line;
  dirty_t           mc_wr_dirty;
  logic             mc_alloc_en;
  laddr_t           mc_alloc_laddr;
  line_t            mc_alloc_line;
  dirty_t           mc_alloc_dirty;
  logic             mc_ev_valid;
  laddr_t           mc_ev_laddr;
  line_t            mc_ev_line;
  dirty_t           mc_ev_dirty;
  logic             mc_inv_all, mc_inv_en;

  miss_cache #(.ENTRIES(MC_ENTRIES), .DIRTY_W(HALVES)) u_mc (
    .clk, .rst_n,
    .lk_en(mc_lk_en), .lk_laddr(mc_lk_laddr), .hit_q(mc_hit_q), .idx_q(mc_idx_q),
    .rd_idx(mc_idx), .rd_valid(mc_rd_valid), .rd_laddr(mc_rd_laddr),
    .rd_line(mc_rd_line), .rd_dirty(mc_rd_dirty),
    .wr_en(mc_wr_en), .wr_idx(mc_idx), .wr_valid(mc_wr_valid), .wr_laddr(mc_wr_laddr),
    .wr_line(mc_wr_line), .wr_dirty(mc_wr_dirty),
    .alloc_en(mc_alloc_en), .alloc_laddr(mc_alloc_laddr), .alloc_line(mc_alloc_line),
    .alloc_dirty(mc_alloc_dirty),
    .ev_valid(mc_ev_valid), .ev_laddr(mc_ev_laddr), .ev_line(mc_ev_line),
    .ev_dirty(mc_ev_dirty),
    .inv_all(mc_inv_all), .inv_en(mc_inv_en), .inv_idx(mc_idx)
  );

  assign mc_idx = (state == S_M_MC) ? mcnt : mc_idx_q;

  // --------------------------------------------------------- write buffers
  logic              wbb_push, wbb_full, wbb_empty, wbb_chk_hit;
  laddr_t            wbb_push_laddr;
  line_t             wbb_push_line;
  dirty_t            wbb_push_dirty;
  logic              wbb_mreq, wbb_gnt;
  addr_t             wbb_maddr;
  logic [WORD_W-1:0] wbb_mwdata;
  logic [BE_W-1:0]   wbb_mbe;

  wb_buffer #(.DEPTH(WBB_DEPTH)) u_wbb (
    .clk, .rst_n,
    .push_en(wbb_push), .push_laddr(wbb_push_laddr), .push_line(wbb_push_line),
    .push_dirty(wbb_push_dirty), .full(wbb_full), .empty(wbb_empty),
    .chk_laddr(rq_laddr), .chk_hit(wbb_chk_hit),
    .mem_req(wbb_mreq), .mem_addr(wbb_maddr), .mem_wdata(wbb_mwdata), .mem_be(wbb_mbe),
    .mem_gnt(wbb_gnt)
  );

  logic              wtb_push, wtb_full, wtb_empty, wtb_chk_hit;
  logic              wtb_mreq, wtb_gnt;
  addr_t             wtb_maddr;
  logic [WORD_W-1:0] wtb_mwdata;
  logic [BE_W-1:0]   wtb_mbe;

  wt_buffer #(.DEPTH(WTB_DEPTH)) u_wtb (
    .clk, .rst_n,
    .push_en(wtb_push), .push_addr(rq_addr), .push_data(rq_wdata), .push_be(rq_be),
    .full(wtb_full), .empty(wtb_empty),
    .chk_laddr(rq_laddr), .chk_hit(wtb_chk_hit),
    .mem_req(wtb_mreq), .mem_addr(wtb_maddr), .mem_wdata(wtb_mwdata), .mem_be(wtb_mbe),
    .mem_gnt(wtb_gnt)
  );

  // ------------------------------------------------------ memory arbitration
  logic fill_req;
  assign fill_req = (state == S_FILL) && (fill_issued < 3'd4) && !wbb_chk_hit && !wtb_chk_hit;

  always_comb begin
    mem_req   = fill_req || wtb_mreq || wbb_mreq;
    mem_we    = 1'b1;
    mem_addr  = wbb_maddr;
    mem_wdata = wbb_mwdata;
    mem_be    = wbb_mbe;
    wtb_gnt   = 1'b0;
    wbb_gnt   = 1'b0;
    if (fill_req) begin
      mem_we    = 1'b0;
      mem_addr  = {rq_laddr, 2'(rq_word + fill_issued[1:0]), 2'b00};
      mem_wdata = '0;
      mem_be    = '1;
    end else if (wtb_mreq) begin
      mem_addr  = wtb_maddr;
      mem_wdata = wtb_mwdata;
      mem_be    = wtb_mbe;
      wtb_gnt   = mem_gnt;
    end else begin
      wbb_gnt   = mem_gnt;
    end
  end

  // ------------------------------------------------------------ datapath
  logic   l1_hit;
  assign l1_hit = tag_rdata.valid && (tag_rdata.tag == rq_tag);

  logic   accept;
  assign d_ready = !m_req && ((state == S_IDLE) || (state == S_LOOKUP && l1_hit && !rq_we));
  assign accept  = d_req && d_ready;

  logic [1:0] rcv_word;
  line_t      fill_line_d;
  assign rcv_word = rq_word + fill_rcvd[1:0];
  always_comb begin
    fill_line_d = fill_line;
    if (mem_rvalid) fill_line_d[rcv_word*WORD_W +: WORD_W] = mem_rdata;
  end

  // Line and dirty bits after the pending store, if any, is applied.
  line_t  mc_line_new, fill_line_new;
  dirty_t st_dirty;
  assign st_dirty      = (rq_we && !rq_wt) ? rq_half : 2'b00;
  assign mc_line_new   = rq_we ? merge(mc_rd_line, rq_word, rq_wdata, rq_be) : mc_rd_line;
  assign fill_line_new = rq_we ? merge(fill_line, rq_word, rq_wdata, rq_be) : fill_line;

  line_t st_mask;
  always_comb begin
    st_mask = '0;
    for (int unsigned b = 0; b < BE_W; b++)
      if (rq_be[b]) st_mask[rq_word*WORD_W + b*8 +: 8] = 8'hff;
  end

  logic             need_alloc, ev_dirty_out;
  assign need_alloc   = vic_lock || vic_valid;
  assign ev_dirty_out = need_alloc && mc_ev_valid && (mc_ev_dirty != '0);

  logic [IDX_W-1:0] m_idx;
  logic [TAG_W-1:0] m_tag;
  logic             m_match, mc_m_match;
  assign m_idx      = mop_all ? cnt : mop_addr[OFF_W +: IDX_W];
  assign m_tag      = mop_addr[OFF_W+IDX_W +: TAG_W];
  assign m_match    = tag_rdata.valid && (mop_all || tag_rdata.tag == m_tag);
  assign mc_m_match = (state == S_M_MC) ? mc_rd_valid : mc_hit_q;

  // ------------------------------------------------------------ control
  always_comb begin
    state_d        = state;
    tag_en         = 1'b0;
    tag_we         = 1'b0;
    dat_en         = 1'b0;
    dat_we         = 1'b0;
    arr_addr       = rq_idx;
    tag_wdata      = '{valid: 1'b1, lock: lock_fill, dirty: st_dirty, tag: rq_tag};
    dat_wdata      = fill_line_new;
    dat_wmask      = '1;
    mc_lk_en       = 1'b0;
    mc_lk_laddr    = rq_laddr;
    mc_wr_en       = 1'b0;
    mc_wr_valid    = vic_valid;
    mc_wr_laddr    = {vic_tag, rq_idx};
    mc_wr_line     = vic_line;
    mc_wr_dirty    = vic_dirty;
    mc_alloc_en    = 1'b0;
    mc_alloc_laddr = {vic_tag, rq_idx};
    mc_alloc_line  = vic_line;
    mc_alloc_dirty = vic_dirty;
    mc_inv_all     = 1'b0;
    mc_inv_en      = 1'b0;
    wbb_push       = 1'b0;
    wbb_push_laddr = mc_ev_laddr;
    wbb_push_line  = mc_ev_line;
    wbb_push_dirty = mc_ev_dirty;
    wtb_push       = 1'b0;
    d_rvalid       = 1'b0;
    d_rdata        = dat_rdata[rq_word*WORD_W +: WORD_W];
    m_done         = 1'b0;
    events         = '0;

    unique case (state)
      S_IDLE, S_LOOKUP: begin
        if (state == S_LOOKUP) begin
          if (!l1_hit) begin
            state_d = S_MC_CAM;
          end else if (!rq_we) begin
            d_rvalid      = 1'b1;
            events.l1_hit = 1'b1;
            state_d       = S_IDLE;
          end else if (rq_wt && wtb_full) begin
            events.stall_buf = 1'b1;        // wait for a write-through slot
          end else begin
            d_rvalid        = 1'b1;
            events.l1_hit   = 1'b1;
            events.wt_store = rq_wt;
            wtb_push        = rq_wt;
            dat_en          = 1'b1;
            dat_we          = 1'b1;
            dat_wdata       = {(LINE_W/WORD_W){rq_wdata}};
            dat_wmask       = st_mask;
            tag_en          = !rq_wt;
            tag_we          = !rq_wt;
            tag_wdata       = tag_rdata;
            tag_wdata.dirty = tag_rdata.dirty | st_dirty;
            state_d         = S_IDLE;
          end
        end
        if (state_d == S_IDLE) begin
          if (m_req) begin
            if (m_op[2] == 1'b0 && m_op[1] == 1'b0) state_d = S_M_INV;
            else                                    state_d = S_M_RD;
          end else if (accept) begin
            tag_en   = 1'b1;
            dat_en   = 1'b1;
            arr_addr = d_addr[OFF_W +: IDX_W];
            state_d  = S_LOOKUP;
          end
        end
      end

      S_MC_CAM: begin
        mc_lk_en = 1'b1;
        state_d  = S_MC_DATA;
      end

      S_MC_DATA: begin
        if (!mc_hit_q) begin
          state_d = S_FILL;
        end else if (rq_we && rq_wt && wtb_full) begin
          events.stall_buf = 1'b1;
        end else begin
          d_rvalid        = 1'b1;
          d_rdata         = mc_rd_line[rq_word*WORD_W +: WORD_W];
          events.mc_hit   = 1'b1;
          events.wt_store = rq_we && rq_wt;
          wtb_push        = rq_we && rq_wt;
          mc_wr_en        = 1'b1;
          if (!vic_lock) begin
            // swap: line into the array, victim into this entry
            tag_en          = 1'b1;
            tag_we          = 1'b1;
            tag_wdata.dirty = mc_rd_dirty | st_dirty;
            dat_en          = 1'b1;
            dat_we          = 1'b1;
            dat_wdata       = mc_line_new;
          end else begin
            mc_wr_valid = 1'b1;
            mc_wr_laddr = rq_laddr;
            mc_wr_line  = mc_line_new;
            mc_wr_dirty = mc_rd_dirty | st_dirty;
          end
          state_d = S_IDLE;
        end
      end

      S_FILL: begin
        if (mem_rvalid && fill_rcvd == 3'd0) begin
          d_rvalid = 1'b1;                  // hot word, early restart
          d_rdata  = mem_rdata;             // (a store is merged at placement)
        end
        if (mem_rvalid && fill_rcvd == 3'd3) state_d = S_PLACE;
      end

      S_PLACE: begin
        if ((rq_we && rq_wt && wtb_full) || (ev_dirty_out && wbb_full)) begin
          events.stall_buf = 1'b1;
        end else begin
          events.fill     = 1'b1;
          events.wt_store = rq_we && rq_wt;
          wtb_push        = rq_we && rq_wt;
          if (!vic_lock) begin
            tag_en      = 1'b1;
            tag_we      = 1'b1;
            dat_en      = 1'b1;
            dat_we      = 1'b1;
            mc_alloc_en = vic_valid;
          end else begin
            mc_alloc_en        = 1'b1;
            mc_alloc_laddr     = rq_laddr;
            mc_alloc_line      = fill_line_new;
            mc_alloc_dirty     = st_dirty;
            events.locked_fill = 1'b1;
          end
          wbb_push       = ev_dirty_out;
          events.wb_push = ev_dirty_out;
          state_d        = S_IDLE;
        end
      end

      // invalidate every line without reading it (also used after reset)
      S_M_INV: begin
        tag_en    = 1'b1;
        tag_we    = 1'b1;
        arr_addr  = cnt;
        tag_wdata = '0;
        if (cnt == IDX_W'(LINES - 1)) begin
          mc_inv_all = 1'b1;
          m_done     = !init_q;
          state_d    = S_IDLE;
        end
      end

      S_M_RD: begin
        tag_en   = 1'b1;
        dat_en   = 1'b1;
        arr_addr = m_idx;
        state_d  = S_M_CHK;
      end

      S_M_CHK: begin
        if (m_match && mop_wb && tag_rdata.dirty != '0 && wbb_full) begin
          events.stall_buf = 1'b1;
        end else begin
          if (m_match) begin
            wbb_push        = mop_wb && tag_rdata.dirty != '0;
            events.wb_push  = wbb_push;
            wbb_push_laddr  = {tag_rdata.tag, m_idx};
            wbb_push_line   = dat_rdata;
            wbb_push_dirty  = tag_rdata.dirty;
            tag_en          = 1'b1;
            tag_we          = 1'b1;
            arr_addr        = m_idx;
            tag_wdata       = tag_rdata;
            tag_wdata.dirty = '0;
            if (mop_inv) tag_wdata = '0;
          end
          if (mop_all && cnt != IDX_W'(LINES - 1)) begin
            state_d = S_M_RD;
          end else if (mop_all) begin
            state_d = S_M_MC;
          end else begin
            mc_lk_en    = 1'b1;
            mc_lk_laddr = mop_addr[ADDR_W-1:OFF_W];
            state_d     = S_M_MC_CHK;
          end
        end
      end

      S_M_MC, S_M_MC_CHK: begin
        if (mc_m_match && mop_wb && mc_rd_dirty != '0 && wbb_full) begin
          events.stall_buf = 1'b1;
        end else begin
          if (mc_m_match) begin
            wbb_push       = mop_wb && mc_rd_dirty != '0;
            events.wb_push = wbb_push;
            wbb_push_laddr = mc_rd_laddr;
            wbb_push_line  = mc_rd_line;
            wbb_push_dirty = mc_rd_dirty;
            mc_inv_en      = mop_inv;
            mc_wr_en       = !mop_inv;
            mc_wr_valid    = 1'b1;
            mc_wr_laddr    = mc_rd_laddr;
            mc_wr_line     = mc_rd_line;
            mc_wr_dirty    = '0;
          end
          if (state == S_M_MC && mcnt != MC_IW'(MC_ENTRIES - 1)) state_d = S_M_MC;
          else                                                  state_d = S_M_DRAIN;
        end
      end

      S_M_DRAIN: begin
        if (!mop_wb || (wbb_empty && wtb_empty)) begin
          m_done  = 1'b1;
          state_d = S_IDLE;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_M_INV;
      init_q      <= 1'b1;
      cnt         <= '0;
      mcnt        <= '0;
      fill_issued <= '0;
      fill_rcvd   <= '0;
      rq_addr     <= '0;
      rq_we       <= 1'b0;
      rq_wt       <= 1'b0;
      mop_all     <= 1'b1;
      mop_wb      <= 1'b0;
      mop_inv     <= 1'b1;
      mop_addr    <= '0;
    end else begin
      state <= state_d;
      if (accept) begin
        rq_addr <= d_addr;
        rq_we   <= d_we;
        rq_wt   <= d_wt || dccr_wt;
      end
      if ((state == S_IDLE || state == S_LOOKUP) && state_d inside {S_M_INV, S_M_RD}) begin
        mop_all  <= !m_op[2];
        mop_wb   <= m_op[1];
        mop_inv  <= m_op[0];
        mop_addr <= m_addr;
        cnt      <= '0;
        mcnt     <= '0;
      end
      if (state == S_M_INV) begin
        cnt <= cnt + 1'b1;
        if (state_d == S_IDLE) init_q <= 1'b0;
      end
      if (state == S_M_CHK && state_d != S_M_CHK) cnt <= cnt + 1'b1;
      if (state == S_M_MC && state_d != S_M_DRAIN && !events.stall_buf) mcnt <= mcnt + 1'b1;
      if (state == S_MC_DATA) begin
        fill_issued <= '0;
        fill_rcvd   <= '0;
      end
      if (fill_req && mem_gnt) fill_issued <= fill_issued + 1'b1;
      if (state == S_FILL && mem_rvalid) fill_rcvd <= fill_rcvd + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (accept) begin
      rq_wdata <= d_wdata;
      rq_be    <= d_be;
    end
    if (state == S_LOOKUP && !l1_hit) begin
      vic_valid <= tag_rdata.valid;
      vic_lock  <= tag_rdata.valid && tag_rdata.lock;
      vic_dirty <= tag_rdata.valid ? tag_rdata.dirty : 2'b00;
      vic_tag   <= tag_rdata.tag;
      vic_line  <= dat_rdata;
    end
    if (state == S_FILL) fill_line <= fill_line_d;
  end

  // -------------------------------------------------------------- checks
  mem_data_only_in_fill: assert property (@(posedge clk) disable iff (!rst_n)
      mem_rvalid |-> state == S_FILL)
    else $error("dcache: unexpected memory read data");

  no_fill_over_buffered_line: assert property (@(posedge clk) disable iff (!rst_n)
      fill_req |-> !wbb_chk_hit && !wtb_chk_hit)
    else $error("dcache: line fill overtakes a buffered write");

endmodule
