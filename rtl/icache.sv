// icache: low-power direct-mapped instruction cache with line reuse buffer
// and miss cache.
//
// Organisation: CACHE_BYTES of 16-byte lines in one tag array and one data
// array (single-port SRAM macros, one line wide), a MC_ENTRIES-entry fully
// associative miss cache for lines replaced from the array, and a one-line
// line reuse buffer (LRB). Fetches are 16-bit half-words.
//
// Fetch flow and latency (cycles from the accepting edge to if_rvalid):
//   LRB hit       1  The processor marks the fetch sequential (if_seq) in
//                    the same cycle it presents the address; a sequential
//                    fetch that stays in the previous line is served from
//                    the LRB while the tag and data arrays stay disabled.
//   L1 hit        1  Tag and data arrays read together; the line is also
//                    copied into the LRB.
//   miss-cache    3  Cycle 1 finds the L1 miss, cycle 2 compares the miss
//   hit              cache CAM, cycle 3 reads its data. The line then swaps
//                    places with the L1 victim, unless the victim is locked,
//                    in which case it stays in the miss cache.
//   fill          -  Eight half-word reads, hot half-word first and wrapping
//                    inside the line. The processor gets the hot half-word
//                    the cycle it arrives. While the fill runs, a sequential
//                    fetch in the same line is taken as soon as its
//                    half-word has arrived and is served one cycle later;
//                    other fetches wait for the fill. The victim moves to
//                    the miss cache; if the L1 line is locked the new line
//                    goes to the miss cache instead.
// Fetches are accepted on if_req && if_ready; a new fetch may be accepted in
// the cycle a hit is delivered, so hits stream at one per cycle.
//
// Locking: lines written into the array while lock_fill is high are locked
// and are never replaced; only invalidation unlocks them.
// Maintenance: m_req with m_op = IC_INV_ALL (all lines, miss cache and LRB;
// one cycle per line) or IC_INV_LINE (the line holding m_addr). m_req is held
// until the one-cycle m_done pulse. After reset the cache invalidates itself
// and does not accept fetches until that is done.
// Memory port: one half-word read per grant (mem_req/mem_addr, taken when
// mem_gnt is high), data returned in order with mem_rvalid.
//
// The sizes, the LRB, the 3-cycle miss-cache hit, locking with miss-cache
// allocation, both invalidations and hot-half-word-first fill with early
// start follow the cache description. The swap on a miss-cache hit, the
// lock_fill control, FIFO miss-cache replacement, the bus protocol and the
// self-invalidation after reset are this design's choices, and so is serving
// sequential fetches during a fill.
module icache
  import cache_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned MC_ENTRIES  = 32,
  localparam int unsigned LINES      = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned IDX_W      = $clog2(LINES),
  localparam int unsigned TAG_W      = LADDR_W - IDX_W,
  localparam int unsigned MC_IW      = $clog2(MC_ENTRIES)
) (
  input  logic            clk,
  input  logic            rst_n,
  // processor fetch port
  input  logic            if_req,
  input  addr_t           if_addr,
  input  logic            if_seq,
  output logic            if_ready,
  output logic            if_rvalid,
  output logic [HW_W-1:0] if_rdata,
  // control
  input  logic            lock_fill,
  input  logic            m_req,
  input  ic_op_e          m_op,
  input  addr_t           m_addr,
  output logic            m_done,
  // memory port
  output logic            mem_req,
  output addr_t           mem_addr,
  input  logic            mem_gnt,
  input  logic            mem_rvalid,
  input  logic [HW_W-1:0] mem_rdata,
  // accounting
  output ic_events_t      events
);

  typedef struct packed {
    logic             valid;
    logic             lock;
    logic [TAG_W-1:0] tag;
  } tag_entry_t;

  typedef enum logic [3:0] {
    S_IDLE, S_LRB, S_LOOKUP, S_MC_CAM, S_MC_DATA, S_FILL, S_M_ALL, S_M_CHK
  } state_e;

  state_e state, state_d;

  // ---------------------------------------------------------------- arrays
  logic             tag_en, tag_we;
  logic [IDX_W-1:0] tag_addr;
  tag_entry_t       tag_wdata, tag_rdata;
  logic             dat_en, dat_we;
  line_t            dat_wdata, dat_rdata;

  sram_sp #(.DEPTH(LINES), .WIDTH($bits(tag_entry_t))) u_tag (
    .clk, .en(tag_en), .we(tag_we), .addr(tag_addr), .wdata(tag_wdata),
    .wmask('1), .rdata(tag_rdata)
  );

  sram_sp #(.DEPTH(LINES), .WIDTH(LINE_W)) u_data (
    .clk, .en(dat_en), .we(dat_we), .addr(tag_addr), .wdata(dat_wdata),
    .wmask('1), .rdata(dat_rdata)
  );

  // ------------------------------------------------------------- registers
  addr_t            req_addr;      // fetch being served
  logic             vic_valid, vic_lock;
  logic [TAG_W-1:0] vic_tag;
  line_t            vic_line;
  line_t            fill_line;
  logic [3:0]       fill_issued, fill_rcvd;
  logic [2:0]       fill_hw0;      // hot half-word of the fill
  logic [7:0]       rcv_mask;      // half-words of the fill received so far
  logic             stream_q;      // fetch served from the filling line this cycle
  logic [IDX_W-1:0] cnt;
  logic             init_q;        // self-invalidation after reset

  laddr_t           req_laddr;
  logic [IDX_W-1:0] req_idx;
  logic [TAG_W-1:0] req_tag;
  logic [2:0]       req_hw;
  assign req_laddr = req_addr[ADDR_W-1:OFF_W];
  assign req_idx   = req_laddr[IDX_W-1:0];
  assign req_tag   = req_laddr[LADDR_W-1:IDX_W];
  assign req_hw    = req_addr[OFF_W-1:1];

  // ------------------------------------------------------------ miss cache
  logic             mc_lk_en;
  laddr_t           mc_lk_laddr;
  logic             mc_hit_q;
  logic [MC_IW-1:0] mc_idx_q;
  logic             mc_rd_valid;
  laddr_t           mc_rd_laddr;
  line_t            mc_rd_line;
  logic             mc_rd_dirty;
  logic             mc_wr_en, mc_alloc_en, mc_inv_all, mc_inv_en;
  laddr_t           mc_wr_laddr, mc_alloc_laddr;
  line_t            mc_wr_line, mc_alloc_line;
  logic             mc_ev_valid;
  laddr_t           mc_ev_laddr;
  line_t            mc_ev_line;
  logic             mc_ev_dirty;

  miss_cache #(.ENTRIES(MC_ENTRIES), .DIRTY_W(0)) u_mc (
    .clk, .rst_n,
    .lk_en(mc_lk_en), .lk_laddr(mc_lk_laddr), .hit_q(mc_hit_q), .idx_q(mc_idx_q),
    .rd_idx(mc_idx_q), .rd_valid(mc_rd_valid), .rd_laddr(mc_rd_laddr),
    .rd_line(mc_rd_line), .rd_dirty(mc_rd_dirty),
    .wr_en(mc_wr_en), .wr_idx(mc_idx_q), .wr_valid(vic_valid), .wr_laddr(mc_wr_laddr),
    .wr_line(mc_wr_line), .wr_dirty(1'b0),
    .alloc_en(mc_alloc_en), .alloc_laddr(mc_alloc_laddr), .alloc_line(mc_alloc_line),
    .alloc_dirty(1'b0),
    .ev_valid(mc_ev_valid), .ev_laddr(mc_ev_laddr), .ev_line(mc_ev_line),
    .ev_dirty(mc_ev_dirty),
    .inv_all(mc_inv_all), .inv_en(mc_inv_en), .inv_idx(mc_idx_q)
  );

  // ------------------------------------------------------ line reuse buffer
  logic            lrb_use, lrb_fill, lrb_inv, lrb_valid;
  line_t           lrb_line;
  laddr_t          lrb_laddr;
  logic [HW_W-1:0] lrb_rdata;

  line_reuse_buffer u_lrb (
    .clk, .rst_n,
    .seq(if_seq), .hw_off(if_addr[OFF_W-1:1]), .use_lrb(lrb_use),
    .rd_hw(req_hw), .rd_data(lrb_rdata),
    .fill_en(lrb_fill), .fill_laddr(req_laddr), .fill_line(lrb_line), .inv(lrb_inv),
    .valid(lrb_valid), .laddr(lrb_laddr)
  );

  logic l1_hit;
  assign l1_hit = tag_rdata.valid && (tag_rdata.tag == req_tag);

  // During a fill, a sequential fetch that stays in the line being filled is
  // taken once its half-word has arrived, and served from the fill register.
  logic stream_ok;
  assign stream_ok = (state == S_FILL) && if_seq && (if_addr[OFF_W-1:1] != 3'd0) &&
                     rcv_mask[if_addr[OFF_W-1:1]];

  logic accept;
  assign if_ready = !m_req && ((state == S_IDLE) || (state == S_LRB) ||
                               (state == S_LOOKUP && l1_hit) || stream_ok);
  assign accept   = if_req && if_ready;

  // Line as it stands once the current fill beat is merged in.
  logic [2:0] rcv_hw;
  line_t      fill_line_d;
  logic       fill_last;
  assign rcv_hw    = fill_hw0 + fill_rcvd[2:0];
  always_comb begin
    fill_line_d = fill_line;
    if (mem_rvalid) fill_line_d[rcv_hw*HW_W +: HW_W] = mem_rdata;
  end
  assign fill_last = (state == S_FILL) && mem_rvalid && (fill_rcvd == 4'd7);

  assign mem_req  = (state == S_FILL) && (fill_issued < 4'd8);
  assign mem_addr = {req_laddr, 3'(fill_hw0 + fill_issued[2:0]), 1'b0};

  // ------------------------------------------------------------ control
  always_comb begin
    state_d        = state;
    tag_en         = 1'b0;
    tag_we         = 1'b0;
    tag_addr       = req_idx;
    tag_wdata      = '{valid: 1'b1, lock: lock_fill, tag: req_tag};
    dat_en         = 1'b0;
    dat_we         = 1'b0;
    dat_wdata      = fill_line_d;
    mc_lk_en       = 1'b0;
    mc_lk_laddr    = req_laddr;
    mc_wr_en       = 1'b0;
    mc_wr_laddr    = {vic_tag, req_idx};
    mc_wr_line     = vic_line;
    mc_alloc_en    = 1'b0;
    mc_alloc_laddr = {vic_tag, req_idx};
    mc_alloc_line  = vic_line;
    mc_inv_all     = 1'b0;
    mc_inv_en      = 1'b0;
    lrb_fill       = 1'b0;
    lrb_line       = dat_rdata;
    lrb_inv        = 1'b0;
    if_rvalid      = 1'b0;
    if_rdata       = dat_rdata[req_hw*HW_W +: HW_W];
    m_done         = 1'b0;
    events         = '0;

    unique case (state)
      S_IDLE, S_LRB, S_LOOKUP: begin
        // delivery of the fetch accepted in the previous cycle
        if (state == S_LRB) begin
          if_rvalid      = 1'b1;
          if_rdata       = lrb_rdata;
          events.lrb_hit = 1'b1;
          state_d        = S_IDLE;
        end else if (state == S_LOOKUP) begin
          if (l1_hit) begin
            if_rvalid     = 1'b1;
            lrb_fill      = 1'b1;
            events.l1_hit = 1'b1;
            state_d       = S_IDLE;
          end else begin
            state_d = S_MC_CAM;
          end
        end
        // new work
        if (state_d == S_IDLE) begin
          if (m_req) begin
            lrb_inv = 1'b1;
            if (m_op == IC_INV_ALL) begin
              mc_inv_all = 1'b1;
              state_d    = S_M_ALL;
            end else begin
              tag_en      = 1'b1;
              tag_addr    = m_addr[OFF_W +: IDX_W];
              mc_lk_en    = 1'b1;
              mc_lk_laddr = m_addr[ADDR_W-1:OFF_W];
              state_d     = S_M_CHK;
            end
          end else if (accept) begin
            if (lrb_use) begin
              state_d = S_LRB;
            end else begin
              tag_en   = 1'b1;
              dat_en   = 1'b1;
              tag_addr = if_addr[OFF_W +: IDX_W];
              state_d  = S_LOOKUP;
            end
          end
        end
      end

      S_MC_CAM: begin
        mc_lk_en = 1'b1;
        state_d  = S_MC_DATA;
      end

      S_MC_DATA: begin
        if (mc_hit_q) begin
          if_rvalid     = 1'b1;
          if_rdata      = mc_rd_line[req_hw*HW_W +: HW_W];
          lrb_fill      = 1'b1;
          lrb_line      = mc_rd_line;
          events.mc_hit = 1'b1;
          if (!vic_lock) begin
            // swap: the line moves to the array, the victim to its entry
            tag_en    = 1'b1;
            tag_we    = 1'b1;
            dat_en    = 1'b1;
            dat_we    = 1'b1;
            dat_wdata = mc_rd_line;
            mc_wr_en  = 1'b1;
          end
          state_d = S_IDLE;
        end else begin
          state_d = S_FILL;
        end
      end

      S_FILL: begin
        if (mem_rvalid && fill_rcvd == 4'd0) begin
          if_rvalid = 1'b1;           // hot half-word, early restart
          if_rdata  = mem_rdata;
        end
        if (stream_q) begin
          if_rvalid          = 1'b1;  // later half-word of the same line
          if_rdata           = fill_line[req_hw*HW_W +: HW_W];
          events.fill_stream = 1'b1;
        end
        if (fill_last) begin
          lrb_fill    = 1'b1;
          lrb_line    = fill_line_d;
          events.fill = 1'b1;
          if (!vic_lock) begin
            tag_en      = 1'b1;
            tag_we      = 1'b1;
            dat_en      = 1'b1;
            dat_we      = 1'b1;
            mc_alloc_en = vic_valid;
          end else begin
            mc_alloc_en        = 1'b1;
            mc_alloc_laddr     = req_laddr;
            mc_alloc_line      = fill_line_d;
            events.locked_fill = 1'b1;
          end
          // a fetch taken in this cycle is served by the just-loaded LRB
          state_d = accept ? S_LRB : S_IDLE;
        end
      end

      S_M_ALL: begin
        tag_en    = 1'b1;
        tag_we    = 1'b1;
        tag_addr  = cnt;
        tag_wdata = '0;
        if (cnt == IDX_W'(LINES - 1)) begin
          m_done  = !init_q;
          state_d = S_IDLE;
        end
      end

      S_M_CHK: begin
        if (tag_rdata.valid && tag_rdata.tag == m_addr[OFF_W+IDX_W +: TAG_W]) begin
          tag_en    = 1'b1;
          tag_we    = 1'b1;
          tag_addr  = m_addr[OFF_W +: IDX_W];
          tag_wdata = '0;
        end
        mc_inv_en = mc_hit_q;
        m_done    = 1'b1;
        state_d   = S_IDLE;
      end

      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_M_ALL;
      init_q      <= 1'b1;
      cnt         <= '0;
      fill_issued <= '0;
      fill_rcvd   <= '0;
      fill_hw0    <= '0;
      rcv_mask    <= '0;
      stream_q    <= 1'b0;
      req_addr    <= '0;
    end else begin
      state <= state_d;
      if (accept) req_addr <= if_addr;
      if (state == S_M_ALL) begin
        cnt <= cnt + 1'b1;
        if (state_d == S_IDLE) init_q <= 1'b0;
      end
      if (state == S_MC_DATA) begin
        fill_issued <= '0;
        fill_rcvd   <= '0;
        fill_hw0    <= req_hw;
        rcv_mask    <= '0;
      end
      if (state == S_FILL && mem_rvalid) rcv_mask[rcv_hw] <= 1'b1;
      stream_q <= (state == S_FILL) && accept && !fill_last;
      if (mem_req && mem_gnt) fill_issued <= fill_issued + 1'b1;
      if (state == S_FILL && mem_rvalid) fill_rcvd <= fill_rcvd + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (state == S_LOOKUP && !l1_hit) begin
      vic_valid <= tag_rdata.valid;
      vic_lock  <= tag_rdata.valid && tag_rdata.lock;
      vic_tag   <= tag_rdata.tag;
      vic_line  <= dat_rdata;
    end
    if (state == S_FILL) fill_line <= fill_line_d;
  end

  // -------------------------------------------------------------- checks
  addr_t last_addr;
  logic  last_vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_vld <= 1'b0;
    else if (accept) begin
      last_vld  <= 1'b1;
      last_addr <= if_addr;
    end
  end

  seq_hint_correct: assert property (@(posedge clk) disable iff (!rst_n)
      accept && if_seq && last_vld |-> if_addr == last_addr + 32'd2)
    else $error("icache: sequential hint on a non-sequential fetch");

  lrb_holds_line: assert property (@(posedge clk) disable iff (!rst_n)
      state == S_LRB |-> lrb_valid && lrb_laddr == req_laddr)
    else $error("icache: line reuse buffer served a different line");

  one_delivery_per_cycle: assert property (@(posedge clk) disable iff (!rst_n)
      stream_q |-> !(mem_rvalid && fill_rcvd == 4'd0))
    else $error("icache: two fetch deliveries in one cycle");

  mem_only_in_fill: assert property (@(posedge clk) disable iff (!rst_n)
      mem_rvalid |-> state == S_FILL)
    else $error("icache: unexpected memory data");

endmodule
