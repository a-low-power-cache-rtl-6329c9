// tb_dcache_env: processor-side driver, memory and checker for one data
// cache.
//
// Loads and stores go to 96 lines that share 24 cache indices (four lines per
// index), so accesses hit, miss into the miss cache, and push dirty lines out
// of it. Pages alternate between write-back and write-through by address bit
// 12, and some phases force write-through through the control-register bit.
// A reference copy of memory is updated when each store is accepted; every
// load is compared with it. Latency is checked: 1 cycle for array hits, 3 for
// miss-cache hits, and every access that needs a fill must complete when its
// hot word arrives. Synchronize, flush and invalidate are exercised per line
// and for the whole cache; after a whole-cache synchronize or flush the
// memory model must equal the reference word for word. Each mechanism is
// counted and a failure is counted for any that never happened.
module tb_dcache_env
  import cache_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned N_OPS       = 6000
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              d_req,
  output logic              d_we,
  output addr_t             d_addr,
  output logic [WORD_W-1:0] d_wdata,
  output logic [3:0]        d_be,
  output logic              d_wt,
  input  logic              d_ready,
  input  logic              d_rvalid,
  input  logic [WORD_W-1:0] d_rdata,
  output logic              dccr_wt,
  output logic              lock_fill,
  output logic              m_req,
  output dc_op_e            m_op,
  output addr_t             m_addr,
  input  logic              m_done,
  input  logic              mem_req,
  input  logic              mem_we,
  input  addr_t             mem_addr,
  input  logic [WORD_W-1:0] mem_wdata,
  input  logic [3:0]        mem_be,
  output logic              mem_gnt,
  output logic              mem_rvalid,
  output logic [WORD_W-1:0] mem_rdata,
  input  dc_events_t        events,
  output logic              done,
  output int                checks,
  output int                failures
);
  localparam int unsigned MEM_AW = 14;       // 16 Ki words = 64 KB

  tb_mem_model #(.DATA_W(32), .AW(MEM_AW), .LAT(3), .RAND_GNT(1'b1)) u_mem (
    .clk, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .be(mem_be),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  function automatic logic [31:0] init_word(input int unsigned i);
    logic [31:0] h = i * 32'h9E37_79B1 + 32'h1234_5677;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    return h ^ (h >> 13);
  endfunction

  logic [31:0] ref_mem [2**MEM_AW];

  typedef struct { bit we; addr_t a; logic [31:0] exp; longint t; } pend_t;
  pend_t  pend [$];
  longint cyc;
  int n_l1, n_mc, n_fill, n_locked, n_wt, n_wbpush, n_stall, n_early, n_wr_beats;
  int n_sync_all, n_flush_all, n_inv_all, n_sync_line, n_flush_line, n_inv_line;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("dcache FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) cyc <= 0;
    else begin
      cyc <= cyc + 1;
      if (events.l1_hit) n_l1++;
      if (events.mc_hit) n_mc++;
      if (events.fill) n_fill++;
      if (events.locked_fill) n_locked++;
      if (events.wt_store) n_wt++;
      if (events.wb_push) n_wbpush++;
      if (events.stall_buf) n_stall++;
      if (mem_req && mem_gnt && mem_we) n_wr_beats++;
      if (d_rvalid) begin
        if (pend.size() == 0) check(0, "response without an access");
        else begin
          pend_t p;
          longint lat;
          p = pend.pop_front();
          lat = cyc - p.t;
          if (!p.we) check(d_rdata == p.exp, $sformatf("load %h got %h exp %h", p.a, d_rdata, p.exp));
          if (events.l1_hit && !(p.we && events.stall_buf)) check(lat >= 1 && (p.we || lat == 1), "hit latency 1");
          else if (events.mc_hit && !p.we) check(lat == 3, "miss-cache hit latency 3");
          else if (!events.l1_hit && !events.mc_hit && !events.fill) n_early++;
        end
      end
    end
  end

  // Inputs change on the falling edge; d_ready depends only on the cache
  // state, so its value half a cycle before the rising edge says whether the
  // access is taken at that edge.
  task automatic access(input bit we, input addr_t a, input logic [31:0] wd, input logic [3:0] be);
    int unsigned wi;
    logic [31:0] e;
    wi = (a >> 2) & ((1 << MEM_AW) - 1);
    @(negedge clk);
    d_req   = 1'b1;
    d_we    = we;
    d_addr  = a;
    d_wdata = wd;
    d_be    = be;
    d_wt    = a[12];
    #1;
    while (!d_ready) begin
      @(negedge clk);
      #1;
    end
    e = ref_mem[wi];
    if (we)
      for (int b = 0; b < 4; b++) if (be[b]) ref_mem[wi][b*8 +: 8] = wd[b*8 +: 8];
    pend.push_back('{we: we, a: a, exp: e, t: cyc});
  endtask

  task automatic drain();
    @(negedge clk);
    d_req = 1'b0;
    while (pend.size() != 0) @(negedge clk);
  endtask

  task automatic maint(input dc_op_e op, input addr_t a);
    drain();
    m_req  = 1'b1;
    m_op   = op;
    m_addr = a;
    @(negedge clk);
    while (!m_done) @(negedge clk);
    m_req  = 1'b0;
    @(negedge clk);
  endtask

  task automatic compare_memory(input string when);
    int bad;
    bad = 0;
    for (int i = 0; i < 2**MEM_AW; i++)
      if (u_mem.mem[i] != ref_mem[i]) begin
        bad++;
        if (bad < 4) $display("memory word %h: %h, reference %h", i * 4, u_mem.mem[i], ref_mem[i]);
      end
    check(bad == 0, {"memory equals reference after ", when});
  endtask

  // one of 96 lines on 24 indices, four lines per index
  function automatic addr_t pick_addr();
    int unsigned idx, tg;
    idx = ($urandom % 24) * 37 % (CACHE_BYTES / 16);
    tg  = $urandom % 4;
    return addr_t'(tg * CACHE_BYTES + idx * 16 + ($urandom % 4) * 4);
  endfunction

  task automatic random_ops(input int n);
    for (int i = 0; i < n; i++) begin
      addr_t a;
      bit    we;
      a  = pick_addr();
      we = ($urandom % 5) < 2;
      access(we, a, $urandom, we ? 4'(($urandom % 15) + 1) : 4'hf);
      if (($urandom % 8) == 0) begin @(negedge clk); d_req = 1'b0; end
    end
  endtask

  initial begin
    addr_t la;
    d_req = 0; d_we = 0; d_addr = '0; d_wdata = '0; d_be = '0; d_wt = 0; dccr_wt = 0;
    lock_fill = 0; m_req = 0; m_op = DC_INV_ALL; m_addr = '0; done = 0;
    checks = 0; failures = 0;
    n_l1 = 0; n_mc = 0; n_fill = 0; n_locked = 0; n_wt = 0; n_wbpush = 0; n_stall = 0;
    n_early = 0; n_wr_beats = 0;
    n_sync_all = 0; n_flush_all = 0; n_inv_all = 0; n_sync_line = 0; n_flush_line = 0;
    n_inv_line = 0;
    for (int i = 0; i < 2**MEM_AW; i++) ref_mem[i] = init_word(i);
    @(posedge rst_n);
    @(posedge clk);
    // locked lines: indices 0 and 1 of the first alias
    lock_fill = 1'b1;
    access(1'b1, 32'h0000_0000, 32'hCAFE_0000, 4'hf);
    access(1'b0, 32'h0000_0014, '0, 4'hf);
    drain();
    lock_fill = 1'b0;
    for (int t = 1; t < 4; t++) begin
      access(1'b1, addr_t'(t * CACHE_BYTES + 8), 32'hBEEF_0000 + t, 4'hf);
      access(1'b0, addr_t'(t * CACHE_BYTES + 16), '0, 4'hf);
    end
    random_ops(N_OPS / 4);
    // a burst of write-through stores fills the write-through buffer
    dccr_wt = 1'b1;
    for (int i = 0; i < 12; i++) access(1'b1, addr_t'(32'h0000_0100 + 4 * (i % 4)), $urandom, 4'hf);
    random_ops(N_OPS / 8);
    dccr_wt = 1'b0;
    random_ops(N_OPS / 4);
    // per-line maintenance
    for (int i = 0; i < 20; i++) begin
      la = pick_addr();
      case (i % 3)
        0: begin maint(DC_SYNC_LINE, la); n_sync_line++; end
        1: begin maint(DC_FLUSH_LINE, la); n_flush_line++; end
        default: begin
          maint(DC_SYNC_LINE, la);
          maint(DC_INV_LINE, la);
          n_inv_line++;
        end
      endcase
      random_ops(10);
    end
    maint(DC_SYNC_ALL, '0);
    n_sync_all++;
    compare_memory("synchronize");
    random_ops(N_OPS / 4);
    maint(DC_FLUSH_ALL, '0);
    n_flush_all++;
    compare_memory("flush");
    maint(DC_INV_ALL, '0);
    n_inv_all++;
    random_ops(N_OPS / 8);
    maint(DC_FLUSH_ALL, '0);
    compare_memory("final flush");
    check(n_l1 > 0, "array hits");
    check(n_mc > 0, "miss-cache hits");
    check(n_fill > 0, "line fills");
    check(n_locked > 0, "fills placed in the miss cache for locked lines");
    check(n_wt > 0, "write-through stores");
    check(n_wbpush > 0, "dirty lines sent to the write-back buffer");
    check(n_stall > 0, "stalls on a full write buffer");
    check(n_early > 0, "early restart on the hot word");
    check(n_early == n_fill, "every miss that fills completes on its hot word");
    $display("dcache: l1=%0d mc=%0d fills=%0d locked_fills=%0d wt_stores=%0d wb_lines=%0d stalls=%0d early=%0d write_beats=%0d",
             n_l1, n_mc, n_fill, n_locked, n_wt, n_wbpush, n_stall, n_early, n_wr_beats);
    $display("dcache: maintenance sync_line=%0d flush_line=%0d inv_line=%0d sync_all=%0d flush_all=%0d inv_all=%0d",
             n_sync_line, n_flush_line, n_inv_line, n_sync_all, n_flush_all, n_inv_all);
    done = 1;
  end
endmodule
