// tb_icache_env: processor-side driver, memory and checker for one
// instruction cache.
//
// It plays a program of fetch streams: a locked region, random loops (line
// reuse buffer and array hits), two loops whose lines share cache indices
// (miss-cache swaps), a loop conflicting with the locked lines (fills placed
// in the miss cache), then single-line and whole-cache invalidation. Every
// fetched half-word is compared with the memory contents, which it computes
// itself from the memory model's hash. Latency is checked: 1 cycle for line
// reuse buffer and array hits and for sequential fetches served while their
// line is being filled, 3 for miss-cache hits. Each mechanism is
// counted and a failure is counted for any that never happened. The memory
// (tb_mem_model, 16-bit) sits inside the environment.
module tb_icache_env
  import cache_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 16384,
  parameter int unsigned N_LOOPS     = 60
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic            if_req,
  output addr_t           if_addr,
  output logic            if_seq,
  input  logic            if_ready,
  input  logic            if_rvalid,
  input  logic [HW_W-1:0] if_rdata,
  output logic            lock_fill,
  output logic            m_req,
  output ic_op_e          m_op,
  output addr_t           m_addr,
  input  logic            m_done,
  input  logic            mem_req,
  input  addr_t           mem_addr,
  output logic            mem_gnt,
  output logic            mem_rvalid,
  output logic [HW_W-1:0] mem_rdata,
  input  ic_events_t      events,
  output logic            done,
  output int              checks,
  output int              failures
);
  localparam int unsigned MEM_AW = 16;     // 64 Ki half-words = 128 KB

  tb_mem_model #(.DATA_W(16), .AW(MEM_AW), .LAT(2), .RAND_GNT(1'b1)) u_mem (
    .clk, .req(mem_req), .we(1'b0), .addr(mem_addr), .wdata('0), .be('0),
    .gnt(mem_gnt), .rvalid(mem_rvalid), .rdata(mem_rdata)
  );

  // same hash as the memory model, computed here independently
  function automatic logic [15:0] mem_hw(input addr_t a);
    int unsigned i = (a >> 1) & ((1 << MEM_AW) - 1);
    logic [31:0] h = i * 32'h9E37_79B1 + 32'h1234_5677;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    return 16'(h ^ (h >> 13));
  endfunction

  typedef struct { addr_t a; longint t; } pend_t;
  pend_t  pend [$];
  longint cyc;
  addr_t  last_a;
  bit     last_v;
  int n_lrb, n_l1, n_mc, n_fill, n_locked, n_early, n_stream, n_inv_line, n_inv_all, n_fetch;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 12) $display("icache FAIL @%0d: %s", cyc, what);
    end
  endtask

  always @(posedge clk) begin
    if (!rst_n) cyc <= 0;
    else begin
      cyc <= cyc + 1;
      if (events.lrb_hit) n_lrb++;
      if (events.l1_hit) n_l1++;
      if (events.mc_hit) n_mc++;
      if (events.fill) n_fill++;
      if (events.locked_fill) n_locked++;
      if (events.fill_stream) n_stream++;
      if (if_rvalid) begin
        if (pend.size() == 0) check(0, "data without a fetch");
        else begin
          pend_t p;
          longint lat;
          p = pend.pop_front();
          lat = cyc - p.t;
          check(if_rdata == mem_hw(p.a), $sformatf("data at %h", p.a));
          if (events.lrb_hit || events.l1_hit || events.fill_stream) check(lat == 1, "hit latency 1");
          else if (events.mc_hit) check(lat == 3, "miss-cache hit latency 3");
          else n_early++;                      // hot half-word of a fill
        end
      end
    end
  end

  // Inputs change on the falling edge; if_ready depends only on the cache
  // state, so its value half a cycle before the rising edge says whether the
  // fetch is taken at that edge.
  task automatic fetch(input addr_t a);
    bit s;
    s = last_v && (a == last_a + 32'd2);
    @(negedge clk);
    if_req  = 1'b1;
    if_addr = a;
    if_seq  = s;
    #1;
    while (!if_ready) begin
      @(negedge clk);
      #1;
    end
    pend.push_back('{a: a, t: cyc});
    last_a = a;
    last_v = 1'b1;
    n_fetch++;
  endtask

  task automatic run(input addr_t start, input int n);
    for (int i = 0; i < n; i++) fetch(start + addr_t'(2 * i));
  endtask

  task automatic idle_until_drained();
    @(negedge clk);
    if_req = 1'b0;
    while (pend.size() != 0) @(negedge clk);
    // a fill can still be running after its last fetch was served
    for (int q = 0; q < 6; q++) begin
      @(negedge clk);
      if (mem_req) q = 0;
    end
  endtask

  task automatic maint(input ic_op_e op, input addr_t a);
    idle_until_drained();
    m_req  = 1'b1;
    m_op   = op;
    m_addr = a;
    @(negedge clk);
    while (!m_done) @(negedge clk);
    m_req  = 1'b0;
    @(negedge clk);
  endtask

  localparam addr_t LOCK_BASE = 32'h0000_0400;
  localparam addr_t LOOP_BASE = 32'h0001_0000;
  localparam addr_t PING      = 32'h0000_2800;

  initial begin
    int f0;
    if_req = 0; if_addr = '0; if_seq = 0; lock_fill = 0; m_req = 0; m_op = IC_INV_ALL;
    m_addr = '0; done = 0; checks = 0; failures = 0; last_v = 0; last_a = '0;
    n_lrb = 0; n_l1 = 0; n_mc = 0; n_fill = 0; n_locked = 0; n_early = 0; n_stream = 0;
    n_inv_line = 0; n_inv_all = 0; n_fetch = 0;
    @(posedge rst_n);
    @(posedge clk);
    // 1. lock four lines
    lock_fill = 1'b1;
    run(LOCK_BASE, 32);
    idle_until_drained();
    lock_fill = 1'b0;
    // 2. random loops
    for (int l = 0; l < N_LOOPS; l++) begin
      addr_t s;
      int    len, k;
      s   = LOOP_BASE + addr_t'(($urandom % 32768) * 2);
      len = 4 + $urandom % 45;
      k   = 2 + $urandom % 3;
      if (($urandom % 4) == 0) idle_until_drained();
      for (int it = 0; it < k; it++) run(s, len);
    end
    // 3. two loops sharing indices: misses swap through the miss cache
    for (int it = 0; it < 4; it++) begin
      run(PING, 16);
      run(PING + addr_t'(CACHE_BYTES), 16);
    end
    // 4. conflicts with the locked lines go to the miss cache
    run(LOCK_BASE + addr_t'(CACHE_BYTES), 32);
    run(LOCK_BASE + addr_t'(CACHE_BYTES), 32);
    idle_until_drained();
    f0 = n_fill;
    run(LOCK_BASE, 32);
    idle_until_drained();
    check(n_fill == f0, "locked lines survived conflicting fills");
    // 5. single-line invalidation
    maint(IC_INV_LINE, LOCK_BASE);
    n_inv_line++;
    f0 = n_fill;
    run(LOCK_BASE, 4);
    idle_until_drained();
    check(n_fill == f0 + 1, "invalidated line is fetched again");
    // 6. whole-cache invalidation
    maint(IC_INV_ALL, '0);
    n_inv_all++;
    f0 = n_fill;
    run(LOCK_BASE + 32'h40, 16);
    idle_until_drained();
    check(n_fill == f0 + 2, "after invalidating all, lines are fetched again");
    // every mechanism must have happened
    check(n_lrb > 0, "line reuse buffer hits");
    check(n_l1 > 0, "array hits");
    check(n_mc > 0, "miss-cache hits");
    check(n_fill > 0, "line fills");
    check(n_locked > 0, "fills placed in the miss cache for locked lines");
    check(n_early > 0, "early restart on the hot half-word");
    check(n_stream > 0, "sequential fetches served during a fill");
    $display("icache: fetches=%0d lrb=%0d l1=%0d mc=%0d fills=%0d locked_fills=%0d early=%0d during_fill=%0d inv_line=%0d inv_all=%0d",
             n_fetch, n_lrb, n_l1, n_mc, n_fill, n_locked, n_early, n_stream, n_inv_line, n_inv_all);
    $display("icache: LRB share of fetches %0d%%", (100 * n_lrb) / n_fetch);
    done = 1;
  end
endmodule
