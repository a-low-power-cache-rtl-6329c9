// tb_quicksort_workload: a quicksort run through the full-size cache pair
// (calm_cache_system with default parameters), the kind of program whose
// supply current is measured for the cache in the original description.
//
// Data side: an iterative quicksort (Lomuto partition, explicit range stack
// kept in the "processor") sorts N 32-bit words at ARRAY in a write-back page.
// Every element access is a blocking load or store through the data cache:
// the request is held until ready, and the next access waits for rvalid.
// Instruction side: at the same time a fetch stream runs a small loop body
// with a call into a second routine, the way the sort code would be fetched.
// Every fetched half-word is checked against the instruction memory.
//
// The program runs twice. The second run first stores the original values
// back and then sorts again, so both runs do the same work. Checks:
//   * after each run the array read back through the cache is sorted and is
//     the sorted original;
//   * in the second run neither cache does a line fill (code and data stay
//     resident, so only the caches and not the memories are active);
//   * after a whole-cache flush the data memory holds the sorted array.
// The per-run access counts, fills and LRB share of fetches are printed.
// The memories and their hash contents come from tb_mem_model.
module tb_quicksort_workload;
  import cache_pkg::*;
  localparam int     N      = 512;
  localparam addr_t  ARRAY  = 32'h0000_2000;
  localparam addr_t  CODE_A = 32'h0000_0100;  // loop body, 48 half-words
  localparam addr_t  CODE_B = 32'h0000_0600;  // called routine, 20 half-words

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic if_req, if_seq, if_ready, if_rvalid, ic_lock_fill, ic_m_req, ic_m_done;
  logic ic_mem_req, ic_mem_gnt, ic_mem_rvalid;
  addr_t if_addr, ic_m_addr, ic_mem_addr;
  logic [HW_W-1:0] if_rdata, ic_mem_rdata;
  ic_op_e ic_m_op;
  ic_events_t ic_events;
  logic d_req, d_we, d_wt, d_ready, d_rvalid, dccr_wt, dc_lock_fill, dc_m_req, dc_m_done;
  logic dc_mem_req, dc_mem_we, dc_mem_gnt, dc_mem_rvalid;
  addr_t d_addr, dc_m_addr, dc_mem_addr;
  logic [31:0] d_wdata, d_rdata, dc_mem_wdata, dc_mem_rdata;
  logic [3:0] d_be, dc_mem_be;
  dc_op_e dc_m_op;
  dc_events_t dc_events;

  calm_cache_system dut (.*);

  tb_mem_model #(.DATA_W(16), .AW(14), .LAT(2), .RAND_GNT(1'b1)) u_imem (
    .clk, .req(ic_mem_req), .we(1'b0), .addr(ic_mem_addr), .wdata('0), .be('0),
    .gnt(ic_mem_gnt), .rvalid(ic_mem_rvalid), .rdata(ic_mem_rdata)
  );
  tb_mem_model #(.DATA_W(32), .AW(14), .LAT(2), .RAND_GNT(1'b1)) u_dmem (
    .clk, .req(dc_mem_req), .we(dc_mem_we), .addr(dc_mem_addr), .wdata(dc_mem_wdata),
    .be(dc_mem_be), .gnt(dc_mem_gnt), .rvalid(dc_mem_rvalid), .rdata(dc_mem_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("quicksort FAIL @%0t: %s", $time, msg);
    end
  endfunction

  // ---------------- counters ----------------
  int n_loads, n_stores, n_fetch, n_lrb, n_ic_fill, n_dc_fill, n_dc_hit;
  always @(posedge clk) begin
    if (ic_events.lrb_hit) n_lrb++;
    if (ic_events.fill)    n_ic_fill++;
    if (dc_events.fill)    n_dc_fill++;
    if (dc_events.l1_hit)  n_dc_hit++;
  end

  // ---------------- instruction side ----------------
  addr_t ipend[$];
  addr_t last_a;
  bit    last_v;
  bit    fetching;

  always @(posedge clk) begin
    if (if_rvalid) begin
      addr_t a;
      check(ipend.size() != 0, "fetch data without a request");
      if (ipend.size() != 0) begin
        a = ipend.pop_front();
        check(if_rdata == u_imem.mem[a[14:1]], $sformatf("fetch data at %h", a));
      end
    end
  end

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
    ipend.push_back(a);
    last_a = a;
    last_v = 1'b1;
    n_fetch++;
  endtask

  task automatic fetch_program();
    while (fetching) begin
      for (int i = 0; i < 48; i++) begin
        fetch(CODE_A + addr_t'(2 * i));
        if (i == 30)
          for (int k = 0; k < 20; k++) fetch(CODE_B + addr_t'(2 * k));
      end
    end
    @(negedge clk);
    if_req = 1'b0;
    while (ipend.size() != 0) @(negedge clk);
  endtask

  // ---------------- data side ----------------
  task automatic dc_access(input bit we, input addr_t a, input logic [31:0] wd,
                           output logic [31:0] rd);
    @(negedge clk);
    d_req   = 1'b1;
    d_we    = we;
    d_addr  = a;
    d_wdata = wd;
    d_be    = 4'hF;
    #1;
    while (!d_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
    d_req = 1'b0;
    while (!d_rvalid) @(negedge clk);
    rd = d_rdata;
    if (we) n_stores++;
    else    n_loads++;
  endtask

  function automatic addr_t el(input int i);
    return ARRAY + addr_t'(4 * i);
  endfunction

  task automatic ld(input int i, output logic [31:0] v);
    dc_access(1'b0, el(i), '0, v);
  endtask

  task automatic st(input int i, input logic [31:0] v);
    logic [31:0] unused;
    dc_access(1'b1, el(i), v, unused);
  endtask

  task automatic quicksort();
    int lo_s[$], hi_s[$];
    int lo, hi, i, p;
    logic [31:0] pivot, aj, ai, ah;
    lo_s.push_back(0);
    hi_s.push_back(N - 1);
    while (lo_s.size() != 0) begin
      lo = lo_s.pop_back();
      hi = hi_s.pop_back();
      if (lo < hi) begin
        ld(hi, pivot);
        i = lo;
        for (int j = lo; j < hi; j++) begin
          ld(j, aj);
          if (aj < pivot) begin
            if (i != j) begin
              ld(i, ai);
              st(i, aj);
              st(j, ai);
            end
            i++;
          end
        end
        ld(i, ai);
        ld(hi, ah);
        st(i, ah);
        st(hi, ai);
        p = i;
        lo_s.push_back(lo);
        hi_s.push_back(p - 1);
        lo_s.push_back(p + 1);
        hi_s.push_back(hi);
      end
    end
  endtask

  logic [31:0] orig [N];
  logic [31:0] gold [N];

  task automatic check_sorted(input string tag);
    logic [31:0] v;
    int bad;
    bad = 0;
    for (int i = 0; i < N; i++) begin
      ld(i, v);
      if (v != gold[i]) bad++;
    end
    check(bad == 0, $sformatf("%s: %0d elements out of place", tag, bad));
  endtask

  task automatic run(input int r);
    int c0;
    n_loads = 0; n_stores = 0; n_fetch = 0; n_lrb = 0;
    n_ic_fill = 0; n_dc_fill = 0; n_dc_hit = 0;
    last_v  = 1'b0;
    c0 = $time / 10;
    fetching = 1'b1;
    fork
      fetch_program();
      begin
        if (r == 2)
          for (int i = 0; i < N; i++) st(i, orig[i]);
        quicksort();
        fetching = 1'b0;
      end
    join
    $display("quicksort run %0d: cycles=%0d loads=%0d stores=%0d dc_hits=%0d dc_fills=%0d fetches=%0d lrb=%0d (%0d%%) ic_fills=%0d",
             r, $time / 10 - c0, n_loads, n_stores, n_dc_hit, n_dc_fill, n_fetch, n_lrb,
             (100 * n_lrb) / (n_fetch == 0 ? 1 : n_fetch), n_ic_fill);
    check(n_loads > N, "sort did work");
    check(n_fetch > 1000, "fetch stream ran");
    if (r == 2) begin
      check(n_dc_fill == 0, "no data-cache fills in the second run");
      check(n_ic_fill == 0, "no instruction-cache fills in the second run");
    end
    check_sorted($sformatf("run %0d", r));
  endtask

  initial begin
    if_req = 0; if_addr = '0; if_seq = 0; ic_lock_fill = 0; ic_m_req = 0;
    ic_m_op = IC_INV_ALL; ic_m_addr = '0;
    d_req = 0; d_we = 0; d_addr = '0; d_wdata = '0; d_be = '0; d_wt = 0; dccr_wt = 0;
    dc_lock_fill = 0; dc_m_req = 0; dc_m_op = DC_FLUSH_ALL; dc_m_addr = '0;
    last_v = 0; last_a = '0; fetching = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < N; i++) orig[i] = u_dmem.mem[el(i) >> 2];
    gold = orig;
    gold.sort();
    run(1);
    run(2);
    // write the sorted array back and compare the memory
    @(negedge clk);
    dc_m_req = 1'b1;
    dc_m_op  = DC_FLUSH_ALL;
    @(negedge clk);
    while (!dc_m_done) @(negedge clk);
    dc_m_req = 1'b0;
    repeat (40) @(negedge clk);
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < N; i++) if (u_dmem.mem[el(i) >> 2] != gold[i]) bad++;
      check(bad == 0, $sformatf("memory after flush: %0d elements differ", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("quicksort FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
