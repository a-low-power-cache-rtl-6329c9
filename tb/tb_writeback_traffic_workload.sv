// tb_writeback_traffic_workload: write-back traffic of the data cache with
// two dirty bits per line, run on calm_cache_system with default parameters.
//
// The program is a random load/store stream in write-back pages over a
// 64 KB working set (four times the cache): 70 % of the accesses go to a
// 4 KB hot region, the rest anywhere, and 40 % of the accesses are stores of
// one word. At the end the whole cache is flushed.
// Counted: lines handed to the write-back buffer (wb_push events) and words
// written to memory. With one dirty bit per line every pushed line would cost
// four words, so words / (4 * lines) is the traffic relative to a single
// dirty bit; it is printed, and it must be below 1 because many lines have
// only one dirty half. Conflicting dirty lines that are kept in the miss
// cache cause no traffic at all; miss-cache hits are printed as well.
// Every load is checked against a reference memory, and after the flush the
// data memory must equal the reference.
module tb_writeback_traffic_workload;
  import cache_pkg::*;
  localparam int     N_OPS = 20000;
  localparam int     AW    = 14;                // 64 KB of data memory

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

  tb_mem_model #(.DATA_W(16), .AW(10), .LAT(2), .RAND_GNT(1'b1)) u_imem (
    .clk, .req(ic_mem_req), .we(1'b0), .addr(ic_mem_addr), .wdata('0), .be('0),
    .gnt(ic_mem_gnt), .rvalid(ic_mem_rvalid), .rdata(ic_mem_rdata)
  );
  tb_mem_model #(.DATA_W(32), .AW(AW), .LAT(2), .RAND_GNT(1'b1)) u_dmem (
    .clk, .req(dc_mem_req), .we(dc_mem_we), .addr(dc_mem_addr), .wdata(dc_mem_wdata),
    .be(dc_mem_be), .gnt(dc_mem_gnt), .rvalid(dc_mem_rvalid), .rdata(dc_mem_rdata)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic void check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("wb_traffic FAIL @%0t: %s", $time, msg);
    end
  endfunction

  int n_push, n_words, n_fill, n_mc, n_loads, n_stores;
  always @(posedge clk) begin
    if (dc_events.wb_push) n_push++;
    if (dc_events.fill)    n_fill++;
    if (dc_events.mc_hit)  n_mc++;
    if (dc_mem_req && dc_mem_we && dc_mem_gnt) n_words++;
  end

  logic [31:0] ref_mem [2**AW];

  task automatic dc_access(input bit we, input addr_t a, input logic [31:0] wd);
    int unsigned w;
    w = (a >> 2) & ((1 << AW) - 1);
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
    if (we) begin
      ref_mem[w] = wd;
      n_stores++;
    end else begin
      check(d_rdata == ref_mem[w], $sformatf("load data at %h", a));
      n_loads++;
    end
  endtask

  initial begin
    int bad;
    if_req = 0; if_addr = '0; if_seq = 0; ic_lock_fill = 0; ic_m_req = 0;
    ic_m_op = IC_INV_ALL; ic_m_addr = '0;
    d_req = 0; d_we = 0; d_addr = '0; d_wdata = '0; d_be = '0; d_wt = 0; dccr_wt = 0;
    dc_lock_fill = 0; dc_m_req = 0; dc_m_op = DC_FLUSH_ALL; dc_m_addr = '0;
    n_push = 0; n_words = 0; n_fill = 0; n_mc = 0; n_loads = 0; n_stores = 0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int i = 0; i < 2**AW; i++) ref_mem[i] = u_dmem.mem[i];

    for (int k = 0; k < N_OPS; k++) begin
      addr_t a;
      bit    we;
      if (($urandom % 10) < 7) a = 32'h0000_3000 + addr_t'(($urandom % 1024) * 4);
      else                     a = addr_t'(($urandom % (2**AW)) * 4);
      we = ($urandom % 10) < 4;
      dc_access(we, a, $urandom);
    end
    @(negedge clk);
    dc_m_req = 1'b1;
    dc_m_op  = DC_FLUSH_ALL;
    @(negedge clk);
    while (!dc_m_done) @(negedge clk);
    dc_m_req = 1'b0;
    repeat (40) @(negedge clk);

    bad = 0;
    for (int i = 0; i < 2**AW; i++) if (u_dmem.mem[i] != ref_mem[i]) bad++;
    check(bad == 0, $sformatf("memory after flush: %0d words differ", bad));
    $display("wb_traffic: loads=%0d stores=%0d fills=%0d mc_hits=%0d lines_written_back=%0d words_written=%0d",
             n_loads, n_stores, n_fill, n_mc, n_push, n_words);
    $display("wb_traffic: traffic relative to one dirty bit per line: %0d%%",
             (100 * n_words) / (n_push == 0 ? 1 : 4 * n_push));
    check(n_push > 100, "lines were written back");
    check(n_mc > 0, "miss-cache hits occurred");
    check(n_words < 4 * n_push, "clean halves are not written back");
    check(n_words >= 2 * n_push, "every pushed line writes at least one half");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("wb_traffic FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
