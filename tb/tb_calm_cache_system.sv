// tb_calm_cache_system: end-to-end run of the cache pair at full size (16 KB
// instruction and data caches, 32-entry miss caches, 2-entry write-back and
// 4-entry write-through buffers), no parameter overridden. The instruction
// side and the data side each run their program from tb_icache_env and
// tb_dcache_env at the same time, each against its own memory; the test ends
// when both are done. Every mechanism of both caches is counted inside the
// environments, which count a failure for any that never happened.
module tb_calm_cache_system;
  import cache_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  // instruction side
  logic if_req, if_seq, if_ready, if_rvalid, ic_lock_fill, ic_m_req, ic_m_done;
  logic ic_mem_req, ic_mem_gnt, ic_mem_rvalid, ic_done;
  addr_t if_addr, ic_m_addr, ic_mem_addr;
  logic [HW_W-1:0] if_rdata, ic_mem_rdata;
  ic_op_e ic_m_op;
  ic_events_t ic_events;
  int ic_checks, ic_failures;
  // data side
  logic d_req, d_we, d_wt, d_ready, d_rvalid, dccr_wt, dc_lock_fill, dc_m_req, dc_m_done;
  logic dc_mem_req, dc_mem_we, dc_mem_gnt, dc_mem_rvalid, dc_done;
  addr_t d_addr, dc_m_addr, dc_mem_addr;
  logic [31:0] d_wdata, d_rdata, dc_mem_wdata, dc_mem_rdata;
  logic [3:0] d_be, dc_mem_be;
  dc_op_e dc_m_op;
  dc_events_t dc_events;
  int dc_checks, dc_failures;

  calm_cache_system dut (.*);

  tb_icache_env #(.N_LOOPS(60)) ienv (
    .clk, .rst_n, .if_req, .if_addr, .if_seq, .if_ready, .if_rvalid, .if_rdata,
    .lock_fill(ic_lock_fill), .m_req(ic_m_req), .m_op(ic_m_op), .m_addr(ic_m_addr),
    .m_done(ic_m_done), .mem_req(ic_mem_req), .mem_addr(ic_mem_addr), .mem_gnt(ic_mem_gnt),
    .mem_rvalid(ic_mem_rvalid), .mem_rdata(ic_mem_rdata), .events(ic_events),
    .done(ic_done), .checks(ic_checks), .failures(ic_failures)
  );

  tb_dcache_env #(.N_OPS(4000)) denv (
    .clk, .rst_n, .d_req, .d_we, .d_addr, .d_wdata, .d_be, .d_wt, .d_ready, .d_rvalid,
    .d_rdata, .dccr_wt, .lock_fill(dc_lock_fill), .m_req(dc_m_req), .m_op(dc_m_op),
    .m_addr(dc_m_addr), .m_done(dc_m_done), .mem_req(dc_mem_req), .mem_we(dc_mem_we),
    .mem_addr(dc_mem_addr), .mem_wdata(dc_mem_wdata), .mem_be(dc_mem_be),
    .mem_gnt(dc_mem_gnt), .mem_rvalid(dc_mem_rvalid), .mem_rdata(dc_mem_rdata),
    .events(dc_events), .done(dc_done), .checks(dc_checks), .failures(dc_failures)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (800000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", ic_checks + dc_checks,
             ic_failures + dc_failures + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (ic_done && dc_done);
    $display("TB_RESULT checks=%0d failures=%0d", ic_checks + dc_checks,
             ic_failures + dc_failures);
    $finish;
  end
endmodule
