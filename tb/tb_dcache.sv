// tb_dcache: the data cache at its full 16 KB / 32-entry size, driven by
// tb_dcache_env (see there for the access program and the checks).
module tb_dcache;
  import cache_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic d_req, d_we, d_wt, d_ready, d_rvalid, dccr_wt, lock_fill, m_req, m_done;
  logic mem_req, mem_we, mem_gnt, mem_rvalid, done;
  addr_t d_addr, m_addr, mem_addr;
  logic [31:0] d_wdata, d_rdata, mem_wdata, mem_rdata;
  logic [3:0] d_be, mem_be;
  dc_op_e m_op;
  dc_events_t events;
  int checks, failures;

  dcache dut (.*);
  tb_dcache_env env (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
