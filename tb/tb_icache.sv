// tb_icache: the instruction cache at its full 16 KB / 32-entry size, driven
// by tb_icache_env (see there for the program and the checks).
module tb_icache;
  import cache_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic if_req, if_seq, if_ready, if_rvalid, lock_fill, m_req, m_done;
  logic mem_req, mem_gnt, mem_rvalid, done;
  addr_t if_addr, m_addr, mem_addr;
  logic [HW_W-1:0] if_rdata, mem_rdata;
  ic_op_e m_op;
  ic_events_t events;
  int checks, failures;

  icache dut (.*);
  tb_icache_env env (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (400000) @(posedge clk);
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
