// tb_wt_buffer: random write-through stores against random memory grants.
// Checks in-order draining of address, data and byte enables, the full flag
// at four entries, and the line check.
module tb_wt_buffer;
  import cache_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic push_en, full, empty, chk_hit, mem_req, mem_gnt;
  addr_t push_addr, mem_addr;
  logic [31:0] push_data, mem_wdata;
  logic [3:0] push_be, mem_be;
  laddr_t chk_laddr;

  wt_buffer #(.DEPTH(4)) dut (.*);

  typedef struct { logic [31:0] a; logic [31:0] d; logic [3:0] be; } st_t;
  st_t q [$];
  int checks = 0, failures = 0, max_occ = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    push_en = 0; push_addr = '0; push_data = '0; push_be = '0; mem_gnt = 0; chk_laddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      mem_gnt   = ($urandom % 4) == 0;
      chk_laddr = (q.size() != 0 && ($urandom % 2)) ? q[q.size()-1].a[31:4] : laddr_t'($urandom);
      #1;
      begin
        bit in_q;
        in_q = 0;
        foreach (q[i]) if (q[i].a[31:4] == chk_laddr) in_q = 1;
        check(chk_hit == in_q, "line check");
      end
      check(full == (q.size() == 4), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      check(mem_req == (q.size() != 0), "request while not empty");
      if (q.size() != 0)
        check(mem_addr == {q[0].a[31:2], 2'b00} && mem_wdata == q[0].d && mem_be == q[0].be,
              "oldest store presented");
      push_en   = !full && (($urandom % 2) == 0);
      push_addr = $urandom;
      push_data = $urandom;
      push_be   = 4'($urandom);
      @(posedge clk);
      #1;
      if (mem_gnt && q.size() != 0) void'(q.pop_front());
      if (push_en) q.push_back('{a: push_addr, d: push_data, be: push_be});
      if (q.size() > max_occ) max_occ = q.size();
      push_en = 0;
    end
    check(max_occ == 4, "buffer filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
