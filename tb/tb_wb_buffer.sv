// tb_wb_buffer: pushes lines with random dirty-half masks while memory grants
// at random, and checks that exactly the dirty halves are written, word by
// word in order, that the buffer reports full at two entries, and that the
// line-address check sees waiting lines.
module tb_wb_buffer;
  import cache_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic push_en, full, empty, chk_hit, mem_req, mem_gnt;
  laddr_t push_laddr, chk_laddr;
  line_t push_line;
  dirty_t push_dirty;
  addr_t mem_addr;
  logic [31:0] mem_wdata;
  logic [3:0] mem_be;

  wb_buffer #(.DEPTH(2)) dut (.*);

  typedef struct { logic [31:0] a; logic [31:0] d; } beat_t;
  beat_t exp_q [$];
  laddr_t held [$];
  int checks = 0, failures = 0, halves = 0, lines = 0;

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

  // memory side: compare each granted beat with the expectation
  always @(posedge clk) begin
    if (rst_n && mem_req && mem_gnt) begin
      if (exp_q.size() == 0) check(0, "unexpected write");
      else begin
        beat_t e;
        e = exp_q.pop_front();
        check(mem_addr == e.a && mem_wdata == e.d && mem_be == 4'hf, "write beat");
      end
    end
  end

  initial begin
    push_en = 0; push_laddr = '0; push_line = '0; push_dirty = '0; mem_gnt = 0; chk_laddr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      mem_gnt = ($urandom % 3) != 0;
      // the line check: a pushed line is waiting while its beats are expected
      chk_laddr = (held.size() != 0) ? held[0] : laddr_t'($urandom);
      #1;
      if (held.size() != 0) check(chk_hit, "check sees waiting line");
      check(full == (held.size() == 2), "full flag");
      check(empty == (held.size() == 0), "empty flag");
      push_en = !full && (($urandom % 4) == 0);
      if (push_en) begin
        push_laddr = laddr_t'($urandom);
        push_line  = {$urandom, $urandom, $urandom, $urandom};
        push_dirty = 2'($urandom % 3) + 2'd1;
        lines++;
        for (int h = 0; h < 2; h++)
          if (push_dirty[h]) begin
            halves++;
            for (int w = 0; w < 2; w++)
              exp_q.push_back('{a: {push_laddr, 2'(2*h + w), 2'b00},
                                d: push_line[(2*h + w)*32 +: 32]});
          end
      end
      @(posedge clk);
      #1;
      if (push_en) held.push_back(push_laddr);
      push_en = 0;
      // a line leaves the buffer when its last beat is granted
      while (held.size() != 0 && (held.size() > (empty ? 0 : (full ? 2 : 1)))) void'(held.pop_front());
    end
    mem_gnt = 1;
    repeat (20) @(posedge clk);
    check(exp_q.size() == 0, "all beats written");
    check(halves < 2 * lines, "some lines had a clean half");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
