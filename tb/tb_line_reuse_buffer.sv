// tb_line_reuse_buffer: checks the "same line" prediction (valid, sequential,
// half-word offset not zero), the half-word read multiplexer after fills, and
// that invalidation stops the buffer from serving.
module tb_line_reuse_buffer;
  import cache_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic seq, use_lrb, fill_en, inv, valid;
  logic [2:0] hw_off, rd_hw;
  logic [HW_W-1:0] rd_data;
  laddr_t fill_laddr, laddr;
  line_t fill_line, ref_line;
  bit ref_valid;
  int checks = 0, failures = 0;

  line_reuse_buffer dut (.*);

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
    seq = 0; hw_off = 0; rd_hw = 0; fill_en = 0; inv = 0; fill_laddr = '0; fill_line = '0;
    ref_valid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      seq    = $urandom % 2;
      hw_off = 3'($urandom);
      rd_hw  = 3'($urandom);
      #1;
      check(use_lrb == (ref_valid && seq && hw_off != 0), "use_lrb prediction");
      if (ref_valid) begin
        check(rd_data == ref_line[rd_hw*16 +: 16], "half-word read");
        check(laddr == fill_laddr, "held line address");
      end
      check(valid == ref_valid, "valid flag");
      fill_en = ($urandom % 3) == 0;
      inv     = ($urandom % 11) == 0;
      if (fill_en) begin
        fill_laddr = laddr_t'({$urandom, $urandom});
        fill_line  = {$urandom, $urandom, $urandom, $urandom};
        ref_line   = fill_line;
      end
      @(posedge clk);
      #1;
      if (inv) ref_valid = 0; else if (fill_en) ref_valid = 1;
      fill_en = 0; inv = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
