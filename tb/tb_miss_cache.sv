// tb_miss_cache: random allocations, CAM lookups, entry rewrites and
// invalidations against a reference model of the entries and the FIFO
// pointer. Checks the registered lookup result one cycle after the compare,
// the entry read through the returned index, and the eviction view before
// each allocation.
module tb_miss_cache;
  import cache_pkg::*;
  localparam int unsigned N = 32;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic lk_en, hit_q, rd_valid, wr_en, wr_valid, alloc_en, ev_valid, inv_all, inv_en;
  logic [4:0] idx_q, rd_idx, wr_idx, inv_idx;
  laddr_t lk_laddr, rd_laddr, wr_laddr, alloc_laddr, ev_laddr;
  line_t rd_line, wr_line, alloc_line, ev_line;
  logic [1:0] rd_dirty, wr_dirty, alloc_dirty, ev_dirty;

  miss_cache #(.ENTRIES(N), .DIRTY_W(2)) dut (.*);

  bit     r_valid [N];
  laddr_t r_tag   [N];
  line_t  r_line  [N];
  logic [1:0] r_dirty [N];
  int     r_ptr;
  int checks = 0, failures = 0;
  bit exp_hit_v; int exp_idx; bit lk_pending;

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

  // small pool of line addresses so lookups hit often
  function automatic laddr_t pick();
    return laddr_t'(($urandom % 48) * 28'h01_0011);
  endfunction

  function automatic bit present(laddr_t a);
    for (int i = 0; i < N; i++) if (r_valid[i] && r_tag[i] == a) return 1;
    return 0;
  endfunction

  initial begin
    lk_en = 0; wr_en = 0; alloc_en = 0; inv_all = 0; inv_en = 0; rd_idx = 0;
    wr_idx = 0; inv_idx = 0; lk_laddr = '0; wr_laddr = '0; alloc_laddr = '0;
    wr_line = '0; alloc_line = '0; wr_dirty = 0; alloc_dirty = 0; wr_valid = 0;
    foreach (r_valid[i]) r_valid[i] = 0;
    r_ptr = 0; lk_pending = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // result of last cycle's lookup
      if (lk_pending) begin
        check(hit_q == exp_hit_v, "lookup hit");
        if (exp_hit_v) begin
          check(idx_q == 5'(exp_idx), "lookup index");
          rd_idx = idx_q;
          #1;
          // the entry may have been rewritten in the same edge: compare with it now
          check(rd_valid == r_valid[exp_idx], "entry valid");
          if (r_valid[exp_idx])
            check(rd_laddr == r_tag[exp_idx] && rd_line == r_line[exp_idx] &&
                  rd_dirty == r_dirty[exp_idx], "entry read");
        end
      end
      // eviction view
      check(ev_valid == r_valid[r_ptr], "eviction valid");
      if (r_valid[r_ptr])
        check(ev_laddr == r_tag[r_ptr] && ev_line == r_line[r_ptr] && ev_dirty == r_dirty[r_ptr],
              "eviction entry");
      // new operations
      lk_en    = ($urandom % 2) != 0;
      lk_laddr = pick();
      exp_hit_v = 0; exp_idx = 0;
      for (int i = 0; i < N; i++)
        if (r_valid[i] && r_tag[i] == lk_laddr) begin exp_hit_v = 1; exp_idx = i; end
      lk_pending = lk_en;
      alloc_en    = ($urandom % 3) == 0;
      alloc_laddr = pick();
      if (present(alloc_laddr)) alloc_en = 0;     // the caches never duplicate a line
      alloc_line  = {$urandom, $urandom, $urandom, $urandom};
      alloc_dirty = 2'($urandom);
      wr_en    = ($urandom % 7) == 0;
      wr_idx   = 5'($urandom);
      wr_valid = ($urandom % 4) != 0;
      wr_laddr = pick();
      if (present(wr_laddr) || (alloc_en && (wr_laddr == alloc_laddr || wr_idx == 5'(r_ptr))))
        wr_en = 0;
      wr_line  = {$urandom, $urandom, $urandom, $urandom};
      wr_dirty = 2'($urandom);
      inv_en   = ($urandom % 13) == 0;
      inv_idx  = 5'($urandom);
      if (wr_en && inv_idx == wr_idx) inv_en = 0;
      inv_all  = ($urandom % 400) == 0;
      @(posedge clk);
      #1;
      if (inv_all) begin
        foreach (r_valid[i]) r_valid[i] = 0;
      end else begin
        if (inv_en) r_valid[inv_idx] = 0;
        if (wr_en) r_valid[wr_idx] = wr_valid;
        if (alloc_en) r_valid[r_ptr] = 1;
      end
      if (wr_en) begin r_tag[wr_idx] = wr_laddr; r_line[wr_idx] = wr_line; r_dirty[wr_idx] = wr_dirty; end
      if (alloc_en) begin
        r_tag[r_ptr] = alloc_laddr; r_line[r_ptr] = alloc_line; r_dirty[r_ptr] = alloc_dirty;
        r_ptr = (r_ptr + 1) % N;
      end
      lk_en = 0; alloc_en = 0; wr_en = 0; inv_en = 0; inv_all = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
