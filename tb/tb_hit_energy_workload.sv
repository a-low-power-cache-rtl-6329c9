// tb_hit_energy_workload: the access programs used to characterise the
// energy of one cache access, run on calm_cache_system with default
// parameters. Each program is warmed up once and then measured; in the
// measured pass every access must be served the intended way:
//   I1  instruction fetches that jump from line to line: every fetch is an
//       array hit (one tag and one data array read, no LRB, no miss cache);
//   I2  straight-line code in a resident 1 KB loop: LRB hits and array hits
//       only; the data array is read only on the array hits;
//   I3  fetches alternating between two lines that share an index: every
//       fetch misses the array and hits the miss cache (3 cycles, swap);
//   D1  loads and stores to a resident 1 KB block in a write-back page:
//       every access is an array hit and nothing goes to memory;
//   D2  loads and stores alternating between two lines that share an index:
//       every access hits the miss cache and nothing goes to memory.
// For each program the testbench prints cycles, accesses and array, CAM and
// memory activity per access, the quantities an energy estimate multiplies
// by the energy of each macro. Fetched and loaded data are checked against
// the memories (loads against a reference that includes the stores).
// Accesses are blocking: the next one is issued the cycle after the previous
// result, so an access of latency L takes L+1 cycles here.
module tb_hit_energy_workload;
  import cache_pkg::*;
  localparam int unsigned CB = 16384;           // cache size, default of the top

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

  tb_mem_model #(.DATA_W(16), .AW(15), .LAT(2), .RAND_GNT(1'b1)) u_imem (
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
      if (failures < 10) $display("hit_energy FAIL @%0t: %s", $time, msg);
    end
  endfunction

  // ---------------- activity counters ----------------
  int n_cyc, n_acc, n_lrb, n_l1, n_mc, n_fill, n_tag, n_dat, n_cam, n_mem;
  always @(posedge clk) begin
    n_cyc++;
    if (ic_events.lrb_hit) n_lrb++;
    if (ic_events.l1_hit || dc_events.l1_hit)  n_l1++;
    if (ic_events.mc_hit || dc_events.mc_hit)  n_mc++;
    if (ic_events.fill   || dc_events.fill)    n_fill++;
    if (dut.u_icache.tag_en   || dut.u_dcache.tag_en)   n_tag++;
    if (dut.u_icache.dat_en   || dut.u_dcache.dat_en)   n_dat++;
    if (dut.u_icache.mc_lk_en || dut.u_dcache.mc_lk_en) n_cam++;
    if (ic_mem_req || dc_mem_req) n_mem++;
  end

  task automatic clear();
    n_cyc = 0; n_acc = 0; n_lrb = 0; n_l1 = 0; n_mc = 0; n_fill = 0;
    n_tag = 0; n_dat = 0; n_cam = 0; n_mem = 0;
  endtask

  task automatic report(input string name);
    repeat (2) @(negedge clk);        // let the last access's events be counted
    $display("%s: accesses=%0d cycles=%0d lrb=%0d l1=%0d mc=%0d fills=%0d tag_accesses=%0d data_accesses=%0d cam=%0d mem_cycles=%0d",
             name, n_acc, n_cyc, n_lrb, n_l1, n_mc, n_fill, n_tag, n_dat, n_cam, n_mem);
  endtask

  // ---------------- instruction side ----------------
  addr_t last_a;
  bit    last_v;

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
    @(negedge clk);
    if_req = 1'b0;
    while (!if_rvalid) @(negedge clk);
    check(if_rdata == u_imem.mem[a[15:1]], $sformatf("fetch data at %h", a));
    last_a = a;
    last_v = 1'b1;
    n_acc++;
  endtask

  // I1: one fetch per line over 64 lines, twice per pass
  task automatic prog_i1();
    for (int r = 0; r < 2; r++)
      for (int l = 0; l < 64; l++) fetch(32'h0000_1000 + addr_t'(16 * l + 2 * (l % 8)));
  endtask

  // I2: a 1 KB straight-line loop body
  task automatic prog_i2();
    for (int i = 0; i < 512; i++) fetch(32'h0000_2000 + addr_t'(2 * i));
  endtask

  // I3: eight line pairs that share their index
  task automatic prog_i3();
    for (int r = 0; r < 4; r++)
      for (int l = 0; l < 8; l++) begin
        fetch(32'h0000_3000 + addr_t'(16 * l));
        fetch(32'h0000_3000 + addr_t'(CB + 16 * l));
      end
  endtask

  // ---------------- data side ----------------
  logic [31:0] ref_mem [addr_t];

  task automatic dc_access(input bit we, input addr_t a, input logic [31:0] wd);
    addr_t w;
    logic [31:0] e;
    w = a >> 2;
    e = ref_mem.exists(w) ? ref_mem[w] : u_dmem.mem[w[13:0]];
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
    if (we) ref_mem[w] = wd;
    else    check(d_rdata == e, $sformatf("load data at %h", a));
    n_acc++;
  endtask

  // D1: read-modify-write over a 1 KB block
  task automatic prog_d1();
    for (int i = 0; i < 256; i++) begin
      addr_t a;
      a = 32'h0000_0400 + addr_t'(4 * i);
      dc_access(1'b0, a, '0);
      dc_access(1'b1, a, 32'(i) ^ 32'hA5A5_0000);
    end
  endtask

  // D2: loads and stores alternating between lines that share an index
  task automatic prog_d2();
    for (int r = 0; r < 4; r++)
      for (int l = 0; l < 8; l++) begin
        addr_t a, b;
        a = 32'h0000_0800 + addr_t'(16 * l + 4 * r);
        b = a + addr_t'(CB);
        dc_access(1'b0, a, '0);
        dc_access(1'b1, b, 32'(r * 8 + l));
        dc_access(1'b1, a, 32'(r * 8 + l) ^ 32'hFFFF);
        dc_access(1'b0, b, '0);
      end
  endtask

  initial begin
    if_req = 0; if_addr = '0; if_seq = 0; ic_lock_fill = 0; ic_m_req = 0;
    ic_m_op = IC_INV_ALL; ic_m_addr = '0;
    d_req = 0; d_we = 0; d_addr = '0; d_wdata = '0; d_be = '0; d_wt = 0; dccr_wt = 0;
    dc_lock_fill = 0; dc_m_req = 0; dc_m_op = DC_FLUSH_ALL; dc_m_addr = '0;
    last_v = 0; last_a = '0;
    repeat (5) @(posedge clk);
    rst_n = 1'b1;

    prog_i1(); repeat (20) @(negedge clk); clear(); prog_i1();
    report("I1 array hits");
    check(n_l1 == n_acc && n_lrb == 0 && n_mc == 0 && n_fill == 0, "I1: every fetch an array hit");
    check(n_tag == n_acc && n_dat == n_acc && n_cam == 0, "I1: one tag and one data access per fetch");
    check(n_cyc == 2 * n_acc + 2, "I1: 1-cycle hits");

    prog_i2(); repeat (20) @(negedge clk); clear(); last_v = 1'b0; prog_i2();
    report("I2 sequential code");
    check(n_lrb + n_l1 == n_acc && n_mc == 0 && n_fill == 0, "I2: LRB and array hits only");
    check(n_lrb == 448 && n_dat == n_l1 && n_tag == n_l1, "I2: arrays idle on every LRB hit");

    prog_i3(); repeat (20) @(negedge clk); clear(); prog_i3();
    report("I3 miss-cache hits");
    check(n_mc == n_acc && n_fill == 0 && n_mem == 0, "I3: every fetch a miss-cache hit");
    check(n_cyc == 4 * n_acc + 2, "I3: 3-cycle miss-cache hits");

    prog_d1(); repeat (20) @(negedge clk); clear(); prog_d1();
    report("D1 array hits");
    check(n_l1 == n_acc && n_mc == 0 && n_fill == 0 && n_mem == 0, "D1: every access an array hit");
    check(n_cam == 0, "D1: miss cache not looked up");
    check(n_cyc == 2 * n_acc + 2, "D1: 1-cycle hits");

    prog_d2(); repeat (20) @(negedge clk); clear(); prog_d2();
    report("D2 miss-cache hits");
    check(n_mc == n_acc && n_fill == 0 && n_mem == 0, "D2: every access a miss-cache hit");
    check(n_cyc == 4 * n_acc + 2, "D2: 3-cycle miss-cache hits");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("hit_energy FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
