// tb_sram_sp: random single-port accesses against a reference array.
// Checks read data one cycle after each read, masked writes, and that the
// output holds while the macro is disabled or writing.
module tb_sram_sp;
  localparam int unsigned DEPTH = 64, WIDTH = 24;
  logic clk = 1'b0, en, we;
  logic [5:0] addr;
  logic [WIDTH-1:0] wdata, wmask, rdata, ref_mem [DEPTH], exp_q;
  int checks = 0, failures = 0;
  bit have_exp = 1'b0;

  sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1'b0; we = 1'b0; addr = '0; wdata = '0; wmask = '0;
    // initialise every word through the port
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      en = 1'b1; we = 1'b1; addr = 6'(i); wdata = WIDTH'($urandom); wmask = '1;
      ref_mem[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (have_exp) begin
        checks++;
        if (rdata !== exp_q) begin
          failures++;
          if (failures < 10) $display("mismatch at op %0d: got %h exp %h", n, rdata, exp_q);
        end
      end
      en    = ($urandom % 4) != 0;
      we    = ($urandom % 2) != 0;
      addr  = 6'($urandom);
      wdata = WIDTH'($urandom);
      wmask = WIDTH'($urandom);
      if (en && !we) begin
        exp_q    = ref_mem[addr];
        have_exp = 1'b1;
      end
      if (en && we)
        ref_mem[addr] = (ref_mem[addr] & ~wmask) | (wdata & wmask);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
