// line_reuse_buffer: one-line buffer in front of the instruction cache.
//
// Every line the cache delivers to the processor (from the main array, the
// miss cache or a line fill) is copied here with its line address. The
// processor announces, together with each fetch address, whether the fetch
// is sequential to the previous one. A sequential fetch whose half-word offset
// is not zero stays in the line of the previous fetch, which is the line held
// here, so `use_lrb` is raised and the cache leaves its tag and data arrays
// disabled for that fetch: neither a tag read nor a tag compare is needed.
// A sequential fetch at offset zero has crossed into the next line and goes
// to the cache. The read port is a half-word multiplexer on the held line.
//
// Timing: use_lrb is combinational from seq/hw_off and the valid bit; fill_en
// loads the line at the clock edge; inv clears the buffer (used by cache
// maintenance). The single-line capacity and the use of the sequential hint
// follow the cache description; the offset-zero rule is how this design
// derives "same line" from that hint.
// hw_off is address bits [3:1] of the fetch.
module line_reuse_buffer
  import cache_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // prediction for the fetch presented this cycle
  input  logic            seq,
  input  logic [2:0]      hw_off,   // half-word offset of the fetch address
  output logic            use_lrb,
  // read of the held line
  input  logic [2:0]      rd_hw,
  output logic [HW_W-1:0] rd_data,
  // load and clear
  input  logic            fill_en,
  input  laddr_t          fill_laddr,
  input  line_t           fill_line,
  input  logic            inv,
  output logic            valid,
  output laddr_t          laddr
);

  line_t line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= 1'b0;
    else if (inv) valid <= 1'b0;
    else if (fill_en) valid <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (fill_en) begin
      line_q <= fill_line;
      laddr  <= fill_laddr;
    end
  end

  assign use_lrb = valid && seq && (hw_off != 3'd0);
  assign rd_data = line_q[rd_hw*HW_W +: HW_W];

endmodule
