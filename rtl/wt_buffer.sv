// wt_buffer: write-through buffer of the data cache.
//
// Every store to a write-through page (or any store while the data cache
// control register selects write-through) is queued here as a word address,
// data and byte enables, and written to memory in order, one word per
// memory grant, while the processor continues. This smooths the store
// traffic: the processor stalls only when all DEPTH entries are waiting.
//
// Interface: push_en enqueues (not allowed when full); mem_req/mem_addr/
// mem_wdata/mem_be present the oldest store and it leaves the buffer in the
// cycle mem_gnt is high. chk_laddr/chk_hit report whether any queued store
// falls in a given line, so that a line fill can wait for it. The documented
// depth is four; the word format is this design's choice.
module wt_buffer
  import cache_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                push_en,
  input  addr_t               push_addr,
  input  logic [WORD_W-1:0]   push_data,
  input  logic [WORD_W/8-1:0] push_be,
  output logic                full,
  output logic                empty,
  input  laddr_t              chk_laddr,
  output logic                chk_hit,
  output logic                mem_req,
  output addr_t               mem_addr,
  output logic [WORD_W-1:0]   mem_wdata,
  output logic [WORD_W/8-1:0] mem_be,
  input  logic                mem_gnt
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  addr_t               e_addr [DEPTH];
  logic [WORD_W-1:0]   e_data [DEPTH];
  logic [WORD_W/8-1:0] e_be   [DEPTH];
  logic [DEPTH-1:0]    e_valid;
  logic [PW-1:0]       head, tail;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = !e_valid[head];
  assign full  = e_valid[tail];

  always_comb begin
    chk_hit = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++)
      if (e_valid[i] && e_addr[i][ADDR_W-1:OFF_W] == chk_laddr) chk_hit = 1'b1;
  end

  assign mem_req   = !empty;
  assign mem_addr  = {e_addr[head][ADDR_W-1:2], 2'b00};
  assign mem_wdata = e_data[head];
  assign mem_be    = e_be[head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= '0;
      head    <= '0;
      tail    <= '0;
    end else begin
      if (mem_req && mem_gnt) begin
        e_valid[head] <= 1'b0;
        head          <= inc(head);
      end
      if (push_en) begin
        e_valid[tail] <= 1'b1;
        tail          <= inc(tail);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push_en) begin
      e_addr[tail] <= push_addr;
      e_data[tail] <= push_data;
      e_be[tail]   <= push_be;
    end
  end

  push_not_full: assert property (@(posedge clk) disable iff (!rst_n) push_en |-> !full)
    else $error("wt_buffer: push while full");

endmodule
