// wb_buffer: write-back buffer of the data cache.
//
// Holds up to DEPTH dirty lines that have left the cache (evicted from the
// miss cache, or written back by a synchronize or flush operation) and
// drains them to memory in the background, oldest first. Each line carries
// two dirty bits, one per 8-byte half; only dirty halves are written, as two
// 32-bit word writes each, so a line with one dirty half costs half the
// traffic of a whole-line write-back.
//
// Interface: push_en with push_laddr/line/dirty enqueues (not allowed when
// full). The memory side issues one word write per cycle as mem_req with
// mem_addr/mem_wdata and all byte enables set; a beat is taken when mem_gnt
// is high in the same cycle. chk_laddr/chk_hit tell the cache whether a line
// it is about to fetch is still waiting here. The documented depth is two;
// the half-line write order (low half first) is this design's choice.
module wb_buffer
  import cache_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                push_en,
  input  laddr_t              push_laddr,
  input  line_t               push_line,
  input  dirty_t              push_dirty,
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

  laddr_t        e_laddr [DEPTH];
  line_t         e_line  [DEPTH];
  dirty_t        e_dirty [DEPTH];
  logic [DEPTH-1:0] e_valid;
  logic [PW-1:0] head, tail;
  logic [1:0]    wsel;
  logic          busy;
  logic [1:0]    eff_word;
  logic          pop;

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign empty = !e_valid[head];
  assign full  = e_valid[tail];

  always_comb begin
    chk_hit = 1'b0;
    for (int unsigned i = 0; i < DEPTH; i++)
      if (e_valid[i] && e_laddr[i] == chk_laddr) chk_hit = 1'b1;
  end

  assign eff_word  = busy ? wsel : (e_dirty[head][0] ? 2'd0 : 2'd2);
  assign mem_req   = !empty && (e_dirty[head] != '0);
  assign mem_addr  = {e_laddr[head], eff_word, 2'b00};
  assign mem_wdata = e_line[head][eff_word*WORD_W +: WORD_W];
  assign mem_be    = '1;

  // Last beat of the head line, or a head with nothing dirty.
  assign pop = !empty && ((e_dirty[head] == '0) ||
               (mem_gnt && eff_word[0] && !(eff_word[1] == 1'b0 && e_dirty[head][1])));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= '0;
      head    <= '0;
      tail    <= '0;
      wsel    <= '0;
      busy    <= 1'b0;
    end else begin
      if (pop) begin
        e_valid[head] <= 1'b0;
        head          <= inc(head);
        busy          <= 1'b0;
      end else if (mem_req && mem_gnt) begin
        busy <= 1'b1;
        wsel <= eff_word[0] ? 2'd2 : eff_word + 2'd1;
      end
      if (push_en) begin
        e_valid[tail] <= 1'b1;
        tail          <= inc(tail);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push_en) begin
      e_laddr[tail] <= push_laddr;
      e_line[tail]  <= push_line;
      e_dirty[tail] <= push_dirty;
    end
  end

  push_not_full: assert property (@(posedge clk) disable iff (!rst_n) push_en |-> !full)
    else $error("wb_buffer: push while full");

endmodule
