// tb_mem_model: behavioural off-chip memory for the cache testbenches.
//
// 2**AW words of DATA_W bits, byte addressed. One request per cycle is taken
// when req and gnt are both high; gnt is high in a random three of four
// cycles when RAND_GNT is set, and always otherwise. Writes apply their byte
// enables at the clock edge; reads return in order LAT cycles later on
// rvalid/rdata. Addresses above the array wrap. Every word starts at
// init_word(index), a fixed hash, so a testbench can compute the contents
// independently. Reads and writes are counted.
module tb_mem_model #(
  parameter int unsigned DATA_W   = 32,
  parameter int unsigned AW       = 14,
  parameter int unsigned LAT      = 2,
  parameter bit          RAND_GNT = 1'b1
) (
  input  logic                clk,
  input  logic                req,
  input  logic                we,
  input  logic [31:0]         addr,
  input  logic [DATA_W-1:0]   wdata,
  input  logic [DATA_W/8-1:0] be,
  output logic                gnt,
  output logic                rvalid,
  output logic [DATA_W-1:0]   rdata
);
  localparam int unsigned SH = $clog2(DATA_W / 8);

  logic [DATA_W-1:0] mem [2**AW];
  logic [LAT-1:0]    pv;
  logic [DATA_W-1:0] pd [LAT];
  int unsigned       n_reads, n_writes;

  function automatic logic [DATA_W-1:0] init_word(input int unsigned i);
    logic [31:0] h = i * 32'h9E37_79B1 + 32'h1234_5677;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    return DATA_W'(h ^ (h >> 13));
  endfunction

  initial begin
    for (int unsigned i = 0; i < 2**AW; i++) mem[i] = init_word(i);
    pv       = '0;
    gnt      = 1'b1;
    n_reads  = 0;
    n_writes = 0;
  end

  always @(negedge clk) gnt <= RAND_GNT ? (($urandom % 4) != 0) : 1'b1;

  logic [AW-1:0] idx;
  assign idx = addr[SH +: AW];

  always @(posedge clk) begin
    pv <= {pv[LAT-2:0], 1'b0};
    for (int i = LAT - 1; i > 0; i--) pd[i] <= pd[i-1];
    if (req && gnt) begin
      if (we) begin
        for (int b = 0; b < DATA_W / 8; b++)
          if (be[b]) mem[idx][b*8 +: 8] <= wdata[b*8 +: 8];
        n_writes <= n_writes + 1;
      end else begin
        pv[0]    <= 1'b1;
        pd[0]    <= mem[idx];
        n_reads  <= n_reads + 1;
      end
    end
  end

  assign rvalid = pv[LAT-1];
  assign rdata  = pd[LAT-1];
endmodule
