// sram_sp: single-port synchronous SRAM, the model of a compiled memory macro.
//
// One access per clock: when en is high the word at addr is read (we low) or
// written under the bit mask wmask (we high). Read data appears on rdata one
// cycle after the read and then holds until the next read, so a macro whose
// enable is low neither toggles its outputs nor consumes access energy; the
// caches use this to keep their arrays in standby. A write does not change
// rdata. Contents are not reset. The tag and data arrays of both caches are
// instances of this model; the macro's internal design is not specified and
// this is a plain behavioural array written so that synthesis maps it to a
// memory.
module sram_sp #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [WIDTH-1:0] wmask,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en && we) begin
      for (int unsigned b = 0; b < WIDTH; b++)
        if (wmask[b]) mem[addr][b] <= wdata[b];
    end
  end

  always_ff @(posedge clk) begin
    if (en && !we) rdata <= mem[addr];
  end

endmodule
