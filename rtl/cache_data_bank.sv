// One 8 KB data bank of the Scale cache.
//
// A single-port synchronous RAM of 512 words of 128 bits: each cycle it
// performs one read or one byte-masked write, which is the one-access-per-
// bank-per-cycle rate of the Scale memory system. Read data appears on
// rdata the cycle after a read and then holds until the next read; writes
// do not disturb rdata. The byte enables and the one-cycle read latency are
// this design's choice. On silicon this is a generated RAM macro; here it is
// an array that synthesis maps to a memory.
module cache_data_bank #(
  parameter int unsigned WORDS = 512,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic               clk,
  input  logic               en,
  input  logic               we,
  input  logic [AW-1:0]      addr,
  input  logic [WIDTH/8-1:0] be,
  input  logic [WIDTH-1:0]   wdata,
  output logic [WIDTH-1:0]   rdata
);
  logic [WIDTH-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (en && we) begin
      for (int b = 0; b < WIDTH / 8; b++)
        if (be[b]) mem[addr][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (en && !we) rdata <= mem[addr];
  end
endmodule
