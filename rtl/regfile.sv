// Cluster register file: 32 entries of 32 bits with two read ports and two
// write ports, as in each Scale execution cluster.
//
// Reads are combinational. Writes happen at the rising clock edge; a read of
// an entry being written in the same cycle returns the old value. If both
// write ports name the same entry, port 1 wins. The chip built this array
// from latch bit-cells with tri-state hierarchical read bit-lines; here it is
// flip-flops, which behave the same at this interface. Write-port priority is
// this design's choice. No reset: software writes a register before reading
// it.
module regfile #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned WIDTH   = 32,
  localparam int unsigned AW = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic [AW-1:0]    ra0,
  output logic [WIDTH-1:0] rd0,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic             we0,
  input  logic [AW-1:0]    wa0,
  input  logic [WIDTH-1:0] wd0,
  input  logic             we1,
  input  logic [AW-1:0]    wa1,
  input  logic [WIDTH-1:0] wd1
);
  logic [WIDTH-1:0] regs [ENTRIES];

  always_ff @(posedge clk) begin
    if (we0 && !(we1 && wa1 == wa0)) regs[wa0] <= wd0;
    if (we1) regs[wa1] <= wd1;
  end

  assign rd0 = regs[ra0];
  assign rd1 = regs[ra1];
endmodule
