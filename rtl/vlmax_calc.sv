// Maximum-vector-length logic of the Scale control processor.
//
// Each lane's register file is shared among the virtual processors (VPs)
// mapped to it, so the number of VPs, and with it the maximum vector length,
// depends on how many registers each VP uses. Given the per-VP register
// count configured for each of the four clusters, the lane holds
// floor(REGS / max count) VPs and the vector length is LANES times that:
// with one register per VP, 4 lanes x 32 = 128 VPs. A count of 0 is treated
// as 1. Combinational. The exact rule (maximum over the clusters, floor) is
// this design's reading.
module vlmax_calc #(
  parameter int unsigned LANES    = 4,
  parameter int unsigned REGS     = 32,
  parameter int unsigned CLUSTERS = 4,
  localparam int unsigned NW = $clog2(REGS + 1),
  localparam int unsigned VW = $clog2(LANES * REGS + 1)
) (
  input  logic [NW-1:0] nregs [CLUSTERS],
  output logic [VW-1:0] vlmax
);
  logic [NW-1:0] m;
  logic [NW-1:0] per_lane;

  always_comb begin
    m = NW'(1);
    for (int c = 0; c < CLUSTERS; c++)
      if (nregs[c] > m) m = nregs[c];
    if (m > NW'(REGS)) m = NW'(REGS);
    per_lane = NW'(REGS / m);
    vlmax    = VW'(per_lane) * VW'(LANES);
  end
endmodule
