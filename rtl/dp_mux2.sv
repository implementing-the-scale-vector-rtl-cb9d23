// Two-input datapath multiplexer, W bits wide.
//
// One of the preplaced datapath components of the Scale clusters
// (Fig. "datapath preplacement": dpMux2 #(32) with ports s, i0, i1, o). On
// the chip each bit slice is built from NAND2 cells with shared select
// drivers; this is the behavioural equivalent: o = s ? i1 : i0,
// combinational.
module dp_mux2 #(
  parameter int unsigned W = 32
) (
  input  logic         s,
  input  logic [W-1:0] i0,
  input  logic [W-1:0] i1,
  output logic [W-1:0] o
);
  assign o = s ? i1 : i0;
endmodule
