// Address crossbar of the Scale memory system.
//
// For each bank, forwards the operation and address of the requester the
// arbiter selected, and tags it with that requester's id so the response can
// find its way back. Purely combinational: one multiplexer per bank.
module addr_xbar
  import scale_pkg::*;
#(
  parameter int unsigned NREQ  = 11,
  parameter int unsigned NBANK = 4,
  localparam int unsigned RW = $clog2(NREQ)
) (
  input  logic [NREQ-1:0]  req_we,
  input  logic [31:0]      req_addr [NREQ],
  input  logic [RW-1:0]    bank_sel [NBANK],
  output logic             bank_we   [NBANK],
  output logic [31:0]      bank_addr [NBANK],
  output logic [RID_W-1:0] bank_rid  [NBANK]
);
  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      bank_we[b]   = req_we[bank_sel[b]];
      bank_addr[b] = req_addr[bank_sel[b]];
      bank_rid[b]  = RID_W'(bank_sel[b]);
    end
  end
endmodule
