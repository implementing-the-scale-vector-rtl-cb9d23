// Write-data crossbar of the Scale memory system.
//
// For each bank, forwards the 128-bit write data and byte enables of the
// requester the arbiter selected. Every requester presents a bank-word
// aligned value with byte enables; a narrow requester places its bytes in
// the lanes its address selects (this design's convention). Combinational.
module write_xbar #(
  parameter int unsigned NREQ  = 11,
  parameter int unsigned NBANK = 4,
  parameter int unsigned W     = 128,
  localparam int unsigned RW = $clog2(NREQ)
) (
  input  logic [W-1:0]   req_wdata [NREQ],
  input  logic [W/8-1:0] req_be    [NREQ],
  input  logic [RW-1:0]  bank_sel  [NBANK],
  output logic [W-1:0]   bank_wdata [NBANK],
  output logic [W/8-1:0] bank_be    [NBANK]
);
  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      bank_wdata[b] = req_wdata[bank_sel[b]];
      bank_be[b]    = req_be[bank_sel[b]];
    end
  end
endmodule
