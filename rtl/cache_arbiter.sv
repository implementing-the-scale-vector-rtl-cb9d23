// Request arbiter of the Scale memory system.
//
// Each of the NREQ requesters presents at most one request, addressed to one
// of NBANK banks. Every cycle the arbiter picks, independently for each bank
// whose req_ready is high, one of the requesters that address it, so up to
// NBANK accesses proceed at once. Grants are combinational (grant[r] is the
// requester's ready for this cycle). Within a bank the priority is
// round-robin: the pointer moves to the requester after the winner. The
// round-robin policy is this design's choice.
module cache_arbiter #(
  parameter int unsigned NREQ  = 11,
  parameter int unsigned NBANK = 4,
  localparam int unsigned BW = $clog2(NBANK),
  localparam int unsigned RW = $clog2(NREQ)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NREQ-1:0]  req_valid,
  input  logic [BW-1:0]    req_bank [NREQ],
  input  logic [NBANK-1:0] bank_ready,
  output logic [NREQ-1:0]  grant,
  output logic [NBANK-1:0] bank_valid,
  output logic [RW-1:0]    bank_sel [NBANK]
);
  logic [RW-1:0] ptr [NBANK];

  always_comb begin
    grant = '0;
    for (int b = 0; b < NBANK; b++) begin
      bank_valid[b] = 1'b0;
      bank_sel[b]   = '0;
      // scan from the pointer, wrapping around, and take the first match
      for (int k = NREQ - 1; k >= 0; k--) begin
        int unsigned r;
        r = (int'(ptr[b]) + k) % NREQ;
        if (req_valid[r] && req_bank[r] == BW'(b) && bank_ready[b]) begin
          bank_valid[b] = 1'b1;
          bank_sel[b]   = RW'(r);
        end
      end
      if (bank_valid[b]) grant[bank_sel[b]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANK; b++) ptr[b] <= '0;
    end else begin
      for (int b = 0; b < NBANK; b++)
        if (bank_valid[b])
          ptr[b] <= (bank_sel[b] == RW'(NREQ - 1)) ? '0 : bank_sel[b] + 1'b1;
    end
  end

  // each requester addresses one bank, so it can win at most once
  assert property (@(posedge clk) disable iff (!rst_n) (grant & ~req_valid) == '0);
endmodule
