// Read crossbar of the Scale memory system.
//
// Each bank presents at most one response, tagged with the id of the
// requester it answers. The crossbar delivers every response to its
// requester. A requester can receive only one response per cycle; if two
// banks answer the same requester together (a hit in one bank and a replayed
// miss in another), the lowest-numbered bank wins and the others are told to
// hold their response (bank_rsp_ready low) until a later cycle. The
// conflict rule is this design's choice. Combinational.
module read_xbar
  import scale_pkg::*;
#(
  parameter int unsigned NREQ  = 11,
  parameter int unsigned NBANK = 4
) (
  input  bank_rsp_t         bank_rsp [NBANK],
  output logic [NBANK-1:0]  bank_rsp_ready,
  output logic [NREQ-1:0]   rsp_valid,
  output logic [WORD_W-1:0] rsp_data [NREQ]
);
  always_comb begin
    rsp_valid      = '0;
    bank_rsp_ready = '0;
    for (int r = 0; r < NREQ; r++) rsp_data[r] = '0;
    for (int b = 0; b < NBANK; b++) begin
      if (bank_rsp[b].valid && int'(bank_rsp[b].rid) < NREQ
          && !rsp_valid[bank_rsp[b].rid]) begin
        rsp_valid[bank_rsp[b].rid] = 1'b1;
        rsp_data[bank_rsp[b].rid]  = bank_rsp[b].rdata;
        bank_rsp_ready[b]          = 1'b1;
      end
    end
  end
endmodule
