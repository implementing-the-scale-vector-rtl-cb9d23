// The Scale memory system: a 32 KB, four-bank, nonblocking, 32-way
// set-associative cache shared by 11 requesters, with its external memory
// interface.
//
// Each cycle the arbiter grants up to one requester per bank; the address
// and write crossbars carry the granted requests to the banks; each bank
// answers one cycle later on a hit (or later, after a refill, on a miss) and
// the read crossbar returns the answer to the requester named in it. Bank
// misses go through the external memory interface to the pins.
//
// Requester interface (per requester r): hold req_valid[r] with req_we,
// req_addr, req_be and req_wdata until req_ready[r] (a grant in that cycle).
// Every accepted request, load or store, later gets exactly one cycle with
// rsp_valid[r]; for a load rsp_data[r] is the addressed 128-bit word.
// Responses to one requester come back in order when its requests go to one
// bank; across banks, or when a miss is replayed, they may be reordered.
// The chip's requesters are the control processor, the host interface, the
// AIB fill unit, the VRU, the VLU, the VSU and the four lanes; the
// numbering used in scale_chip is this design's choice.
module memory_system
  import scale_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ram_mode,
  input  logic [NREQ-1:0]   req_valid,
  input  logic [NREQ-1:0]   req_we,
  input  logic [31:0]       req_addr  [NREQ],
  input  logic [BE_W-1:0]   req_be    [NREQ],
  input  logic [WORD_W-1:0] req_wdata [NREQ],
  output logic [NREQ-1:0]   req_ready,
  output logic [NREQ-1:0]   rsp_valid,
  output logic [WORD_W-1:0] rsp_data  [NREQ],
  // external memory pins
  input  logic [1:0]        mem_mode,
  output logic              mem_out_valid,
  output logic [31:0]       mem_out_data,
  input  logic              mem_out_ready,
  input  logic              mem_in_valid,
  input  logic [31:0]       mem_in_data,
  // per-bank events, one-cycle pulses
  output logic [NBANK-1:0]  ev_hit,
  output logic [NBANK-1:0]  ev_miss_primary,
  output logic [NBANK-1:0]  ev_miss_secondary,
  output logic [NBANK-1:0]  ev_writeback,
  output logic [NBANK-1:0]  ev_replay,
  output logic [NBANK-1:0]  ev_bank_conflict   // a bank was wanted but lost
);
  localparam int unsigned RW = $clog2(NREQ);

  logic [1:0]        req_bank   [NREQ];
  logic [NBANK-1:0]  bank_ready, bank_valid;
  logic [RW-1:0]     bank_sel   [NBANK];
  logic              b_we       [NBANK];
  logic [31:0]       b_addr     [NBANK];
  logic [RID_W-1:0]  b_rid      [NBANK];
  logic [WORD_W-1:0] b_wdata    [NBANK];
  logic [BE_W-1:0]   b_be       [NBANK];
  bank_rsp_t         b_rsp      [NBANK];
  logic [NBANK-1:0]  b_rsp_ready;
  line_req_t         b_miss     [NBANK];
  logic [NBANK-1:0]  b_miss_ready;
  line_fill_t        b_fill     [NBANK];

  always_comb
    for (int r = 0; r < NREQ; r++) req_bank[r] = bank_of(req_addr[r]);

  cache_arbiter #(.NREQ(NREQ), .NBANK(NBANK)) u_arb (
    .clk, .rst_n, .req_valid, .req_bank, .bank_ready,
    .grant(req_ready), .bank_valid, .bank_sel
  );

  addr_xbar #(.NREQ(NREQ), .NBANK(NBANK)) u_axbar (
    .req_we, .req_addr, .bank_sel,
    .bank_we(b_we), .bank_addr(b_addr), .bank_rid(b_rid)
  );

  write_xbar #(.NREQ(NREQ), .NBANK(NBANK), .W(WORD_W)) u_wxbar (
    .req_wdata, .req_be, .bank_sel, .bank_wdata(b_wdata), .bank_be(b_be)
  );

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    cache_bank #(.BANK_ID(2'(b))) u_bank (
      .clk, .rst_n, .ram_mode,
      .req_valid (bank_valid[b]),
      .req       ('{we: b_we[b], addr: b_addr[b], rid: b_rid[b], be: b_be[b], wdata: b_wdata[b]}),
      .req_ready (bank_ready[b]),
      .rsp       (b_rsp[b]),
      .rsp_ready (b_rsp_ready[b]),
      .miss      (b_miss[b]),
      .miss_ready(b_miss_ready[b]),
      .fill      (b_fill[b]),
      .ev_hit           (ev_hit[b]),
      .ev_miss_primary  (ev_miss_primary[b]),
      .ev_miss_secondary(ev_miss_secondary[b]),
      .ev_writeback     (ev_writeback[b]),
      .ev_replay        (ev_replay[b])
    );
  end

  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      int unsigned n;
      n = 0;
      for (int r = 0; r < NREQ; r++)
        if (req_valid[r] && req_bank[r] == 2'(b)) n++;
      ev_bank_conflict[b] = (n > 1);
    end
  end

  read_xbar #(.NREQ(NREQ), .NBANK(NBANK)) u_rxbar (
    .bank_rsp(b_rsp), .bank_rsp_ready(b_rsp_ready), .rsp_valid, .rsp_data
  );

  mem_interface #(.NBANK(NBANK)) u_memif (
    .clk, .rst_n, .mode(mem_mode),
    .bank_miss(b_miss), .bank_miss_ready(b_miss_ready), .bank_fill(b_fill),
    .out_valid(mem_out_valid), .out_data(mem_out_data), .out_ready(mem_out_ready),
    .in_valid(mem_in_valid), .in_data(mem_in_data)
  );
endmodule
