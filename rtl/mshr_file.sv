// Miss-status handling registers of one Scale cache bank.
//
// Each of the 32 entries tracks one missing 32-byte line: its line address
// and a replay queue holding the primary miss (slot 0) and up to 4 secondary
// misses to the same line (slots 1..4), each with its destination (requester
// id) and, for stores, the data. The bank looks a missing line up
// (lookup_hit / lookup_idx, combinational), then either allocates a new
// entry (alloc) or appends to the matching one (append) at the clock edge.
// When the refill arrives the bank reads the slots back through rd_idx /
// rd_slot and releases the entry with free. A second read port (ln_idx)
// gives the line address of a queued refill request. can_alloc and
// all_append_ok summarise whether any request could be recorded; the bank
// uses them, not the request itself, to decide whether to accept. Free-entry
// choice (lowest index) and slot layout are this design's choice.
module mshr_file
  import scale_pkg::*;
#(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned REPL    = 4,
  localparam int unsigned IW = $clog2(ENTRIES),
  localparam int unsigned SLOTS = REPL + 1,
  localparam int unsigned CW = $clog2(SLOTS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LADDR_W-1:0] lookup_line,
  output logic               lookup_hit,
  output logic [IW-1:0]      lookup_idx,
  output logic               can_alloc,
  output logic [IW-1:0]      alloc_idx,
  output logic               can_append,     // matching entry has room
  output logic               all_append_ok,  // every valid entry has room
  input  logic               alloc,
  input  logic               append,
  input  miss_slot_t         slot_in,
  input  logic [IW-1:0]      rd_idx,
  input  logic [CW-1:0]      rd_slot,
  output logic [LADDR_W-1:0] rd_line,
  output miss_slot_t         rd_req,
  output logic [CW-1:0]      rd_count,
  input  logic               free,
  input  logic [IW-1:0]      ln_idx,
  output logic [LADDR_W-1:0] ln_line,
  output logic [CW-1:0]      used            // entries in use, saturating
);
  logic [ENTRIES-1:0] valid;
  logic [LADDR_W-1:0] line  [ENTRIES];
  logic [CW-1:0]      count [ENTRIES];
  miss_slot_t         slots [ENTRIES][SLOTS];

  always_comb begin
    lookup_hit = 1'b0;
    lookup_idx = '0;
    can_alloc  = 1'b0;
    alloc_idx  = '0;
    all_append_ok = 1'b1;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && line[i] == lookup_line) begin
        lookup_hit = 1'b1;
        lookup_idx = IW'(i);
      end
      if (!valid[i]) begin
        can_alloc = 1'b1;
        alloc_idx = IW'(i);
      end
      if (valid[i] && count[i] == CW'(SLOTS)) all_append_ok = 1'b0;
    end
    can_append = lookup_hit && count[lookup_idx] != CW'(SLOTS);
  end

  always_comb begin
    used = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (valid[i] && used != '1) used = used + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (free) valid[rd_idx] <= 1'b0;
      if (alloc && can_alloc) valid[alloc_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (alloc && can_alloc) begin
      line[alloc_idx]     <= lookup_line;
      count[alloc_idx]    <= CW'(1);
      slots[alloc_idx][0] <= slot_in;
    end else if (append && can_append) begin
      slots[lookup_idx][count[lookup_idx]] <= slot_in;
      count[lookup_idx] <= count[lookup_idx] + 1'b1;
    end
  end

  assign rd_line  = line[rd_idx];
  assign rd_req   = slots[rd_idx][rd_slot];
  assign rd_count = count[rd_idx];
  assign ln_line  = line[ln_idx];

  assert property (@(posedge clk) disable iff (!rst_n) !(alloc && append));
  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> can_alloc && !lookup_hit);
  assert property (@(posedge clk) disable iff (!rst_n) append |-> can_append);
endmodule
