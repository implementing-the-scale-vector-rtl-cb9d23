// One 32-entry tag CAM subbank of a Scale cache bank (one set of the
// 32-way set-associative cache).
//
// match_tag is compared with every valid entry in parallel; hit and the
// index of the (lowest) matching entry come out combinationally, and that
// index, together with the set and word bits, forms the data-RAM index. A
// read port returns the tag and valid bit of entry rd_idx (used to find the
// victim's address for a writeback), and one write port updates an entry at
// the clock edge. Reset clears all valid bits. The chip built the bit-cell
// from a latch and an XOR; here the storage is flip-flops.
module tag_cam #(
  parameter int unsigned ENTRIES = 32,
  parameter int unsigned TAG_W   = 22,
  localparam int unsigned IW = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [TAG_W-1:0] match_tag,
  output logic             hit,
  output logic [IW-1:0]    hit_idx,
  input  logic [IW-1:0]    rd_idx,
  output logic [TAG_W-1:0] rd_tag,
  output logic             rd_valid,
  input  logic             wr_en,
  input  logic [IW-1:0]    wr_idx,
  input  logic [TAG_W-1:0] wr_tag,
  input  logic             wr_valid
);
  logic [TAG_W-1:0]   tags  [ENTRIES];
  logic [ENTRIES-1:0] valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (wr_en) valid[wr_idx] <= wr_valid;
  end

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_idx] <= wr_tag;
  end

  always_comb begin
    hit     = 1'b0;
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && tags[i] == match_tag) begin
        hit     = 1'b1;
        hit_idx = IW'(i);
      end
    end
  end

  assign rd_tag   = tags[rd_idx];
  assign rd_valid = valid[rd_idx];
endmodule
