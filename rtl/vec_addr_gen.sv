// Address generator for one Scale vector memory command (the VLU/VSU
// unit-stride generator and the per-lane segment-strided generators).
//
// Unit-stride (cmd.unit=1): the vector occupies vl * nseg * 2^esize bytes
// from base. The generator walks the 16-byte cache words that hold it, one
// access per word, so every cache access moves up to 16 bytes; acc_index is
// the word's number within the command.
// Segment-strided (cmd.unit=0): VP i reads or writes a segment of nseg
// contiguous elements at base + i * stride; one access per segment is issued
// (the segment buffers then move the elements over several cycles).
// acc_index is the VP and acc_lane = VP mod LANES the lane that owns it.
// Interface: pulse start with cmd while !busy; acc_valid/acc_ready is a
// valid/ready handshake per access, one access per cycle at best; done
// pulses in the cycle the last access is accepted. A segment is assumed not
// to cross a 16-byte word, and the lane mapping is this design's choice.
module vec_addr_gen
  import scale_pkg::*;
#(
  parameter int unsigned LANES = 4,
  localparam int unsigned LW = $clog2(LANES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  vcmd_t       cmd,
  output logic        busy,
  output logic        acc_valid,
  output logic [31:0] acc_addr,
  output logic [11:0] acc_index,
  output logic [LW-1:0] acc_lane,
  input  logic        acc_ready,
  output logic        done
);
  vcmd_t       c;
  logic [31:0] addr;
  logic [11:0] idx, last;
  logic [15:0] nbytes;

  assign nbytes = 16'(cmd.vl) * 16'(cmd.nseg) << cmd.esize;

  assign acc_valid = busy;
  assign acc_addr  = addr;
  assign acc_index = idx;
  assign acc_lane  = LW'(idx);
  assign done      = busy && acc_ready && idx == last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      c    <= '0;
      addr <= '0;
      idx  <= '0;
      last <= '0;
    end else if (!busy) begin
      if (start && cmd.vl != 0) begin
        busy <= 1'b1;
        c    <= cmd;
        idx  <= '0;
        if (cmd.unit) begin
          addr <= {cmd.base[31:4], 4'b0};
          // words from the one holding base to the one holding the last byte
          last <= 12'((({4'b0, cmd.base[3:0]} + 20'(nbytes) - 20'd1) >> 4));
        end else begin
          addr <= cmd.base;
          last <= 12'(cmd.vl) - 12'd1;
        end
      end
    end else if (acc_ready) begin
      idx  <= idx + 1'b1;
      addr <= c.unit ? addr + 32'd16 : addr + c.stride;
      if (idx == last) busy <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
