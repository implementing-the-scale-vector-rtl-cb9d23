// External memory interface of the Scale chip.
//
// Arbitrates round-robin between the cache banks' miss requests and carries
// one transaction at a time over the chip's 32-bit output and input ports,
// which run in 8-, 16- or 32-bit mode (mode 0/1/2; a narrow mode uses the low
// pins and sends the least significant part of each word first).
//   Writeback: command word, then the 8 data words of the line (low first).
//   Refill:    command word; the memory controller then returns 8 data words
//              on the input port, which go to the bank as one fill pulse.
// Command word = {is_writeback, 4'b0, line_address[26:0]}. The outgoing
// pins use a valid/ready handshake per beat; incoming beats are qualified by
// in_valid only. The packet format, the handshakes and the one-transaction-
// at-a-time policy are this design's choices; the DDR transfer mode and the
// forwarded memory clock of the chip are not modelled.
module mem_interface
  import scale_pkg::*;
#(
  parameter int unsigned NBANK = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       mode,
  input  line_req_t        bank_miss [NBANK],
  output logic [NBANK-1:0] bank_miss_ready,
  output line_fill_t       bank_fill [NBANK],
  output logic             out_valid,
  output logic [31:0]      out_data,
  input  logic             out_ready,
  input  logic             in_valid,
  input  logic [31:0]      in_data
);
  typedef enum logic [1:0] {M_IDLE, M_SEND, M_RECV, M_FILL} mstate_t;
  mstate_t state;

  localparam int unsigned BIDX = $clog2(NBANK);
  localparam int unsigned WORDS = LINE_W / 32;

  logic [BIDX-1:0]   ptr, cur_bank;
  line_req_t         cur;
  logic [3:0]        word_i;    // 0: command, 1..8: data words
  logic [1:0]        beat_i;
  logic [1:0]        last_beat;
  logic [31:0]       word_out;
  logic [LINE_W-1:0] rbuf;
  logic              pick_v;
  logic [BIDX-1:0]   pick;

  // beats per 32-bit word, minus one
  always_comb begin
    unique case (mode)
      2'd0:    last_beat = 2'd3;
      2'd1:    last_beat = 2'd1;
      default: last_beat = 2'd0;
    endcase
  end

  // round-robin choice among the banks with a pending miss
  always_comb begin
    pick_v = 1'b0;
    pick   = '0;
    for (int k = NBANK - 1; k >= 0; k--) begin
      int unsigned b;
      b = (int'(ptr) + k) % NBANK;
      if (bank_miss[b].valid) begin
        pick_v = 1'b1;
        pick   = BIDX'(b);
      end
    end
  end

  always_comb begin
    bank_miss_ready = '0;
    if (state == M_IDLE && pick_v) bank_miss_ready[pick] = 1'b1;
  end

  assign word_out = (word_i == 0) ? {cur.is_wb, 4'b0, cur.line}
                                  : cur.data[32*(word_i-1) +: 32];

  always_comb begin
    out_valid = (state == M_SEND);
    unique case (mode)
      2'd0:    out_data = {24'b0, word_out[8*beat_i +: 8]};
      2'd1:    out_data = {16'b0, word_out[16*beat_i[0] +: 16]};
      default: out_data = word_out;
    endcase
  end

  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      bank_fill[b].valid = (state == M_FILL) && (cur_bank == BIDX'(b));
      bank_fill[b].mshr  = cur.mshr;
      bank_fill[b].data  = rbuf;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= M_IDLE;
      ptr      <= '0;
      cur_bank <= '0;
      cur      <= '0;
      word_i   <= '0;
      beat_i   <= '0;
      rbuf     <= '0;
    end else begin
      unique case (state)
        M_IDLE: if (pick_v) begin
          cur      <= bank_miss[pick];
          cur_bank <= pick;
          ptr      <= pick + 1'b1;
          word_i   <= '0;
          beat_i   <= '0;
          state    <= M_SEND;
        end
        M_SEND: if (out_ready) begin
          if (beat_i != last_beat) begin
            beat_i <= beat_i + 1'b1;
          end else begin
            beat_i <= '0;
            if (!cur.is_wb) begin
              word_i <= 4'd0;
              state  <= M_RECV;
            end else if (word_i == 4'(WORDS)) begin
              state  <= M_IDLE;
            end else begin
              word_i <= word_i + 1'b1;
            end
          end
        end
        M_RECV: if (in_valid) begin
          unique case (mode)
            2'd0:    rbuf[32*word_i + 8*beat_i +: 8] <= in_data[7:0];
            2'd1:    rbuf[32*word_i + 16*beat_i[0] +: 16] <= in_data[15:0];
            default: rbuf[32*word_i +: 32] <= in_data;
          endcase
          if (beat_i != last_beat) begin
            beat_i <= beat_i + 1'b1;
          end else begin
            beat_i <= '0;
            if (word_i == 4'(WORDS - 1)) state <= M_FILL;
            else word_i <= word_i + 1'b1;
          end
        end
        M_FILL: state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bank_miss_ready));
endmodule
