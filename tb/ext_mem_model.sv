// Behavioural model of the off-chip memory controller and DRAM, for the
// testbenches. It speaks the link protocol of mem_interface: it assembles
// 32-bit words from 8-, 16- or 32-bit beats, takes a command word
// {is_writeback, 4'b0, line[26:0]}, stores the 8 data words of a writeback,
// and answers a refill after LAT cycles with the 8 words of the line. Words
// never written read as tb_mem_pkg::init_word(address). out_ready stalls at
// random when STALL is set. Counts refills and writebacks.
module ext_mem_model
  import tb_mem_pkg::*;
#(
  parameter int LAT   = 6,
  parameter bit STALL = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  mode,
  input  logic        out_valid,
  input  logic [31:0] out_data,
  output logic        out_ready,
  output logic        in_valid,
  output logic [31:0] in_data,
  output int          n_refill,
  output int          n_wb
);
  logic [31:0] mem [int unsigned];
  int beats_per_word;
  assign beats_per_word = (mode == 2'd0) ? 4 : (mode == 2'd1) ? 2 : 1;

  function automatic logic [31:0] rd(input logic [29:0] wa);
    return mem.exists(int'(wa)) ? mem[int'(wa)] : init_word(wa);
  endfunction

  // words queued for sending back, and beat state
  logic [31:0] word_acc;
  int          beat, nword;
  logic        have_cmd, is_wb;
  logic [26:0] line;
  logic [31:0] send_q [$];
  int          wait_cnt;
  int          send_beat;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_ready <= 1'b0;
      in_valid  <= 1'b0;
      in_data   <= '0;
      beat = 0; nword = 0; have_cmd = 0; word_acc = 0; wait_cnt = 0; send_beat = 0;
      n_refill <= 0; n_wb <= 0;
      send_q.delete();
    end else begin
      // receive beats
      if (out_valid && out_ready) begin
        if (mode == 2'd0) word_acc[8*beat +: 8] = out_data[7:0];
        else if (mode == 2'd1) word_acc[16*beat +: 16] = out_data[15:0];
        else word_acc = out_data;
        beat++;
        if (beat == beats_per_word) begin
          beat = 0;
          if (!have_cmd) begin
            have_cmd = 1; is_wb = word_acc[31]; line = word_acc[26:0]; nword = 0;
            if (!is_wb) begin
              for (int i = 0; i < 8; i++) send_q.push_back(rd({line, 3'(i)}));
              wait_cnt = LAT;
              have_cmd = 0;
              n_refill <= n_refill + 1;
            end
          end else begin
            mem[int'({line, 3'(nword)})] = word_acc;
            nword++;
            if (nword == 8) begin have_cmd = 0; n_wb <= n_wb + 1; end
          end
        end
      end
      out_ready <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;
      // send refill beats
      in_valid <= 1'b0;
      if (send_q.size() != 0) begin
        if (wait_cnt > 0) wait_cnt--;
        else begin
          logic [31:0] w;
          w = send_q[0];
          in_valid <= 1'b1;
          in_data  <= (mode == 2'd0) ? {24'b0, w[8*send_beat +: 8]} :
                      (mode == 2'd1) ? {16'b0, w[16*send_beat +: 16]} : w;
          send_beat++;
          if (send_beat == beats_per_word) begin
            send_beat = 0;
            void'(send_q.pop_front());
          end
        end
      end
    end
  end

  // word read access for testbenches that check memory contents
  function automatic logic [31:0] peek(input logic [29:0] wa);
    return rd(wa);
  endfunction
endmodule
