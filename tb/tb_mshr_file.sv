// Testbench for mshr_file: allocates primary misses until full, appends up
// to four secondary misses per line, checks that a fifth is refused, reads
// every slot back in order and frees entries, against a reference model.
module tb_mshr_file;
  import scale_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [26:0] lookup_line, rd_line, ln_line;
  logic lookup_hit, can_alloc, can_append, all_append_ok, alloc, append, free;
  logic [4:0] lookup_idx, alloc_idx, rd_idx, ln_idx;
  logic [2:0] rd_slot, rd_count, used;
  miss_slot_t slot_in, rd_req;

  mshr_file dut (.clk, .rst_n, .lookup_line, .lookup_hit, .lookup_idx, .can_alloc, .alloc_idx,
                 .can_append, .all_append_ok, .alloc, .append, .slot_in, .rd_idx, .rd_slot,
                 .rd_line, .rd_req, .rd_count, .free, .ln_idx, .ln_line, .used);

  // reference
  logic        mv [32];
  logic [26:0] ml [32];
  miss_slot_t  ms [32][5];
  int          mc [32];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic miss_slot_t rnd_slot();
    miss_slot_t s;
    s.rid = 4'($urandom_range(0, 10)); s.we = $urandom_range(0, 1); s.word = $urandom_range(0, 1);
    s.be = 16'($urandom); s.wdata = {$urandom, $urandom, $urandom, $urandom};
    return s;
  endfunction

  // present a miss for line l; returns 1 if recorded
  task automatic miss(input logic [26:0] l, output logic ok);
    int hit_i = -1, free_i = -1;
    for (int i = 31; i >= 0; i--) begin
      if (mv[i] && ml[i] == l) hit_i = i;
      if (!mv[i]) free_i = i;
    end
    @(negedge clk);
    lookup_line = l; slot_in = rnd_slot();
    #1;
    chk(lookup_hit == (hit_i >= 0), "lookup hit");
    chk(can_alloc == (free_i >= 0), "can_alloc");
    ok = 0;
    if (hit_i >= 0) begin
      chk(lookup_idx == 5'(hit_i), "lookup idx");
      chk(can_append == (mc[hit_i] < 5), "can_append");
      if (mc[hit_i] < 5) begin
        append = 1; ms[hit_i][mc[hit_i]] = slot_in; mc[hit_i]++; ok = 1;
      end
    end else if (free_i >= 0) begin
      chk(alloc_idx == 5'(free_i), "alloc idx");
      alloc = 1; mv[free_i] = 1; ml[free_i] = l; ms[free_i][0] = slot_in; mc[free_i] = 1; ok = 1;
    end
    @(negedge clk);
    alloc = 0; append = 0;
  endtask

  task automatic drain(input int i);
    @(negedge clk);
    rd_idx = 5'(i);
    ln_idx = 5'(i);
    for (int s = 0; s < mc[i]; s++) begin
      rd_slot = 3'(s);
      #1;
      chk(rd_req == ms[i][s], "replay slot");
    end
    chk(rd_line == ml[i] && ln_line == ml[i], "line");
    chk(rd_count == 3'(mc[i]), "count");
    free = 1;
    @(negedge clk);
    free = 0;
    mv[i] = 0;
  endtask

  initial begin
    logic ok;
    int refused = 0;
    rst_n = 0; alloc = 0; append = 0; free = 0; lookup_line = 0; rd_idx = 0; rd_slot = 0; ln_idx = 0;
    slot_in = '0;
    for (int i = 0; i < 32; i++) begin mv[i] = 0; mc[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      for (int n = 0; n < 120; n++) begin
        miss(27'($urandom_range(0, 40)), ok);
        if (!ok) refused++;
      end
      #1;
      begin
        automatic int u = 0;
        automatic logic aok = 1;
        for (int i = 0; i < 32; i++) begin
          if (mv[i]) u++;
          if (mv[i] && mc[i] == 5) aok = 0;
        end
        chk(used == 3'((u > 7) ? 7 : u), "used count");
        chk(all_append_ok == aok, "all_append_ok");
      end
      for (int i = 0; i < 32; i++) if (mv[i] && $urandom_range(0, 1)) drain(i);
    end
    for (int i = 0; i < 32; i++) if (mv[i]) drain(i);
    chk(refused > 0, "full replay queue refused at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
