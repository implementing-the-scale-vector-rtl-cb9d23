// Testbench for memory_system: all 11 requesters issue random loads and
// stores at once. Requester r owns byte r of every 16-byte word, so the
// expected value of each byte it reads is known without ordering
// assumptions, while all requesters still share lines, banks and MSHRs.
// Phase 1 runs in on-chip RAM mode (every access hits); phase 2 runs in
// caching mode from reset, with an address pool larger than a set so that
// misses, secondary misses, replays, dirty evictions and writebacks all
// happen; the external memory model answers over the 32-bit link. Each
// mechanism is counted and must occur. Also checks the RAM-mode hit
// latency: a response one cycle after the grant.
module tb_memory_system;
  import scale_pkg::*;
  import tb_mem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int OPS = 250;

  logic rst_n, ram_mode;
  logic [NREQ-1:0] req_valid, req_we, req_ready, rsp_valid;
  logic [31:0] req_addr [NREQ];
  logic [BE_W-1:0] req_be [NREQ];
  logic [WORD_W-1:0] req_wdata [NREQ], rsp_data [NREQ];
  logic [1:0] mem_mode;
  logic mem_out_valid, mem_out_ready, mem_in_valid;
  logic [31:0] mem_out_data, mem_in_data;
  logic [3:0] ev_hit, ev_miss_primary, ev_miss_secondary, ev_writeback, ev_replay, ev_bank_conflict;
  int n_refill, n_wb;

  memory_system dut (.clk, .rst_n, .ram_mode, .req_valid, .req_we, .req_addr, .req_be, .req_wdata,
    .req_ready, .rsp_valid, .rsp_data, .mem_mode, .mem_out_valid, .mem_out_data, .mem_out_ready,
    .mem_in_valid, .mem_in_data, .ev_hit, .ev_miss_primary, .ev_miss_secondary, .ev_writeback,
    .ev_replay, .ev_bank_conflict);

  ext_mem_model #(.LAT(4)) u_mem (.clk, .rst_n, .mode(mem_mode), .out_valid(mem_out_valid),
    .out_data(mem_out_data), .out_ready(mem_out_ready), .in_valid(mem_in_valid),
    .in_data(mem_in_data), .n_refill, .n_wb);

  int c_hit, c_prim, c_sec, c_wb, c_rpl, c_conf, c_lat1;
  always @(posedge clk) begin
    c_hit  += $countones(ev_hit);
    c_prim += $countones(ev_miss_primary);
    c_sec  += $countones(ev_miss_secondary);
    c_wb   += $countones(ev_writeback);
    c_rpl  += $countones(ev_replay);
    c_conf += $countones(ev_bank_conflict);
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // golden bytes, per requester, keyed by 16-byte word address
  logic [7:0] gold [NREQ][int unsigned];
  logic [NREQ-1:0] busy_r;
  logic run;
  int phase;

  function automatic logic [7:0] init_byte(input logic [27:0] wa, input int r);
    logic [31:0] w;
    w = init_word({wa, 2'(r / 4)});
    return w[8 * (r % 4) +: 8];
  endfunction

  for (genvar r = 0; r < NREQ; r++) begin : g_req
    initial begin
      req_valid[r] = 0; req_we[r] = 0; req_addr[r] = 0; req_be[r] = 0; req_wdata[r] = 0;
      busy_r[r] = 0;
      forever begin
        automatic logic [27:0] wa;
        automatic logic we;
        automatic logic [7:0] b;
        automatic int wait_c;
        automatic logic has_gold;
        @(negedge clk);
        if (!run) continue;
        busy_r[r] = 1;
        for (int n = 0; n < OPS; n++) begin
          if (phase == 1) wa = 28'($urandom_range(0, 255)) * 8 + 28'($urandom_range(0, 7));    // < 32 KB
          else wa = {20'($urandom_range(0, 39)), 3'($urandom_range(0, 1)), 2'($urandom), 1'($urandom)} ;
          has_gold = gold[r].exists(int'(wa));
          we = (phase == 1 && !has_gold) ? 1'b1 : ($urandom_range(0, 2) == 0);
          b = 8'($urandom);
          req_valid[r] = 1; req_we[r] = we; req_addr[r] = {wa, 4'h0};
          req_be[r] = 16'(1) << r;
          req_wdata[r] = {$urandom, $urandom, $urandom, $urandom};
          req_wdata[r][8*r +: 8] = b;
          @(posedge clk);
          while (!req_ready[r]) @(posedge clk);
          @(negedge clk);
          req_valid[r] = 0;
          wait_c = 1;
          while (!rsp_valid[r]) begin @(negedge clk); wait_c++; end
          if (phase == 1 && wait_c == 1) c_lat1++;
          if (we) gold[r][int'(wa)] = b;
          else begin
            automatic logic [7:0] e = has_gold ? gold[r][int'(wa)] : init_byte(wa, r);
            checks++;
            if (rsp_data[r][8*r +: 8] !== e) begin
              failures++;
              $display("FAIL phase %0d req %0d word %h: got %h exp %h", phase, r, wa, rsp_data[r][8*r +: 8], e);
            end
          end
        end
        busy_r[r] = 0;
        while (run) @(negedge clk);
      end
    end
  end

  task automatic run_phase(input int p, input logic rm);
    rst_n = 0;
    ram_mode = rm;
    phase = p;
    for (int r = 0; r < NREQ; r++) gold[r].delete();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    repeat (3) @(negedge clk);
    while (busy_r != 0) @(negedge clk);
    run = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("MECH %s: %0d", what, n);
  endtask

  initial begin
    rst_n = 0; ram_mode = 1; mem_mode = 2'd2; run = 0; phase = 0;
    c_hit = 0; c_prim = 0; c_sec = 0; c_wb = 0; c_rpl = 0; c_conf = 0; c_lat1 = 0;
    run_phase(1, 1'b1);
    need(c_lat1, "RAM-mode response one cycle after grant");
    need(c_hit, "RAM-mode hits");
    checks++;
    if (c_prim != 0) begin failures++; $display("FAIL miss in RAM mode"); end
    run_phase(2, 1'b0);
    need(c_prim, "primary misses");
    need(c_sec, "secondary misses");
    need(c_rpl, "replays");
    need(c_wb, "dirty writebacks");
    need(n_wb, "writebacks at the memory");
    need(n_refill, "refills at the memory");
    need(c_conf, "bank conflicts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
