// Testbench for cache_bank (bank 0) in caching mode and on-chip RAM mode.
// Four request streams (ids 0-3) share the bank; stream r owns byte r of
// every word, so each loaded byte has a known value. The testbench picks one
// pending stream per cycle and randomly withholds rsp_ready to exercise the
// response hold. Misses go through mem_interface to the external memory
// model. Counts hits, primary and secondary misses, writebacks and replays,
// and checks the hit latency (response in the cycle after acceptance).
module tb_cache_bank;
  import scale_pkg::*;
  import tb_mem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NS = 4;
  localparam int OPS = 400;

  logic rst_n, ram_mode, req_valid, req_ready, rsp_ready, miss_ready;
  bank_req_t req;
  bank_rsp_t rsp;
  line_req_t miss;
  line_fill_t fill;
  logic ev_hit, ev_miss_primary, ev_miss_secondary, ev_writeback, ev_replay;
  line_req_t  mi_miss [2];
  logic [1:0] mi_ready;
  line_fill_t mi_fill [2];
  logic out_valid, out_ready, in_valid;
  logic [31:0] out_data, in_data;
  int n_refill, n_wb;

  cache_bank #(.BANK_ID(2'd0)) dut (.clk, .rst_n, .ram_mode, .req_valid, .req, .req_ready, .rsp,
    .rsp_ready, .miss, .miss_ready, .fill, .ev_hit, .ev_miss_primary, .ev_miss_secondary,
    .ev_writeback, .ev_replay);

  assign mi_miss[0] = miss;
  assign mi_miss[1] = '0;
  assign miss_ready = mi_ready[0];
  assign fill = mi_fill[0];
  mem_interface #(.NBANK(2)) u_mi (.clk, .rst_n, .mode(2'd2), .bank_miss(mi_miss),
    .bank_miss_ready(mi_ready), .bank_fill(mi_fill), .out_valid, .out_data, .out_ready,
    .in_valid, .in_data);
  ext_mem_model #(.LAT(5)) u_mem (.clk, .rst_n, .mode(2'd2), .out_valid, .out_data, .out_ready,
    .in_valid, .in_data, .n_refill, .n_wb);

  int c_hit, c_prim, c_sec, c_wb, c_rpl, c_hold, c_lat_ok, c_lat_bad;
  always @(posedge clk) begin
    c_hit += int'(ev_hit); c_prim += int'(ev_miss_primary); c_sec += int'(ev_miss_secondary);
    c_wb += int'(ev_writeback); c_rpl += int'(ev_replay);
    if (rsp.valid && !rsp_ready) c_hold++;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-stream state
  logic        pend  [NS];
  bank_req_t   preq  [NS];
  logic        outst [NS];
  int          left  [NS];
  logic [7:0]  gold  [NS][int unsigned];
  logic        run;
  int          cur;
  logic        accepted_hit;
  logic [RID_W-1:0] acc_rid;

  function automatic logic [7:0] init_byte(input logic [27:0] wa, input int r);
    logic [31:0] w;
    w = init_word({wa, 2'(r / 4)});
    return w[8 * (r % 4) +: 8];
  endfunction

  // choose one pending stream each cycle
  always_comb begin
    cur = -1;
    for (int s = 0; s < NS; s++) if (pend[s] && (cur < 0 || $urandom_range(0, 1) == 0)) cur = s;
  end
  assign req_valid = run && cur >= 0;
  assign req = (cur >= 0) ? preq[cur] : '0;

  logic prev_hit_acc;
  logic [RID_W-1:0] prev_rid;

  always @(posedge clk) begin
    // latency of hits: response must be there in the next cycle
    if (prev_hit_acc) begin
      if (rsp.valid && rsp.rid == prev_rid) c_lat_ok++; else c_lat_bad++;
    end
    prev_hit_acc <= req_valid && req_ready && ev_hit && (!rsp.valid || rsp_ready);
    prev_rid <= req.rid;
    rsp_ready <= $urandom_range(0, 3) != 0;
    if (run) begin
      // response
      if (rsp.valid && rsp_ready) begin
        automatic int s = int'(rsp.rid);
        automatic bank_req_t q = preq[s];
        automatic logic [27:0] wa = q.addr[31:4];
        if (!outst[s]) begin failures++; $display("FAIL response with nothing outstanding"); end
        outst[s] = 0;
        if (q.we) gold[s][int'(wa)] = q.wdata[8*s +: 8];
        else begin
          automatic logic [7:0] e = gold[s].exists(int'(wa)) ? gold[s][int'(wa)] : init_byte(wa, s);
          checks++;
          if (rsp.rdata[8*s +: 8] !== e) begin
            failures++; $display("FAIL stream %0d word %h got %h exp %h", s, wa, rsp.rdata[8*s +: 8], e);
          end
        end
      end
      if (req_valid && req_ready) begin
        pend[cur] = 0;
        outst[cur] = 1;
      end
      // new requests
      for (int s = 0; s < NS; s++) begin
        if (!pend[s] && !outst[s] && left[s] > 0) begin
          automatic logic [27:0] wa;
          if (ram_mode) wa = {17'd0, 8'($urandom_range(0, 255)), 2'b00, 1'($urandom)};
          else wa = {20'($urandom_range(0, 39)), 3'($urandom_range(0, 1)), 2'b00, 1'($urandom)};
          preq[s].we = ram_mode ? !gold[s].exists(int'(wa)) || $urandom_range(0, 2) == 0
                                : $urandom_range(0, 2) == 0;
          preq[s].addr = {wa, 4'h0};
          preq[s].rid = RID_W'(s);
          preq[s].be = 16'(1) << s;
          preq[s].wdata = {$urandom, $urandom, $urandom, $urandom};
          pend[s] = 1;
          left[s]--;
        end
      end
    end
  end

  task automatic run_phase(input logic rm);
    rst_n = 0; ram_mode = rm; run = 0;
    for (int s = 0; s < NS; s++) begin
      pend[s] = 0; outst[s] = 0; left[s] = OPS; gold[s].delete();
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run = 1;
    forever begin
      automatic logic busy = 0;
      @(negedge clk);
      for (int s = 0; s < NS; s++) if (pend[s] || outst[s] || left[s] > 0) busy = 1;
      if (!busy) break;
    end
    run = 0;
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("MECH %s: %0d", what, n);
  endtask

  initial begin
    c_hit = 0; c_prim = 0; c_sec = 0; c_wb = 0; c_rpl = 0; c_hold = 0; c_lat_ok = 0; c_lat_bad = 0;
    prev_hit_acc = 0; prev_rid = 0;
    run_phase(1'b1);
    checks++;
    if (c_prim != 0) begin failures++; $display("FAIL miss in RAM mode"); end
    run_phase(1'b0);
    need(c_hit, "hits");
    need(c_prim, "primary misses");
    need(c_sec, "secondary misses");
    need(c_wb, "writebacks");
    need(c_rpl, "replays");
    need(c_hold, "response held by back-pressure");
    need(c_lat_ok, "hit answered in the next cycle");
    checks++;
    if (c_lat_bad != 0) begin failures++; $display("FAIL hit latency %0d", c_lat_bad); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
