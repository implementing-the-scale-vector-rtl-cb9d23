// One bank of the Scale nonblocking cache: 8 tag CAM subbanks (one per set,
// 32 ways each), 32 MSHRs and an 8 KB data bank.
//
// On-chip RAM mode (ram_mode=1): every access hits; the address indexes the
// data RAM directly ({addr[14:7], addr[4]}) and the tags are not used.
//
// Caching mode: an accepted request searches the CAM of its set in the same
// cycle. A hit reads or writes the data RAM at {set, way, addr[4]}. A miss
// is recorded in the MSHRs, as a new entry (primary miss, which also queues a
// refill request to the external memory interface) or appended to the entry
// already tracking the line (secondary miss); the bank keeps serving other
// requests meanwhile. When the refill data arrives the bank stops accepting
// requests, picks a victim way by a per-set round-robin pointer, writes a
// dirty victim back through the memory interface, writes the new line
// (two RAM cycles), installs its tag, and replays the recorded requests in
// order, one per cycle, before freeing the MSHR.
//
// Interface and timing: req/req_valid/req_ready is a valid/ready handshake,
// and req_ready does not depend on req_valid or req. Every request (load or
// store) gets one response carrying its requester id: one cycle after
// acceptance for a hit, later for a miss. A response stays on rsp until
// rsp_ready; while it waits the bank accepts nothing. The miss port is
// valid/ready; fill is a one-cycle pulse that can only arrive when the bank
// is idle (the memory interface has one transaction in flight).
// Victim choice, write-back/write-allocate policy, latencies and the bank's
// conservative accept rule (no free MSHR, or any full replay queue, stops
// all requests) are this design's choices.
module cache_bank
  import scale_pkg::*;
#(
  parameter logic [1:0] BANK_ID = 2'd0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ram_mode,
  input  logic       req_valid,
  input  bank_req_t  req,
  output logic       req_ready,
  output bank_rsp_t  rsp,
  input  logic       rsp_ready,
  output line_req_t  miss,
  input  logic       miss_ready,
  input  line_fill_t fill,
  // event counters for the testbenches / performance monitoring
  output logic       ev_hit,
  output logic       ev_miss_primary,
  output logic       ev_miss_secondary,
  output logic       ev_writeback,
  output logic       ev_replay
);
  typedef enum logic [3:0] {
    S_IDLE, S_VICT, S_RD0, S_RD1, S_RD2, S_WB, S_WR0, S_WR1, S_RPL
  } state_t;
  state_t state;

  // ---------------- tag CAM subbanks ----------------
  logic [SETS-1:0]     cam_hit;
  logic [4:0]          cam_hit_idx [SETS];
  logic [TAG_W-1:0]    cam_rd_tag  [SETS];
  logic [SETS-1:0]     cam_rd_valid;
  logic [SETS-1:0]     cam_wr_en;
  logic [4:0]          cam_rd_idx;
  logic [4:0]          cam_wr_idx;
  logic [TAG_W-1:0]    cam_wr_tag;

  for (genvar s = 0; s < SETS; s++) begin : g_cam
    tag_cam #(.ENTRIES(WAYS), .TAG_W(TAG_W)) u_cam (
      .clk, .rst_n,
      .match_tag (tag_of(req.addr)),
      .hit       (cam_hit[s]),
      .hit_idx   (cam_hit_idx[s]),
      .rd_idx    (cam_rd_idx),
      .rd_tag    (cam_rd_tag[s]),
      .rd_valid  (cam_rd_valid[s]),
      .wr_en     (cam_wr_en[s]),
      .wr_idx    (cam_wr_idx),
      .wr_tag    (cam_wr_tag),
      .wr_valid  (1'b1)
    );
  end

  // ---------------- MSHRs ----------------
  logic               m_hit, m_can_alloc, m_can_append, m_all_ok;
  logic [4:0]         m_hit_idx, m_alloc_idx;
  logic               m_alloc, m_append, m_free;
  logic [4:0]         m_rd_idx, m_ln_idx;
  logic [2:0]         m_rd_slot, m_rd_count, m_used;
  logic [LADDR_W-1:0] m_rd_line, m_ln_line;
  miss_slot_t         m_rd_req, m_slot_in;

  mshr_file #(.ENTRIES(MSHRS), .REPL(REPLAYS)) u_mshr (
    .clk, .rst_n,
    .lookup_line   (req.addr[31:5]),
    .lookup_hit    (m_hit),
    .lookup_idx    (m_hit_idx),
    .can_alloc     (m_can_alloc),
    .alloc_idx     (m_alloc_idx),
    .can_append    (m_can_append),
    .all_append_ok (m_all_ok),
    .alloc         (m_alloc),
    .append        (m_append),
    .slot_in       (m_slot_in),
    .rd_idx        (m_rd_idx),
    .rd_slot       (m_rd_slot),
    .rd_line       (m_rd_line),
    .rd_req        (m_rd_req),
    .rd_count      (m_rd_count),
    .free          (m_free),
    .ln_idx        (m_ln_idx),
    .ln_line       (m_ln_line),
    .used          (m_used)
  );

  assign m_slot_in = '{rid: req.rid, we: req.we, word: req.addr[4], be: req.be, wdata: req.wdata};

  // ---------------- data RAM ----------------
  logic             ram_en, ram_we;
  logic [8:0]       ram_addr;
  logic [BE_W-1:0]  ram_be;
  logic [WORD_W-1:0] ram_wdata, ram_rdata;

  cache_data_bank #(.WORDS(BANK_WORDS), .WIDTH(WORD_W)) u_data (
    .clk, .en(ram_en), .we(ram_we), .addr(ram_addr), .be(ram_be),
    .wdata(ram_wdata), .rdata(ram_rdata)
  );

  // ---------------- response register ----------------
  logic             rsp_v;
  logic [RID_W-1:0] rsp_rid;
  logic             adv;        // nothing waiting on rsp
  logic             rsp_set;    // an access that answers happens this cycle
  logic [RID_W-1:0] rsp_set_rid;

  assign adv = !rsp_v || rsp_ready;
  assign rsp = '{valid: rsp_v, rid: rsp_rid, rdata: ram_rdata};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_v   <= 1'b0;
      rsp_rid <= '0;
    end else if (adv) begin
      rsp_v   <= rsp_set;
      rsp_rid <= rsp_set_rid;
    end
  end

  // ---------------- refill request queue (MSHR indices) ----------------
  logic [4:0] rq [MSHRS];
  logic [5:0] rq_cnt;
  logic [4:0] rq_head, rq_tail;
  logic       rq_push, rq_pop;

  assign m_ln_idx = rq[rq_head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq_cnt  <= '0;
      rq_head <= '0;
      rq_tail <= '0;
    end else begin
      if (rq_push) begin
        rq_tail <= rq_tail + 1'b1;
      end
      if (rq_pop) rq_head <= rq_head + 1'b1;
      rq_cnt <= rq_cnt + 6'(rq_push) - 6'(rq_pop);
    end
  end
  always_ff @(posedge clk) if (rq_push) rq[rq_tail] <= m_alloc_idx;

  // ---------------- victim / fill state ----------------
  logic [4:0]        rr_ptr [SETS];
  logic [WAYS-1:0]   dirty  [SETS];
  line_fill_t        fill_q;
  logic [2:0]        f_set;
  logic [4:0]        f_way;
  logic [TAG_W-1:0]  f_tag;
  logic [WORD_W-1:0] wb_buf [2];
  logic [TAG_W-1:0]  v_tag;
  logic [2:0]        rpl_i;

  assign f_set = m_rd_line[2 +: 3];
  assign f_tag = m_rd_line[5 +: TAG_W];
  assign f_way = rr_ptr[f_set];

  // ---------------- request path ----------------
  logic [2:0] r_set;
  logic       r_hit;
  logic [4:0] r_way;
  logic       acc;

  assign r_set = set_of(req.addr);
  assign r_hit = cam_hit[r_set];
  assign r_way = cam_hit_idx[r_set];

  assign req_ready = (state == S_IDLE) && adv &&
                     (ram_mode || (m_can_alloc && m_all_ok && rq_cnt != 6'(MSHRS)));
  assign acc = req_valid && req_ready;

  always_comb begin
    ram_en      = 1'b0;
    ram_we      = 1'b0;
    ram_addr    = '0;
    ram_be      = req.be;
    ram_wdata   = req.wdata;
    rsp_set     = 1'b0;
    rsp_set_rid = req.rid;
    m_alloc     = 1'b0;
    m_append    = 1'b0;
    m_free      = 1'b0;
    m_rd_idx    = fill_q.mshr;
    m_rd_slot   = rpl_i;
    rq_push     = 1'b0;
    cam_rd_idx  = f_way;
    cam_wr_en   = '0;
    cam_wr_idx  = f_way;
    cam_wr_tag  = f_tag;
    ev_hit = 1'b0; ev_miss_primary = 1'b0; ev_miss_secondary = 1'b0;
    ev_writeback = 1'b0; ev_replay = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (acc) begin
          if (ram_mode) begin
            ram_en   = 1'b1;
            ram_we   = req.we;
            ram_addr = ram_index(req.addr);
            rsp_set  = 1'b1;
            ev_hit   = 1'b1;
          end else if (r_hit) begin
            ram_en   = 1'b1;
            ram_we   = req.we;
            ram_addr = {r_set, r_way, req.addr[4]};
            rsp_set  = 1'b1;
            ev_hit   = 1'b1;
          end else if (m_hit) begin
            m_append          = 1'b1;
            ev_miss_secondary = 1'b1;
          end else begin
            m_alloc         = 1'b1;
            rq_push         = 1'b1;
            ev_miss_primary = 1'b1;
          end
        end
      end
      S_RD0: begin
        ram_en   = adv;
        ram_addr = {f_set, f_way, 1'b0};
      end
      S_RD1: begin
        ram_en   = adv;
        ram_addr = {f_set, f_way, 1'b1};
      end
      S_WR0: begin
        ram_en    = 1'b1;
        ram_we    = 1'b1;
        ram_addr  = {f_set, f_way, 1'b0};
        ram_be    = '1;
        ram_wdata = fill_q.data[0 +: WORD_W];
      end
      S_WR1: begin
        ram_en     = 1'b1;
        ram_we     = 1'b1;
        ram_addr   = {f_set, f_way, 1'b1};
        ram_be     = '1;
        ram_wdata  = fill_q.data[WORD_W +: WORD_W];
        cam_wr_en[f_set] = 1'b1;
      end
      S_RPL: begin
        if (adv) begin
          ram_en      = 1'b1;
          ram_we      = m_rd_req.we;
          ram_addr    = {f_set, f_way, m_rd_req.word};
          ram_be      = m_rd_req.be;
          ram_wdata   = m_rd_req.wdata;
          rsp_set     = 1'b1;
          rsp_set_rid = m_rd_req.rid;
          ev_replay   = 1'b1;
          m_free      = (rpl_i == m_rd_count - 1'b1);
        end
      end
      default: ;
    endcase
    if (state == S_WB && miss_ready) ev_writeback = 1'b1;
  end

  // Miss port: a victim writeback has priority over queued refills, and no
  // refill request leaves while a fill is being processed.
  always_comb begin
    miss = '0;
    rq_pop = 1'b0;
    if (state == S_WB) begin
      miss.valid = 1'b1;
      miss.is_wb = 1'b1;
      miss.line  = {v_tag, f_set, BANK_ID};
      miss.data  = {wb_buf[1], wb_buf[0]};
    end else if (state == S_IDLE && rq_cnt != 0) begin
      miss.valid = 1'b1;
      miss.line  = m_ln_line;
      miss.mshr  = m_ln_idx;
      rq_pop     = miss_ready;
    end
  end

  // ---------------- fill sequencing ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      fill_q <= '0;
      rpl_i  <= '0;
      v_tag  <= '0;
      for (int s = 0; s < SETS; s++) begin
        rr_ptr[s] <= '0;
        dirty[s]  <= '0;
      end
    end else begin
      // store hits and replayed stores mark the line dirty
      if (state == S_IDLE && acc && !ram_mode && r_hit && req.we)
        dirty[r_set][r_way] <= 1'b1;
      unique case (state)
        S_IDLE: if (fill.valid) begin
          fill_q <= fill;
          state  <= S_VICT;
        end
        S_VICT: begin
          rpl_i <= '0;
          v_tag <= cam_rd_tag[f_set];
          if (cam_rd_valid[f_set] && dirty[f_set][f_way]) state <= S_RD0;
          else state <= S_WR0;
        end
        S_RD0: if (adv) state <= S_RD1;
        S_RD1: if (adv) begin
          wb_buf[0] <= ram_rdata;
          state     <= S_RD2;
        end
        S_RD2: begin
          wb_buf[1] <= ram_rdata;
          state     <= S_WB;
        end
        S_WB: if (miss_ready) state <= S_WR0;
        S_WR0: state <= S_WR1;
        S_WR1: begin
          dirty[f_set][f_way] <= 1'b0;
          state <= S_RPL;
        end
        S_RPL: if (adv) begin
          if (m_rd_req.we) dirty[f_set][f_way] <= 1'b1;
          if (m_free) begin
            rr_ptr[f_set] <= rr_ptr[f_set] + 1'b1;
            state <= S_IDLE;
          end else begin
            rpl_i <= rpl_i + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A fill only arrives for an outstanding refill, while the bank is idle.
  assert property (@(posedge clk) disable iff (!rst_n) fill.valid |-> state == S_IDLE);
  // Handshake: a presented miss request stays until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   miss.valid && !miss_ready && state == S_WB |=> miss.valid && miss.is_wb);
endmodule
