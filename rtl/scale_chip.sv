// Top level of the Scale vector-thread processor RTL.
//
// Scale pairs a scalar control processor with a vector-thread unit of four
// lanes; each lane has four execution clusters (C0-C3) that run atomic
// instruction blocks for the virtual processors mapped to the lane. All
// memory traffic goes to a shared 32 KB, four-bank, nonblocking cache.
//
// What this top contains:
//   * the clock generator (on-chip VCO model or external clock, divided by
//     1..32); everything else runs on its output clock;
//   * LANES x 4 cluster datapaths, cluster 3 of each lane with the
//     multiply/divide unit; each cluster's result drives its lane transport
//     bus through an enabled datapath latch that opens in the low clock phase
//     (xport_* outputs hold a result from the falling edge after it appears
//     until the next falling edge);
//   * the vector-length logic;
//   * the vector-load and vector-store address generators (VLU, VSU), which
//     are memory requesters 4 and 5;
//   * the memory system with its external memory pins.
// Parts whose internals are not part of this design (control processor,
// command-management units and AIB caches, AIB fill unit, VRU, host
// interface) connect through ports: each cluster takes decoded operations
// on cl_op, requesters 0-3 and 6-10 are the ext_req_* ports (entries 4 and 5
// of those arrays are unused), VLU read data comes out on vlu_rsp_* (vlu_acc_index/vlu_acc_lane name
// each access as it is issued), and VSU
// store data comes in on vsu_wdata/vsu_be for the access shown on
// vsu_acc_index/vsu_acc_lane.
// Requester numbering (0 control processor, 1 host interface, 2 AIB fill
// unit, 3 VRU, 4 VLU, 5 VSU, 6-9 lanes 0-3, 10 spare) is this design's
// choice.
module scale_chip
  import scale_pkg::*;
#(
  parameter int unsigned LANES = 4
) (
  // clocking and reset
  input  logic              ext_clk,
  input  logic [11:0]       vco_ctrl_mv,
  input  logic              clk_sel_ext,
  input  logic [4:0]        clk_div,
  input  logic              rst_n,
  output logic              core_clk,
  // cluster operations, writeback and results
  input  cl_op_t            cl_op      [LANES][4],
  output logic              cl_busy    [LANES][4],
  input  logic              cl_wb_en   [LANES][4],
  input  logic [4:0]        cl_wb_addr [LANES][4],
  input  logic [31:0]       cl_wb_data [LANES][4],
  output logic              cl_res_valid [LANES][4],
  output logic [31:0]       cl_result  [LANES][4],
  output logic [31:0]       xport_data [LANES][4],
  // vector length
  input  logic [5:0]        nregs      [4],
  output logic [7:0]        vlmax,
  // vector load / store commands
  input  logic              vlu_start,
  input  vcmd_t             vlu_cmd,
  output logic              vlu_busy,
  output logic              vlu_done,
  output logic [11:0]       vlu_acc_index,
  output logic [1:0]        vlu_acc_lane,
  output logic              vlu_rsp_valid,
  output logic [WORD_W-1:0] vlu_rsp_data,
  input  logic              vsu_start,
  input  vcmd_t             vsu_cmd,
  output logic              vsu_busy,
  output logic              vsu_done,
  output logic [11:0]       vsu_acc_index,
  output logic [1:0]        vsu_acc_lane,
  input  logic [WORD_W-1:0] vsu_wdata,
  input  logic [BE_W-1:0]   vsu_be,
  output logic              vsu_rsp_valid,
  // other memory requesters
  input  logic              ram_mode,
  input  logic [NREQ-1:0]   ext_req_valid,
  input  logic [NREQ-1:0]   ext_req_we,
  input  logic [31:0]       ext_req_addr  [NREQ],
  input  logic [BE_W-1:0]   ext_req_be    [NREQ],
  input  logic [WORD_W-1:0] ext_req_wdata [NREQ],
  output logic [NREQ-1:0]   ext_req_ready,
  output logic [NREQ-1:0]   ext_rsp_valid,
  output logic [WORD_W-1:0] ext_rsp_data  [NREQ],
  // external memory pins
  input  logic [1:0]        mem_mode,
  output logic              mem_out_valid,
  output logic [31:0]       mem_out_data,
  input  logic              mem_out_ready,
  input  logic              mem_in_valid,
  input  logic [31:0]       mem_in_data,
  // events
  output logic [NBANK-1:0]  ev_hit,
  output logic [NBANK-1:0]  ev_miss_primary,
  output logic [NBANK-1:0]  ev_miss_secondary,
  output logic [NBANK-1:0]  ev_writeback,
  output logic [NBANK-1:0]  ev_replay,
  output logic [NBANK-1:0]  ev_bank_conflict
);
  localparam int unsigned REQ_VLU = 4;
  localparam int unsigned REQ_VSU = 5;

  logic clk;
  logic vco_clk;

  vco u_vco (.vctrl_mv(vco_ctrl_mv), .clk(vco_clk));

  clock_gen #(.MAXDIV(32)) u_clkgen (
    .vco_clk, .ext_clk, .sel_ext(clk_sel_ext), .div(clk_div), .rst_n, .clk_out(clk)
  );
  assign core_clk = clk;

  // ---------------- lanes of clusters ----------------
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    for (genvar c = 0; c < 4; c++) begin : g_cl
      logic [4:0] res_rd_unused;
      cluster #(.HAS_MULDIV(c == 3)) u_cluster (
        .clk, .rst_n,
        .op        (cl_op[l][c]),
        .busy      (cl_busy[l][c]),
        .wb_en     (cl_wb_en[l][c]),
        .wb_addr   (cl_wb_addr[l][c]),
        .wb_data   (cl_wb_data[l][c]),
        .res_valid (cl_res_valid[l][c]),
        .res_rd    (res_rd_unused),
        .result    (cl_result[l][c])
      );
      // transport-bus latch, transparent in the low phase of the clock
      dp_latch_h_en #(.W(32)) u_xport (
        .clk(~clk), .d_n(cl_result[l][c]), .en_p(cl_res_valid[l][c]), .q_np(xport_data[l][c])
      );
    end
  end

  vlmax_calc #(.LANES(4), .REGS(32), .CLUSTERS(4)) u_vlmax (.nregs, .vlmax);

  // ---------------- vector memory units ----------------
  logic        vlu_acc_valid, vlu_acc_ready, vsu_acc_valid, vsu_acc_ready;
  logic [31:0] vlu_acc_addr, vsu_acc_addr;

  vec_addr_gen #(.LANES(4)) u_vlu (
    .clk, .rst_n, .start(vlu_start), .cmd(vlu_cmd), .busy(vlu_busy),
    .acc_valid(vlu_acc_valid), .acc_addr(vlu_acc_addr), .acc_index(vlu_acc_index),
    .acc_lane(vlu_acc_lane), .acc_ready(vlu_acc_ready), .done(vlu_done)
  );
  vec_addr_gen #(.LANES(4)) u_vsu (
    .clk, .rst_n, .start(vsu_start), .cmd(vsu_cmd), .busy(vsu_busy),
    .acc_valid(vsu_acc_valid), .acc_addr(vsu_acc_addr), .acc_index(vsu_acc_index),
    .acc_lane(vsu_acc_lane), .acc_ready(vsu_acc_ready), .done(vsu_done)
  );

  // ---------------- memory system ----------------
  logic [NREQ-1:0]   m_valid, m_we, m_ready, m_rsp_valid;
  logic [31:0]       m_addr  [NREQ];
  logic [BE_W-1:0]   m_be    [NREQ];
  logic [WORD_W-1:0] m_wdata [NREQ];
  logic [WORD_W-1:0] m_rdata [NREQ];

  always_comb begin
    for (int r = 0; r < NREQ; r++) begin
      m_valid[r] = ext_req_valid[r];
      m_we[r]    = ext_req_we[r];
      m_addr[r]  = ext_req_addr[r];
      m_be[r]    = ext_req_be[r];
      m_wdata[r] = ext_req_wdata[r];
    end
    m_valid[REQ_VLU] = vlu_acc_valid;
    m_we[REQ_VLU]    = 1'b0;
    m_addr[REQ_VLU]  = vlu_acc_addr;
    m_be[REQ_VLU]    = '0;
    m_wdata[REQ_VLU] = '0;
    m_valid[REQ_VSU] = vsu_acc_valid;
    m_we[REQ_VSU]    = 1'b1;
    m_addr[REQ_VSU]  = vsu_acc_addr;
    m_be[REQ_VSU]    = vsu_be;
    m_wdata[REQ_VSU] = vsu_wdata;
  end

  memory_system u_mem (
    .clk, .rst_n, .ram_mode,
    .req_valid(m_valid), .req_we(m_we), .req_addr(m_addr), .req_be(m_be), .req_wdata(m_wdata),
    .req_ready(m_ready), .rsp_valid(m_rsp_valid), .rsp_data(m_rdata),
    .mem_mode, .mem_out_valid, .mem_out_data, .mem_out_ready, .mem_in_valid, .mem_in_data,
    .ev_hit, .ev_miss_primary, .ev_miss_secondary, .ev_writeback, .ev_replay, .ev_bank_conflict
  );

  assign vlu_acc_ready = m_ready[REQ_VLU];
  assign vsu_acc_ready = m_ready[REQ_VSU];
  assign vlu_rsp_valid = m_rsp_valid[REQ_VLU];
  assign vlu_rsp_data  = m_rdata[REQ_VLU];
  assign vsu_rsp_valid = m_rsp_valid[REQ_VSU];

  always_comb begin
    ext_req_ready = m_ready;
    ext_rsp_valid = m_rsp_valid;
    ext_req_ready[REQ_VLU] = 1'b0;
    ext_req_ready[REQ_VSU] = 1'b0;
    ext_rsp_valid[REQ_VLU] = 1'b0;
    ext_rsp_valid[REQ_VSU] = 1'b0;
    for (int r = 0; r < NREQ; r++) ext_rsp_data[r] = m_rdata[r];
  end
endmodule
