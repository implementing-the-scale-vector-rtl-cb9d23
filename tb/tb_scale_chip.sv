// End-to-end testbench for scale_chip at its default size (4 lanes of 4
// clusters, 11-requester four-bank memory system).
//   1. Clocking: measures the core clock from the VCO and from the external
//      clock divided by 1 and by 3.
//   2. Clusters: all 16 clusters run random ALU operations at once (the
//      cluster-3 datapaths also multiplies and divides) against register-file
//      models; results are checked on the result ports and on the transport
//      latches.
//   3. Vector length: vlmax for several register counts.
//   4. Memory, on-chip RAM mode: the control-processor port stores a block,
//      the VLU reads it back unit-stride; the VSU stores a strided vector of
//      VP elements and the VLU loads it back strided; a control-processor
//      load runs concurrently so the VLU/VSU/CP contend for banks.
//   5. Memory, caching mode over the 16-bit memory link: the same traffic
//      with a stride that puts 64 lines into one set, so misses, secondary
//      misses, replays and dirty writebacks happen.
// Every mechanism is counted and must have happened at least once.
module tb_scale_chip;
  import scale_pkg::*;
  import tb_mem_pkg::*;
  int checks = 0, failures = 0;

  logic ext_clk = 0;
  always #5 ext_clk = ~ext_clk;

  logic [11:0] vco_ctrl_mv;
  logic clk_sel_ext, rst_n, clk;
  logic [4:0] clk_div;
  cl_op_t cl_op [4][4];
  logic cl_busy [4][4], cl_wb_en [4][4], cl_res_valid [4][4];
  logic [4:0] cl_wb_addr [4][4];
  logic [31:0] cl_wb_data [4][4], cl_result [4][4], xport_data [4][4];
  logic [5:0] nregs [4];
  logic [7:0] vlmax;
  logic vlu_start, vlu_busy, vlu_done, vlu_rsp_valid;
  vcmd_t vlu_cmd, vsu_cmd;
  logic [11:0] vlu_acc_index, vsu_acc_index;
  logic [1:0] vlu_acc_lane, vsu_acc_lane;
  logic [WORD_W-1:0] vlu_rsp_data, vsu_wdata;
  logic vsu_start, vsu_busy, vsu_done, vsu_rsp_valid;
  logic [BE_W-1:0] vsu_be;
  logic ram_mode;
  logic [NREQ-1:0] ext_req_valid, ext_req_we, ext_req_ready, ext_rsp_valid;
  logic [31:0] ext_req_addr [NREQ];
  logic [BE_W-1:0] ext_req_be [NREQ];
  logic [WORD_W-1:0] ext_req_wdata [NREQ], ext_rsp_data [NREQ];
  logic [1:0] mem_mode;
  logic mem_out_valid, mem_out_ready, mem_in_valid;
  logic [31:0] mem_out_data, mem_in_data;
  logic [3:0] ev_hit, ev_miss_primary, ev_miss_secondary, ev_writeback, ev_replay, ev_bank_conflict;
  int n_refill, n_wb;

  scale_chip dut (.*, .core_clk(clk));

  ext_mem_model #(.LAT(4)) u_mem (.clk, .rst_n, .mode(mem_mode), .out_valid(mem_out_valid),
    .out_data(mem_out_data), .out_ready(mem_out_ready), .in_valid(mem_in_valid),
    .in_data(mem_in_data), .n_refill, .n_wb);

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_hit, m_prim, m_sec, m_wb, m_rpl, m_conf, m_md, m_xport, m_vlu, m_vsu, m_cp;
  always @(posedge clk) begin
    m_hit  += $countones(ev_hit);
    m_prim += $countones(ev_miss_primary);
    m_sec  += $countones(ev_miss_secondary);
    m_wb   += $countones(ev_writeback);
    m_rpl  += $countones(ev_replay);
    m_conf += $countones(ev_bank_conflict);
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("MECH %s: %0d", what, n);
  endtask

  // ---------------- clusters ----------------
  function automatic logic [31:0] alu(alu_op_t o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD: return x + z;       ALU_SUB: return x - z;
      ALU_AND: return x & z;       ALU_OR:  return x | z;
      ALU_XOR: return x ^ z;       ALU_NOR: return ~(x | z);
      ALU_SLL: return x << z[4:0]; ALU_SRL: return x >> z[4:0];
      ALU_SRA: return $unsigned($signed(x) >>> z[4:0]);
      ALU_SLT: return {31'b0, $signed(x) < $signed(z)};
      default: return {31'b0, x < z};
    endcase
  endfunction
  function automatic logic [31:0] md(md_op_t o, logic [31:0] x, logic [31:0] z);
    logic [63:0] p;
    case (o)
      MD_MUL16: return 32'($signed(x[15:0]) * $signed(z[15:0]));
      MD_MUL:   begin p = $signed({{32{x[31]}}, x}) * $signed({{32{z[31]}}, z}); return p[31:0]; end
      MD_MULU:  return x * z;
      MD_DIV:   return (z == 0) ? '1 : (x == 32'h8000_0000 && z == '1) ? x : 32'($signed(x) / $signed(z));
      default:  return (z == 0) ? '1 : x / z;
    endcase
  endfunction

  logic cl_go = 1'b0;
  logic [15:0] cl_done;
  for (genvar l = 0; l < 4; l++) begin : g_l
    for (genvar c = 0; c < 4; c++) begin : g_c
      logic [31:0] R [32];
      initial begin
        cl_op[l][c] = '0; cl_wb_en[l][c] = 0; cl_wb_addr[l][c] = 0; cl_wb_data[l][c] = 0;
        cl_done[l*4+c] = 0;
        wait (cl_go);
        @(negedge clk);
        for (int i = 0; i < 32; i++) begin
          cl_wb_en[l][c] = 1; cl_wb_addr[l][c] = 5'(i); cl_wb_data[l][c] = $urandom; R[i] = cl_wb_data[l][c];
          @(negedge clk);
        end
        cl_wb_en[l][c] = 0;
        for (int n = 0; n < 150; n++) begin
          automatic cl_op_t o = '0;
          automatic logic [31:0] v;
          o.valid = 1; o.rs1 = 5'($urandom); o.rs2 = 5'($urandom); o.rd = 5'($urandom);
          o.use_imm = $urandom_range(0, 1); o.imm = $urandom; o.wr = 1;
          o.is_md = (c == 3) && $urandom_range(0, 4) == 0;
          o.alu_op = alu_op_t'($urandom_range(0, 10));
          o.md_op = md_op_t'($urandom_range(0, 4));
          v = o.is_md ? md(o.md_op, R[o.rs1], o.use_imm ? o.imm : R[o.rs2])
                      : alu(o.alu_op, R[o.rs1], o.use_imm ? o.imm : R[o.rs2]);
          cl_op[l][c] = o;
          @(negedge clk);
          cl_op[l][c] = '0;
          if (o.is_md) begin
            m_md++;
            while (cl_busy[l][c]) @(negedge clk);
            @(negedge clk);
          end
          R[o.rd] = v;
          chk(cl_res_valid[l][c] && cl_result[l][c] === v, "cluster result");
          #1;
          chk(xport_data[l][c] === v, "transport latch");
          m_xport++;
        end
        cl_done[l*4+c] = 1;
      end
    end
  end

  // ---------------- vector store data ----------------
  logic [31:0] vals [256];
  logic [3:0]  voff;
  assign vsu_wdata = WORD_W'(vals[vsu_acc_index[7:0]]) << (8 * voff);
  assign vsu_be    = BE_W'(16'hF << voff);

  // golden memory image, by byte address
  logic [7:0] gold [int unsigned];
  function automatic logic [7:0] gbyte(input logic [31:0] a, input logic known_init);
    logic [31:0] w;
    if (gold.exists(int'(a))) return gold[int'(a)];
    w = init_word(a[31:2]);
    return known_init ? w[8*a[1:0] +: 8] : 8'hxx;
  endfunction

  // control-processor port (requester 0): blocking store or load
  task automatic cp_access(input logic we, input logic [31:0] addr, input logic [127:0] data,
                           output logic [127:0] rdata);
    @(negedge clk);
    ext_req_valid[0] = 1; ext_req_we[0] = we; ext_req_addr[0] = addr; ext_req_be[0] = '1;
    ext_req_wdata[0] = data;
    @(posedge clk);
    while (!ext_req_ready[0]) @(posedge clk);
    @(negedge clk);
    ext_req_valid[0] = 0;
    while (!ext_rsp_valid[0]) @(negedge clk);
    rdata = ext_rsp_data[0];
    m_cp++;
    if (we) for (int b = 0; b < 16; b++) gold[int'(addr + b)] = data[8*b +: 8];
  endtask

  task automatic run_vec(input vcmd_t c, input logic store, output logic [127:0] got [$]);
    got.delete();
    @(negedge clk);
    if (store) begin vsu_cmd = c; vsu_start = 1; end
    else begin vlu_cmd = c; vlu_start = 1; end
    @(negedge clk);
    vsu_start = 0; vlu_start = 0;
    if (store) begin
      automatic int acks = 0;
      while (acks < c.vl) begin if (vsu_rsp_valid) acks++; @(negedge clk); end
      m_vsu++;
    end else begin
      automatic int n = c.unit ? ((int'(c.base[3:0]) + int'(c.vl) * 4 - 1) / 16 + 1) : int'(c.vl);
      while (got.size() < n) begin if (vlu_rsp_valid) got.push_back(vlu_rsp_data); @(negedge clk); end
      m_vlu++;
    end
  endtask

  // the memory test used in both modes
  task automatic mem_test(input logic known_init, input logic [31:0] ubase, input logic [31:0] sbase,
                          input logic [31:0] stride, input int vl);
    logic [127:0] got [$];
    logic [127:0] exp [$];
    logic [127:0] rd;
    vcmd_t c;
    // CP stores a block, VLU reads it unit-stride
    for (int w = 0; w < vl / 4; w++) begin
      cp_access(1'b1, ubase + 32'(16 * w), {$urandom, $urandom, $urandom, $urandom}, rd);
    end
    c = '0; c.unit = 1; c.base = ubase; c.esize = 2; c.nseg = 1; c.vl = 8'(vl);
    run_vec(c, 1'b0, got);
    exp.delete();
    for (int w = 0; w < vl / 4; w++) begin
      automatic logic [127:0] e;
      for (int b = 0; b < 16; b++) e[8*b +: 8] = gbyte(ubase + 32'(16 * w + b), known_init);
      exp.push_back(e);
    end
    got.sort(); exp.sort();
    chk(got == exp, "unit-stride vector load returns the stored block");
    // caching mode: a unit-stride load of untouched lines (two words per line)
    if (known_init) begin
      c.base = ubase + 32'h2000;
      run_vec(c, 1'b0, got);
      exp.delete();
      for (int w = 0; w < vl / 4; w++) begin
        automatic logic [127:0] e;
        for (int b = 0; b < 16; b++) e[8*b +: 8] = gbyte(c.base + 32'(16 * w + b), 1'b1);
        exp.push_back(e);
      end
      got.sort(); exp.sort();
      chk(got == exp, "unit-stride vector load of lines refilled from memory");
    end
    // VSU strided store of VP elements, concurrent CP loads, then VLU strided load
    for (int i = 0; i < vl; i++) vals[i] = $urandom;
    voff = sbase[3:0];
    c = '0; c.unit = 0; c.base = sbase; c.stride = stride; c.esize = 2; c.nseg = 1; c.vl = 8'(vl);
    fork
      run_vec(c, 1'b1, got);
      for (int k = 0; k < 8; k++) cp_access(1'b0, ubase + 32'(16 * k), '0, rd);
    join
    for (int i = 0; i < vl; i++)
      for (int b = 0; b < 4; b++) gold[int'(sbase + stride * i + b)] = vals[i][8*b +: 8];
    run_vec(c, 1'b0, got);
    begin
      automatic logic [31:0] ge [$];
      automatic logic [31:0] ee [$];
      foreach (got[i]) ge.push_back(got[i][8*voff +: 32]);
      for (int i = 0; i < vl; i++) ee.push_back(vals[i]);
      ge.sort(); ee.sort();
      chk(ge == ee, "strided vector load returns the VP elements stored by the VSU");
    end
  endtask

  initial begin
    realtime t0, t1;
    rst_n = 0; vco_ctrl_mv = 12'd1800; clk_sel_ext = 0; clk_div = 0; ram_mode = 1; mem_mode = 2;
    vlu_start = 0; vsu_start = 0; vlu_cmd = '0; vsu_cmd = '0; cl_go = 0;
    ext_req_valid = '0; ext_req_we = '0;
    for (int r = 0; r < NREQ; r++) begin ext_req_addr[r] = 0; ext_req_be[r] = 0; ext_req_wdata[r] = 0; end
    for (int i = 0; i < 4; i++) nregs[i] = 6'd1;
    for (int i = 0; i < 256; i++) vals[i] = 0;
    voff = 0;
    m_hit = 0; m_prim = 0; m_sec = 0; m_wb = 0; m_rpl = 0; m_conf = 0; m_md = 0; m_xport = 0;
    m_vlu = 0; m_vsu = 0; m_cp = 0;
    // 1. clocking
    #100;
    rst_n = 1;
    repeat (3) @(posedge clk);
    t0 = $realtime; @(posedge clk); t1 = $realtime;
    chk($rtoi((t1 - t0) / 1ps + 0.5) == 3846, "core clock from the VCO at 1800 mV (260 MHz)");
    clk_sel_ext = 1; clk_div = 5'd2;
    rst_n = 0; #20 rst_n = 1;
    repeat (3) @(posedge clk);
    t0 = $realtime; @(posedge clk); t1 = $realtime;
    chk($rtoi(t1 - t0 + 0.5) == 30, "external clock divided by 3");
    clk_div = 5'd0;
    rst_n = 0; #20;
    repeat (3) @(posedge clk);
    t0 = $realtime; @(posedge clk); t1 = $realtime;
    chk($rtoi(t1 - t0 + 0.5) == 10, "external clock undivided");
    @(negedge clk);
    rst_n = 1;
    // 2. clusters, running alongside the memory tests below
    cl_go = 1;
    // 3. vector length
    nregs = '{6'd1, 6'd1, 6'd1, 6'd1}; #1 chk(vlmax == 8'd128, "vlmax 128 with one register per VP");
    nregs = '{6'd5, 6'd2, 6'd8, 6'd3}; #1 chk(vlmax == 8'd16, "vlmax with 8 registers per VP");
    nregs = '{6'd32, 6'd1, 6'd1, 6'd1}; #1 chk(vlmax == 8'd4, "vlmax with 32 registers per VP");
    // 4. on-chip RAM mode
    mem_test(1'b0, 32'h0000_1000, 32'h0000_2004, 32'd48, 64);
    chk(m_prim == 0, "no misses in on-chip RAM mode");
    // 5. caching mode, 16-bit memory link
    while (cl_done != '1) @(negedge clk);
    @(negedge clk);
    rst_n = 0; ram_mode = 0; mem_mode = 2'd1;
    gold.delete();
    repeat (3) @(negedge clk);
    rst_n = 1;
    mem_test(1'b1, 32'h0004_0000, 32'h0010_0008, 32'd1024, 64);
    // the same strided vector again: the lines were evicted by each other
    mem_test(1'b1, 32'h0004_0400, 32'h0010_0008, 32'd1024, 40);
    need(m_hit, "cache hits");
    need(m_prim, "primary misses");
    need(m_sec, "secondary misses");
    need(m_rpl, "miss replays");
    need(m_wb, "dirty-line writebacks");
    need(n_refill, "refills over the memory link");
    need(n_wb, "writebacks over the memory link");
    need(m_conf, "bank conflicts");
    need(m_md, "multiply/divide operations");
    need(m_xport, "transport latch updates");
    need(m_vlu, "vector loads");
    need(m_vsu, "vector stores");
    need(m_cp, "control-processor port accesses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
