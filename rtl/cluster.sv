// Execution datapath of one Scale cluster.
//
// Holds the cluster's 32-entry, two-read/two-write register file, its ALU
// and, when HAS_MULDIV is set (cluster 3), the multiply/divide unit. Each
// cycle it takes one decoded operation: the sources are read from the
// register file (the second may be replaced by an immediate), the ALU result
// is written to rd through write port 0 at the next edge and appears on
// result (res_valid) in the next cycle, to be broadcast on the lane's
// transport bus. A multiply/divide raises busy until its result is written
// (lo goes to rd). Write port 1 is the writeback port for data arriving from
// other clusters or from memory; it wins over port 0 on the same register.
// The decoded-operation format stands in for the AIB instruction encoding,
// which is not part of this design; the execute-directive queue, AIB cache
// and transport/writeback decoupling queues that surround a real cluster are
// not included.
module cluster
  import scale_pkg::*;
#(
  parameter bit HAS_MULDIV = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cl_op_t      op,
  output logic        busy,
  input  logic        wb_en,
  input  logic [4:0]  wb_addr,
  input  logic [31:0] wb_data,
  output logic        res_valid,
  output logic [4:0]  res_rd,
  output logic [31:0] result
);
  logic [31:0] rs1_v, rs2_v, opb, alu_y;
  logic        issue, issue_alu, issue_md;
  logic        md_busy, md_done;
  logic [31:0] md_lo;
  logic [4:0]  md_rd;
  logic        md_wr;
  logic        we0;
  logic [4:0]  wa0;
  logic [31:0] wd0;

  assign issue     = op.valid && !busy;
  assign issue_alu = issue && !op.is_md;
  assign issue_md  = issue && op.is_md && HAS_MULDIV;

  regfile #(.ENTRIES(32), .WIDTH(32)) u_rf (
    .clk,
    .ra0(op.rs1), .rd0(rs1_v),
    .ra1(op.rs2), .rd1(rs2_v),
    .we0, .wa0, .wd0,
    .we1(wb_en), .wa1(wb_addr), .wd1(wb_data)
  );

  // operand B: immediate or register (a preplaced datapath multiplexer)
  dp_mux2 #(.W(32)) u_opb_mux (.s(op.use_imm), .i0(rs2_v), .i1(op.imm), .o(opb));

  cluster_alu u_alu (.op(op.alu_op), .a(rs1_v), .b(opb), .y(alu_y));

  if (HAS_MULDIV) begin : g_md
    logic [31:0] md_hi_unused;
    muldiv u_md (
      .clk, .rst_n, .start(issue_md), .op(op.md_op), .a(rs1_v), .b(opb),
      .busy(md_busy), .done(md_done), .lo(md_lo), .hi(md_hi_unused)
    );
  end else begin : g_nomd
    assign md_busy = 1'b0;
    assign md_done = 1'b0;
    assign md_lo   = '0;
  end

  assign busy = md_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      md_rd <= '0;
      md_wr <= 1'b0;
    end else if (issue_md) begin
      md_rd <= op.rd;
      md_wr <= op.wr;
    end
  end

  // write port 0: the ALU result, or a finished multiply/divide
  always_comb begin
    we0 = issue_alu && op.wr;
    wa0 = op.rd;
    wd0 = alu_y;
    if (md_done) begin
      we0 = md_wr;
      wa0 = md_rd;
      wd0 = md_lo;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_rd    <= '0;
      result    <= '0;
    end else begin
      res_valid <= issue_alu || md_done;
      if (issue_alu || md_done) begin
        res_rd <= wa0;
        result <= wd0;
      end
    end
  end

  // operations are not issued while a multiply/divide runs
  assert property (@(posedge clk) disable iff (!rst_n) op.valid |-> !busy);
endmodule
