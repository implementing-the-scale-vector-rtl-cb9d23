// Testbench for cluster (with the multiply/divide unit): a random stream of
// ALU, immediate, multiply/divide and external-writeback operations checked
// against a register-file model; every result and the final register
// contents are compared.
module tb_cluster;
  import scale_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, busy, wb_en, res_valid;
  logic [4:0] wb_addr, res_rd;
  logic [31:0] wb_data, result;
  cl_op_t op;
  logic [31:0] R [32];
  int n_md = 0, n_wb = 0;

  cluster #(.HAS_MULDIV(1'b1)) dut (.clk, .rst_n, .op, .busy, .wb_en, .wb_addr, .wb_data,
                                   .res_valid, .res_rd, .result);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  task automatic expect_result(input logic [31:0] v, input logic [4:0] rd);
    // result appears one cycle after the write edge
    checks++;
    if (!(res_valid && result === v && res_rd == rd)) begin
      failures++;
      $display("FAIL result v=%b got %h exp %h", res_valid, result, v);
    end
  endtask

  initial begin
    rst_n = 0; op = '0; wb_en = 0; wb_addr = 0; wb_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initialise registers through the writeback port
    for (int i = 0; i < 32; i++) begin
      wb_en = 1; wb_addr = 5'(i); wb_data = $urandom; R[i] = wb_data;
      @(negedge clk);
    end
    wb_en = 0;
    for (int n = 0; n < 3000; n++) begin
      automatic cl_op_t o = '0;
      automatic logic [31:0] bv, v;
      o.valid = 1;
      o.rs1 = 5'($urandom); o.rs2 = 5'($urandom); o.rd = 5'($urandom);
      o.use_imm = $urandom_range(0, 1);
      o.imm = $urandom_range(0, 1) ? 32'($urandom_range(0, 40)) : $urandom;
      o.wr = $urandom_range(0, 7) != 0;
      o.is_md = $urandom_range(0, 9) == 0;
      o.alu_op = alu_op_t'($urandom_range(0, 10));
      o.md_op = md_op_t'($urandom_range(0, 4));
      bv = o.use_imm ? o.imm : R[o.rs2];
      v = o.is_md ? md(o.md_op, R[o.rs1], bv) : alu(o.alu_op, R[o.rs1], bv);
      // sometimes an external writeback in the same cycle, to another register
      wb_en = !o.is_md && $urandom_range(0, 3) == 0;
      wb_addr = 5'($urandom); wb_data = $urandom;
      op = o;
      @(negedge clk);
      op = '0;
      if (o.is_md) begin
        n_md++;
        while (busy) @(negedge clk);
        @(negedge clk);   // done: written at the next edge
        expect_result(v, o.rd);
        if (o.wr) R[o.rd] = v;
      end else begin
        if (o.wr) R[o.rd] = v;
        if (wb_en) begin R[wb_addr] = wb_data; n_wb++; end
        wb_en = 0;
        expect_result(v, o.rd);
      end
    end
    // read back every register through an OR with zero immediate
    for (int i = 0; i < 32; i++) begin
      op = '0; op.valid = 1; op.alu_op = ALU_OR; op.rs1 = 5'(i); op.use_imm = 1; op.imm = 0; op.rd = 5'(i); op.wr = 0;
      @(negedge clk);
      op = '0;
      expect_result(R[i], 5'(i));
    end
    checks++;
    if (n_md == 0 || n_wb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
