// Cluster arithmetic unit: adder, logic unit and shifter.
//
// The operands are AND-gated onto three private buses, so only the unit the
// operation uses sees its inputs change (the data gating the Scale clusters
// use to save power); the result is chosen by a final multiplexer.
// Combinational. The operation set is a MIPS-like choice of this design:
// add, sub, set-less-than (signed/unsigned) in the adder; and, or, xor, nor
// in the logic unit; shifts by b[4:0] in the shifter.
module cluster_alu
  import scale_pkg::*;
(
  input  alu_op_t     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        use_add, use_log, use_sh;
  logic [31:0] add_a, add_b, log_a, log_b, sh_a;
  logic [4:0]  sh_b;
  logic [32:0] sum;
  logic [31:0] add_y, log_y, sh_y;
  logic        sub;

  assign use_add = op inside {ALU_ADD, ALU_SUB, ALU_SLT, ALU_SLTU};
  assign use_log = op inside {ALU_AND, ALU_OR, ALU_XOR, ALU_NOR};
  assign use_sh  = op inside {ALU_SLL, ALU_SRL, ALU_SRA};
  assign sub     = (op != ALU_ADD);

  // data gating
  assign add_a = a & {32{use_add}};
  assign add_b = b & {32{use_add}};
  assign log_a = a & {32{use_log}};
  assign log_b = b & {32{use_log}};
  assign sh_a  = a & {32{use_sh}};
  assign sh_b  = b[4:0] & {5{use_sh}};

  // adder (subtract for sub and compares)
  assign sum = {1'b0, add_a} + {1'b0, sub ? ~add_b : add_b} + 33'(sub);

  always_comb begin
    unique case (op)
      ALU_SLT:  add_y = {31'b0, (add_a[31] != add_b[31]) ? add_a[31] : sum[31]};
      ALU_SLTU: add_y = {31'b0, ~sum[32]};
      default:  add_y = sum[31:0];
    endcase
  end

  always_comb begin
    unique case (op)
      ALU_AND: log_y = log_a & log_b;
      ALU_OR:  log_y = log_a | log_b;
      ALU_XOR: log_y = log_a ^ log_b;
      default: log_y = ~(log_a | log_b);
    endcase
  end

  always_comb begin
    unique case (op)
      ALU_SLL: sh_y = sh_a << sh_b;
      ALU_SRA: sh_y = $unsigned($signed(sh_a) >>> sh_b);
      default: sh_y = sh_a >> sh_b;
    endcase
  end

  assign y = use_add ? add_y : use_log ? log_y : sh_y;
endmodule
