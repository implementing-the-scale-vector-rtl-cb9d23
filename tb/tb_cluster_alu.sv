// Testbench for cluster_alu: every operation on random and corner operands,
// compared with results computed here.
module tb_cluster_alu;
  import scale_pkg::*;
  int checks = 0, failures = 0;
  alu_op_t op;
  logic [31:0] a, b, y;

  cluster_alu dut (.op, .a, .b, .y);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alu_op_t o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_NOR:  return ~(x | z);
      ALU_SLL:  return x << z[4:0];
      ALU_SRL:  return x >> z[4:0];
      ALU_SRA:  return $unsigned($signed(x) >>> z[4:0]);
      ALU_SLT:  return {31'b0, $signed(x) < $signed(z)};
      ALU_SLTU: return {31'b0, x < z};
      default:  return 'x;
    endcase
  endfunction

  initial begin
    logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1F};
    for (int n = 0; n < 4000; n++) begin
      op = alu_op_t'($urandom_range(0, 10));
      a = ($urandom_range(0, 3) == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      b = ($urandom_range(0, 3) == 0) ? corner[$urandom_range(0, 5)] : $urandom;
      #1;
      checks++;
      if (y !== model(op, a, b)) begin
        failures++;
        $display("FAIL op=%s a=%h b=%h y=%h", op.name(), a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
