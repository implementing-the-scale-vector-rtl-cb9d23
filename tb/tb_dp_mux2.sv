// Testbench for dp_mux2: random data and select.
module tb_dp_mux2;
  int checks = 0, failures = 0;
  logic s;
  logic [31:0] i0, i1, o;
  dp_mux2 #(.W(32)) dut (.s, .i0, .i1, .o);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 1000; n++) begin
      s = $urandom_range(0, 1); i0 = $urandom; i1 = $urandom;
      #1;
      checks++;
      if (o !== (s ? i1 : i0)) begin failures++; $display("FAIL"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
