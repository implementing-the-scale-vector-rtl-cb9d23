// Testbench for dp_latch_h_en: the output follows d_n while the clock is
// high and the enable was set at the rising edge, and holds otherwise.
module tb_dp_latch_h_en;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic en_p;
  logic [31:0] d_n, q_np, exp;
  dp_latch_h_en #(.W(32)) dut (.clk, .d_n, .en_p, .q_np);
  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input string what);
    checks++;
    if (q_np !== exp) begin failures++; $display("FAIL %s q=%h exp=%h", what, q_np, exp); end
  endtask
  initial begin
    // load a known value
    en_p = 1; d_n = 32'h1234_5678; #5 clk = 1; #5 clk = 0;
    exp = 32'h1234_5678;
    #1 chk("initial load");
    for (int n = 0; n < 2000; n++) begin
      // low phase: set up the enable and data
      en_p = $urandom_range(0, 1);
      d_n = $urandom;
      #4;
      clk = 1;
      #1;
      if (en_p) exp = d_n;
      chk("after rising edge");
      // data changes during the high phase pass through only when enabled
      d_n = $urandom;
      en_p = ~en_p;           // enable changes during high phase do not matter
      #1;
      if (!en_p) exp = d_n;   // en_p was inverted: original enable is !en_p
      chk("transparent high phase");
      #3;
      clk = 0;
      #1;
      d_n = $urandom;
      #1;
      chk("hold in low phase");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
