// Testbench for the vco behavioural model: measures the period at several
// control voltages and checks the linear model (260 MHz at 1800 mV).
module tb_vco;
  int checks = 0, failures = 0;
  logic [11:0] vctrl_mv;
  logic clk;
  vco dut (.vctrl_mv, .clk);
  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    static int mv [4] = '{1800, 1200, 2400, 900};
    for (int i = 0; i < 4; i++) begin
      realtime t0, t1;
      int expp;
      vctrl_mv = 12'(mv[i]);
      repeat (3) @(posedge clk);
      t0 = $realtime;
      @(posedge clk);
      t1 = $realtime;
      expp = 2 * ((3846 * 1800 / mv[i]) / 2);
      checks++;
      if ($rtoi((t1 - t0) / 1ps + 0.5) != expp) begin
        failures++; $display("FAIL %0d mV: period %0d ps exp %0d", mv[i], $rtoi((t1 - t0) / 1ps + 0.5), expp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
