// Testbench for clock_gen: for each root clock and every divisor 1..32,
// measures the output period and high time in root-clock periods.
module tb_clock_gen;
  int checks = 0, failures = 0;
  logic vco_clk = 0, ext_clk = 0, sel_ext, rst_n, clk_out;
  logic [4:0] div;
  always #7 vco_clk = ~vco_clk;     // 14-unit period
  always #5 ext_clk = ~ext_clk;     // 10-unit period
  clock_gen dut (.vco_clk, .ext_clk, .sel_ext, .div, .rst_n, .clk_out);
  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int s = 0; s < 2; s++) begin
      automatic int per = s ? 10 : 14;
      sel_ext = s[0];
      for (int d = 1; d <= 32; d++) begin
        time t0, t1, t2;
        rst_n = 0; div = 5'(d - 1);
        #100 rst_n = 1;
        // skip two output periods
        repeat (3) @(posedge clk_out);
        t0 = $time;
        @(negedge clk_out); t1 = $time;
        @(posedge clk_out); t2 = $time;
        checks += 2;
        if (t2 - t0 != time'(d * per)) begin
          failures++; $display("FAIL period div=%0d sel=%0d: %0t", d, s, t2 - t0);
        end
        if (t1 - t0 != time'((d == 1) ? per / 2 : (d / 2) * per)) begin
          failures++; $display("FAIL high time div=%0d: %0t", d, t1 - t0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
