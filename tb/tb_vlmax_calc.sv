// Testbench for vlmax_calc: exhaustive over a single cluster's register
// count, then random combinations of four counts.
module tb_vlmax_calc;
  int checks = 0, failures = 0;
  logic [5:0] nregs [4];
  logic [7:0] vlmax;
  vlmax_calc dut (.nregs, .vlmax);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int expv(int m);
    if (m < 1) m = 1;
    return 4 * (32 / m);
  endfunction
  initial begin
    for (int k = 0; k <= 32; k++) begin
      nregs = '{6'(k), 6'd1, 6'd0, 6'd1};
      #1; checks++;
      if (vlmax != 8'(expv(k))) begin failures++; $display("FAIL k=%0d vl=%0d", k, vlmax); end
    end
    nregs = '{6'd1, 6'd1, 6'd1, 6'd1};
    #1; checks++;
    if (vlmax != 8'd128) begin failures++; $display("FAIL 128 VPs"); end
    for (int n = 0; n < 500; n++) begin
      automatic int m = 0;
      for (int c = 0; c < 4; c++) begin
        nregs[c] = 6'($urandom_range(0, 32));
        if (nregs[c] > m) m = nregs[c];
      end
      #1; checks++;
      if (vlmax != 8'(expv(m))) begin failures++; $display("FAIL random"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
