// Testbench for regfile: random traffic on both write ports and both read
// ports against a reference array, including same-entry write collisions
// (port 1 wins) and read-during-write (old value).
module tb_regfile;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] ra0, ra1, wa0, wa1;
  logic [31:0] rd0, rd1, wd0, wd1;
  logic we0, we1;
  logic [31:0] ref_r [32];
  int collisions = 0;

  regfile dut (.clk, .ra0, .rd0, .ra1, .rd1, .we0, .wa0, .wd0, .we1, .wa1, .wd1);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we0 = 0; we1 = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0; ra0 = 0; ra1 = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we0 = 1; wa0 = 5'(i); wd0 = $urandom; ref_r[i] = wd0;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      we0 = $urandom_range(0, 1); we1 = $urandom_range(0, 1);
      wa0 = 5'($urandom); wa1 = ($urandom_range(0, 3) == 0) ? wa0 : 5'($urandom);
      wd0 = $urandom; wd1 = $urandom;
      ra0 = 5'($urandom); ra1 = ($urandom_range(0, 1)) ? wa0 : 5'($urandom);
      #1;
      checks += 2;
      if (rd0 !== ref_r[ra0]) begin failures++; $display("FAIL rd0"); end
      if (rd1 !== ref_r[ra1]) begin failures++; $display("FAIL rd1"); end
      if (we0) ref_r[wa0] = wd0;
      if (we1) ref_r[wa1] = wd1;
      if (we0 && we1 && wa0 == wa1) collisions++;
    end
    checks++;
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
