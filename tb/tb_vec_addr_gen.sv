// Testbench for vec_addr_gen: random unit-stride and segment-strided
// commands with random acceptance stalls; checks every access address,
// index and lane against a list computed here, the access count, and that
// done pulses with the last access.
module tb_vec_addr_gen;
  import scale_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, busy, acc_valid, acc_ready, done;
  vcmd_t cmd;
  logic [31:0] acc_addr;
  logic [11:0] acc_index;
  logic [1:0]  acc_lane;

  vec_addr_gen dut (.clk, .rst_n, .start, .cmd, .busy, .acc_valid, .acc_addr, .acc_index,
                    .acc_lane, .acc_ready, .done);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 0; start = 0; cmd = '0; acc_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      automatic vcmd_t c = '0;
      automatic logic [31:0] exp_addr [$];
      automatic int got = 0;
      c.unit   = $urandom_range(0, 1);
      c.esize  = 2'($urandom_range(0, 2));
      c.nseg   = 4'($urandom_range(1, 4));
      c.vl     = 8'($urandom_range(1, 128));
      c.base   = {$urandom_range(0, 4095), 4'b0} + 32'($urandom_range(0, 15) & ~((1 << c.esize) - 1));
      c.stride = 32'($urandom_range(1, 64)) << 4;
      if (c.unit) begin
        automatic int unsigned bytes = int'(c.vl) * int'(c.nseg) << c.esize;
        for (int unsigned w = c.base >> 4; w <= (c.base + bytes - 1) >> 4; w++) exp_addr.push_back(w << 4);
      end else begin
        for (int i = 0; i < c.vl; i++) exp_addr.push_back(c.base + i * c.stride);
      end
      @(negedge clk);
      cmd = c; start = 1;
      @(negedge clk);
      start = 0;
      while (got < exp_addr.size()) begin
        acc_ready = $urandom_range(0, 2) != 0;
        #1;
        chk(acc_valid, "valid while accesses remain");
        if (acc_ready) begin
          chk(acc_addr == exp_addr[got], "address");
          chk(acc_index == 12'(got), "index");
          if (!c.unit) chk(acc_lane == 2'(got), "lane = VP mod 4");
          chk(done == (got == exp_addr.size() - 1), "done with last access");
          got++;
        end
        @(negedge clk);
      end
      acc_ready = 0;
      chk(!busy && !acc_valid, "idle after command");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
