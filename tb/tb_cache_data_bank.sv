// Testbench for cache_data_bank: random byte-masked writes and reads against
// a reference array; checks one-cycle read latency and that rdata holds
// through writes and idle cycles.
module tb_cache_data_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic en, we;
  logic [8:0] addr;
  logic [15:0] be;
  logic [127:0] wdata, rdata;
  logic [127:0] ref_mem [512];

  cache_data_bank dut (.clk, .en, .we, .addr, .be, .wdata, .rdata);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [127:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    en = 0; we = 0; addr = 0; be = 0; wdata = 0;
    // fill every word
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 9'(i); be = '1;
      wdata = {$urandom, $urandom, $urandom, $urandom};
      ref_mem[i] = wdata;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      addr = 9'($urandom_range(0, 511));
      en = 1;
      we = $urandom_range(0, 2) == 0;
      be = 16'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      if (we) begin
        for (int b = 0; b < 16; b++) if (be[b]) ref_mem[addr][8*b +: 8] = wdata[8*b +: 8];
      end else begin
        automatic logic [127:0] exp = ref_mem[addr];
        @(negedge clk);
        en = 0;
        check(rdata, exp, "read after one cycle");
        // rdata holds over an idle cycle and a write
        @(negedge clk);
        check(rdata, exp, "hold idle");
        en = 1; we = 1; be = '0; addr = 9'($urandom_range(0, 511));
        @(negedge clk);
        en = 0; we = 0;
        check(rdata, exp, "hold across write");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
