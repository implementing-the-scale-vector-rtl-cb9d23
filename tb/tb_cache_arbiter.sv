// Testbench for cache_arbiter: random request patterns; checks that each
// bank grants exactly one requester when any valid requester addresses it
// and it is ready, that grants go only to requesters addressing a granted
// bank, that up to four grants happen in one cycle, and that round-robin
// priority serves every requester of a contended bank within NREQ cycles.
module tb_cache_arbiter;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [10:0] req_valid, grant;
  logic [1:0]  req_bank [11];
  logic [3:0]  bank_ready, bank_valid;
  logic [3:0]  bank_sel [4];
  int four_grants = 0;

  cache_arbiter dut (.clk, .rst_n, .req_valid, .req_bank, .bank_ready, .grant, .bank_valid, .bank_sel);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 0; req_valid = 0; bank_ready = 0;
    for (int r = 0; r < 11; r++) req_bank[r] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // random traffic
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      req_valid = 11'($urandom);
      for (int r = 0; r < 11; r++) req_bank[r] = 2'($urandom);
      bank_ready = ($urandom_range(0, 3) == 0) ? 4'($urandom) : 4'hF;
      #1;
      for (int b = 0; b < 4; b++) begin
        automatic logic want = 0;
        for (int r = 0; r < 11; r++) if (req_valid[r] && req_bank[r] == 2'(b)) want = 1;
        chk(bank_valid[b] == (want && bank_ready[b]), "bank valid");
        if (bank_valid[b]) chk(req_valid[bank_sel[b]] && req_bank[bank_sel[b]] == 2'(b) && grant[bank_sel[b]], "bank sel");
      end
      for (int r = 0; r < 11; r++)
        if (grant[r]) chk(bank_valid[req_bank[r]] && bank_sel[req_bank[r]] == 4'(r), "grant consistent");
      if ($countones(grant) == 4) four_grants++;
    end
    chk(four_grants > 0, "four simultaneous accesses");
    // fairness: all 11 requesters hold a request to bank 2
    @(negedge clk);
    req_valid = '1; bank_ready = 4'hF;
    for (int r = 0; r < 11; r++) req_bank[r] = 2'd2;
    begin
      automatic logic [10:0] served = 0;
      for (int c = 0; c < 11; c++) begin
        #1;
        served |= grant;
        chk($countones(grant) == 1, "one grant per bank");
        @(negedge clk);
      end
      chk(served == '1, "round robin serves every requester in 11 cycles");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
