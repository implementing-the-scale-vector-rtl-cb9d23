// Testbench for read_xbar: random bank responses, including several banks
// answering one requester; checks delivery, the lowest-bank-wins rule and
// bank_rsp_ready.
module tb_read_xbar;
  import scale_pkg::*;
  int checks = 0, failures = 0;
  bank_rsp_t    bank_rsp [4];
  logic [3:0]   bank_rsp_ready;
  logic [10:0]  rsp_valid;
  logic [127:0] rsp_data [11];
  int conflicts = 0;
  read_xbar dut (.bank_rsp, .bank_rsp_ready, .rsp_valid, .rsp_data);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 3000; n++) begin
      for (int b = 0; b < 4; b++) begin
        bank_rsp[b].valid = $urandom_range(0, 1);
        bank_rsp[b].rid = 4'($urandom_range(0, 4));
        bank_rsp[b].rdata = {$urandom, $urandom, $urandom, $urandom};
      end
      #1;
      begin
        automatic logic [10:0] ev = 0;
        automatic int winner [11];
        for (int r = 0; r < 11; r++) winner[r] = -1;
        for (int b = 0; b < 4; b++)
          if (bank_rsp[b].valid) begin
            if (winner[bank_rsp[b].rid] < 0) winner[bank_rsp[b].rid] = b;
            else conflicts++;
          end
        for (int b = 0; b < 4; b++) begin
          checks++;
          if (bank_rsp_ready[b] != (bank_rsp[b].valid && winner[bank_rsp[b].rid] == b)) begin
            failures++; $display("FAIL ready %0d", b);
          end
        end
        for (int r = 0; r < 11; r++) begin
          checks++;
          if (rsp_valid[r] != (winner[r] >= 0) ||
              (winner[r] >= 0 && rsp_data[r] !== bank_rsp[winner[r]].rdata)) begin
            failures++; $display("FAIL requester %0d", r);
          end
        end
      end
    end
    checks++;
    if (conflicts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
