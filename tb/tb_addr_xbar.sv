// Testbench for addr_xbar: random selections; each bank must see the
// selected requester's address and operation, tagged with its id.
module tb_addr_xbar;
  int checks = 0, failures = 0;
  logic [10:0] req_we;
  logic [31:0] req_addr [11];
  logic [3:0]  bank_sel [4];
  logic        bank_we [4];
  logic [31:0] bank_addr [4];
  logic [3:0]  bank_rid [4];
  addr_xbar dut (.req_we, .req_addr, .bank_sel, .bank_we, .bank_addr, .bank_rid);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      req_we = 11'($urandom);
      for (int r = 0; r < 11; r++) req_addr[r] = $urandom;
      for (int b = 0; b < 4; b++) bank_sel[b] = 4'($urandom_range(0, 10));
      #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (bank_addr[b] !== req_addr[bank_sel[b]] || bank_we[b] !== req_we[bank_sel[b]] || bank_rid[b] !== bank_sel[b]) begin
          failures++; $display("FAIL bank %0d", b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
