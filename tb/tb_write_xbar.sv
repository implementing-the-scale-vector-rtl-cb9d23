// Testbench for write_xbar: random selections; each bank must see the
// selected requester's write data and byte enables.
module tb_write_xbar;
  int checks = 0, failures = 0;
  logic [127:0] req_wdata [11];
  logic [15:0]  req_be [11];
  logic [3:0]   bank_sel [4];
  logic [127:0] bank_wdata [4];
  logic [15:0]  bank_be [4];
  write_xbar dut (.req_wdata, .req_be, .bank_sel, .bank_wdata, .bank_be);
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int r = 0; r < 11; r++) begin
        req_wdata[r] = {$urandom, $urandom, $urandom, $urandom};
        req_be[r] = 16'($urandom);
      end
      for (int b = 0; b < 4; b++) bank_sel[b] = 4'($urandom_range(0, 10));
      #1;
      for (int b = 0; b < 4; b++) begin
        checks++;
        if (bank_wdata[b] !== req_wdata[bank_sel[b]] || bank_be[b] !== req_be[bank_sel[b]]) begin
          failures++; $display("FAIL bank %0d", b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
