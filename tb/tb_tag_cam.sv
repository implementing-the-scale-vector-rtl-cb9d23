// Testbench for tag_cam: random tag installs and invalidations against a
// reference table; checks hit, hit index (lowest match), read port and reset.
module tb_tag_cam;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [21:0] match_tag, rd_tag, wr_tag;
  logic hit, rd_valid, wr_en, wr_valid;
  logic [4:0] hit_idx, rd_idx, wr_idx;
  logic [21:0] rtag [32];
  logic        rval [32];

  tag_cam dut (.clk, .rst_n, .match_tag, .hit, .hit_idx, .rd_idx, .rd_tag, .rd_valid,
               .wr_en, .wr_idx, .wr_tag, .wr_valid);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 0; wr_en = 0; wr_idx = 0; wr_tag = 0; wr_valid = 0; match_tag = 0; rd_idx = 0;
    for (int i = 0; i < 32; i++) begin rtag[i] = 0; rval[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      rd_idx = 5'(i); #1;
      chk(!rd_valid, "reset clears valid");
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // a small tag pool so that matches and duplicates happen
      wr_en = $urandom_range(0, 1);
      wr_idx = 5'($urandom);
      wr_tag = 22'($urandom_range(0, 40));
      wr_valid = $urandom_range(0, 5) != 0;
      if (wr_en) begin rtag[wr_idx] = wr_tag; rval[wr_idx] = wr_valid; end
      @(negedge clk);
      wr_en = 0;
      match_tag = 22'($urandom_range(0, 40));
      rd_idx = 5'($urandom);
      #1;
      begin
        automatic logic eh = 0;
        automatic logic [4:0] ei = 0;
        for (int i = 31; i >= 0; i--) if (rval[i] && rtag[i] == match_tag) begin eh = 1; ei = 5'(i); end
        chk(hit == eh, "hit");
        if (eh) chk(hit_idx == ei, "hit index");
        chk(rd_valid == rval[rd_idx], "read valid");
        if (rval[rd_idx]) chk(rd_tag == rtag[rd_idx], "read tag");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
