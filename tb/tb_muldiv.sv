// Testbench for muldiv: random signed/unsigned multiplies and divides and
// 16x16 multiplies, with corner operands (zero divisor, most negative
// dividend); checks results against SystemVerilog arithmetic and the
// latency (2 cycles from start to done for MD_MUL16, 34 for 32-bit ops,
// counting the start cycle).
module tb_muldiv;
  import scale_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n, start, busy, done;
  md_op_t op;
  logic [31:0] a, b, lo, hi;

  muldiv dut (.clk, .rst_n, .start, .op, .a, .b, .busy, .done, .lo, .hi);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input md_op_t o, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] elo, ehi;
    logic [63:0] p;
    int cyc;
    case (o)
      MD_MUL16: begin p = 64'($signed(x[15:0]) * $signed(y[15:0])); elo = p[31:0]; ehi = {32{p[31]}}; end
      MD_MUL:   begin p = $signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y}); elo = p[31:0]; ehi = p[63:32]; end
      MD_MULU:  begin p = {32'b0, x} * {32'b0, y}; elo = p[31:0]; ehi = p[63:32]; end
      MD_DIV: begin
        if (y == 0) begin elo = '1; ehi = x; end
        else if (x == 32'h8000_0000 && y == '1) begin elo = x; ehi = 0; end
        else begin elo = $signed(x) / $signed(y); ehi = $signed(x) % $signed(y); end
      end
      default: begin
        if (y == 0) begin elo = '1; ehi = x; end
        else begin elo = x / y; ehi = x % y; end
      end
    endcase
    @(negedge clk);
    start = 1; op = o; a = x; b = y;
    @(negedge clk);
    start = 0; a = $urandom; b = $urandom;   // operands need not be held
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks += 3;
    if (lo !== elo || hi !== ehi) begin
      failures++;
      $display("FAIL %s %h %h -> %h %h exp %h %h", o.name(), x, y, hi, lo, ehi, elo);
    end
    if (cyc != ((o == MD_MUL16) ? 2 : 34)) begin
      failures++;
      $display("FAIL latency %s %0d", o.name(), cyc);
    end
    @(negedge clk);
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    logic [31:0] corner [5] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF};
    rst_n = 0; start = 0; op = MD_MUL; a = 0; b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++)
        for (int o = 0; o < 5; o++) run(md_op_t'(o), corner[i], corner[j]);
    for (int n = 0; n < 1500; n++)
      run(md_op_t'($urandom_range(0, 4)), $urandom, ($urandom_range(0, 3) == 0) ? 32'($urandom_range(0, 300)) : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
