// Testbench for mem_interface: four banks present random refill and
// writeback requests; an external memory model answers over the pins in
// each of the 8-, 16- and 32-bit modes. Checks that every refill delivers
// the line's words (initial or last written) to the requesting bank with
// its MSHR index, that writebacks reach the model, the number of beats per
// transaction, and that all banks are served.
module tb_mem_interface;
  import scale_pkg::*;
  import tb_mem_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n;
  logic [1:0] mode;
  line_req_t  bank_miss [4];
  logic [3:0] bank_miss_ready;
  line_fill_t bank_fill [4];
  logic out_valid, out_ready, in_valid;
  logic [31:0] out_data, in_data;
  int n_refill, n_wb;
  int out_beats = 0;

  mem_interface dut (.clk, .rst_n, .mode, .bank_miss, .bank_miss_ready, .bank_fill,
                     .out_valid, .out_data, .out_ready, .in_valid, .in_data);
  ext_mem_model #(.LAT(3)) u_mem (.clk, .rst_n, .mode, .out_valid, .out_data, .out_ready,
                                  .in_valid, .in_data, .n_refill, .n_wb);

  // reference copy of memory contents by word address
  logic [31:0] refm [int unsigned];
  function automatic logic [31:0] refrd(input logic [29:0] wa);
    return refm.exists(int'(wa)) ? refm[int'(wa)] : init_word(wa);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid && out_ready) out_beats++;

  // each bank: one outstanding request at a time
  int done_cnt [4];
  int served_wb, served_rf;
  logic pause = 0;
  logic [3:0] active = 0;
  for (genvar b = 0; b < 4; b++) begin : g_b
    initial begin
      bank_miss[b] = '0;
      done_cnt[b] = 0;
      @(posedge rst_n);
      forever begin
        automatic line_req_t r = '0;
        @(negedge clk);
        if (pause || $urandom_range(0, 3) != 0) continue;
        active[b] = 1;
        r.valid = 1;
        r.is_wb = $urandom_range(0, 1);
        r.line  = 27'({$urandom_range(0, 7), 2'(b)});
        r.mshr  = 5'($urandom);
        for (int i = 0; i < 8; i++) r.data[32*i +: 32] = $urandom;
        bank_miss[b] = r;
        do @(negedge clk); while (!g_hs[b].taken);
        bank_miss[b].valid = 0;
        if (r.is_wb) begin
          for (int i = 0; i < 8; i++) refm[int'({r.line, 3'(i)})] = r.data[32*i +: 32];
          served_wb++;
        end else begin
          while (!bank_fill[b].valid) @(negedge clk);
          checks += 2;
          if (bank_fill[b].mshr != r.mshr) begin failures++; $display("FAIL mshr"); end
          for (int i = 0; i < 8; i++)
            if (bank_fill[b].data[32*i +: 32] !== refrd({r.line, 3'(i)})) begin
              failures++; $display("FAIL fill data bank %0d word %0d", b, i); break;
            end
          served_rf++;
        end
        done_cnt[b]++;
        active[b] = 0;
      end
    end
  end
  // record a handshake seen at the clock edge
  for (genvar b = 0; b < 4; b++) begin : g_hs
    logic taken = 0;
    always @(posedge clk) taken <= bank_miss[b].valid && bank_miss_ready[b];
  end

  initial begin
    rst_n = 0; mode = 2'd2; served_wb = 0; served_rf = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      // change mode only while the link is idle
      pause = 1;
      while (active != 0) @(negedge clk);
      repeat (20) @(negedge clk);
      mode = 2'(m);
      pause = 0;
      repeat (4000) @(negedge clk);
    end
    checks++;
    if (served_wb == 0 || served_rf == 0) failures++;
    for (int b = 0; b < 4; b++) begin
      checks++;
      if (done_cnt[b] == 0) begin failures++; $display("FAIL bank %0d starved", b); end
    end
    $display("served refills=%0d writebacks=%0d", served_rf, served_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
