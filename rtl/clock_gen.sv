// Core clock generator of the Scale chip.
//
// Selects the root clock, the on-chip VCO or an external clock input, and
// divides it by any integer from 1 to 32 (div = divisor - 1). With div = 0
// the root clock passes straight through; otherwise a counter on the root
// clock produces an output that is high for floor(N/2) root cycles of every
// N. Switching root or divisor while running can produce one short pulse;
// the chip's tuning of memory-clock phase is not modelled. The counter
// scheme is this design's choice.
module clock_gen #(
  parameter int unsigned MAXDIV = 32,
  localparam int unsigned DW = $clog2(MAXDIV)
) (
  input  logic          vco_clk,
  input  logic          ext_clk,
  input  logic          sel_ext,
  input  logic [DW-1:0] div,
  input  logic          rst_n,
  output logic          clk_out
);
  logic          root;
  logic [DW-1:0] cnt;
  logic          div_q;
  logic [DW:0]   n;

  assign root = sel_ext ? ext_clk : vco_clk;
  assign n    = {1'b0, div} + 1'b1;

  always_ff @(posedge root or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      div_q <= 1'b0;
    end else begin
      cnt   <= (cnt >= div) ? '0 : cnt + 1'b1;
      // high for the first floor(N/2) counts of each period
      div_q <= ((cnt >= div) ? 0 : (DW+1)'(cnt) + 1'b1) < (n >> 1);
    end
  end

  assign clk_out = (div == '0) ? root : div_q;
endmodule
