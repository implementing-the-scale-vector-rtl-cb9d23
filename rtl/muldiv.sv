// Multiply/divide unit of Scale cluster 3 (and of the control processor).
//
// MD_MUL16 multiplies the signed low halves of a and b (16x16 -> 32 bits) in
// one step. MD_MUL/MD_MULU (signed/unsigned 32x32 -> 64) and MD_DIV/MD_DIVU
// (quotient and remainder) are iterative, one bit per cycle: shift-and-add
// multiplication and restoring division on magnitudes, with the signs fixed
// at the end. Pulse start (while !busy) with op, a and b; busy stays high
// until the cycle in which done pulses with the result on lo/hi:
//   MD_MUL16: done 1 cycle after start, lo = product, hi = sign extension
//   32-bit:   done 33 cycles after start; lo = product low / quotient,
//             hi = product high / remainder.
// The algorithms and latencies are this design's choice. Division by zero
// gives quotient all-ones and remainder = dividend.
module muldiv
  import scale_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  md_op_t      op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        busy,
  output logic        done,
  output logic [31:0] lo,
  output logic [31:0] hi
);
  typedef enum logic [1:0] {D_IDLE, D_M16, D_ITER, D_FIX} dstate_t;
  dstate_t state;

  md_op_t      op_q;
  logic [5:0]  cnt;
  logic [31:0] ma, mb;        // operand magnitudes
  logic [63:0] acc;           // mul: {hi, lo} product; div: {rem, quotient}
  logic        neg_lo, neg_hi;
  logic        is_div;
  logic [32:0] trial;

  function automatic logic [31:0] mag(input logic [31:0] v, input logic s);
    return (s && v[31]) ? -v : v;
  endfunction

  assign is_div = (op_q == MD_DIV) || (op_q == MD_DIVU);
  assign trial  = {acc[63:31]} - {1'b0, mb};
  assign busy   = (state != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      done  <= 1'b0;
      op_q  <= MD_MUL;
      cnt   <= '0;
      ma    <= '0;
      mb    <= '0;
      acc   <= '0;
      lo    <= '0;
      hi    <= '0;
      neg_lo <= 1'b0;
      neg_hi <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: if (start) begin
          op_q <= op;
          if (op == MD_MUL16) begin
            acc   <= 64'($signed(a[15:0]) * $signed(b[15:0]));
            state <= D_M16;
          end else begin
            logic s;
            s   = (op == MD_MUL) || (op == MD_DIV);
            ma  <= mag(a, s);
            mb  <= mag(b, s);
            acc <= (op == MD_DIV || op == MD_DIVU) ? {32'b0, mag(a, s)} : 64'b0;
            neg_lo <= s && (a[31] ^ b[31]) && (b != 0 || op == MD_MUL);
            neg_hi <= s && ((op == MD_MUL) ? (a[31] ^ b[31]) : a[31]);
            cnt   <= 6'd32;
            state <= D_ITER;
          end
        end
        D_M16: begin
          lo    <= acc[31:0];
          hi    <= {32{acc[31]}};
          done  <= 1'b1;
          state <= D_IDLE;
        end
        D_ITER: begin
          if (is_div) begin
            // restoring division: shift {rem, q} left, try subtracting
            if (!trial[32]) acc <= {trial[31:0], acc[30:0], 1'b1};
            else            acc <= {acc[62:0], 1'b0};
          end else begin
            // shift-and-add on the multiplier's bits, LSB first
            acc <= {(ma[0] ? {1'b0, acc[63:32]} + {1'b0, mb} : {1'b0, acc[63:32]}), acc[31:1]};
            ma  <= ma >> 1;
          end
          cnt <= cnt - 1'b1;
          if (cnt == 6'd1) state <= D_FIX;
        end
        D_FIX: begin
          if (is_div) begin
            lo <= (mb == 0) ? '1 : (neg_lo ? -acc[31:0] : acc[31:0]);
            hi <= neg_hi ? -acc[63:32] : acc[63:32];
          end else begin
            {hi, lo} <= neg_lo ? -acc : acc;
          end
          done  <= 1'b1;
          state <= D_IDLE;
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
endmodule
