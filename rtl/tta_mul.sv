// tta_mul -- multiplier function unit of the TTA processor.
//
// Multiplies operand port O1 by the value moved to the trigger port T and
// keeps the low 32 bits of the product (the only opcode, MUL = 0). On the
// FPGA a 32x32 product of which the low word is kept maps onto three 18x18
// hard multipliers. The result is readable from the instruction after the
// trigger (latency 1). Opcode set and latency are this design's choice.
module tta_mul
  import tta_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        o1_we,
  input  word_t       o1_in,
  input  logic        t_we,
  input  logic [3:0]  t_op,
  input  word_t       t_in,
  output word_t       result
);
  word_t o1_q, a;

  assign a = o1_we ? o1_in : o1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_q   <= '0;
      result <= '0;
    end else begin
      if (o1_we) o1_q <= o1_in;
      if (t_we && t_op == 4'd0) result <= a * t_in;
    end
  end
endmodule
