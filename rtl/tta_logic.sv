// tta_logic -- bitwise logic function unit of the TTA processor.
//
// Same socket timing as the other single-cycle units: operand port O1 is
// latched (or taken from the bus when written in the trigger instruction), a
// move to the trigger port T with an opcode computes O1 op T into the result
// register, readable from the next instruction on. Latency 1.
// Operations AND, IOR and XOR are this design's choice; the unit is only named
// in the processor drawing.
module tta_logic
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
  word_t o1_q, a, res_d;

  assign a = o1_we ? o1_in : o1_q;

  always_comb begin
    unique case (logic_op_e'(t_op))
      LOG_AND: res_d = a & t_in;
      LOG_IOR: res_d = a | t_in;
      LOG_XOR: res_d = a ^ t_in;
      default: res_d = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_q   <= '0;
      result <= '0;
    end else begin
      if (o1_we) o1_q   <= o1_in;
      if (t_we)  result <= res_d;
    end
  end
endmodule
