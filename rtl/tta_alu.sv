// tta_alu -- arithmetic and compare function unit of the TTA processor.
//
// Two input sockets: operand port O1 (latched) and trigger port T. A move to
// T with an opcode starts the operation; O1 may be written in the same
// instruction, in which case the value on the bus is used directly. The result
// register is updated at the end of the trigger cycle, so the result can be
// moved out from the next instruction on, and it holds until the next trigger.
// Latency 1. Compare operations (EQ, GT, GTU) return 0 or 1, which programs
// move into the boolean register file to guard later moves.
// The operation set is this design's own choice; the unit is only named in
// the processor drawing.
module tta_alu
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
    unique case (alu_op_e'(t_op))
      ALU_ADD:  res_d = a + t_in;
      ALU_SUB:  res_d = a - t_in;
      ALU_EQ:   res_d = word_t'(a == t_in);
      ALU_GT:   res_d = word_t'($signed(a) > $signed(t_in));
      ALU_GTU:  res_d = word_t'(a > t_in);
      ALU_MAX:  res_d = ($signed(a) > $signed(t_in)) ? a : t_in;
      ALU_MIN:  res_d = ($signed(a) < $signed(t_in)) ? a : t_in;
      ALU_MAXU: res_d = (a > t_in) ? a : t_in;
      ALU_MINU: res_d = (a < t_in) ? a : t_in;
      default:  res_d = '0;
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
