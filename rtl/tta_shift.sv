// tta_shift -- shifter function unit of the TTA processor.
//
// Operand port O1 holds the value to shift, the trigger port T the shift
// amount (its low 5 bits). Opcodes: SHL (left), SHR (arithmetic right),
// SHRU (logical right). The result register is written at the end of the
// trigger cycle and is readable from the next instruction on (latency 1).
// The operation set is this design's choice; the unit is only named in the
// processor drawing.
module tta_shift
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
  logic [4:0] sh;

  assign a  = o1_we ? o1_in : o1_q;
  assign sh = t_in[4:0];

  always_comb begin
    unique case (shift_op_e'(t_op))
      SH_SHL:  res_d = a << sh;
      SH_SHR:  res_d = word_t'($signed(a) >>> sh);
      SH_SHRU: res_d = a >> sh;
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
