// tta_lsu -- load/store unit of the TTA processor.
//
// Operand port O1 holds store data, the trigger port T the word address.
// LDW (opcode 0) issues a read of the synchronous data memory in the trigger
// cycle; the word returns one cycle later and is captured in the result
// register, so a load result can be moved out from the second instruction
// after the trigger (latency 2). STW (opcode 1) writes O1 to the address in the
// trigger cycle. Addresses count 32-bit words. Only whole-word accesses exist;
// the opcode set, word addressing and latency are this design's choices.
module tta_lsu
  import tta_pkg::*;
#(
  parameter int unsigned ADDR_W = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              o1_we,
  input  word_t             o1_in,
  input  logic              t_we,
  input  logic [3:0]        t_op,
  input  word_t             t_in,
  output word_t             result,
  // data memory port
  output logic              mem_en,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output word_t             mem_wdata,
  input  word_t             mem_rdata
);
  word_t o1_q;
  logic  ld_pending;

  assign mem_en    = t_we && (t_op == LSU_LDW || t_op == LSU_STW);
  assign mem_we    = t_we && t_op == LSU_STW;
  assign mem_addr  = t_in[ADDR_W-1:0];
  assign mem_wdata = o1_we ? o1_in : o1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      o1_q       <= '0;
      result     <= '0;
      ld_pending <= 1'b0;
    end else begin
      if (o1_we) o1_q <= o1_in;
      ld_pending <= t_we && t_op == LSU_LDW;
      if (ld_pending) result <= mem_rdata;
    end
  end
endmodule
