// tta_gcu -- global control unit (program counter and instruction fetch).
//
// The processor starts locked. A one-cycle pulse on tta_start unlocks it and
// fetches the instruction at address 0. The instruction memory is synchronous:
// the address presented in one cycle returns its instruction in the next,
// which is then executed while the following address is fetched. exec_en marks
// the cycles in which an instruction is valid and its moves take effect.
// Trigger opcodes of the GCU: JUMP (target in the moved word), CALL (as JUMP,
// saving pc+1 in the return-address register ra, readable as a source) and
// HALT. A taken jump steers the very next fetch, so there are no delay slots.
// HALT stops fetching, locks the processor and raises tta_complete, which
// stays high until the next tta_start. While locked no unit is triggered, so
// the data memory is left alone for the host to copy out.
// The start/complete handshake follows the interface description; the opcode
// set, restart at address 0 and the missing delay slots are this design's.
module tta_gcu
  import tta_pkg::*;
#(
  parameter int unsigned PC_W = 10
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tta_start,
  output logic            tta_complete,
  output logic            imem_en,
  output logic [PC_W-1:0] imem_addr,
  output logic            exec_en,
  output logic [PC_W-1:0] pc,
  input  logic            t_we,
  input  logic [3:0]      t_op,
  input  word_t           t_in,
  output word_t           ra
);
  logic ir_valid;
  logic do_jump, do_halt;

  assign exec_en = ir_valid;
  assign do_jump = ir_valid && t_we && (t_op == GCU_JUMP || t_op == GCU_CALL);
  assign do_halt = ir_valid && t_we && t_op == GCU_HALT;

  always_comb begin
    if (!ir_valid) begin
      imem_en   = tta_start;
      imem_addr = '0;
    end else begin
      imem_en   = !do_halt;
      imem_addr = do_jump ? t_in[PC_W-1:0] : pc + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_valid     <= 1'b0;
      pc           <= '0;
      ra           <= '0;
      tta_complete <= 1'b0;
    end else begin
      if (!ir_valid) begin
        if (tta_start) begin
          ir_valid     <= 1'b1;
          pc           <= '0;
          tta_complete <= 1'b0;
        end
      end else if (do_halt) begin
        ir_valid     <= 1'b0;
        tta_complete <= 1'b1;
      end else begin
        pc <= imem_addr;
        if (t_we && t_op == GCU_CALL) ra <= word_t'(pc) + 1;
      end
    end
  end
endmodule
