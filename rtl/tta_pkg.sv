// tta_pkg -- shared types and constants of the transport-triggered processor.
//
// A TTA instruction is a set of moves, one per transport bus. Each move names a
// source (a short immediate, a function-unit result, a register or the return
// address) and a destination socket (an operand port, a trigger port carrying
// the opcode, or a register). Operations happen as a side effect of a move to a
// trigger port. The move layout below is this design's own encoding; the
// number and kind of units follow the small processor configuration.
//
// Move layout, MSB first (MOVE_W = 26 bits):
//   guard[2:0]  0 always, 1 if B0, 2 if !B0, 3 if B1, 4 if !B1
//   src[11:0]   src[11]=1: signed 11-bit immediate in src[10:0]
//               src[11]=0: unit id src[10:6], index src[5:0]
//   dst[10:0]   unit id dst[10:6], index dst[5:0]
//               function units: dst[5]=1 trigger with opcode dst[3:0],
//                               dst[5]=0 operand port 1
//               register files: register number
//   A register-file source index names the read socket in bit 5 and the
//   register in bits 4:0.
// Unit id 0 as a destination is "no move"; as a source it reads zero.
package tta_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned GUARD_W  = 3;
  localparam int unsigned SRC_W    = 12;
  localparam int unsigned DST_W    = 11;
  localparam int unsigned UNIT_W   = 5;
  localparam int unsigned IDX_W    = 6;
  localparam int unsigned SIMM_W   = 11;
  localparam int unsigned MOVE_W   = GUARD_W + SRC_W + DST_W;

  typedef logic [DATA_W-1:0] word_t;

  typedef enum logic [GUARD_W-1:0] {
    G_ALWAYS = 3'd0,
    G_B0     = 3'd1,
    G_NB0    = 3'd2,
    G_B1     = 3'd3,
    G_NB1    = 3'd4
  } guard_e;

  typedef struct packed {
    logic [GUARD_W-1:0] guard;
    logic               src_imm;
    logic [SIMM_W-1:0]  src_val;   // immediate, or {unit, index}
    logic [UNIT_W-1:0]  dst_unit;
    logic [IDX_W-1:0]   dst_idx;
  } move_t;

  // Destination index of a function unit trigger socket (bit 5 set);
  // index 0 is operand port O1.
  localparam logic [IDX_W-1:0] TRIG_FLAG  = 6'h20;

  // ALU opcodes (result = O1 op T).
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,
    ALU_SUB  = 4'd1,
    ALU_EQ   = 4'd2,
    ALU_GT   = 4'd3,
    ALU_GTU  = 4'd4,
    ALU_MAX  = 4'd5,
    ALU_MIN  = 4'd6,
    ALU_MAXU = 4'd7,
    ALU_MINU = 4'd8
  } alu_op_e;

  typedef enum logic [3:0] {
    LOG_AND = 4'd0,
    LOG_IOR = 4'd1,
    LOG_XOR = 4'd2
  } logic_op_e;

  typedef enum logic [3:0] {
    SH_SHL  = 4'd0,
    SH_SHR  = 4'd1,
    SH_SHRU = 4'd2
  } shift_op_e;

  typedef enum logic [3:0] {
    LSU_LDW = 4'd0,
    LSU_STW = 4'd1
  } lsu_op_e;

  typedef enum logic [3:0] {
    GCU_JUMP = 4'd0,
    GCU_CALL = 4'd1,
    GCU_HALT = 4'd2
  } gcu_op_e;

  // Helpers that build moves (used by test programs).
  function automatic move_t mv_imm(input logic signed [SIMM_W-1:0] imm,
                                   input logic [UNIT_W-1:0] du,
                                   input logic [IDX_W-1:0]  di,
                                   input logic [GUARD_W-1:0] g = G_ALWAYS);
    move_t m;
    m.guard = g; m.src_imm = 1'b1; m.src_val = imm;
    m.dst_unit = du; m.dst_idx = di;
    return m;
  endfunction

  function automatic move_t mv(input logic [UNIT_W-1:0] su,
                               input logic [IDX_W-1:0]  si,
                               input logic [UNIT_W-1:0] du,
                               input logic [IDX_W-1:0]  di,
                               input logic [GUARD_W-1:0] g = G_ALWAYS);
    move_t m;
    m.guard = g; m.src_imm = 1'b0; m.src_val = {su, si};
    m.dst_unit = du; m.dst_idx = di;
    return m;
  endfunction

  function automatic logic [IDX_W-1:0] trig(input logic [3:0] op);
    return TRIG_FLAG | IDX_W'(op);
  endfunction

  localparam move_t MOVE_NOP = '0;

endpackage
