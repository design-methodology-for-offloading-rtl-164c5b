// tta_asm_pkg -- test-program builder for the TTA processor testbenches.
//
// Holds the unit-id map of a processor configuration (same order as the core
// assigns them), a helper that packs moves into an instruction word, and the
// test kernel used by the processor and system testbenches:
//   for i in 0..n-1:  x = mem[i]; sum += x; mem[i] = ((x * k) >>> s) ^ x
//   output sum on the IO unit; halt.
// The loop body takes 6 instructions, so the kernel runs 6n + 3
// instructions. It exercises both ALUs, LOGIC, MUL, SHIFT, both LSUs, the
// IO unit, two register files, a boolean guard, a jump and a halt.
package tta_asm_pkg;
  import tta_pkg::*;

  localparam int unsigned MAX_BUS = 17;
  typedef logic [MAX_BUS*MOVE_W-1:0] instr_t;

  typedef struct {
    int alu0, alu1, logic_u, mul, shift, lsu0, lsu1, io, rf0, rf1, bool_u, gcu;
  } units_t;

  function automatic units_t units_for(int n_alu, int n_mul, int n_shift, int n_rf);
    units_t u;
    u.alu0    = 1;
    u.alu1    = 2;
    u.logic_u = 1 + n_alu;
    u.mul     = u.logic_u + 1;
    u.shift   = u.mul + n_mul;
    u.lsu0    = u.shift + n_shift;
    u.lsu1    = u.lsu0 + 1;
    u.io      = u.lsu0 + 2;
    u.rf0     = u.io + 1;
    u.rf1     = u.rf0 + 1;
    u.bool_u  = u.rf0 + n_rf;
    u.gcu     = u.bool_u + 1;
    return u;
  endfunction

  function automatic instr_t pack(move_t m [$]);
    instr_t w = '0;
    foreach (m[b]) w[b*MOVE_W +: MOVE_W] = m[b];
    return w;
  endfunction

  function automatic logic [UNIT_W-1:0] U(int id);
    return UNIT_W'(id);
  endfunction

  // Kernel described above; all immediates must fit 11 signed bits.
  function automatic void build_kernel(units_t u, int n, int k, int s,
                                       ref instr_t prog [$]);
    prog.delete();
    // Each register file has one write port: at most one write per file
    // and instruction. RF0: r1 = i, r4 = sum, r5 = x.
    // RF1: r0 = k, r2 = n-1, r6 = i+1.
    // Each register file has two read sockets, chosen by source index bit 5:
    // I5 reads r4 and r5 of RF0 and so uses both.
    // I0, I1: i = 0, last = n-1, k, sum = 0
    prog.push_back(pack('{mv_imm(0, U(u.rf0), 1), mv_imm(SIMM_W'(n-1), U(u.rf1), 2)}));
    prog.push_back(pack('{mv_imm(SIMM_W'(k), U(u.rf1), 0), mv_imm(0, U(u.rf0), 4)}));
    // I2 (loop): load mem[i]
    prog.push_back(pack('{mv(U(u.rf0), 1, U(u.lsu0), trig(LSU_LDW))}));
    // I3: last = (i == n-1); next = i + 1
    prog.push_back(pack('{mv(U(u.rf0), 1, U(u.alu0), 0),
                          mv(U(u.rf1), 2, U(u.alu0), trig(ALU_EQ)),
                          mv(U(u.rf0), 1, U(u.alu1), 0),
                          mv_imm(1, U(u.alu1), trig(ALU_ADD))}));
    // I4: x*k; keep x; B0 = last; keep next
    prog.push_back(pack('{mv(U(u.lsu0), 0, U(u.mul), 0),
                          mv(U(u.rf1), 0, U(u.mul), trig(4'd0)),
                          mv(U(u.lsu0), 0, U(u.rf0), 5),
                          mv(U(u.alu0), 0, U(u.bool_u), 0),
                          mv(U(u.alu1), 0, U(u.rf1), 6)}));
    // I5: (x*k) >>> s ; sum + x
    prog.push_back(pack('{mv(U(u.mul), 0, U(u.shift), 0),
                          mv_imm(SIMM_W'(s), U(u.shift), trig(SH_SHR)),
                          mv(U(u.rf0), 4, U(u.alu0), 0),
                          mv(U(u.rf0), 6'h20 | 5, U(u.alu0), trig(ALU_ADD))}));
    // I6: ^ x ; sum = ...
    prog.push_back(pack('{mv(U(u.shift), 0, U(u.logic_u), 0),
                          mv(U(u.rf0), 5, U(u.logic_u), trig(LOG_XOR)),
                          mv(U(u.alu0), 0, U(u.rf0), 4)}));
    // I7: store; i = next; if !B0 jump loop
    prog.push_back(pack('{mv(U(u.logic_u), 0, U(u.lsu1), 0),
                          mv(U(u.rf0), 1, U(u.lsu1), trig(LSU_STW)),
                          mv(U(u.rf1), 6, U(u.rf0), 1),
                          mv_imm(2, U(u.gcu), trig(GCU_JUMP), G_NB0)}));
    // I8: output sum, halt
    prog.push_back(pack('{mv(U(u.rf0), 4, U(u.io), trig(4'd0)),
                          mv_imm(0, U(u.gcu), trig(GCU_HALT))}));
  endfunction

  function automatic logic [31:0] kernel_ref(logic [31:0] x, int k, int s);
    logic [31:0] p;
    p = x * 32'(k);
    return 32'($signed(p) >>> s) ^ x;
  endfunction
endpackage
