// tta_interconnect -- transport buses and sockets of the TTA processor.
//
// Each of the N_BUS buses carries one move per instruction. For every bus the
// unit decodes the move's source (sign-extended short immediate, or the value
// of a source unit, which the core supplies per bus; a register file gives
// each bus the read socket that the move names), evaluates its guard against the
// two boolean registers, and, if the move is enabled, routes the value to the
// destination socket. Destinations are sorted into two classes per unit:
// "a" writes (index bit 5 clear: operand port O1 of a function unit, or a
// register number of a register file) and "t" writes (index bit 5 set: the
// trigger port with its opcode). Moves happen only while exec_en is high.
// Every socket is connected to every bus here; the drawing of the small
// processor shows a partial connection pattern that this design does not
// reproduce. Two moves to the same socket class of one unit in one
// instruction are a program error: the higher-numbered bus wins and an
// assertion reports it. Purely combinational.
module tta_interconnect
  import tta_pkg::*;
#(
  parameter int unsigned N_BUS   = 5,
  parameter int unsigned N_UNITS = 13
) (
  input  logic       exec_en,
  input  move_t      moves    [N_BUS],
  input  logic [1:0] bools,
  // source side: per bus, the unit and index it reads, and the values offered
  output logic [UNIT_W-1:0] rd_unit [N_BUS],
  output logic [IDX_W-1:0]  rd_idx  [N_BUS],
  input  word_t      src_data [N_BUS][N_UNITS],
  // destination side, per unit
  output logic       a_we   [N_UNITS],
  output logic [IDX_W-1:0] a_idx [N_UNITS],
  output word_t      a_data [N_UNITS],
  output logic       t_we   [N_UNITS],
  output logic [3:0] t_op   [N_UNITS],
  output word_t      t_data [N_UNITS],
  output word_t      bus_val [N_BUS],
  output logic       bus_en  [N_BUS],
  output logic       conflict
);
  // The source fields are decoded apart from the value mux, because the core
  // derives register-file read addresses from them and feeds the read data
  // back in through src_data.
  for (genvar b = 0; b < N_BUS; b++) begin : g_src
    assign rd_unit[b] = moves[b].src_val[SIMM_W-1 -: UNIT_W];
    assign rd_idx[b]  = moves[b].src_val[IDX_W-1:0];
  end

  always_comb begin
    for (int b = 0; b < N_BUS; b++) begin
      logic g;
      if (moves[b].src_imm)
        bus_val[b] = word_t'($signed(moves[b].src_val));
      else if (rd_unit[b] == '0 || 32'(rd_unit[b]) >= N_UNITS)
        bus_val[b] = '0;
      else
        bus_val[b] = src_data[b][int'(rd_unit[b])];
      unique case (guard_e'(moves[b].guard))
        G_ALWAYS: g = 1'b1;
        G_B0:     g = bools[0];
        G_NB0:    g = !bools[0];
        G_B1:     g = bools[1];
        G_NB1:    g = !bools[1];
        default:  g = 1'b0;
      endcase
      bus_en[b] = exec_en && g && moves[b].dst_unit != '0
                  && 32'(moves[b].dst_unit) < N_UNITS;
    end
  end

  always_comb begin
    conflict = 1'b0;
    for (int u = 0; u < N_UNITS; u++) begin
      a_we[u] = 1'b0; a_idx[u] = '0; a_data[u] = '0;
      t_we[u] = 1'b0; t_op[u]  = '0; t_data[u] = '0;
      for (int b = 0; b < N_BUS; b++) begin
        if (bus_en[b] && 32'(moves[b].dst_unit) == u) begin
          if (moves[b].dst_idx[5]) begin
            if (t_we[u]) conflict = 1'b1;
            t_we[u]   = 1'b1;
            t_op[u]   = moves[b].dst_idx[3:0];
            t_data[u] = bus_val[b];
          end else begin
            if (a_we[u]) conflict = 1'b1;
            a_we[u]   = 1'b1;
            a_idx[u]  = moves[b].dst_idx;
            a_data[u] = bus_val[b];
          end
        end
      end
    end
  end
endmodule
