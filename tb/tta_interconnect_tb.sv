// tta_interconnect_tb -- self-checking test of the TTA transport buses.
//
// Random instructions (random sources, immediates, guards, destinations and
// opcodes) are applied with random boolean registers and source values. A
// reference written here decides, per unit and socket class, which bus (the
// highest-numbered enabled one) delivers which value, and whether two moves
// collided. Outputs must match; nothing may move while exec_en is low.
module tta_interconnect_tb;
  import tta_pkg::*;
  localparam int NB = 5, NU = 13;

  logic exec_en;
  move_t moves [NB];
  logic [1:0] bools;
  logic [UNIT_W-1:0] rd_unit [NB];
  logic [IDX_W-1:0]  rd_idx  [NB];
  word_t src_data [NB][NU];
  logic a_we [NU]; logic [IDX_W-1:0] a_idx [NU]; word_t a_data [NU];
  logic t_we [NU]; logic [3:0] t_op [NU]; word_t t_data [NU];
  word_t bus_val [NB]; logic bus_en [NB]; logic conflict;
  int checks = 0, failures = 0;

  tta_interconnect #(.N_BUS(NB), .N_UNITS(NU)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic word_t value_of(int b);
    if (moves[b].src_imm) return {{21{moves[b].src_val[10]}}, moves[b].src_val};
    if (moves[b].src_val[10:6] == 0 || moves[b].src_val[10:6] >= NU) return 0;
    return src_data[b][moves[b].src_val[10:6]];
  endfunction

  function automatic bit enabled(int b);
    bit g;
    case (moves[b].guard)
      0: g = 1; 1: g = bools[0]; 2: g = !bools[0]; 3: g = bools[1]; 4: g = !bools[1];
      default: g = 0;
    endcase
    return exec_en && g && moves[b].dst_unit != 0 && moves[b].dst_unit < NU;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      bit exp_conf;
      exp_conf = 0;
      exec_en = (n % 10 != 0);
      bools = 2'($urandom);
      for (int b = 0; b < NB; b++) begin
        moves[b] = move_t'($urandom);
        moves[b].guard = 3'($urandom_range(5, 0));
        moves[b].dst_unit = 5'($urandom_range(NU, 0));
        for (int u = 0; u < NU; u++) src_data[b][u] = $urandom;
      end
      #1;
      for (int u = 0; u < NU; u++) begin
        int ta, tt, na, nt;
        ta = -1; tt = -1; na = 0; nt = 0;
        for (int b = NB - 1; b >= 0; b--) begin
          if (enabled(b) && moves[b].dst_unit == u) begin
            if (moves[b].dst_idx[5]) begin nt++; if (tt < 0) tt = b; end
            else begin na++; if (ta < 0) ta = b; end
          end
        end
        if (na > 1 || nt > 1) exp_conf = 1;
        check(a_we[u] == (ta >= 0) && t_we[u] == (tt >= 0), $sformatf("unit %0d write enables a %0d %0d t %0d %0d", u, a_we[u], ta, t_we[u], tt));
        if (ta >= 0) check(a_data[u] == value_of(ta) && a_idx[u] == moves[ta].dst_idx, $sformatf("unit %0d a data", u));
        if (tt >= 0) check(t_data[u] == value_of(tt) && t_op[u] == moves[tt].dst_idx[3:0], $sformatf("unit %0d t data", u));
      end
      for (int b = 0; b < NB; b++)
        check(bus_en[b] == enabled(b) && rd_unit[b] == moves[b].src_val[10:6], "bus decode");
      check(conflict == exp_conf, "conflict flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
