// tta_gcu_tb -- self-checking test of the TTA control unit.
//
// A small control-flow "program" is given as a table indexed by pc: at each
// pc the test drives, while exec_en is high, the move to the GCU trigger port
// that the instruction would carry (none, JUMP, CALL or HALT). Checked: the
// unit is locked after reset; a start pulse fetches address 0; sequential
// fetch; jumps and calls steer the next fetch with no delay slot; CALL saves
// pc+1 in ra; HALT stops fetching, raises tta_complete and keeps it and the
// lock until the next start; the executed pc sequence matches a reference.
module tta_gcu_tb;
  import tta_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tta_start, tta_complete, imem_en, exec_en, t_we;
  logic [9:0] imem_addr, pc;
  logic [3:0] t_op;
  word_t t_in, ra;
  int checks = 0, failures = 0;

  tta_gcu #(.PC_W(10)) dut (.*);

  // program: 0,1,2 -> jump 10 ; 10,11 -> call 20 ; 20,21 -> halt
  always_comb begin
    t_we = 0; t_op = 0; t_in = 0;
    if (exec_en) begin
      unique case (pc)
        10'd2:  begin t_we = 1; t_op = GCU_JUMP; t_in = 10; end
        10'd11: begin t_we = 1; t_op = GCU_CALL; t_in = 20; end
        10'd21: begin t_we = 1; t_op = GCU_HALT; t_in = 0; end
        default: ;
      endcase
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int exp_seq [] = '{0, 1, 2, 10, 11, 20, 21};

  initial begin
    tta_start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(!exec_en && !imem_en && !tta_complete, "locked after reset");
    for (int run = 0; run < 2; run++) begin
      tta_start = 1;
      #1 check(imem_en && imem_addr == 0, "start fetches address 0");
      @(negedge clk); tta_start = 0;
      for (int i = 0; i < exp_seq.size(); i++) begin
        check(exec_en && pc == 10'(exp_seq[i]), $sformatf("step %0d pc %0d exp %0d", i, pc, exp_seq[i]));
        if (i + 1 < exp_seq.size())
          check(imem_en && imem_addr == 10'(exp_seq[i+1]), $sformatf("fetch %0d exp %0d", imem_addr, exp_seq[i+1]));
        else
          check(!imem_en, "no fetch on halt");
        @(negedge clk);
      end
      check(ra == 12, $sformatf("ra %0d exp 12", ra));
      check(tta_complete && !exec_en, "complete and locked after halt");
      repeat (10) @(negedge clk);
      check(tta_complete && !exec_en && !imem_en, "stays locked");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
