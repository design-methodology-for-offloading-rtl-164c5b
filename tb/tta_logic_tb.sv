// tta_logic_tb -- self-checking test of the TTA logic unit.
//
// Random operands and opcodes. Each operation is triggered either with O1
// written in the same cycle (bus value used directly) or with O1 written one
// cycle earlier (latched value used). The result must appear one cycle after
// the trigger and hold while no trigger arrives. Expected values come from a
// reference function written independently here.
module tta_logic_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        o1_we, t_we;
  logic [31:0] o1_in, t_in, result;
  logic [3:0]  t_op;
  int checks = 0, failures = 0;

  tta_logic dut (.*);

  function automatic logic [31:0] model(int op, logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    case (op)
      0: r = a & b;
      1: r = a | b;
      2: r = a ^ b;
      default: r = 0;
    endcase
    return r;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    o1_we = 0; t_we = 0; o1_in = 0; t_in = 0; t_op = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      logic [31:0] a, b, exp_r;
      int op;
      a = $urandom; b = $urandom; op = $urandom_range(2, 0);
      if (n % 7 == 0) b = a;
      if (n % 11 == 0) b = 32'($urandom_range(40, 0));
      if (n % 2 == 0) begin
        @(negedge clk); o1_we = 1; o1_in = a; t_we = 0;
        @(negedge clk); o1_we = 0; o1_in = $urandom;
      end else begin
        @(negedge clk); o1_we = 1; o1_in = a;
      end
      t_we = 1; t_op = 4'(op); t_in = b;
      exp_r = model(op, a, b);
      @(negedge clk); o1_we = 0; t_we = 0; t_in = $urandom;
      check(result == exp_r, $sformatf("op %0d a=%h b=%h got %h exp %h", op, a, b, result, exp_r));
      @(negedge clk);
      check(result == exp_r, "result held without trigger");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
