// tta_io_sfu_tb -- self-checking test of the TTA output unit.
//
// Each trigger with opcode 0 must give exactly one io_valid pulse, one cycle
// later, with the moved word on io_data; the word must hold afterwards and
// other opcodes must produce nothing.
module tta_io_sfu_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic t_we, io_valid;
  logic [3:0] t_op;
  logic [31:0] t_in, io_data;
  int checks = 0, failures = 0;

  tta_io_sfu dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [31:0] last = 0;
    t_we = 0; t_op = 0; t_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] d; bit valid_op;
      d = $urandom; valid_op = (n % 4 != 3);
      t_we = 1; t_op = valid_op ? 4'd0 : 4'd5; t_in = d;
      @(negedge clk); t_we = 0; t_in = $urandom;
      if (valid_op) last = d;
      check(io_valid == valid_op, "io_valid pulse");
      check(io_data == last, $sformatf("io_data %h exp %h", io_data, last));
      @(negedge clk);
      check(!io_valid && io_data == last, "single pulse, data held");
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
