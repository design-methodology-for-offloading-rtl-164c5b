// tta_lsu_tb -- self-checking test of the TTA load/store unit.
//
// Connects the unit to a synchronous word memory model. Random stores (data
// through O1, written one cycle earlier or in the trigger cycle) are mirrored
// in a reference array; random loads must deliver the stored word in the
// result register two cycles after the trigger and keep it afterwards.
module tta_lsu_tb;
  localparam int AW = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic o1_we, t_we, mem_en, mem_we;
  logic [31:0] o1_in, t_in, result, mem_wdata, mem_rdata;
  logic [3:0] t_op;
  logic [AW-1:0] mem_addr;
  logic [31:0] mem [64];
  logic [31:0] ref_mem [64];
  int checks = 0, failures = 0;

  tta_lsu #(.ADDR_W(AW)) dut (.*);

  always_ff @(posedge clk) if (mem_en) begin
    if (mem_we) mem[mem_addr] <= mem_wdata;
    mem_rdata <= mem[mem_addr];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin mem[i] = 0; ref_mem[i] = 0; end
    o1_we = 0; t_we = 0; o1_in = 0; t_in = 0; t_op = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      int a; logic [31:0] d;
      a = $urandom_range(63, 0); d = $urandom;
      if ($urandom_range(1, 0) == 1) begin
        @(negedge clk);
        o1_we = 1; o1_in = d;
        if (n % 2 == 0) begin @(negedge clk); o1_we = 0; o1_in = $urandom; end
        t_we = 1; t_op = 4'd1; t_in = 32'(a);
        ref_mem[a] = d;
        @(negedge clk); t_we = 0; o1_we = 0;
      end else begin
        @(negedge clk); t_we = 1; t_op = 4'd0; t_in = 32'(a);
        @(negedge clk); t_we = 0;
        @(negedge clk);
        check(result == ref_mem[a], $sformatf("load %0d got %h exp %h", a, result, ref_mem[a]));
        @(negedge clk);
        check(result == ref_mem[a], "load result held");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
