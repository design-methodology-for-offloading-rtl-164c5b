// tta_rf_tb -- self-checking test of the TTA register file (32 x 32, 5 read
// ports) and of its 2 x 1-bit boolean configuration.
//
// Random writes are mirrored in a reference array; every cycle all read
// ports read random registers and must return the reference values (old value
// when the same register is written in that cycle).
module tta_rf_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        we;
  logic [4:0]  waddr;
  logic [31:0] wdata;
  logic [4:0]  raddr [5];
  logic [31:0] rdata [5];
  logic [31:0] regs  [32];
  logic        bwe;
  logic [0:0]  bwaddr, bwdata;
  logic [0:0]  braddr [5];
  logic [0:0]  brdata [5];
  logic [0:0]  bregs  [2];
  logic [31:0] ref_r [32];
  logic        ref_b [2];
  int checks = 0, failures = 0;

  tta_rf #(.NREGS(32), .WIDTH(32), .NRD(5)) dut (.clk, .rst_n, .we, .waddr, .wdata,
    .raddr, .rdata, .regs);
  tta_rf #(.NREGS(2), .WIDTH(1), .NRD(5)) dut_bool (.clk, .rst_n, .we(bwe),
    .waddr(bwaddr), .wdata(bwdata), .raddr(braddr), .rdata(brdata), .regs(bregs));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) ref_r[i] = 0;
    ref_b[0] = 0; ref_b[1] = 0;
    we = 0; bwe = 0; waddr = 0; wdata = 0; bwaddr = 0; bwdata = 0;
    for (int p = 0; p < 5; p++) begin raddr[p] = 0; braddr[p] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      we = ($urandom_range(2, 0) != 0); waddr = 5'($urandom); wdata = $urandom;
      bwe = ($urandom_range(1, 0) != 0); bwaddr = 1'($urandom); bwdata = 1'($urandom);
      for (int p = 0; p < 5; p++) begin
        raddr[p] = (p == 0) ? waddr : 5'($urandom);
        braddr[p] = 1'($urandom);
      end
      #1;
      for (int p = 0; p < 5; p++) begin
        check(rdata[p] == ref_r[raddr[p]], $sformatf("port %0d reg %0d got %h exp %h", p, raddr[p], rdata[p], ref_r[raddr[p]]));
        check(brdata[p] == ref_b[braddr[p]], "bool read");
      end
      @(posedge clk); #1;
      if (we) ref_r[waddr] = wdata;
      if (bwe) ref_b[bwaddr] = bwdata;
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
