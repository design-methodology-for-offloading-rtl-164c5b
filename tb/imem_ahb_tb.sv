// imem_ahb_tb -- self-checking test of the asymmetric instruction memory.
//
// 130-bit instructions (5 AHB words each, at a stride of 8 words) are written
// over AHB with random IDLE and BUSY gaps and in random instruction order;
// each instruction's words arrive in order 0..4. Some instructions are then
// rewritten, over three rounds. Checked: every instruction read through the
// wide port equals the reference; an instruction whose words 0..3 have been
// written but not word 4 still reads its old value (the commit happens on the
// last word); every bus cycle gets a zero-wait OKAY response; host reads
// return zero.
module imem_ahb_tb;
  import ahb_pkg::*;
  localparam int SIZE = 16, W = 130, WPI = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd_en; logic [3:0] rd_addr; logic [W-1:0] rd_data;
  logic hsel, hwrite, hready, hreadyout, hresp;
  logic [31:0] haddr, hwdata, hrdata; logic [1:0] htrans;
  logic [W-1:0] ref_i [SIZE];
  int checks = 0, failures = 0;

  imem_ahb #(.MEM_SIZE(SIZE), .MEM_WIDTH(W), .WORD_WIDTH(32)) dut (.*);
  assign hready = hreadyout;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit p_wr; logic [31:0] p_wdata;

  task automatic bus(bit xfer, bit busy, int addr, logic [31:0] d);
    hwdata = p_wr ? p_wdata : $urandom;
    hsel = 1; hwrite = 1; haddr = 32'(addr) << 2;
    htrans = xfer ? HTRANS_NONSEQ : (busy ? HTRANS_BUSY : HTRANS_IDLE);
    p_wr = xfer; p_wdata = d;
    @(negedge clk);
    check(hreadyout && hresp == HRESP_OKAY, "zero-wait OKAY response");
  endtask

  task automatic read_check(int i, string what);
    rd_en = 1; rd_addr = 4'(i);
    @(negedge clk); rd_en = 0;
    check(rd_data == ref_i[i], $sformatf("%s: instr %0d got %h exp %h", what, i, rd_data, ref_i[i]));
  endtask

  task automatic write_instr(int i, logic [W-1:0] v, bit partial);
    logic [WPI*32-1:0] w;
    w = {{(WPI*32-W){1'b0}}, v};
    for (int k = 0; k < WPI; k++) begin
      while ($urandom_range(3, 0) == 0) bus(0, $urandom_range(1, 0), 0, 0);
      if (k == WPI - 1 && partial) begin
        bus(0, 0, 0, 0);
        read_check(i, "before last word");
      end
      bus(1, 0, i * 8 + k, w[k*32 +: 32]);
    end
    ref_i[i] = v;
  endtask

  initial begin
    int order [SIZE];
    hsel = 0; htrans = 0; hwrite = 0; haddr = 0; hwdata = 0; rd_en = 0; rd_addr = 0;
    p_wr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (ref_i[i]) ref_i[i] = '0;
    for (int round = 0; round < 3; round++) begin
      for (int n = 0; n < SIZE + 6; n++) begin
        logic [W-1:0] v;
        v = {$urandom, $urandom, $urandom, $urandom, $urandom};
        write_instr(n < SIZE ? order[n] : $urandom_range(SIZE - 1, 0), v, round > 0);
      end
      bus(0, 0, 0, 0);
      bus(0, 0, 0, 0);
      // host read returns zero
      hwrite = 0; htrans = HTRANS_NONSEQ; haddr = 0; @(negedge clk);
      htrans = HTRANS_IDLE; check(hrdata == 0 && hresp == HRESP_OKAY, "host read");
      for (int i = 0; i < SIZE; i++) read_check(i, "after writes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
