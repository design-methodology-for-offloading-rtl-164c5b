// dmem_ahb_tb -- self-checking test of the dual-port data memory.
//
// An AHB master drives random pipelined traffic (NONSEQ, SEQ, BUSY and IDLE
// cycles, reads and writes, including a read right after a write to the same
// word) on the lower half of the memory while the processor port reads and
// writes the upper half at random. Both are checked against reference arrays
// every cycle (AHB read data in the data phase, port-A data one cycle after
// the request). Finally each port reads what the other wrote.
module dmem_ahb_tb;
  import ahb_pkg::*;
  localparam int DEPTH = 256, HALF = DEPTH / 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic a_en, a_we; logic [7:0] a_addr; logic [31:0] a_wdata, a_rdata;
  logic hsel, hwrite, hready, hreadyout, hresp;
  logic [31:0] haddr, hwdata, hrdata; logic [1:0] htrans;
  logic [31:0] ref_m [DEPTH];
  int checks = 0, failures = 0;

  dmem_ahb #(.DEPTH(DEPTH)) dut (.*);
  assign hready = hreadyout;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // previous-cycle state of both ports
  bit p_wr, p_rd, pa_rd; int p_addr; logic [31:0] p_wdata, p_exp, pa_exp;

  task automatic ahb_cycle(bit xfer, bit wr, int addr, bit busy);
    // data phase of the previous transfer
    hwdata = p_wr ? p_wdata : $urandom;
    if (p_wr) ref_m[p_addr] = p_wdata;
    // address phase
    hsel   = xfer || busy;
    htrans = xfer ? ((addr % 2 == 0) ? HTRANS_NONSEQ : HTRANS_SEQ) : (busy ? HTRANS_BUSY : HTRANS_IDLE);
    hwrite = wr;
    haddr  = 32'(addr) << 2;
    p_wr = xfer && wr; p_rd = xfer && !wr; p_addr = addr;
    p_wdata = $urandom;
    if (p_rd) p_exp = ref_m[addr];
  endtask

  task automatic port_a_cycle(bit en, bit we, int addr);
    a_en = en; a_we = we; a_addr = 8'(addr); a_wdata = $urandom;
    pa_rd = en && !we;
    if (pa_rd) pa_exp = ref_m[addr];
    if (en && we) ref_m[addr] = a_wdata;
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) ref_m[i] = 0;
    hsel = 0; htrans = 0; hwrite = 0; haddr = 0; hwdata = 0;
    a_en = 0; a_we = 0; a_addr = 0; a_wdata = 0;
    p_wr = 0; p_rd = 0; pa_rd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // initialise both halves through their own ports
    for (int i = 0; i < HALF; i++) begin
      ahb_cycle(1, 1, i, 0); port_a_cycle(1, 1, HALF + i);
      @(negedge clk);
    end
    for (int n = 0; n < 3000; n++) begin
      bit was_rd, was_ard; logic [31:0] e, ea; int r; int addr;
      was_rd = p_rd; e = p_exp; was_ard = pa_rd; ea = pa_exp;
      if (was_rd) check(hrdata == e, $sformatf("AHB read got %h exp %h", hrdata, e));
      if (was_ard) check(a_rdata == ea, $sformatf("port A read got %h exp %h", a_rdata, ea));
      r = $urandom_range(9, 0);
      addr = (r == 9 && p_wr) ? p_addr : $urandom_range(HALF - 1, 0);
      ahb_cycle(r != 8, r < 4, addr, r == 8);
      port_a_cycle($urandom_range(1, 0), $urandom_range(1, 0), HALF + $urandom_range(HALF - 1, 0));
      @(negedge clk);
    end
    // cross reads
    for (int i = 0; i < DEPTH; i++) begin
      bit was_rd, was_ard; logic [31:0] e, ea;
      was_rd = p_rd; e = p_exp; was_ard = pa_rd; ea = pa_exp;
      if (was_rd) check(hrdata == e, "AHB cross read");
      if (was_ard) check(a_rdata == ea, "port A cross read");
      ahb_cycle(1, 0, (i + HALF) % DEPTH, 0);
      port_a_cycle(1, 0, i);
      @(negedge clk);
    end
    check(hresp == HRESP_OKAY && hreadyout, "OKAY, no wait states");
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
