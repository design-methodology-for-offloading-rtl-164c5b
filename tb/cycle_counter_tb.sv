// cycle_counter_tb -- self-checking test of the AHB cycle counter.
//
// Starts the counter, lets it run a random number of cycles, stops it and
// reads COUNT: the value must equal the number of clock edges between the
// data phases of the start and the stop write. The count must then hold,
// resume from where it stopped on a second start, read back the running bit
// in CTRL, and clear to zero on reset.
module cycle_counter_tb;
  import ahb_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hsel, hwrite, hready, hreadyout, hresp;
  logic [31:0] haddr, hwdata, hrdata, count; logic [1:0] htrans;
  int checks = 0, failures = 0;
  int edges = 0;
  always @(posedge clk) edges++;

  cycle_counter dut (.*);
  assign hready = hreadyout;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // single write; returns the edge number that ends its data phase
  task automatic wr(int offs, logic [31:0] d, output int edge_no);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 1; haddr = 32'(offs);
    @(negedge clk);
    hsel = 0; htrans = HTRANS_IDLE; hwdata = d;
    @(posedge clk); #1 edge_no = edges;
    @(negedge clk);
  endtask

  task automatic rd(int offs, output logic [31:0] d);
    hsel = 1; htrans = HTRANS_NONSEQ; hwrite = 0; haddr = 32'(offs);
    @(negedge clk);
    hsel = 0; htrans = HTRANS_IDLE;
    d = hrdata;
    @(negedge clk);
  endtask

  initial begin
    int e_start, e_stop, total; logic [31:0] d;
    hsel = 0; htrans = 0; hwrite = 0; haddr = 0; hwdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    total = 0;
    for (int run = 0; run < 5; run++) begin
      wr(0, 32'h1, e_start);
      rd(0, d); check(d == 1, "running bit set");
      repeat ($urandom_range(300, 1)) @(negedge clk);
      wr(0, 32'h2, e_stop);
      total += e_stop - e_start;
      rd(4, d); check(d == 32'(total), $sformatf("count %0d exp %0d", d, total));
      rd(0, d); check(d == 0, "running bit clear");
      repeat (20) @(negedge clk);
      rd(4, d); check(d == 32'(total) && count == 32'(total), "count holds when stopped");
    end
    wr(0, 32'h4, e_stop);
    rd(4, d); check(d == 0, "reset clears");
    wr(0, 32'h5, e_start);
    repeat (10) @(negedge clk);
    rd(4, d); check(d == 32'(edges - e_start - 1), $sformatf("reset+start count %0d edges %0d e_start %0d", d, edges, e_start));
    check(hresp == HRESP_OKAY, "OKAY");
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
