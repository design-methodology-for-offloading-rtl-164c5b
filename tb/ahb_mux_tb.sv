// ahb_mux_tb -- self-checking test of the AHB slave-response multiplexer.
//
// Random selects and transfer types in the address phase, random slave
// responses in the data phase. The response on the bus must come from the
// slave selected in the previous accepted address phase (one with HREADY
// high and a NONSEQ/SEQ transfer); with no such slave it must be a ready,
// OKAY, zero response. Address phases with HREADY low must not change the
// selection.
module ahb_mux_tb;
  localparam int NS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hready; logic [NS-1:0] hsel; logic [1:0] htrans;
  logic [31:0] s_hrdata [NS]; logic s_hreadyout [NS]; logic s_hresp [NS];
  logic [31:0] hrdata; logic hreadyout, hresp;
  int checks = 0, failures = 0;

  ahb_mux #(.NS(NS)) dut (.hclk(clk), .hresetn(rst_n), .*);

  initial begin
    int sel_prev = -1;
    hready = 1; hsel = 0; htrans = 0;
    foreach (s_hrdata[i]) begin s_hrdata[i] = 0; s_hreadyout[i] = 1; s_hresp[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      int s;
      s = $urandom_range(NS, 0);
      hsel = (s < NS) ? NS'(1 << s) : '0;
      htrans = 2'($urandom);
      hready = ($urandom_range(3, 0) != 0);
      foreach (s_hrdata[i]) begin
        s_hrdata[i] = $urandom; s_hreadyout[i] = 1'($urandom); s_hresp[i] = 1'($urandom);
      end
      #1;
      checks++;
      if (sel_prev >= 0) begin
        if (hrdata != s_hrdata[sel_prev] || hreadyout != s_hreadyout[sel_prev] || hresp != s_hresp[sel_prev]) begin
          failures++; $display("FAIL: response of slave %0d not routed", sel_prev);
        end
      end else if (hrdata != 0 || !hreadyout || hresp) begin
        failures++; $display("FAIL: default response");
      end
      if (hready) sel_prev = (htrans[1] && s < NS) ? s : -1;
      @(negedge clk);
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
