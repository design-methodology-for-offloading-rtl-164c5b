// dma_module_tb -- self-checking test of the DMA module state machine.
//
// A model of the DMA controller serves requests: while dma_breq[x] is high it
// runs a burst (a few cycles) and marks its last beat with dma_clr[x], adding
// dma_tc[x] on the last burst of the block, then waits for the request to drop
// (the acknowledgement) before the next burst. A model of the processor
// raises tta_complete a random time after tta_start and holds it until the
// next start. Checked over several offloads of random burst counts: the
// processor is started once, only after the last input burst is
// acknowledged (a monitor checks every start pulse against DMA_TC); no request is raised while it runs; output bursts start only
// after completion; every burst is acknowledged; the counters agree.
module dma_module_tb;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [1:0] dma_breq, dma_clr, dma_tc;
  logic tta_start, tta_complete, busy;
  logic [15:0] bursts_in, bursts_out, offloads;
  int checks = 0, failures = 0;

  dma_module dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // processor model
  bit running = 0; int run_left = 0; int starts = 0;
  always @(posedge clk) begin
    if (tta_start) begin
      starts++; running <= 1; tta_complete <= 0; run_left <= $urandom_range(50, 1);
    end else if (running) begin
      if (run_left == 0) begin running <= 0; tta_complete <= 1; end
      else run_left <= run_left - 1;
    end
  end

  int acks = 0;

  // every start pulse must follow the input burst that carried DMA_TC
  bit tc_seen = 0;
  always @(posedge clk) if (rst_n) begin
    if (dma_clr[0] && dma_tc[0]) tc_seen <= 1'b1;
    if (tta_start) begin
      check(tc_seen, "start only after the last input burst");
      tc_seen <= 1'b0;
    end
    if (busy) check(dma_breq == 2'b00, "no request while busy");
  end

  task automatic dmac_block(int ch, int nbursts);
    for (int b = 0; b < nbursts; b++) begin
      while (!dma_breq[ch]) begin
        check(!(running && dma_breq != 0), "no request while running");
        @(negedge clk);
      end
      if (ch == 1) check(tta_complete, "read-out only after completion");
      repeat ($urandom_range(6, 1)) @(negedge clk);   // burst beats
      dma_clr[ch] = 1; dma_tc[ch] = (b == nbursts - 1);
      @(negedge clk);
      dma_clr = 0; dma_tc = 0;
      check(!dma_breq[ch], "burst acknowledged");
      if (!dma_breq[ch]) acks++;
      if (ch == 0 && b < nbursts - 1) check(starts == exp_starts, "no start before last burst");
      @(negedge clk);
    end
  endtask

  int exp_starts = 0;

  initial begin
    int nin, nout, total_in = 0, total_out = 0;
    dma_clr = 0; dma_tc = 0; tta_complete = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      nin = $urandom_range(6, 1); nout = $urandom_range(6, 1);
      dmac_block(0, nin);
      exp_starts++;
      repeat (2) @(negedge clk);
      check(starts == exp_starts, $sformatf("started once (%0d vs %0d)", starts, exp_starts));
      check(dma_breq == 0, "requests blocked while running");
      dmac_block(1, nout);
      total_in += nin; total_out += nout;
    end
    @(negedge clk);
    check(bursts_in == 16'(total_in) && bursts_out == 16'(total_out), "burst counters");
    check(offloads == 8, $sformatf("offload counter %0d", offloads));
    check(acks == total_in + total_out, "all bursts acknowledged");
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
