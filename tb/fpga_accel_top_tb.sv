// fpga_accel_top_tb -- end-to-end test of the FPGA offload subsystem at its
// default size (small processor, 1024-instruction program memory, 8192-word
// data memory).
//
// The testbench plays the host side of the platform:
//   * the host CPU writes the program into instruction memory with single
//     AHB writes, and starts/stops/reads the cycle counter;
//   * a DMA-controller model answers the DMA module's request lines. In burst
//     mode each 4-beat burst occupies 18 bus cycles (NONSEQ BUSY SEQ BUSY SEQ
//     BUSY SEQ, then 11 IDLE); in single mode each word takes 6 cycles
//     (NONSEQ, then 5 IDLE). It marks the last beat of a burst with DMA_CLR
//     and the last burst of a block with DMA_TC. Channel 0 copies the input
//     block into data memory, channel 1 copies the results back.
// Offload 1: 1024 words in burst mode. Offload 2: 64 words in single mode,
// after reloading the program. Checked: every result word and the IO-unit sum
// against a reference; transfer time 4608 cycles per 1024-word block in burst
// mode (4.5 cycles/word) and 6 cycles/word in single mode; processor time
// 6N+4 cycles; read-out blocked until the processor completes; the cycle
// counter's reading. Each mechanism (burst acknowledge, terminal count,
// start, completion lock, blocked read-out, single/burst mode switch,
// instruction assembly, cycle counter) is counted and must occur.
module fpga_accel_top_tb;
  import ahb_pkg::*;
  import tta_pkg::*;
  import tta_asm_pkg::*;

  localparam int K = 181, S = 7;
  localparam int WPI = 5, STRIDE = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hsel_fpga, hwrite, hready, hreadyout, hresp;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans; logic [2:0] hsize;
  logic [1:0] dma_breq, dma_clr, dma_tc;
  logic io_valid, tta_busy, tta_complete; logic [31:0] io_data;
  logic [15:0] offloads;

  fpga_accel_top dut (.hclk(clk), .hresetn(rst_n), .*);
  assign hready = hreadyout;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc_no = 0;
  always @(posedge clk) cyc_no++;

  // mechanism counters
  int n_acks = 0, n_tc = 0, n_starts = 0, n_completes = 0, n_blocked = 0;
  int n_single = 0, n_burst = 0, n_commits = 0, n_ccnt = 0, n_io = 0;
  logic [31:0] io_last;
  logic prev_busy = 0, prev_complete = 0;
  always @(posedge clk) if (rst_n) begin
    if (tta_busy && !prev_busy) n_starts++;
    if (tta_complete && !prev_complete) n_completes++;
    prev_busy <= tta_busy; prev_complete <= tta_complete;
    if (io_valid) begin n_io++; io_last = io_data; end
  end

  // ------------------------------------------------------------ AHB master
  logic [31:0] sdram_out [1024];
  bit p_wr, p_rd; logic [31:0] p_wdata, host_rdata; int p_idx;

  task automatic cyc(logic [1:0] tr, logic [31:0] addr, bit wr, logic [31:0] wd, int idx);
    if (p_rd) begin
      if (p_idx < 0) host_rdata = hrdata;
      else sdram_out[p_idx] = hrdata;
    end
    hwdata = p_wr ? p_wdata : '0;
    htrans = tr; haddr = addr; hwrite = wr;
    p_wr = tr[1] && wr; p_rd = tr[1] && !wr; p_wdata = wd; p_idx = idx;
    @(negedge clk);
  endtask

  task automatic idle(int n = 1);
    repeat (n) cyc(HTRANS_IDLE, 0, 0, 0, 0);
  endtask

  // host: single word write / read
  task automatic host_wr(logic [31:0] a, logic [31:0] d);
    cyc(HTRANS_NONSEQ, a, 1, d, 0);
    idle();
  endtask

  task automatic host_rd(logic [31:0] a, output logic [31:0] d);
    cyc(HTRANS_NONSEQ, a, 0, 0, -1);
    idle();
    d = host_rdata;
  endtask

  task automatic load_program(instr_t prog [$]);
    for (int i = 0; i < prog.size(); i++) begin
      for (int k = 0; k < WPI; k++)
        cyc(HTRANS_NONSEQ, 32'h0001_0000 + 32'((i * STRIDE + k) * 4), 1,
            prog[i][k*32 +: 32], 0);
      n_commits++;
    end
    idle(2);
  endtask

  // DMA controller model: one block of nwords on channel ch
  task automatic dmac_block(int ch, int nwords, bit burst, ref logic [31:0] src [1024],
                            output int cycles);
    int beats, nb, slots, t0;
    beats = burst ? 4 : 1;
    slots = burst ? 18 : 6;
    nb = nwords / beats;
    t0 = -1;
    for (int b = 0; b < nb; b++) begin
      while (!dma_breq[ch]) begin
        if (tta_busy) n_blocked++;
        check(!(tta_busy && dma_breq != 0), "no request while processor runs");
        idle();
      end
      if (t0 < 0) t0 = cyc_no;
      for (int s = 0; s < slots; s++) begin
        logic [1:0] tr; int beat;
        beat = -1; tr = HTRANS_IDLE;
        if (burst) begin
          if (s == 0) begin tr = HTRANS_NONSEQ; beat = 0; end
          else if (s < 7 && s % 2 == 1) tr = HTRANS_BUSY;
          else if (s < 7) begin tr = HTRANS_SEQ; beat = s / 2; end
        end else if (s == 0) begin tr = HTRANS_NONSEQ; beat = 0; end
        // one cycle after DMA_CLR the request must be down
        if (s == (burst ? 8 : 2)) begin
          check(!dma_breq[ch], "burst acknowledged by dropping the request");
          if (!dma_breq[ch]) n_acks++;
          if (b == nb - 1) n_tc++;
        end
        // DMA_CLR/DMA_TC during the data phase of the last beat
        dma_clr = '0; dma_tc = '0;
        if (s == (burst ? 7 : 1)) begin
          dma_clr[ch] = 1'b1;
          dma_tc[ch]  = (b == nb - 1);
        end
        if (beat >= 0) begin
          int w = b * beats + beat;
          cyc(tr, 32'(w * 4), ch == 0, (ch == 0) ? src[w] : 32'h0, w);
        end else begin
          cyc(tr, 0, 0, 0, 0);
        end
      end
      if (burst) n_burst++; else n_single++;
    end
    dma_clr = '0; dma_tc = '0;
    cycles = cyc_no - t0;
  endtask

  task automatic offload(int n, bit burst);
    instr_t prog [$];
    logic [31:0] sdram_in [1024];
    logic [31:0] sum, d;
    int t_in, t_out, t_start, t_cc0, t_cc1;
    build_kernel(units_for(2, 1, 1, 2), n, K, S, prog);
    load_program(prog);
    for (int i = 0; i < 1024; i++) sdram_in[i] = $urandom;
    for (int i = 0; i < 1024; i++) sdram_out[i] = 32'hDEAD_BEEF;
    // cycle counter: reset and start
    host_wr(32'h0002_0000, 32'h5);
    t_cc0 = cyc_no;
    dmac_block(0, n, burst, sdram_in, t_in);
    check(t_in == n * (burst ? 18 : 24) / 4, $sformatf("input transfer %0d cycles, expected %0d", t_in, n * (burst ? 18 : 24) / 4));
    // the read channel is already enabled; the DMA module holds it back
    while (!tta_busy) idle();
    t_start = cyc_no;
    dmac_block(1, n, burst, sdram_in, t_out);
    check(t_out == n * (burst ? 18 : 24) / 4, $sformatf("output transfer %0d cycles", t_out));
    host_wr(32'h0002_0000, 32'h2);   // stop
    t_cc1 = cyc_no;
    host_rd(32'h0002_0004, d);
    n_ccnt++;
    check(d == 32'(t_cc1 - t_cc0), $sformatf("cycle counter %0d, expected %0d", d, t_cc1 - t_cc0));
    sum = 0;
    for (int i = 0; i < n; i++) begin
      sum += sdram_in[i];
      check(sdram_out[i] == kernel_ref(sdram_in[i], K, S),
            $sformatf("word %0d: %h expected %h", i, sdram_out[i], kernel_ref(sdram_in[i], K, S)));
    end
    check(io_last == sum, $sformatf("IO sum %h expected %h", io_last, sum));
    $display("offload n=%0d %s: T_trans in %0d out %0d, processor+read-out %0d, counter %0d",
             n, burst ? "burst" : "single", t_in, t_out, cyc_no - t_start, d);
  endtask

  // processor time, measured from the start pulse to completion
  int t_run0, t_run [$];
  always @(posedge clk) begin
    if (dut.tta_start) t_run0 = cyc_no;
    if (tta_complete && !prev_complete) t_run.push_back(cyc_no - t_run0);
  end

  initial begin
    hsel_fpga = 1; hsize = 3'd2; htrans = 0; haddr = 0; hwrite = 0; hwdata = 0;
    dma_clr = 0; dma_tc = 0; p_wr = 0; p_rd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(dma_breq == 2'b01 && !tta_busy, "after reset: input channel enabled, processor locked");
    offload(1024, 1'b1);
    offload(64, 1'b0);
    idle(5);
    check(t_run.size() == 2, "two processor runs");
    if (t_run.size() == 2) begin
      check(t_run[0] == 6 * 1024 + 4, $sformatf("run 1: %0d cycles", t_run[0]));
      check(t_run[1] == 6 * 64 + 4, $sformatf("run 2: %0d cycles", t_run[1]));
    end
    check(offloads == 2, "offload counter");
    check(n_acks > 0, "burst acknowledge happened");
    check(n_tc == 4, "terminal count on each block");
    check(n_starts == 2 && n_completes == 2, "start and completion");
    check(n_blocked > 0, "read-out blocked while processor ran");
    check(n_single > 0 && n_burst > 0, "single and burst modes");
    check(n_commits > 0 && n_ccnt == 2 && n_io == 2, "instruction assembly, counter reads, IO");
    $display("mechanisms: acks=%0d tc=%0d starts=%0d completes=%0d blocked=%0d burst=%0d single=%0d instr=%0d ccnt=%0d io=%0d",
             n_acks, n_tc, n_starts, n_completes, n_blocked, n_burst, n_single, n_commits, n_ccnt, n_io);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
