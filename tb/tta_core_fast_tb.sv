// tta_core_fast_tb -- runs the test kernel on the large TTA configuration
// (17 buses, 5 ALU, 3 MUL, 3 SHIFT, 4 register files).
//
// Instruction and data memories are modelled here as synchronous arrays.
// Fills N words of data memory with random values, pulses tta_start, and
// checks: every result word, the sum on the IO unit, that tta_complete rises
// exactly 6N+4 cycles after the start pulse (one instruction per cycle plus
// the fetch), and that the locked processor leaves memory alone afterwards.
// A second start re-runs the kernel on the results from address 0.
module tta_core_fast_tb;
  import tta_pkg::*;
  import tta_asm_pkg::*;

  localparam int N_BUS = 17, N_ALU = 5, N_MUL = 3, N_SHIFT = 3, N_RF = 4;
  localparam int N = 64, K = 181, S = 7;
  localparam int INSTR_W = N_BUS * MOVE_W;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic tta_start, tta_complete, imem_en, dmem_en, dmem_we, io_valid;
  logic [9:0]  imem_addr;
  logic [INSTR_W-1:0] imem_data;
  logic [12:0] dmem_addr;
  word_t dmem_wdata, dmem_rdata, io_data;

  tta_core #(.N_BUS(N_BUS), .N_ALU(N_ALU), .N_MUL(N_MUL), .N_SHIFT(N_SHIFT),
             .N_RF(N_RF)) dut (.*);

  instr_t      prog [$];
  logic [31:0] dmem [8192];
  logic [31:0] ref_in [N];
  int checks = 0, failures = 0;

  always_ff @(posedge clk) begin
    if (imem_en) imem_data <= (32'(imem_addr) < prog.size()) ? prog[imem_addr][INSTR_W-1:0] : '0;
    if (dmem_en) begin
      if (dmem_we) dmem[dmem_addr] <= dmem_wdata;
      dmem_rdata <= dmem[dmem_addr];
    end
  end

  int io_count = 0; word_t io_last;
  always @(posedge clk) if (io_valid) begin io_count++; io_last = io_data; end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_once(int pass);
    int t0, t1; logic [31:0] sum = 0;
    int io0 = io_count;
    @(negedge clk); tta_start = 1; t0 = $time / 10;
    @(negedge clk); tta_start = 0;
    while (!tta_complete) @(posedge clk);
    t1 = $time / 10;
    check(t1 - t0 == 6*N + 4, $sformatf("pass %0d: complete after %0d cycles, expected %0d", pass, t1 - t0, 6*N+4));
    repeat (3) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      sum += ref_in[i];
      check(dmem[i] == kernel_ref(ref_in[i], K, S),
            $sformatf("pass %0d: mem[%0d]=%h expected %h", pass, i, dmem[i], kernel_ref(ref_in[i], K, S)));
    end
    check(io_count == io0 + 1 && io_last == sum, $sformatf("pass %0d: io sum %h expected %h", pass, io_last, sum));
    check(dmem[N] == 32'hA5A5_0000 + 32'(pass), "word after the block untouched");
    // locked: memory stays as it is
    for (int i = 0; i < N; i++) ref_in[i] = dmem[i];
    repeat (20) @(posedge clk);
    check(tta_complete && !dmem_en, "processor stays locked after halt");
  endtask

  initial begin
    build_kernel(units_for(N_ALU, N_MUL, N_SHIFT, N_RF), N, K, S, prog);
    tta_start = 0;
    for (int i = 0; i < 8192; i++) dmem[i] = '0;
    for (int i = 0; i < N; i++) begin ref_in[i] = $urandom; dmem[i] = ref_in[i]; end
    dmem[N] = 32'hA5A5_0001;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    check(!tta_complete && !dmem_en, "idle and locked after reset");
    run_once(1);
    dmem[N] = 32'hA5A5_0002;
    run_once(2);
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
