// tta_core -- application-specific transport-triggered (TTA) processor.
//
// The processor is a set of function units, register files and a control
// unit joined by transport buses. Each instruction holds one move per bus;
// moving a value to a unit's trigger port starts that unit's operation, so the
// program schedules data transports rather than operations, and results can be
// passed from unit to unit without a register file in between (software
// bypassing).
//
// The default configuration is the small processor: 5 buses, 2 ALUs, one
// LOGIC, MUL and SHIFT unit, 2 load/store units, an output unit (IO_SFU), two
// 32 x 32-bit register files, a 2 x 1-bit boolean register file and the
// control unit (GCU). N_BUS, N_ALU, N_MUL, N_SHIFT and N_RF scale it; the
// larger processor variant is N_BUS=17, N_ALU=5, N_MUL=3, N_SHIFT=3, N_RF=4.
// As in the processor drawing, each general register file has one write
// socket and two read sockets (source index bit 5 picks the socket), and the
// boolean file one of each.
//
// Unit ids (used in moves) are assigned in this order, starting at 1:
//   ALU x N_ALU, LOGIC, MUL x N_MUL, SHIFT x N_SHIFT, LSU x 2, IO_SFU,
//   RF x N_RF, BOOL, GCU.
// Small configuration: ALU 1-2, LOGIC 3, MUL 4, SHIFT 5, LSU 6-7, IO 8,
// RF 9-10, BOOL 11, GCU 12.
//
// Interface: Harvard memories. The instruction port (imem_*) reads one whole
// instruction of INSTR_W = N_BUS*26 bits per cycle from a synchronous memory,
// bus 0 in the low bits. The data port (dmem_*) is a synchronous single-port
// word interface shared by the two LSUs: the program must not trigger both in
// one instruction (checked by an assertion; LSU 0 wins). tta_start and
// tta_complete are the start/lock handshake with the DMA module, io_* the
// output unit. Timing: one instruction per cycle, no stalls; results of
// ALU/LOGIC/MUL/SHIFT readable one instruction after the trigger, loads two.
module tta_core
  import tta_pkg::*;
#(
  parameter int unsigned N_BUS   = 5,
  parameter int unsigned N_ALU   = 2,
  parameter int unsigned N_MUL   = 1,
  parameter int unsigned N_SHIFT = 1,
  parameter int unsigned N_RF    = 2,
  parameter int unsigned PC_W    = 10,
  parameter int unsigned DADDR_W = 13,
  localparam int unsigned INSTR_W = N_BUS * MOVE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               tta_start,
  output logic               tta_complete,
  output logic               imem_en,
  output logic [PC_W-1:0]    imem_addr,
  input  logic [INSTR_W-1:0] imem_data,
  output logic               dmem_en,
  output logic               dmem_we,
  output logic [DADDR_W-1:0] dmem_addr,
  output word_t              dmem_wdata,
  input  word_t              dmem_rdata,
  output logic               io_valid,
  output word_t              io_data
);
  localparam int unsigned N_LSU   = 2;
  localparam int unsigned U_ALU   = 1;
  localparam int unsigned U_LOGIC = U_ALU + N_ALU;
  localparam int unsigned U_MUL   = U_LOGIC + 1;
  localparam int unsigned U_SHIFT = U_MUL + N_MUL;
  localparam int unsigned U_LSU   = U_SHIFT + N_SHIFT;
  localparam int unsigned U_IO    = U_LSU + N_LSU;
  localparam int unsigned U_RF    = U_IO + 1;
  localparam int unsigned U_BOOL  = U_RF + N_RF;
  localparam int unsigned U_GCU   = U_BOOL + 1;
  localparam int unsigned N_UNITS = U_GCU + 1;

  // ---------------------------------------------------------------- control
  logic            exec_en;
  logic [PC_W-1:0] pc;
  word_t           ra;

  // ---------------------------------------------------------- interconnect
  move_t             moves    [N_BUS];
  logic [UNIT_W-1:0] rd_unit  [N_BUS];
  logic [IDX_W-1:0]  rd_idx   [N_BUS];
  word_t             src_data [N_BUS][N_UNITS];
  logic              a_we   [N_UNITS];
  logic [IDX_W-1:0]  a_idx  [N_UNITS];
  word_t             a_data [N_UNITS];
  logic              t_we   [N_UNITS];
  logic [3:0]        t_op   [N_UNITS];
  word_t             t_data [N_UNITS];
  word_t             bus_val [N_BUS];
  logic              bus_en  [N_BUS];
  logic              conflict;
  logic [1:0]        bools;
  word_t             fu_res [N_UNITS];

  for (genvar b = 0; b < N_BUS; b++) begin : g_slot
    assign moves[b] = move_t'(imem_data[b*MOVE_W +: MOVE_W]);
  end

  tta_interconnect #(.N_BUS(N_BUS), .N_UNITS(N_UNITS)) u_ic (
    .exec_en, .moves, .bools, .rd_unit, .rd_idx, .src_data,
    .a_we, .a_idx, .a_data, .t_we, .t_op, .t_data,
    .bus_val, .bus_en, .conflict
  );

  tta_gcu #(.PC_W(PC_W)) u_gcu (
    .clk, .rst_n, .tta_start, .tta_complete, .imem_en, .imem_addr,
    .exec_en, .pc,
    .t_we(t_we[U_GCU]), .t_op(t_op[U_GCU]), .t_in(t_data[U_GCU]), .ra
  );

  // ------------------------------------------------------- function units
  for (genvar i = 0; i < N_ALU; i++) begin : g_alu
    tta_alu u_alu (.clk, .rst_n,
      .o1_we(a_we[U_ALU+i]), .o1_in(a_data[U_ALU+i]),
      .t_we(t_we[U_ALU+i]), .t_op(t_op[U_ALU+i]), .t_in(t_data[U_ALU+i]),
      .result(fu_res[U_ALU+i]));
  end

  tta_logic u_logic (.clk, .rst_n,
    .o1_we(a_we[U_LOGIC]), .o1_in(a_data[U_LOGIC]),
    .t_we(t_we[U_LOGIC]), .t_op(t_op[U_LOGIC]), .t_in(t_data[U_LOGIC]),
    .result(fu_res[U_LOGIC]));

  for (genvar i = 0; i < N_MUL; i++) begin : g_mul
    tta_mul u_mul (.clk, .rst_n,
      .o1_we(a_we[U_MUL+i]), .o1_in(a_data[U_MUL+i]),
      .t_we(t_we[U_MUL+i]), .t_op(t_op[U_MUL+i]), .t_in(t_data[U_MUL+i]),
      .result(fu_res[U_MUL+i]));
  end

  for (genvar i = 0; i < N_SHIFT; i++) begin : g_shift
    tta_shift u_shift (.clk, .rst_n,
      .o1_we(a_we[U_SHIFT+i]), .o1_in(a_data[U_SHIFT+i]),
      .t_we(t_we[U_SHIFT+i]), .t_op(t_op[U_SHIFT+i]), .t_in(t_data[U_SHIFT+i]),
      .result(fu_res[U_SHIFT+i]));
  end

  logic               lsu_en    [N_LSU];
  logic               lsu_we    [N_LSU];
  logic [DADDR_W-1:0] lsu_addr  [N_LSU];
  word_t              lsu_wdata [N_LSU];

  for (genvar i = 0; i < N_LSU; i++) begin : g_lsu
    tta_lsu #(.ADDR_W(DADDR_W)) u_lsu (.clk, .rst_n,
      .o1_we(a_we[U_LSU+i]), .o1_in(a_data[U_LSU+i]),
      .t_we(t_we[U_LSU+i]), .t_op(t_op[U_LSU+i]), .t_in(t_data[U_LSU+i]),
      .result(fu_res[U_LSU+i]),
      .mem_en(lsu_en[i]), .mem_we(lsu_we[i]), .mem_addr(lsu_addr[i]),
      .mem_wdata(lsu_wdata[i]), .mem_rdata(dmem_rdata));
  end

  // Both LSUs share the single data-memory port of the processor.
  always_comb begin
    if (lsu_en[0]) begin
      dmem_en = 1'b1; dmem_we = lsu_we[0];
      dmem_addr = lsu_addr[0]; dmem_wdata = lsu_wdata[0];
    end else begin
      dmem_en = lsu_en[1]; dmem_we = lsu_we[1];
      dmem_addr = lsu_addr[1]; dmem_wdata = lsu_wdata[1];
    end
  end

  tta_io_sfu u_io (.clk, .rst_n,
    .t_we(t_we[U_IO]), .t_op(t_op[U_IO]), .t_in(t_data[U_IO]),
    .io_valid, .io_data);

  // ------------------------------------------------------- register files
  // Each 32 x 32 register file has one write socket and RF_RD read sockets;
  // a move names the read socket in source index bit 5 and the register in
  // bits 4:0. The boolean file has one read socket. The address of a read
  // socket comes from the moves that read through it; moves reading two
  // different registers through one socket in one instruction are a program
  // error (the higher-numbered bus wins, flagged by rd_conflict).
  localparam int unsigned RF_RD = 2;
  word_t      rf_rdata [N_RF][RF_RD];
  logic [4:0] rf_raddr [N_RF][RF_RD];
  logic [0:0] bool_raddr [1];
  logic [0:0] bool_rdata [1];
  logic [0:0] bool_regs  [2];
  logic       rd_conflict;

  always_comb begin
    logic [4:0] prev;
    logic       seen;
    prev = '0;
    seen = 1'b0;
    rd_conflict = 1'b0;
    for (int r = 0; r < N_RF; r++) begin
      for (int p = 0; p < RF_RD; p++) begin
        rf_raddr[r][p] = '0;
        seen = 1'b0;
        for (int b = 0; b < N_BUS; b++) begin
          if (!moves[b].src_imm && 32'(rd_unit[b]) == U_RF + r
              && 32'(rd_idx[b][5]) == p) begin
            prev = rf_raddr[r][p];
            if (seen && prev != rd_idx[b][4:0]) rd_conflict = 1'b1;
            rf_raddr[r][p] = rd_idx[b][4:0];
            seen = 1'b1;
          end
        end
      end
    end
    bool_raddr[0] = '0;
    seen = 1'b0;
    for (int b = 0; b < N_BUS; b++) begin
      if (!moves[b].src_imm && 32'(rd_unit[b]) == U_BOOL) begin
        if (seen && bool_raddr[0] != rd_idx[b][0]) rd_conflict = 1'b1;
        bool_raddr[0] = rd_idx[b][0];
        seen = 1'b1;
      end
    end
  end

  for (genvar r = 0; r < N_RF; r++) begin : g_rf
    word_t regs [32];
    tta_rf #(.NREGS(32), .WIDTH(32), .NRD(RF_RD)) u_rf (.clk, .rst_n,
      .we(a_we[U_RF+r]), .waddr(a_idx[U_RF+r][4:0]), .wdata(a_data[U_RF+r]),
      .raddr(rf_raddr[r]), .rdata(rf_rdata[r]), .regs);
  end

  tta_rf #(.NREGS(2), .WIDTH(1), .NRD(1)) u_bool (.clk, .rst_n,
    .we(a_we[U_BOOL]), .waddr(a_idx[U_BOOL][0]), .wdata(a_data[U_BOOL][0]),
    .raddr(bool_raddr), .rdata(bool_rdata), .regs(bool_regs));
  assign bools = {bool_regs[1], bool_regs[0]};

  // ------------------------------------------------------- source values
  always_comb begin
    for (int b = 0; b < N_BUS; b++) begin
      for (int u = 0; u < N_UNITS; u++) src_data[b][u] = '0;
      for (int u = U_ALU; u < U_IO; u++) src_data[b][u] = fu_res[u];
      for (int r = 0; r < N_RF; r++) src_data[b][U_RF+r] = rf_rdata[r][rd_idx[b][5]];
      src_data[b][U_BOOL] = word_t'(bool_rdata[0]);
      src_data[b][U_GCU]  = ra;
    end
  end

  // Units that have no result register drive zero.
  for (genvar u = 0; u < N_UNITS; u++) begin : g_nores
    if (u < U_ALU || u >= U_IO) begin : g_z
      assign fu_res[u] = '0;
    end
  end

  // ------------------------------------------------------- program rules
  always_ff @(posedge clk) begin
    if (rst_n && exec_en) begin
      assert (!conflict)
        else $error("tta_core: two moves to one socket in instruction at pc %0d", pc);
      assert (!rd_conflict)
        else $error("tta_core: two registers read through one socket at pc %0d", pc);
      assert (!(lsu_en[0] && lsu_en[1]))
        else $error("tta_core: both LSUs triggered in instruction at pc %0d", pc);
    end
  end
endmodule
