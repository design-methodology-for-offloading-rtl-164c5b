// fpga_accel_top -- FPGA side of the software-offload platform.
//
// An application-specific TTA processor runs an offloaded function on data
// that the host's DMA controller places in an on-chip data memory. Around the
// processor sit the adapter blocks that tie it to the host's AHB bus:
//   * imem_ahb      instruction memory, written by the host 32 bits at a time,
//                   read by the processor one whole instruction per cycle;
//   * dmem_ahb      dual-port data memory, processor on one port, AHB on the
//                   other;
//   * dma_module    state machine that admits DMA bursts only while the
//                   processor is locked, starts it when the input block is
//                   in and holds back the read-out until it has finished;
//   * cycle_counter memory-mapped cycle counter for timing an offload;
//   * ahb_decoder / ahb_mux  select one slave per transfer and return its
//                   response.
// Host-side view: load the program into instruction memory once; then for
// each offload the DMA controller writes the input block (channel 0), the
// processor runs and halts, and the DMA controller reads the results
// (channel 1).
//
// Ports: one AHB slave port (hsel_fpga selects the FPGA region; HADDR[17:16]
// picks data memory 0, instruction memory 1, cycle counter 2), the DMA
// request lines of two channels, the processor's output unit and status.
// Parameters default to the small processor configuration; the larger one is
// N_BUS=17, N_ALU=5, N_MUL=3, N_SHIFT=3, N_RF=4. Memory sizes are this
// design's choice.
module fpga_accel_top
  import ahb_pkg::*;
#(
  parameter int unsigned N_BUS      = 5,
  parameter int unsigned N_ALU      = 2,
  parameter int unsigned N_MUL      = 1,
  parameter int unsigned N_SHIFT    = 1,
  parameter int unsigned N_RF       = 2,
  parameter int unsigned IMEM_SIZE  = 1024,
  parameter int unsigned DMEM_DEPTH = 8192
) (
  input  logic               hclk,
  input  logic               hresetn,
  // AHB slave port
  input  logic               hsel_fpga,
  input  logic [HADDR_W-1:0] haddr,
  input  logic [1:0]         htrans,
  input  logic               hwrite,
  input  logic [2:0]         hsize,
  input  logic [HDATA_W-1:0] hwdata,
  input  logic               hready,
  output logic [HDATA_W-1:0] hrdata,
  output logic               hreadyout,
  output logic               hresp,
  // DMA controller request lines, bit x = channel x
  output logic [1:0]         dma_breq,
  input  logic [1:0]         dma_clr,
  input  logic [1:0]         dma_tc,
  // processor output unit and status
  output logic               io_valid,
  output logic [31:0]        io_data,
  output logic               tta_busy,
  output logic               tta_complete,
  output logic [15:0]        offloads
);
  localparam int unsigned INSTR_W = N_BUS * tta_pkg::MOVE_W;
  localparam int unsigned PC_W    = $clog2(IMEM_SIZE);
  localparam int unsigned DADDR_W = $clog2(DMEM_DEPTH);

  // ------------------------------------------------------------ AHB fabric
  logic [N_SLAVES-1:0] hsel;
  logic [HDATA_W-1:0]  s_hrdata    [N_SLAVES];
  logic                s_hreadyout [N_SLAVES];
  logic                s_hresp     [N_SLAVES];

  ahb_decoder u_dec (.hsel_fpga, .haddr, .hsel);

  ahb_mux u_mux (.hclk, .hresetn, .hready, .hsel, .htrans,
    .s_hrdata, .s_hreadyout, .s_hresp, .hrdata, .hreadyout, .hresp);

  // ------------------------------------------------------------ processor
  logic               tta_start;
  logic               imem_en;
  logic [PC_W-1:0]    imem_addr;
  logic [INSTR_W-1:0] imem_data;
  logic               dmem_en, dmem_we;
  logic [DADDR_W-1:0] dmem_addr;
  logic [31:0]        dmem_wdata, dmem_rdata;

  tta_core #(.N_BUS(N_BUS), .N_ALU(N_ALU), .N_MUL(N_MUL), .N_SHIFT(N_SHIFT),
             .N_RF(N_RF), .PC_W(PC_W), .DADDR_W(DADDR_W)) u_tta (
    .clk(hclk), .rst_n(hresetn), .tta_start, .tta_complete,
    .imem_en, .imem_addr, .imem_data,
    .dmem_en, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .io_valid, .io_data);

  imem_ahb #(.MEM_SIZE(IMEM_SIZE), .MEM_WIDTH(INSTR_W), .WORD_WIDTH(32)) u_imem (
    .clk(hclk), .rst_n(hresetn),
    .rd_en(imem_en), .rd_addr(imem_addr), .rd_data(imem_data),
    .hsel(hsel[S_IMEM]), .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hrdata(s_hrdata[S_IMEM]), .hreadyout(s_hreadyout[S_IMEM]),
    .hresp(s_hresp[S_IMEM]));

  dmem_ahb #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk(hclk), .rst_n(hresetn),
    .a_en(dmem_en), .a_we(dmem_we), .a_addr(dmem_addr),
    .a_wdata(dmem_wdata), .a_rdata(dmem_rdata),
    .hsel(hsel[S_DMEM]), .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hrdata(s_hrdata[S_DMEM]), .hreadyout(s_hreadyout[S_DMEM]),
    .hresp(s_hresp[S_DMEM]));

  logic [31:0] ccount;
  cycle_counter u_ccnt (
    .clk(hclk), .rst_n(hresetn),
    .hsel(hsel[S_CCNT]), .haddr, .htrans, .hwrite, .hwdata, .hready,
    .hrdata(s_hrdata[S_CCNT]), .hreadyout(s_hreadyout[S_CCNT]),
    .hresp(s_hresp[S_CCNT]), .count(ccount));

  // ------------------------------------------------------------ DMA module
  logic [15:0] bursts_in, bursts_out;
  dma_module u_dmam (
    .clk(hclk), .rst_n(hresetn),
    .dma_breq, .dma_clr, .dma_tc,
    .tta_start, .tta_complete,
    .busy(tta_busy), .bursts_in, .bursts_out, .offloads);

  // Only 32-bit transfers are supported on this port.
  always_ff @(posedge hclk) begin
    if (hresetn && hsel_fpga && hready && is_xfer(htrans))
      assert (hsize == 3'd2) else $error("fpga_accel_top: only word transfers");
  end
endmodule
