// imem_ahb -- instruction memory with asymmetric ports.
//
// The processor reads one whole instruction of MEM_WIDTH bits per cycle
// (synchronous: address and en in one cycle, data the next). The host writes
// the program over the 32-bit AHB bus, so an instruction arrives as
// WPI = ceil(MEM_WIDTH / WORD_WIDTH) words. Word k of instruction i lives at
// byte address (i * WPI_P2 + k) * 4, WPI_P2 being WPI rounded up to a power of
// two. An assembly register collects the words; the write of the last word
// (k = WPI-1) stores the assembled instruction into the RAM in one go, so the
// RAM needs only one full-width write port. Word 0 sits in the low bits.
// Parameters are the three the program image determines: the number of
// instructions, the instruction width and the host word width.
// The host port is write-only: AHB reads return zero. Zero wait states.
module imem_ahb
  import ahb_pkg::*;
#(
  parameter int unsigned MEM_SIZE   = 1024,
  parameter int unsigned MEM_WIDTH  = 130,
  parameter int unsigned WORD_WIDTH = 32,
  localparam int unsigned AW     = $clog2(MEM_SIZE),
  localparam int unsigned WPI    = (MEM_WIDTH + WORD_WIDTH - 1) / WORD_WIDTH,
  localparam int unsigned KW     = (WPI > 1) ? $clog2(WPI) : 1,
  localparam int unsigned WPI_P2 = 1 << KW
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // processor read port
  input  logic                  rd_en,
  input  logic [AW-1:0]         rd_addr,
  output logic [MEM_WIDTH-1:0]  rd_data,
  // AHB slave
  input  logic                  hsel,
  input  logic [HADDR_W-1:0]    haddr,
  input  logic [1:0]            htrans,
  input  logic                  hwrite,
  input  logic [WORD_WIDTH-1:0] hwdata,
  input  logic                  hready,
  output logic [HDATA_W-1:0]    hrdata,
  output logic                  hreadyout,
  output logic                  hresp
);
  logic [MEM_WIDTH-1:0] mem [MEM_SIZE];

  logic [WPI*WORD_WIDTH-1:0] asm_q;       // assembly register
  logic                      wr_q;
  logic [KW-1:0]             wr_k_q;
  logic [AW-1:0]             wr_i_q;
  logic [WPI*WORD_WIDTH-1:0] asm_next;

  // address phase: capture which word of which instruction is written
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q   <= 1'b0;
      wr_k_q <= '0;
      wr_i_q <= '0;
    end else if (hready) begin
      wr_q   <= hsel && is_xfer(htrans) && hwrite;
      wr_k_q <= haddr[2 +: KW];
      wr_i_q <= haddr[2+KW +: AW];
    end
  end

  always_comb begin
    asm_next = asm_q;
    for (int k = 0; k < WPI; k++)
      if (32'(wr_k_q) == k) asm_next[k*WORD_WIDTH +: WORD_WIDTH] = hwdata;
  end

  // data phase: fill the assembly register, commit on the last word
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    asm_q <= '0;
    else if (wr_q) asm_q <= asm_next;
  end

  always_ff @(posedge clk) begin
    if (wr_q && 32'(wr_k_q) == WPI - 1) mem[wr_i_q] <= asm_next[MEM_WIDTH-1:0];
    if (rd_en) rd_data <= mem[rd_addr];
  end

  assign hrdata    = '0;
  assign hreadyout = 1'b1;
  assign hresp     = HRESP_OKAY;
endmodule
