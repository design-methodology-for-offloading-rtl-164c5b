// tta_rf -- register file of the TTA processor.
//
// NREGS registers of WIDTH bits, one write port and NRD combinational read
// ports. The processor uses two read ports on each general register file and
// one on the boolean file, as in its drawing. A write
// takes effect at the end of the cycle; a read in the same cycle sees the old
// value. All registers reset to zero. Used twice with 32 x 32 bits for the
// general register files and once with 2 x 1 bit for the boolean registers
// that guard moves. Sizes and port counts follow the processor drawing.
module tta_rf #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NRD   = 2,
  localparam int unsigned AW   = (NREGS > 1) ? $clog2(NREGS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr [NRD],
  output logic [WIDTH-1:0] rdata [NRD],
  output logic [WIDTH-1:0] regs  [NREGS]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && 32'(waddr) < NREGS) begin
      regs[waddr] <= wdata;
    end
  end

  always_comb begin
    for (int p = 0; p < NRD; p++)
      rdata[p] = (32'(raddr[p]) < NREGS) ? regs[raddr[p]] : '0;
  end
endmodule
