// ahb_decoder -- address decoder of the FPGA-side AHB slaves.
//
// Combinational: from HADDR it raises exactly one HSEL line of the slave whose
// region holds the address, while the FPGA as a whole is selected (hsel_fpga).
// The region is HADDR[SEL_LSB +: SEL_W]; region values of N_SLAVES and above
// select nothing. The region layout is this design's choice.
module ahb_decoder
  import ahb_pkg::*;
#(
  parameter int unsigned NS  = N_SLAVES,
  parameter int unsigned LSB = SEL_LSB,
  parameter int unsigned W   = SEL_W
) (
  input  logic               hsel_fpga,
  input  logic [HADDR_W-1:0] haddr,
  output logic [NS-1:0]      hsel
);
  logic [W-1:0] region;
  assign region = haddr[LSB +: W];

  always_comb begin
    hsel = '0;
    for (int i = 0; i < NS; i++)
      if (hsel_fpga && 32'(region) == i) hsel[i] = 1'b1;
  end
endmodule
