// ahb_mux -- slave-to-master multiplexer of the FPGA-side AHB slaves.
//
// AHB is pipelined: the slave selected in an address phase answers in the
// following data phase. The mux therefore registers which slave was selected
// when an address phase was accepted (hready high) and routes that slave's
// HRDATA, HREADYOUT and HRESP back to the bus during the data phase. When no
// slave was selected the bus sees a ready, OKAY, zero response.
module ahb_mux
  import ahb_pkg::*;
#(
  parameter int unsigned NS = N_SLAVES
) (
  input  logic               hclk,
  input  logic               hresetn,
  input  logic               hready,       // bus HREADY (end of data phase)
  input  logic [NS-1:0]      hsel,         // address-phase selects
  input  logic [1:0]         htrans,
  input  logic [HDATA_W-1:0] s_hrdata    [NS],
  input  logic               s_hreadyout [NS],
  input  logic               s_hresp     [NS],
  output logic [HDATA_W-1:0] hrdata,
  output logic               hreadyout,
  output logic               hresp
);
  logic [NS-1:0] sel_q;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn)    sel_q <= '0;
    else if (hready) sel_q <= is_xfer(htrans) ? hsel : '0;
  end

  always_comb begin
    hrdata    = '0;
    hreadyout = 1'b1;
    hresp     = HRESP_OKAY;
    for (int i = 0; i < NS; i++) begin
      if (sel_q[i]) begin
        hrdata    = s_hrdata[i];
        hreadyout = s_hreadyout[i];
        hresp     = s_hresp[i];
      end
    end
  end
endmodule
