// dmem_ahb -- dual-port data memory shared by the TTA and the AHB bus.
//
// A DEPTH x 32-bit on-chip RAM with two synchronous ports. Port A belongs to
// the processor's load/store units: en/we/addr/wdata in one cycle, rdata the
// next. Port B is an AHB slave with zero wait states: in the address phase of
// a read the RAM is read so the word is on HRDATA in the data phase; a write's
// address is registered and HWDATA is written in the data phase. A read whose
// address phase meets the data phase of a write to the same word returns the
// new data. If both ports write one word in the same cycle the AHB port wins.
// Byte addresses on AHB, word addresses on port A; only 32-bit transfers.
// The dual-port structure follows the interface description; the wait-state-
// free timing and the collision rules are this design's.
module dmem_ahb
  import ahb_pkg::*;
#(
  parameter int unsigned DEPTH  = 8192,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // port A: processor
  input  logic               a_en,
  input  logic               a_we,
  input  logic [AW-1:0]      a_addr,
  input  logic [31:0]        a_wdata,
  output logic [31:0]        a_rdata,
  // port B: AHB slave
  input  logic               hsel,
  input  logic [HADDR_W-1:0] haddr,
  input  logic [1:0]         htrans,
  input  logic               hwrite,
  input  logic [HDATA_W-1:0] hwdata,
  input  logic               hready,
  output logic [HDATA_W-1:0] hrdata,
  output logic               hreadyout,
  output logic               hresp
);
  logic [31:0] mem [DEPTH];

  logic          acc, rd, wr;
  logic [AW-1:0] b_addr;
  logic          wr_q;
  logic [AW-1:0] wr_addr_q;
  logic          fwd_q;
  logic [31:0]   b_rdata;

  assign acc    = hsel && hready && is_xfer(htrans);
  assign rd     = acc && !hwrite;
  assign wr     = acc && hwrite;
  assign b_addr = haddr[AW+1:2];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      a_rdata <= mem[a_addr];
    end
    if (wr_q) mem[wr_addr_q] <= hwdata;
    if (rd) b_rdata <= mem[b_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q      <= 1'b0;
      wr_addr_q <= '0;
      fwd_q     <= 1'b0;
    end else begin
      if (hready) begin
        wr_q      <= wr;
        wr_addr_q <= b_addr;
      end
      fwd_q <= rd && wr_q && wr_addr_q == b_addr;
    end
  end

  logic [31:0] fwd_data_q;
  always_ff @(posedge clk) if (wr_q) fwd_data_q <= hwdata;

  assign hrdata    = fwd_q ? fwd_data_q : b_rdata;
  assign hreadyout = 1'b1;
  assign hresp     = HRESP_OKAY;
endmodule
