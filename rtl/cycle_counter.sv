// cycle_counter -- memory-mapped counter of FPGA clock cycles (AHB slave).
//
// Used to time an offload from the host. Register map (byte offsets):
//   0x0 CTRL   write: bit 0 start, bit 1 stop, bit 2 reset (clear to zero);
//              read:  bit 0 = counting
//   0x4 COUNT  read: the number of clock cycles counted so far
// Counting runs on every cycle while started. A write takes effect in the
// AHB data phase; reset and start written together clear and then count from
// zero. Zero wait states, OKAY responses. The start/stop/reset/read function
// is the specification; the register layout is this design's choice.
module cycle_counter
  import ahb_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               hsel,
  input  logic [HADDR_W-1:0] haddr,
  input  logic [1:0]         htrans,
  input  logic               hwrite,
  input  logic [HDATA_W-1:0] hwdata,
  input  logic               hready,
  output logic [HDATA_W-1:0] hrdata,
  output logic               hreadyout,
  output logic               hresp,
  output logic [CNT_W-1:0]   count
);
  logic       running;
  logic       wr_q, rd_q;
  logic       reg_q;          // 0: CTRL, 1: COUNT

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q  <= 1'b0;
      rd_q  <= 1'b0;
      reg_q <= 1'b0;
    end else if (hready) begin
      wr_q  <= hsel && is_xfer(htrans) && hwrite;
      rd_q  <= hsel && is_xfer(htrans) && !hwrite;
      reg_q <= haddr[2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      count   <= '0;
    end else begin
      if (wr_q && !reg_q && hwdata[2]) count <= '0;
      else if (running)                count <= count + 1'b1;
      if (wr_q && !reg_q) begin
        if (hwdata[0])      running <= 1'b1;
        else if (hwdata[1]) running <= 1'b0;
      end
    end
  end

  always_comb begin
    hrdata = '0;
    if (rd_q) hrdata = reg_q ? HDATA_W'(count) : HDATA_W'(running);
  end
  assign hreadyout = 1'b1;
  assign hresp     = HRESP_OKAY;
endmodule
