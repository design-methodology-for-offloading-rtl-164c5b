// tta_io_sfu -- output special function unit of the TTA processor.
//
// A single trigger socket: a move to it with opcode 0 places the moved word on
// the external output port io_data and pulses io_valid for one cycle. This is
// how a function unit is tied to the processor's external interface. The
// value is held on io_data until the next write. The unit is only named in the
// processor drawing; what it does here is this design's choice.
module tta_io_sfu
  import tta_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        t_we,
  input  logic [3:0]  t_op,
  input  word_t       t_in,
  output logic        io_valid,
  output word_t       io_data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      io_valid <= 1'b0;
      io_data  <= '0;
    end else begin
      io_valid <= t_we && t_op == 4'd0;
      if (t_we && t_op == 4'd0) io_data <= t_in;
    end
  end
endmodule
