// ahb_pkg -- AMBA AHB signal encodings shared by the FPGA-side bus slaves.
//
// HTRANS codes: IDLE and BUSY carry no transfer, NONSEQ starts a transfer or
// a burst, SEQ continues a burst. HRESP: OKAY or ERROR. Only 32-bit transfers
// are used on this bus. The address map of the FPGA slaves is a choice of this
// design: HADDR[17:16] selects data memory (0), instruction memory (1) or the
// cycle counter (2); 3 is unmapped.
package ahb_pkg;
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  localparam logic HRESP_OKAY  = 1'b0;
  localparam logic HRESP_ERROR = 1'b1;

  localparam int unsigned HADDR_W  = 32;
  localparam int unsigned HDATA_W  = 32;
  localparam int unsigned N_SLAVES = 3;
  localparam int unsigned SEL_LSB  = 16;
  localparam int unsigned SEL_W    = 2;

  localparam int unsigned S_DMEM  = 0;
  localparam int unsigned S_IMEM  = 1;
  localparam int unsigned S_CCNT  = 2;

  // True in the address phase of a real transfer (NONSEQ or SEQ).
  function automatic logic is_xfer(input logic [1:0] htrans);
    return htrans[1];
  endfunction
endpackage
