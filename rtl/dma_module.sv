// dma_module -- DMA module (DMAM): paces DMA transfers around the processor.
//
// A small state machine that lets the platform's DMA controller move data into
// and out of the data memory only while the processor is locked, and starts
// the processor when a whole input block has arrived. Flow per offload:
//   LOAD    processor idle; request bursts on channel 0 (host to FPGA) by
//           holding dma_breq[0]. The DMA controller marks the last beat of
//           each burst with dma_clr[0] (and dma_tc[0] on the last burst).
//   ACK     dma_breq dropped for one cycle: the burst is acknowledged.
//           After the last burst go to START, otherwise back to LOAD.
//   START   one-cycle tta_start pulse: the processor leaves its lock.
//   RUN     no requests; transfers on both channels stay blocked until the
//           processor raises tta_complete (and locks itself).
//   UNLOAD  request bursts on channel 1 (FPGA to host) the same way, with
//           acknowledgement cycles; after the last one, back to LOAD.
// Channels are given as 2-bit vectors, bit x for channel x, like the
// DMA_BREQx / DMA_CLRx / DMA_TCx request lines of the platform's DMA
// controller. The steps follow the specified flow; the one-cycle
// acknowledgement, the channel numbering and the strict load-run-unload
// order (no new input accepted before the results are read) are this
// design's choices. Counters of bursts and offloads are outputs for status.
module dma_module #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [1:0]       dma_breq,
  input  logic [1:0]       dma_clr,
  input  logic [1:0]       dma_tc,
  output logic             tta_start,
  input  logic             tta_complete,
  output logic             busy,          // processor running
  output logic [CNT_W-1:0] bursts_in,
  output logic [CNT_W-1:0] bursts_out,
  output logic [CNT_W-1:0] offloads
);
  typedef enum logic [2:0] {
    S_LOAD, S_LOAD_ACK, S_START, S_RUN, S_UNLOAD, S_UNLOAD_ACK
  } state_e;

  state_e state, state_n;
  logic   last_q, last_n;

  always_comb begin
    state_n   = state;
    last_n    = last_q;
    dma_breq  = 2'b00;
    tta_start = 1'b0;
    unique case (state)
      S_LOAD: begin
        dma_breq[0] = 1'b1;
        if (dma_clr[0]) begin
          state_n = S_LOAD_ACK;
          last_n  = dma_tc[0];
        end
      end
      S_LOAD_ACK: state_n = last_q ? S_START : S_LOAD;
      S_START: begin
        tta_start = 1'b1;
        state_n   = S_RUN;
      end
      S_RUN: if (tta_complete) state_n = S_UNLOAD;
      S_UNLOAD: begin
        dma_breq[1] = 1'b1;
        if (dma_clr[1]) begin
          state_n = S_UNLOAD_ACK;
          last_n  = dma_tc[1];
        end
      end
      S_UNLOAD_ACK: state_n = last_q ? S_LOAD : S_UNLOAD;
      default: state_n = S_LOAD;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_LOAD;
      last_q     <= 1'b0;
      bursts_in  <= '0;
      bursts_out <= '0;
      offloads   <= '0;
    end else begin
      state  <= state_n;
      last_q <= last_n;
      if (state == S_LOAD && dma_clr[0])   bursts_in  <= bursts_in + 1'b1;
      if (state == S_UNLOAD && dma_clr[1]) bursts_out <= bursts_out + 1'b1;
      if (state == S_UNLOAD_ACK && last_q) offloads   <= offloads + 1'b1;
    end
  end

  assign busy = (state == S_START) || (state == S_RUN);

  // Request-line rules: never both channels at once, and never a request
  // while the processor runs.
  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(dma_breq[0] && dma_breq[1]))
        else $error("dma_module: both channels requested");
      assert (!(busy && dma_breq != 2'b00))
        else $error("dma_module: request while the processor runs");
    end
  end
endmodule
