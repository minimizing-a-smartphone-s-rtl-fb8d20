// dma_arbiter: the switch behind domain-bound DMA for an I/O device.
//
// An I/O device's two data streams (packets to the device, packets from it) are
// connected either to the DMA engine of the untrusted domain or to two FIFO
// queues that only the I/O domain's own processor can reach. The choice is one
// bit of state, mode_untrusted_o, which only the control interface changes: a
// write on ctrl_wr_i loads ctrl_untrusted_i. In trusted mode the device talks to
// the FIFOs and the DMA side is held idle; in untrusted mode it talks to the DMA
// engine and the FIFO side is held idle. dma_permit_i, hard-wired from the I/O
// domain's mailboxes, is high only while the untrusted domain is the one using
// the I/O domain: without it a request for untrusted mode is refused, and if it
// falls while in untrusted mode both sides are stalled until the control
// interface switches back, so DMA never moves data outside such a use.
//
// Streams are valid/ready/last word streams; the switch is combinational (no
// added latency). fifo_irq_o interrupts the I/O domain's processor while the
// receive FIFO holds data and the arbiter is in trusted mode. Which side is
// chosen by which mode, and the existence of the control interface, follow the
// document; the permit input, the stalling and the interrupt condition's exact
// form are this design's choices.
module dma_arbiter #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // control interface
  input  logic              ctrl_wr_i,
  input  logic              ctrl_untrusted_i,
  input  logic              dma_permit_i,
  output logic              mode_untrusted_o,
  // device transmit stream (to the device)
  output logic              dev_tx_valid_o,
  input  logic              dev_tx_ready_i,
  output logic [DATA_W-1:0] dev_tx_data_o,
  output logic              dev_tx_last_o,
  // device receive stream (from the device)
  input  logic              dev_rx_valid_i,
  output logic              dev_rx_ready_o,
  input  logic [DATA_W-1:0] dev_rx_data_i,
  input  logic              dev_rx_last_i,
  // DMA engine: memory-to-device and device-to-memory streams
  input  logic              dma_tx_valid_i,
  output logic              dma_tx_ready_o,
  input  logic [DATA_W-1:0] dma_tx_data_i,
  input  logic              dma_tx_last_i,
  output logic              dma_rx_valid_o,
  input  logic              dma_rx_ready_i,
  output logic [DATA_W-1:0] dma_rx_data_o,
  output logic              dma_rx_last_o,
  // I/O domain FIFOs: transmit FIFO output and receive FIFO input
  input  logic              fifo_tx_valid_i,
  output logic              fifo_tx_ready_o,
  input  logic [DATA_W-1:0] fifo_tx_data_i,
  input  logic              fifo_tx_last_i,
  output logic              fifo_rx_valid_o,
  input  logic              fifo_rx_ready_i,
  output logic [DATA_W-1:0] fifo_rx_data_o,
  output logic              fifo_rx_last_o,
  input  logic              fifo_rx_nonempty_i,
  output logic              fifo_irq_o
);
  logic untrusted_q;
  logic use_dma, use_fifo;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         untrusted_q <= 1'b0;
    else if (ctrl_wr_i) untrusted_q <= ctrl_untrusted_i && dma_permit_i;
  end

  assign mode_untrusted_o = untrusted_q;
  assign use_dma  =  untrusted_q && dma_permit_i;
  assign use_fifo = !untrusted_q;

  always_comb begin
    // to the device
    dev_tx_valid_o  = (use_dma && dma_tx_valid_i) || (use_fifo && fifo_tx_valid_i);
    dev_tx_data_o   = use_dma ? dma_tx_data_i : (use_fifo ? fifo_tx_data_i : '0);
    dev_tx_last_o   = use_dma ? dma_tx_last_i : (use_fifo && fifo_tx_last_i);
    dma_tx_ready_o  = use_dma  && dev_tx_ready_i;
    fifo_tx_ready_o = use_fifo && dev_tx_ready_i;
    // from the device
    dma_rx_valid_o  = use_dma  && dev_rx_valid_i;
    fifo_rx_valid_o = use_fifo && dev_rx_valid_i;
    dma_rx_data_o   = use_dma  ? dev_rx_data_i : '0;
    fifo_rx_data_o  = use_fifo ? dev_rx_data_i : '0;
    dma_rx_last_o   = use_dma  && dev_rx_last_i;
    fifo_rx_last_o  = use_fifo && dev_rx_last_i;
    dev_rx_ready_o  = (use_dma && dma_rx_ready_i) || (use_fifo && fifo_rx_ready_i);
  end

  assign fifo_irq_o = use_fifo && fifo_rx_nonempty_i;

  // The state moves only on a control-interface write.
  a_ctrl_only: assert property (@(posedge clk) disable iff (!rst_n)
    !ctrl_wr_i |=> $stable(untrusted_q));
  // DMA never sees data without the permit.
  a_dma_bound: assert property (@(posedge clk) disable iff (!rst_n)
    !dma_permit_i |-> !dma_rx_valid_o && !dma_tx_ready_o);

endmodule
