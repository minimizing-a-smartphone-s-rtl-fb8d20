// tb_dma_arbiter: self-checking test of the domain-bound DMA arbiter.
//
// Checks that after reset the device streams are connected to the I/O domain's
// FIFOs; that a request for untrusted mode is refused without the permit; that
// with the permit the device is connected to the DMA engine and the FIFO side is
// cut off; that losing the permit stalls the DMA side although the state does not
// change; that only the control interface changes the state; and that the FIFO
// interrupt is raised only in trusted mode. Packets are random words with last
// markers, checked word for word at the receiving side.
module tb_dma_arbiter;
  logic clk = 0, rst_n = 0;
  logic ctrl_wr = 0, ctrl_untr = 0, permit = 0, mode;
  logic dtv, dtr = 1, dtl, drv = 0, drr, drl = 0;
  logic [31:0] dtd, drd = '0;
  logic mtv = 0, mtr, mtl = 0, mrv, mrr = 1, mrl;
  logic [31:0] mtd = '0, mrd;
  logic ftv = 0, ftr, ftl = 0, frv, frr = 1, frl;
  logic [31:0] ftd = '0, frd;
  logic nonempty = 0, irq;
  int checks = 0, failures = 0;

  dma_arbiter dut (
    .clk, .rst_n, .ctrl_wr_i(ctrl_wr), .ctrl_untrusted_i(ctrl_untr), .dma_permit_i(permit),
    .mode_untrusted_o(mode),
    .dev_tx_valid_o(dtv), .dev_tx_ready_i(dtr), .dev_tx_data_o(dtd), .dev_tx_last_o(dtl),
    .dev_rx_valid_i(drv), .dev_rx_ready_o(drr), .dev_rx_data_i(drd), .dev_rx_last_i(drl),
    .dma_tx_valid_i(mtv), .dma_tx_ready_o(mtr), .dma_tx_data_i(mtd), .dma_tx_last_i(mtl),
    .dma_rx_valid_o(mrv), .dma_rx_ready_i(mrr), .dma_rx_data_o(mrd), .dma_rx_last_o(mrl),
    .fifo_tx_valid_i(ftv), .fifo_tx_ready_o(ftr), .fifo_tx_data_i(ftd), .fifo_tx_last_i(ftl),
    .fifo_rx_valid_o(frv), .fifo_rx_ready_i(frr), .fifo_rx_data_o(frd), .fifo_rx_last_o(frl),
    .fifo_rx_nonempty_i(nonempty), .fifo_irq_o(irq));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic ctrl(input bit untr);
    ctrl_wr = 1; ctrl_untr = untr; tick(); ctrl_wr = 0;
  endtask

  // Offer a random packet on every source at once and check where each word lands.
  // trusted: FIFO <-> device; dma: DMA <-> device; none: nothing moves.
  task automatic traffic(input int mode_exp, input string what);
    logic [31:0] a, b, c;
    for (int i = 0; i < 8; i++) begin
      a = $urandom; b = $urandom; c = $urandom;
      mtv = 1; mtd = a; mtl = (i == 7);
      ftv = 1; ftd = b; ftl = (i == 7);
      drv = 1; drd = c; drl = (i == 7);
      #1;
      case (mode_exp)
        0: begin
          check(dtv && dtd == b && dtl == (i == 7) && ftr && !mtr, {what, ": FIFO -> device"});
          check(frv && frd == c && frl == (i == 7) && !mrv && mrd == '0 && drr, {what, ": device -> FIFO"});
        end
        1: begin
          check(dtv && dtd == a && dtl == (i == 7) && mtr && !ftr, {what, ": DMA -> device"});
          check(mrv && mrd == c && mrl == (i == 7) && !frv && frd == '0 && drr, {what, ": device -> DMA"});
        end
        default: begin
          check(!dtv && !mtr && !ftr, {what, ": transmit stalled"});
          check(!mrv && !frv && !drr, {what, ": receive stalled"});
        end
      endcase
      tick();
    end
    mtv = 0; ftv = 0; drv = 0;
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(); rst_n = 1; tick();
    check(!mode, "trusted after reset");
    traffic(0, "after reset");
    nonempty = 1; #1 check(irq, "FIFO interrupt in trusted mode"); nonempty = 0;
    // no permit: refused
    ctrl(1);
    check(!mode, "untrusted mode refused without permit");
    traffic(0, "refused");
    // permit: untrusted domain is using the network domain
    permit = 1; tick();
    check(!mode, "permit alone does not change the state");
    ctrl(1);
    check(mode, "untrusted mode with permit");
    traffic(1, "untrusted");
    nonempty = 1; #1 check(!irq, "no FIFO interrupt in untrusted mode"); nonempty = 0;
    // backpressure from the DMA engine reaches the device
    mrr = 0; drv = 1; #1 check(!drr, "DMA backpressure"); drv = 0; mrr = 1;
    // permit lost: DMA cut off, state kept
    permit = 0; tick();
    check(mode, "state unchanged without a control write");
    traffic(2, "permit lost");
    permit = 1; tick();
    traffic(1, "permit back");
    ctrl(0);
    check(!mode, "control interface returns to trusted");
    traffic(0, "trusted again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
