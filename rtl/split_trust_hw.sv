// split_trust_hw: the trusted hardware fabric of the split-trust machine.
//
// The machine is a set of trust domains (resource manager, untrusted domain, two
// TEEs, serial input, serial output, storage, network, TPM mediator) that share no
// processor, memory or bus. The processors, their memories, the I/O controllers,
// the DMA engine and the TPM sit outside this module; what sits inside is every
// piece of hardware through which the domains meet, and therefore the only
// hardware a security-critical program must trust besides the root of trust:
//
//   * 12 verifiably delegable mailboxes (octo_pkg lists them): 7 with a fixed
//     reader (serial output, storage and network command and data-in, one per
//     TEE) and 5 with a fixed writer (serial input, storage and network response
//     and data-out). Data-plane mailboxes carry 512 B messages, the others 64 B;
//     each holds 4 messages. Their delegable ends reach the resource manager, the
//     untrusted domain and both TEEs.
//   * 11 permanent hardware queues between fixed pairs of domains.
//   * The reset guard. rst_req_i carries the resource manager's reset requests;
//     dom_rst_o the resets that reach each domain. A domain's reset also resets
//     the mailboxes it is the fixed end of and the queues it is an end of.
//   * The network domain's DMA arbiter with its transmit and receive FIFOs. The
//     arbiter may connect the Ethernet controller to the DMA engine only while
//     both network control mailboxes are delegated to the untrusted domain.
//   * One bootloader ROM per microcontroller domain, cleared only by rst_n.
//
// All ports are plain signals or arrays indexed by mailbox, queue, domain or ROM
// number (octo_pkg gives the numbering); one clock. The mailbox, reset guard,
// arbiter and ROM behaviour, the counts of mailboxes and queues and the message
// sizes follow the document; which domains each mailbox and queue connect, the
// DMA permit condition and all widths and depths not given there are this
// design's choices.
module split_trust_hw
  import octo_pkg::*;
#(
  parameter int unsigned TICK_CYCLES    = 100000,
  parameter int unsigned HQ_DEPTH       = 64,
  parameter int unsigned NET_FIFO_DEPTH = 512,
  parameter int unsigned ROM_DEPTH      = 4096
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // fixed-reader mailboxes
  input  mbox_cmd_t                    fr_cmd_i          [N_FR][N_PORTS],
  output mbox_status_t                 fr_status_o       [N_FR][N_PORTS],
  input  logic                         fr_wr_valid_i     [N_FR][N_PORTS],
  input  logic [DATA_W-1:0]            fr_wr_data_i      [N_FR][N_PORTS],
  output logic                         fr_wr_ready_o     [N_FR][N_PORTS],
  output mbox_status_t                 fr_fixed_status_o [N_FR],
  output logic                         fr_rd_valid_o     [N_FR],
  input  logic                         fr_rd_ready_i     [N_FR],
  output logic [DATA_W-1:0]            fr_rd_data_o      [N_FR],
  // fixed-writer mailboxes
  input  mbox_cmd_t                    fw_cmd_i          [N_FW][N_PORTS],
  output mbox_status_t                 fw_status_o       [N_FW][N_PORTS],
  output logic                         fw_rd_valid_o     [N_FW][N_PORTS],
  input  logic                         fw_rd_ready_i     [N_FW][N_PORTS],
  output logic [DATA_W-1:0]            fw_rd_data_o      [N_FW][N_PORTS],
  output mbox_status_t                 fw_fixed_status_o [N_FW],
  input  logic                         fw_wr_valid_i     [N_FW],
  output logic                         fw_wr_ready_o     [N_FW],
  input  logic [DATA_W-1:0]            fw_wr_data_i      [N_FW],
  // permanent hardware queues
  input  logic                         hq_wr_valid_i     [N_HQ],
  output logic                         hq_wr_ready_o     [N_HQ],
  input  logic [DATA_W-1:0]            hq_wr_data_i      [N_HQ],
  output logic                         hq_rd_valid_o     [N_HQ],
  input  logic                         hq_rd_ready_i     [N_HQ],
  output logic [DATA_W-1:0]            hq_rd_data_o      [N_HQ],
  // domain resets
  input  logic                         rst_req_i         [N_DOM],
  output logic                         dom_rst_o         [N_DOM],
  output logic                         rst_blocked_o     [N_DOM],
  // network: arbiter control (from the network domain)
  input  logic                         net_arb_wr_i,
  input  logic                         net_arb_untrusted_i,
  output logic                         net_arb_mode_o,
  output logic                         net_dma_permit_o,
  // network: Ethernet controller streams
  output logic                         dev_tx_valid_o,
  input  logic                         dev_tx_ready_i,
  output logic [DATA_W-1:0]            dev_tx_data_o,
  output logic                         dev_tx_last_o,
  input  logic                         dev_rx_valid_i,
  output logic                         dev_rx_ready_o,
  input  logic [DATA_W-1:0]            dev_rx_data_i,
  input  logic                         dev_rx_last_i,
  // network: DMA engine streams (untrusted domain's memory)
  input  logic                         dma_tx_valid_i,
  output logic                         dma_tx_ready_o,
  input  logic [DATA_W-1:0]            dma_tx_data_i,
  input  logic                         dma_tx_last_i,
  output logic                         dma_rx_valid_o,
  input  logic                         dma_rx_ready_i,
  output logic [DATA_W-1:0]            dma_rx_data_o,
  output logic                         dma_rx_last_o,
  // network: the network domain's packet FIFOs
  input  logic                         net_tx_valid_i,
  output logic                         net_tx_ready_o,
  input  logic [DATA_W-1:0]            net_tx_data_i,
  input  logic                         net_tx_last_i,
  output logic                         net_rx_valid_o,
  input  logic                         net_rx_ready_i,
  output logic [DATA_W-1:0]            net_rx_data_o,
  output logic                         net_rx_last_o,
  output logic                         net_irq_o,
  // bootloader ROMs
  input  logic                         rom_wr_en_i       [N_ROM],
  input  logic [$clog2(ROM_DEPTH)-1:0] rom_wr_addr_i     [N_ROM],
  input  logic [DATA_W-1:0]            rom_wr_data_i     [N_ROM],
  input  logic                         rom_lock_i        [N_ROM],
  output logic                         rom_locked_o      [N_ROM],
  input  logic                         rom_rd_en_i       [N_ROM],
  input  logic [$clog2(ROM_DEPTH)-1:0] rom_rd_addr_i     [N_ROM],
  output logic [DATA_W-1:0]            rom_rd_data_o     [N_ROM]
);
  logic    dom_rst    [N_DOM];
  logic    mb_session [N_MBOX];
  dom_id_e mb_owner   [N_MBOX];

  // ---------------------------------------------------------------- mailboxes
  for (genvar i = 0; i < N_FR; i++) begin : g_fr
    logic mb_rst_n;
    assign mb_rst_n = rst_n && !dom_rst[int'(FR_FIXED_DOM[i])];
    mailbox_fr #(
      .MSG_WORDS   (FR_DATA_PLANE[i] ? DATA_MSG_WORDS : CTRL_MSG_WORDS),
      .TICK_CYCLES (TICK_CYCLES)
    ) u_mbox (
      .clk, .rst_n (mb_rst_n),
      .cmd_i          (fr_cmd_i[i]),
      .status_o       (fr_status_o[i]),
      .d_wr_valid_i   (fr_wr_valid_i[i]),
      .d_wr_data_i    (fr_wr_data_i[i]),
      .d_wr_ready_o   (fr_wr_ready_o[i]),
      .fixed_status_o (fr_fixed_status_o[i]),
      .f_rd_valid_o   (fr_rd_valid_o[i]),
      .f_rd_ready_i   (fr_rd_ready_i[i]),
      .f_rd_data_o    (fr_rd_data_o[i]),
      .owner_dom_o    (mb_owner[i]),
      .in_session_o   (mb_session[i]),
      .busy_o         ()
    );
  end

  for (genvar i = 0; i < N_FW; i++) begin : g_fw
    logic mb_rst_n;
    assign mb_rst_n = rst_n && !dom_rst[int'(FW_FIXED_DOM[i])];
    mailbox_fw #(
      .MSG_WORDS   (FW_DATA_PLANE[i] ? DATA_MSG_WORDS : CTRL_MSG_WORDS),
      .TICK_CYCLES (TICK_CYCLES)
    ) u_mbox (
      .clk, .rst_n (mb_rst_n),
      .cmd_i          (fw_cmd_i[i]),
      .status_o       (fw_status_o[i]),
      .d_rd_valid_o   (fw_rd_valid_o[i]),
      .d_rd_ready_i   (fw_rd_ready_i[i]),
      .d_rd_data_o    (fw_rd_data_o[i]),
      .fixed_status_o (fw_fixed_status_o[i]),
      .f_wr_valid_i   (fw_wr_valid_i[i]),
      .f_wr_ready_o   (fw_wr_ready_o[i]),
      .f_wr_data_i    (fw_wr_data_i[i]),
      .owner_dom_o    (mb_owner[N_FR+i]),
      .in_session_o   (mb_session[N_FR+i]),
      .busy_o         ()
    );
  end

  // ------------------------------------------------------------- reset guard
  reset_guard u_guard (
    .clk, .rst_n,
    .rst_req_i,
    .mbox_session_i (mb_session),
    .mbox_owner_i   (mb_owner),
    .dom_rst_o      (dom_rst),
    .blocked_o      (rst_blocked_o)
  );
  assign dom_rst_o = dom_rst;

  // --------------------------------------------------- permanent hw queues
  for (genvar q = 0; q < N_HQ; q++) begin : g_hq
    logic q_rst_n;
    assign q_rst_n = rst_n && !dom_rst[int'(HQ_SRC[q])] && !dom_rst[int'(HQ_DST[q])];
    hw_queue #(.DATA_W(DATA_W), .DEPTH(HQ_DEPTH)) u_q (
      .clk, .rst_n (q_rst_n),
      .wr_valid (hq_wr_valid_i[q]), .wr_ready (hq_wr_ready_o[q]), .wr_data (hq_wr_data_i[q]),
      .rd_valid (hq_rd_valid_o[q]), .rd_ready (hq_rd_ready_i[q]), .rd_data (hq_rd_data_o[q]),
      .count    ()
    );
  end

  // ------------------------------------------------ network domain-bound DMA
  logic                net_rst_n, dma_permit;
  logic                txq_valid, txq_ready, rxq_valid, rxq_ready;
  logic [DATA_W:0]     txq_data, rxq_data;
  logic                arb_rx_valid, arb_rx_ready, arb_rx_last;
  logic [DATA_W-1:0]   arb_rx_data;

  assign net_rst_n  = rst_n && !dom_rst[int'(DOM_NETWORK)];
  assign dma_permit = mb_session[FR_NET_CMD] && (mb_owner[FR_NET_CMD] == DOM_UNTRUSTED) &&
                      mb_session[N_FR + FW_NET_RESP] &&
                      (mb_owner[N_FR + FW_NET_RESP] == DOM_UNTRUSTED);
  assign net_dma_permit_o = dma_permit;

  hw_queue #(.DATA_W(DATA_W + 1), .DEPTH(NET_FIFO_DEPTH)) u_net_txq (
    .clk, .rst_n (net_rst_n),
    .wr_valid (net_tx_valid_i), .wr_ready (net_tx_ready_o), .wr_data ({net_tx_last_i, net_tx_data_i}),
    .rd_valid (txq_valid),      .rd_ready (txq_ready),      .rd_data (txq_data),
    .count    ()
  );

  hw_queue #(.DATA_W(DATA_W + 1), .DEPTH(NET_FIFO_DEPTH)) u_net_rxq (
    .clk, .rst_n (net_rst_n),
    .wr_valid (arb_rx_valid),   .wr_ready (arb_rx_ready),   .wr_data ({arb_rx_last, arb_rx_data}),
    .rd_valid (rxq_valid),      .rd_ready (rxq_ready),      .rd_data (rxq_data),
    .count    ()
  );
  assign net_rx_valid_o = rxq_valid;
  assign rxq_ready      = net_rx_ready_i;
  assign net_rx_data_o  = rxq_data[DATA_W-1:0];
  assign net_rx_last_o  = rxq_data[DATA_W];

  dma_arbiter #(.DATA_W(DATA_W)) u_arb (
    .clk, .rst_n (net_rst_n),
    .ctrl_wr_i        (net_arb_wr_i),
    .ctrl_untrusted_i (net_arb_untrusted_i),
    .dma_permit_i     (dma_permit),
    .mode_untrusted_o (net_arb_mode_o),
    .dev_tx_valid_o, .dev_tx_ready_i, .dev_tx_data_o, .dev_tx_last_o,
    .dev_rx_valid_i, .dev_rx_ready_o, .dev_rx_data_i, .dev_rx_last_i,
    .dma_tx_valid_i, .dma_tx_ready_o, .dma_tx_data_i, .dma_tx_last_i,
    .dma_rx_valid_o, .dma_rx_ready_i, .dma_rx_data_o, .dma_rx_last_o,
    .fifo_tx_valid_i    (txq_valid),
    .fifo_tx_ready_o    (txq_ready),
    .fifo_tx_data_i     (txq_data[DATA_W-1:0]),
    .fifo_tx_last_i     (txq_data[DATA_W]),
    .fifo_rx_valid_o    (arb_rx_valid),
    .fifo_rx_ready_i    (arb_rx_ready),
    .fifo_rx_data_o     (arb_rx_data),
    .fifo_rx_last_o     (arb_rx_last),
    .fifo_rx_nonempty_i (rxq_valid),
    .fifo_irq_o         (net_irq_o)
  );

  // ---------------------------------------------------------- bootloader ROMs
  for (genvar r = 0; r < N_ROM; r++) begin : g_rom
    boot_rom #(.DATA_W(DATA_W), .DEPTH(ROM_DEPTH)) u_rom (
      .clk, .por_n (rst_n),
      .wr_en_i   (rom_wr_en_i[r]),   .wr_addr_i (rom_wr_addr_i[r]), .wr_data_i (rom_wr_data_i[r]),
      .lock_i    (rom_lock_i[r]),    .locked_o  (rom_locked_o[r]),
      .rd_en_i   (rom_rd_en_i[r]),   .rd_addr_i (rom_rd_addr_i[r]), .rd_data_o (rom_rd_data_o[r])
    );
  end

endmodule
