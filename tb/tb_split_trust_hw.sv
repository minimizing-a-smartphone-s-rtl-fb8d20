// tb_split_trust_hw: end-to-end test of the split-trust hardware fabric at its
// default sizes (1 ms tick of 100000 cycles, 64 B and 512 B messages, 16 KB ROMs).
//
// The testbench plays every domain processor and walks through the life of a
// security-critical session:
//   1. bootloaders are loaded into every domain's ROM and locked;
//   2. every domain reports to the TPM mediator over its permanent queue and
//      TEE1 asks the resource manager for the UI over its queue;
//   3. the resource manager resets the serial domains (allowed), delegates the
//      serial output mailbox and the keyboard mailbox to TEE1 for 2 ticks, and
//      TEE1 verifies both status registers while other domains read dummies;
//   4. the resource manager tries to reset the serial output domain and TEE1,
//      and to write to the display, during the session: all refused;
//   5. TEE1 prints a message and reads a key message; the untrusted domain sees
//      none of it; TEE1 yields the output mailbox; the keyboard session ends by
//      time limit at the exact cycle;
//   6. TEE2 gets the storage mailboxes, sends one 512 B data message (quota 1,
//      which ends the session) and reads a 512 B block back;
//   7. the untrusted domain gets the network: the arbiter switches to DMA and
//      packets flow between the Ethernet controller and the DMA engine; after the
//      untrusted domain yields, DMA stalls; back in trusted mode packets go
//      through the network domain's FIFOs and raise its interrupt;
//   8. a full mailbox pushes back on its writer;
//   9. every one of the twelve mailboxes carries one message between its fixed
//      end and a delegate with a quota of one, after which it returns to the
//      resource manager.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_split_trust_hw;
  import octo_pkg::*;
  localparam int unsigned TICK = 100000;
  localparam int unsigned RA   = $clog2(4096);

  logic clk = 0, rst_n = 0;
  mbox_cmd_t    fr_cmd [N_FR][N_PORTS];
  mbox_status_t fr_st  [N_FR][N_PORTS];
  logic         fr_wv  [N_FR][N_PORTS];
  logic [31:0]  fr_wd  [N_FR][N_PORTS];
  logic         fr_wr  [N_FR][N_PORTS];
  mbox_status_t fr_fst [N_FR];
  logic         fr_rv  [N_FR];
  logic         fr_rr  [N_FR];
  logic [31:0]  fr_rd  [N_FR];
  mbox_cmd_t    fw_cmd [N_FW][N_PORTS];
  mbox_status_t fw_st  [N_FW][N_PORTS];
  logic         fw_rv  [N_FW][N_PORTS];
  logic         fw_rr  [N_FW][N_PORTS];
  logic [31:0]  fw_rd  [N_FW][N_PORTS];
  mbox_status_t fw_fst [N_FW];
  logic         fw_wv  [N_FW];
  logic         fw_wr  [N_FW];
  logic [31:0]  fw_wd  [N_FW];
  logic         hq_wv [N_HQ], hq_wr [N_HQ], hq_rv [N_HQ], hq_rr [N_HQ];
  logic [31:0]  hq_wd [N_HQ], hq_rd [N_HQ];
  logic         rreq [N_DOM], drst [N_DOM], rblk [N_DOM];
  logic         arb_wr = 0, arb_untr = 0, arb_mode, permit;
  logic         dtv, dtr = 1, dtl, drv = 0, drr, drl = 0;
  logic [31:0]  dtd, drd = '0;
  logic         mtv = 0, mtr, mtl = 0, mrv, mrr = 1, mrl;
  logic [31:0]  mtd = '0, mrd;
  logic         ntv = 0, ntr, ntl = 0, nrv, nrr = 0, nrl, irq;
  logic [31:0]  ntd = '0, nrd;
  logic            rom_we [N_ROM], rom_lock [N_ROM], rom_locked [N_ROM], rom_re [N_ROM];
  logic [RA-1:0]   rom_wa [N_ROM], rom_ra [N_ROM];
  logic [31:0]     rom_wd [N_ROM], rom_rd [N_ROM];

  int checks = 0, failures = 0;
  int n_rom_lock = 0, n_hq = 0, n_reset_fwd = 0, n_reset_blk = 0, n_delegate = 0,
      n_refused = 0, n_status = 0, n_dummy = 0, n_yield = 0, n_time_exp = 0,
      n_quota_exp = 0, n_wipe = 0, n_dma = 0, n_dma_stall = 0, n_fifo = 0, n_irq = 0,
      n_backpressure = 0;
  logic [31:0] got [$];

  split_trust_hw dut (
    .clk, .rst_n,
    .fr_cmd_i(fr_cmd), .fr_status_o(fr_st), .fr_wr_valid_i(fr_wv), .fr_wr_data_i(fr_wd),
    .fr_wr_ready_o(fr_wr), .fr_fixed_status_o(fr_fst), .fr_rd_valid_o(fr_rv),
    .fr_rd_ready_i(fr_rr), .fr_rd_data_o(fr_rd),
    .fw_cmd_i(fw_cmd), .fw_status_o(fw_st), .fw_rd_valid_o(fw_rv), .fw_rd_ready_i(fw_rr),
    .fw_rd_data_o(fw_rd), .fw_fixed_status_o(fw_fst), .fw_wr_valid_i(fw_wv),
    .fw_wr_ready_o(fw_wr), .fw_wr_data_i(fw_wd),
    .hq_wr_valid_i(hq_wv), .hq_wr_ready_o(hq_wr), .hq_wr_data_i(hq_wd),
    .hq_rd_valid_o(hq_rv), .hq_rd_ready_i(hq_rr), .hq_rd_data_o(hq_rd),
    .rst_req_i(rreq), .dom_rst_o(drst), .rst_blocked_o(rblk),
    .net_arb_wr_i(arb_wr), .net_arb_untrusted_i(arb_untr), .net_arb_mode_o(arb_mode),
    .net_dma_permit_o(permit),
    .dev_tx_valid_o(dtv), .dev_tx_ready_i(dtr), .dev_tx_data_o(dtd), .dev_tx_last_o(dtl),
    .dev_rx_valid_i(drv), .dev_rx_ready_o(drr), .dev_rx_data_i(drd), .dev_rx_last_i(drl),
    .dma_tx_valid_i(mtv), .dma_tx_ready_o(mtr), .dma_tx_data_i(mtd), .dma_tx_last_i(mtl),
    .dma_rx_valid_o(mrv), .dma_rx_ready_i(mrr), .dma_rx_data_o(mrd), .dma_rx_last_o(mrl),
    .net_tx_valid_i(ntv), .net_tx_ready_o(ntr), .net_tx_data_i(ntd), .net_tx_last_i(ntl),
    .net_rx_valid_o(nrv), .net_rx_ready_i(nrr), .net_rx_data_o(nrd), .net_rx_last_o(nrl),
    .net_irq_o(irq),
    .rom_wr_en_i(rom_we), .rom_wr_addr_i(rom_wa), .rom_wr_data_i(rom_wd), .rom_lock_i(rom_lock),
    .rom_locked_o(rom_locked), .rom_rd_en_i(rom_re), .rom_rd_addr_i(rom_ra), .rom_rd_data_o(rom_rd));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic ticks(input int n); repeat (n) tick(); endtask

  function automatic mbox_cmd_t c(mbox_op_e op, dom_id_e tgt, logic [15:0] q, logic [15:0] t);
    return '{op: op, target: tgt, quota: q, tlimit: t};
  endfunction
  localparam mbox_cmd_t NOP = '{op: MBOX_NOP, target: DOM_RM, quota: '0, tlimit: '0};

  task automatic idle_all();
    for (int i = 0; i < N_FR; i++) begin
      fr_rr[i] = 0;
      for (int p = 0; p < N_PORTS; p++) begin fr_cmd[i][p] = NOP; fr_wv[i][p] = 0; fr_wd[i][p] = '0; end
    end
    for (int i = 0; i < N_FW; i++) begin
      fw_wv[i] = 0; fw_wd[i] = '0;
      for (int p = 0; p < N_PORTS; p++) begin fw_cmd[i][p] = NOP; fw_rr[i][p] = 0; end
    end
    for (int q = 0; q < N_HQ; q++) begin hq_wv[q] = 0; hq_wd[q] = '0; hq_rr[q] = 0; end
    for (int d = 0; d < N_DOM; d++) rreq[d] = 0;
    for (int r = 0; r < N_ROM; r++) begin
      rom_we[r] = 0; rom_lock[r] = 0; rom_re[r] = 0; rom_wa[r] = '0; rom_ra[r] = '0; rom_wd[r] = '0;
    end
  endtask

  // Commands: one cycle long.
  task automatic fr_issue(input int i, input int p, input mbox_cmd_t cm);
    fr_cmd[i][p] = cm; tick(); fr_cmd[i][p] = NOP;
  endtask
  task automatic fw_issue(input int i, input int p, input mbox_cmd_t cm);
    fw_cmd[i][p] = cm; tick(); fw_cmd[i][p] = NOP;
  endtask

  // Port p writes n words to fixed-reader mailbox i; waits at most `patience`
  // cycles for each word. Returns the number of words accepted.
  task automatic fr_write(input int i, input int p, input logic [31:0] base, input int n,
                          input int patience, output int acc);
    acc = 0;
    for (int w = 0; w < n; w++) begin
      int waited = 0;
      fr_wv[i][p] = 1; fr_wd[i][p] = base + w;
      while (!fr_wr[i][p] && waited < patience) begin tick(); waited++; end
      if (!fr_wr[i][p]) break;
      tick(); acc++;
    end
    fr_wv[i][p] = 0;
  endtask
  task automatic fr_read(input int i, input int cycles);
    fr_rr[i] = 1;
    repeat (cycles) begin if (fr_rv[i]) got.push_back(fr_rd[i]); tick(); end
    fr_rr[i] = 0;
  endtask
  task automatic fw_write(input int i, input logic [31:0] base, input int n,
                          input int patience, output int acc);
    acc = 0;
    for (int w = 0; w < n; w++) begin
      int waited = 0;
      fw_wv[i] = 1; fw_wd[i] = base + w;
      while (!fw_wr[i] && waited < patience) begin tick(); waited++; end
      if (!fw_wr[i]) break;
      tick(); acc++;
    end
    fw_wv[i] = 0;
  endtask
  task automatic fw_read(input int i, input int p, input int cycles);
    fw_rr[i][p] = 1;
    repeat (cycles) begin if (fw_rv[i][p]) got.push_back(fw_rd[i][p]); tick(); end
    fw_rr[i][p] = 0;
  endtask
  task automatic check_words(input logic [31:0] base, input int n, input string what);
    check(got.size() == n, $sformatf("%s: %0d words, expected %0d", what, got.size(), n));
    for (int w = 0; w < got.size() && w < n; w++)
      check(got[w] == base + w, $sformatf("%s word %0d", what, w));
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, n;
    time t_kbd;
    idle_all();
    ticks(2); rst_n = 1;
    ticks(600);   // mailboxes wipe their queues after reset

    // 1. bootloaders
    for (int r = 0; r < N_ROM; r++) begin
      for (int a = 0; a < 8; a++) begin
        rom_we[r] = 1; rom_wa[r] = RA'(a); rom_wd[r] = {8'(r), 24'(a)} ^ 32'h0B00_7000; tick();
      end
      rom_we[r] = 0; rom_lock[r] = 1; tick(); rom_lock[r] = 0;
      rom_we[r] = 1; rom_wa[r] = RA'(3); rom_wd[r] = 32'hBAD0_BAD0; tick(); rom_we[r] = 0;
      rom_re[r] = 1; rom_ra[r] = RA'(3); tick(); rom_re[r] = 0;
      check(rom_locked[r] && rom_rd[r] == ({8'(r), 24'(3)} ^ 32'h0B00_7000), $sformatf("ROM %0d locked", r));
      if (rom_locked[r]) n_rom_lock++;
    end

    // 2. permanent queues
    for (int q = 0; q < N_HQ; q++) begin hq_wv[q] = 1; hq_wd[q] = 32'h7000 + q; end
    tick();
    for (int q = 0; q < N_HQ; q++) hq_wv[q] = 0;
    for (int q = 0; q < N_HQ; q++) begin
      check(hq_rv[q] && hq_rd[q] == 32'h7000 + q, $sformatf("queue %0d (%s -> %s)", q,
            HQ_SRC[q].name(), HQ_DST[q].name()));
      if (hq_rv[q]) n_hq++;
      hq_rr[q] = 1;
    end
    tick();
    for (int q = 0; q < N_HQ; q++) begin hq_rr[q] = 0; check(!hq_rv[q], "queue drained"); end

    // 3. resource manager resets the serial domains, then delegates the UI to TEE1
    rreq[DOM_SERIAL_OUT] = 1; rreq[DOM_KEYBOARD] = 1; tick();
    check(drst[DOM_SERIAL_OUT] && drst[DOM_KEYBOARD], "free serial domains reset");
    if (drst[DOM_SERIAL_OUT]) n_reset_fwd++;
    rreq[DOM_SERIAL_OUT] = 0; rreq[DOM_KEYBOARD] = 0; ticks(2);
    ticks(70);    // the reset mailboxes wipe again
    fr_issue(FR_SERIAL_OUT, 1, c(MBOX_DELEGATE, DOM_UNTRUSTED, 5, 5));   // not the RM
    check(fr_fst[FR_SERIAL_OUT].owner == DOM_RM, "delegation by a non-RM domain refused");
    if (fr_fst[FR_SERIAL_OUT].owner == DOM_RM) n_refused++;
    fr_issue(FR_SERIAL_OUT, 0, c(MBOX_DELEGATE, DOM_TEE1, 16'd3, 16'd2));
    fw_issue(FW_KEYBOARD,   0, c(MBOX_DELEGATE, DOM_TEE1, QUOTA_INFINITE, 16'd2));
    t_kbd = $time - 1;   // the keyboard delegation edge
    check(fr_st[FR_SERIAL_OUT][2].valid && fr_st[FR_SERIAL_OUT][2].owner == DOM_TEE1 &&
          fr_st[FR_SERIAL_OUT][2].quota == 3, "TEE1 verifies the output mailbox");
    check(fw_st[FW_KEYBOARD][2].valid && fw_st[FW_KEYBOARD][2].owner == DOM_TEE1 &&
          fw_st[FW_KEYBOARD][2].quota == QUOTA_INFINITE && fw_st[FW_KEYBOARD][2].tleft == 2,
          "TEE1 verifies the keyboard mailbox");
    check(fr_fst[FR_SERIAL_OUT].owner == DOM_TEE1, "serial output domain verifies its client");
    if (fr_st[FR_SERIAL_OUT][2].owner == DOM_TEE1 && fw_st[FW_KEYBOARD][2].owner == DOM_TEE1) n_delegate++;
    if (fr_st[FR_SERIAL_OUT][2].valid) n_status++;
    check(fr_st[FR_SERIAL_OUT][1] == STATUS_DUMMY && fr_st[FR_SERIAL_OUT][0] == STATUS_DUMMY &&
          fw_st[FW_KEYBOARD][3] == STATUS_DUMMY, "other domains read dummy status");
    if (fr_st[FR_SERIAL_OUT][1] == STATUS_DUMMY) n_dummy++;

    // 4. attacks by the resource manager during the session
    rreq[DOM_SERIAL_OUT] = 1; rreq[DOM_TEE1] = 1; tick();
    check(!drst[DOM_SERIAL_OUT] && rblk[DOM_SERIAL_OUT], "serial output reset blocked in session");
    check(!drst[DOM_TEE1] && rblk[DOM_TEE1], "TEE1 reset blocked in session");
    if (rblk[DOM_SERIAL_OUT] && rblk[DOM_TEE1]) n_reset_blk++;
    rreq[DOM_SERIAL_OUT] = 0; rreq[DOM_TEE1] = 0;
    fr_write(FR_SERIAL_OUT, 0, 32'hBAD0_0000, 1, 4, acc);
    check(acc == 0, "RM cannot write to the display in a session");
    ticks(70);   // wipe after delegation

    // 5. TEE1 prints and reads a key
    begin
      fr_write(FR_SERIAL_OUT, 2, 32'h5EC0_0000, CTRL_MSG_WORDS, 10, acc);
      got.delete(); fr_read(FR_SERIAL_OUT, 20);
      check_words(32'h5EC0_0000, CTRL_MSG_WORDS, "display message");
      fw_write(FW_KEYBOARD, 32'h0CEE_0000, CTRL_MSG_WORDS, 10, acc);
      got.delete(); fw_read(FW_KEYBOARD, 1, 20);
      check(got.size() == 0, "untrusted domain reads no keystrokes");
      fw_read(FW_KEYBOARD, 2, 20);
      check_words(32'h0CEE_0000, CTRL_MSG_WORDS, "key message");
    end
    check(fr_st[FR_SERIAL_OUT][2].quota == 2, "one display message used of three");
    fr_issue(FR_SERIAL_OUT, 2, c(MBOX_YIELD, DOM_RM, 0, 0));
    check(fr_fst[FR_SERIAL_OUT].owner == DOM_RM && dut.g_fr[FR_SERIAL_OUT].u_mbox.busy_o,
          "yield returns the display and wipes");
    if (fr_fst[FR_SERIAL_OUT].owner == DOM_RM) n_yield++;
    if (dut.g_fr[FR_SERIAL_OUT].u_mbox.busy_o) n_wipe++;
    // keyboard session ends by time: delegation edge + 2 ticks + 1 cycle
    n = 0;
    while (fw_fst[FW_KEYBOARD].owner == DOM_TEE1 && n < 3 * TICK) begin tick(); n++; end
    n = int'(($time - 1 - t_kbd) / 10);
    check(n == 2 * TICK + 1, $sformatf("keyboard session lasted %0d cycles, expected %0d", n, 2 * TICK + 1));
    if (fw_fst[FW_KEYBOARD].owner == DOM_RM) n_time_exp++;
    rreq[DOM_TEE1] = 1; tick(); rreq[DOM_TEE1] = 0;
    check(drst[DOM_TEE1], "TEE1 reset after its sessions");
    if (drst[DOM_TEE1]) n_reset_fwd++;
    tick();

    // 6. storage for TEE2
    fr_issue(FR_STO_CMD, 0, c(MBOX_DELEGATE, DOM_TEE2, 16'd4, 16'd100));
    fr_issue(FR_STO_DIN, 0, c(MBOX_DELEGATE, DOM_TEE2, 16'd1, 16'd100));
    fw_issue(FW_STO_DOUT, 0, c(MBOX_DELEGATE, DOM_TEE2, 16'd1, 16'd100));
    fr_write(FR_STO_DIN, 3, 32'hDA7A_0000, DATA_MSG_WORDS, 600, acc);
    check(acc == DATA_MSG_WORDS, "TEE2 wrote a 512 B block");
    fr_write(FR_STO_DIN, 3, 32'hDA7A_1000, 1, 10, acc);
    check(acc == 0, "no second block beyond the quota");
    got.delete(); fr_read(FR_STO_DIN, DATA_MSG_WORDS + 10);
    check_words(32'hDA7A_0000, DATA_MSG_WORDS, "storage received block");
    check(fr_fst[FR_STO_DIN].owner == DOM_RM, "quota used: data-in mailbox back to RM");
    if (fr_fst[FR_STO_DIN].owner == DOM_RM) n_quota_exp++;
    fw_write(FW_STO_DOUT, 32'hB10C_0000, DATA_MSG_WORDS, 600, acc);
    got.delete(); fw_read(FW_STO_DOUT, 3, DATA_MSG_WORDS + 10);
    check_words(32'hB10C_0000, DATA_MSG_WORDS, "TEE2 read block");
    rreq[DOM_STORAGE] = 1; tick(); rreq[DOM_STORAGE] = 0;
    check(rblk[DOM_STORAGE], "storage reset blocked while its command mailbox is delegated");
    if (rblk[DOM_STORAGE]) n_reset_blk++;
    fr_issue(FR_STO_CMD, 3, c(MBOX_YIELD, DOM_RM, 0, 0));
    if (fr_fst[FR_STO_CMD].owner == DOM_RM) n_yield++;

    // 7. network: domain-bound DMA for the untrusted domain
    check(!permit, "no DMA permit by default");
    arb_wr = 1; arb_untr = 1; tick(); arb_wr = 0;
    check(!arb_mode, "arbiter refuses DMA before delegation");
    if (!arb_mode) n_refused++;
    fr_issue(FR_NET_CMD, 0, c(MBOX_DELEGATE, DOM_UNTRUSTED, QUOTA_INFINITE, 16'd100));
    fw_issue(FW_NET_RESP, 0, c(MBOX_DELEGATE, DOM_UNTRUSTED, QUOTA_INFINITE, 16'd100));
    check(permit, "DMA permitted while the untrusted domain uses the network");
    arb_wr = 1; arb_untr = 1; tick(); arb_wr = 0;
    check(arb_mode, "arbiter in DMA mode");
    for (int w = 0; w < 16; w++) begin
      drv = 1; drd = 32'hE000 + w; drl = (w == 15);
      mtv = 1; mtd = 32'hF000 + w; mtl = (w == 15);
      #1;
      check(mrv && mrd == 32'hE000 + w && mrl == (w == 15), "device -> DMA");
      check(dtv && dtd == 32'hF000 + w && dtl == (w == 15), "DMA -> device");
      if (mrv && dtv) n_dma++;
      tick();
    end
    drv = 0; mtv = 0;
    check(!nrv && !irq, "network domain FIFO untouched in DMA mode");
    fr_issue(FR_NET_CMD, 1, c(MBOX_YIELD, DOM_RM, 0, 0));
    check(!permit, "permit gone after yield");
    drv = 1; mtv = 1; #1;
    check(!mrv && !dtv && !drr, "DMA stalled without the permit");
    if (!mrv && !dtv) n_dma_stall++;
    tick(); drv = 0; mtv = 0;
    arb_wr = 1; arb_untr = 0; tick(); arb_wr = 0;
    check(!arb_mode, "arbiter back to the network domain's FIFOs");
    fw_issue(FW_NET_RESP, 1, c(MBOX_YIELD, DOM_RM, 0, 0));
    check(fw_fst[FW_NET_RESP].owner == DOM_RM, "untrusted domain yields the network responses too");
    if (fw_fst[FW_NET_RESP].owner == DOM_RM) n_yield++;
    for (int w = 0; w < 8; w++) begin
      drv = 1; drd = 32'hC000 + w; drl = (w == 7); tick();
    end
    drv = 0;
    check(irq, "packet in the FIFO interrupts the network domain");
    if (irq) n_irq++;
    got.delete();
    nrr = 1;
    for (int w = 0; w < 10; w++) begin if (nrv) got.push_back(nrd); tick(); end
    nrr = 0;
    check_words(32'hC000, 8, "network domain received packet");
    n = 0;
    for (int w = 0; w < 12; w++) begin
      ntv = (w < 8); ntd = 32'hA000 + w; ntl = (w == 7);
      #1;
      if (dtv) begin check(dtd == 32'hA000 + n && dtl == (n == 7), "FIFO -> device"); n++; end
      tick();
    end
    ntv = 0;
    check(n == 8, "whole packet sent from the FIFO");
    if (n == 8 && got.size() == 8) n_fifo++;

    // 8. back-pressure: the serial output domain does not read
    fr_write(FR_SERIAL_OUT, 0, 32'h1000, QUEUE_MSGS * CTRL_MSG_WORDS + 1, 4, acc);
    check(acc == QUEUE_MSGS * CTRL_MSG_WORDS, $sformatf("mailbox took %0d words before pushing back", acc));
    if (acc == QUEUE_MSGS * CTRL_MSG_WORDS) n_backpressure++;

    // 9. every mailbox, in turn, carries one message between its fixed end and a
    //    delegate holding a quota of one message; the session then ends by quota
    for (int i = 0; i < N_MBOX; i++) begin
      automatic bit          is_fr = (i < N_FR);
      automatic int          m     = is_fr ? i : i - N_FR;
      automatic int          p     = 1 + (i % 3);
      automatic int          other = (p == 1) ? 2 : 1;
      automatic bit          dp    = is_fr ? FR_DATA_PLANE[m] : FW_DATA_PLANE[m];
      automatic int          words = dp ? DATA_MSG_WORDS : CTRL_MSG_WORDS;
      automatic logic [31:0] base  = 32'h9000_0000 + (i << 16);
      automatic string       name  = $sformatf("%s mailbox %0d", is_fr ? "fixed-reader" : "fixed-writer", m);
      got.delete();
      if (is_fr) begin
        check(fr_fst[m].owner == DOM_RM, {name, " free before the sweep"});
        fr_issue(m, 0, c(MBOX_DELEGATE, PORT_DOM[p], 16'd1, 16'd5));
        check(fr_st[m][p].owner == PORT_DOM[p] && fr_st[m][p].quota == 16'd1 &&
              fr_st[m][other] == STATUS_DUMMY, {name, " delegated and verifiable"});
        fr_write(m, p, base, words, 2 * QUEUE_MSGS * DATA_MSG_WORDS, acc);
        check(acc == words, {name, " delegate wrote one message"});
        fr_read(m, words + 4);
        check(fr_fst[m].owner == DOM_RM, {name, " back with the resource manager"});
        if (got.size() == words && fr_fst[m].owner == DOM_RM) n_quota_exp++;
      end else begin
        check(fw_fst[m].owner == DOM_RM, {name, " free before the sweep"});
        fw_issue(m, 0, c(MBOX_DELEGATE, PORT_DOM[p], 16'd1, 16'd5));
        check(fw_st[m][p].owner == PORT_DOM[p] && fw_st[m][p].quota == 16'd1 &&
              fw_st[m][other] == STATUS_DUMMY, {name, " delegated and verifiable"});
        fw_write(m, base, words, 2 * QUEUE_MSGS * DATA_MSG_WORDS, acc);
        check(acc == words, {name, " fixed writer wrote one message"});
        fw_read(m, p, words + 4);
        check(fw_fst[m].owner == DOM_RM, {name, " back with the resource manager"});
        if (got.size() == words && fw_fst[m].owner == DOM_RM) n_quota_exp++;
      end
      check_words(base, words, name);
      n_delegate++;
    end

    // every mechanism happened
    check(n_rom_lock == N_ROM, "ROMs locked");
    check(n_hq == N_HQ, "permanent queues used");
    check(n_reset_fwd >= 2, "resets forwarded");
    check(n_reset_blk >= 2, "resets blocked");
    check(n_delegate >= 1 && n_status >= 1 && n_dummy >= 1, "delegation verified");
    check(n_refused >= 2, "refusals");
    check(n_yield >= 2 && n_wipe >= 1, "yields and wipes");
    check(n_time_exp >= 1, "time expiry");
    check(n_quota_exp >= 1 + N_MBOX, "quota expiry, once on every mailbox");
    check(n_dma >= 16 && n_dma_stall >= 1, "DMA mode and stall");
    check(n_fifo >= 1 && n_irq >= 1, "FIFO mode and interrupt");
    check(n_backpressure >= 1, "back-pressure");
    $display("mechanisms: rom_lock=%0d hw_queue=%0d reset_fwd=%0d reset_blocked=%0d delegate=%0d refused=%0d status=%0d dummy=%0d yield=%0d wipe=%0d time_expiry=%0d quota_expiry=%0d dma=%0d dma_stall=%0d fifo=%0d irq=%0d backpressure=%0d",
             n_rom_lock, n_hq, n_reset_fwd, n_reset_blk, n_delegate, n_refused, n_status, n_dummy,
             n_yield, n_wipe, n_time_exp, n_quota_exp, n_dma, n_dma_stall, n_fifo, n_irq, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
