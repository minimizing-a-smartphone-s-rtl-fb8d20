// tb_mailbox_fr: self-checking test of the fixed-reader mailbox.
//
// Uses 4-word messages, a 2-message queue and a 4-cycle tick. The resource
// manager first uses the mailbox itself; then it delegates the writer end to TEE1
// with a quota of two messages. The test checks that non-owners can neither write
// nor read the status, that the queue is wiped (unavailable for 8 cycles) on
// delegation, that the delegate cannot write a third message, that the fixed
// reader receives exactly what was written, that the session ends once both
// messages are delivered, that a yield wipes undelivered data, that the queue
// pushes back when full, and that a time limit ends a session.
module tb_mailbox_fr;
  import octo_pkg::*;
  localparam int unsigned MW = 4, QM = 2, TICK = 4;
  logic clk = 0, rst_n = 0;
  mbox_cmd_t    cmd [N_PORTS];
  mbox_status_t status [N_PORTS];
  mbox_status_t fstatus;
  logic         wv [N_PORTS];
  logic [31:0]  wd [N_PORTS];
  logic         wr [N_PORTS];
  logic         rv, rr = 0;
  logic [31:0]  rd;
  dom_id_e      owner_dom;
  logic         in_session, busy;
  int checks = 0, failures = 0;
  logic [31:0]  got [$];

  mailbox_fr #(.MSG_WORDS(MW), .QUEUE_MSGS(QM), .TICK_CYCLES(TICK)) dut (
    .clk, .rst_n, .cmd_i(cmd), .status_o(status), .d_wr_valid_i(wv), .d_wr_data_i(wd),
    .d_wr_ready_o(wr), .fixed_status_o(fstatus), .f_rd_valid_o(rv), .f_rd_ready_i(rr),
    .f_rd_data_o(rd), .owner_dom_o(owner_dom), .in_session_o(in_session), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic idle();
    for (int p = 0; p < N_PORTS; p++) begin
      cmd[p] = '{op: MBOX_NOP, target: DOM_RM, quota: '0, tlimit: '0};
      wv[p] = 0; wd[p] = '0;
    end
  endtask
  task automatic issue(input int p, input mbox_op_e op, input dom_id_e tgt,
                       input logic [15:0] q, input logic [15:0] t);
    cmd[p] = '{op: op, target: tgt, quota: q, tlimit: t};
    tick();
    cmd[p] = '{op: MBOX_NOP, target: DOM_RM, quota: '0, tlimit: '0};
  endtask
  // Try to write one message from port p; returns the number of words accepted
  // within a bounded number of cycles.
  task automatic write_msg(input int p, input logic [31:0] base, output int accepted);
    int i = 0, cyc = 0;
    accepted = 0;
    while (i < MW && cyc < 4 * MW) begin
      wv[p] = 1; wd[p] = base + i;
      if (wr[p]) begin accepted++; i++; end
      tick();
      cyc++;
    end
    wv[p] = 0;
  endtask
  task automatic wait_idle();
    int n = 0;
    while (busy && n < 100) begin tick(); n++; end
  endtask
  // Read everything the fixed reader is offered within n cycles.
  task automatic drain(input int n);
    rr = 1;
    repeat (n) begin
      if (rv) got.push_back(rd);
      tick();
    end
    rr = 0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc, n;
    idle();
    tick(); rst_n = 1; tick();
    check(busy, "wipe after reset");
    wait_idle();
    check(!busy && owner_dom == DOM_RM, "idle, resource manager owns");

    // resource manager writes, fixed reader reads
    write_msg(0, 32'h1000, acc);
    check(acc == MW, "RM message accepted");
    // untrusted domain tries to write while not owner
    write_msg(1, 32'hBAD0, acc);
    check(acc == 0, "non-owner write refused");
    got.delete(); drain(12);
    check(got.size() == MW, $sformatf("fixed reader got %0d words", got.size()));
    for (int i = 0; i < got.size(); i++) check(got[i] == 32'h1000 + i, "RM word");

    // back-pressure when full
    write_msg(0, 32'h2000, acc); write_msg(0, 32'h2100, acc);
    write_msg(0, 32'h2200, acc);
    check(acc == 0 && !wr[0], "full queue pushes back");

    // delegate the writer end to TEE1: quota 2 messages, 100 ticks
    cmd[0] = '{op: MBOX_DELEGATE, target: DOM_TEE1, quota: 16'd2, tlimit: 16'd100};
    tick(); idle();
    check(busy && !rv, "delegation wipes the queue (queued RM data gone)");
    n = 0; while (busy) begin tick(); n++; end
    check(n == MW * QM, $sformatf("wipe busy for %0d more cycles", n));
    check(owner_dom == DOM_TEE1 && in_session, "TEE1 owns");
    check(status[2].valid && status[2].owner == DOM_TEE1 && status[2].quota == 2, "TEE1 verifies its access");
    check(status[1] == STATUS_DUMMY && status[0] == STATUS_DUMMY, "others read dummy");
    check(fstatus.owner == DOM_TEE1 && fstatus.quota == 2 && fstatus.tleft <= 100, "fixed reader verifies delegate");
    write_msg(0, 32'hBAD1, acc);
    check(acc == 0, "resource manager locked out");
    write_msg(2, 32'h3000, acc); check(acc == MW, "TEE1 message 1");
    write_msg(2, 32'h3100, acc); check(acc == MW, "TEE1 message 2");
    write_msg(2, 32'h3200, acc); check(acc == 0, "no message beyond quota");
    check(in_session, "session lasts until delivery");
    got.delete(); drain(12);
    check(got.size() == 2 * MW, $sformatf("fixed reader got %0d words from TEE1", got.size()));
    for (int i = 0; i < got.size(); i++)
      check(got[i] == ((i < MW) ? 32'h3000 + i : 32'h3100 + i - MW), "TEE1 word");
    check(!in_session && owner_dom == DOM_RM, "quota used: back to the resource manager");
    wait_idle();

    // yield wipes undelivered data
    issue(0, MBOX_DELEGATE, DOM_TEE2, 16'd5, 16'd100);
    wait_idle();
    write_msg(3, 32'h4000, acc);
    check(acc == MW && rv, "TEE2 message queued");
    issue(3, MBOX_YIELD, DOM_RM, 0, 0);
    check(owner_dom == DOM_RM && busy && !rv, "yield returns and wipes");
    wait_idle();
    for (int i = 0; i < MW * QM; i++) check(dut.u_queue.mem[i] == '0, "storage zeroed");
    got.delete(); drain(4);
    check(got.size() == 0, "nothing of TEE2 left");

    // time limit: 2 ticks
    issue(0, MBOX_DELEGATE, DOM_UNTRUSTED, QUOTA_INFINITE, 16'd2);
    n = 0; while (in_session && n < 100) begin tick(); n++; end
    check(n == 2 * TICK + 1, $sformatf("time limit ended session after %0d cycles", n));
    check(owner_dom == DOM_RM, "time expiry returns mailbox");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
