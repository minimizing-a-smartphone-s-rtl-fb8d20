// tb_mbox_ctrl: self-checking test of the mailbox delegation controller.
//
// With a 4-cycle tick, checks the default ownership of the resource manager,
// refusal of delegations that are not the resource manager's or that name no
// delegable domain, a zero quota or a zero time; that a session cannot be
// revoked or yielded by anyone but the delegate; that the message quota and the
// time limit each end a session at the exact cycle worked out below; that yield
// ends it; that every change of owner pulses the wipe request; that the write
// budget stops a delegate after its quota; that an unlimited quota never counts
// down; and that the status register shows the real value only to the owner and
// the fixed end.
module tb_mbox_ctrl;
  import octo_pkg::*;
  localparam int unsigned TICK = 4;
  logic clk = 0, rst_n = 0;
  mbox_cmd_t    cmd [N_PORTS];
  logic         rd_done = 0, wr_done = 0;
  logic [1:0]   owner;
  dom_id_e      owner_dom;
  logic         in_session, access_ok, wr_allowed, wipe;
  mbox_status_t status [N_PORTS];
  mbox_status_t fstatus;
  int checks = 0, failures = 0;
  int wipes = 0;

  mbox_ctrl #(.TICK_CYCLES(TICK)) dut (
    .clk, .rst_n, .cmd_i(cmd), .rd_msg_done_i(rd_done), .wr_msg_done_i(wr_done),
    .owner_o(owner), .owner_dom_o(owner_dom), .in_session_o(in_session),
    .access_ok_o(access_ok), .wr_allowed_o(wr_allowed), .wipe_o(wipe),
    .status_o(status), .fixed_status_o(fstatus));

  always #5 clk = ~clk;
  always @(negedge clk) if (rst_n && wipe) wipes++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic clear_cmds();
    for (int p = 0; p < N_PORTS; p++) cmd[p] = '{op: MBOX_NOP, target: DOM_RM, quota: '0, tlimit: '0};
  endtask
  // One-cycle command from a port.
  task automatic issue(input int p, input mbox_op_e op, input dom_id_e tgt,
                       input logic [15:0] q, input logic [15:0] t);
    cmd[p] = '{op: op, target: tgt, quota: q, tlimit: t};
    tick();
    clear_cmds();
  endtask
  task automatic pulse_rd(); rd_done = 1; tick(); rd_done = 0; endtask
  task automatic pulse_wr(); wr_done = 1; tick(); wr_done = 0; endtask

  task automatic expect_rm_owner(input string what);
    check(owner == 0 && owner_dom == DOM_RM && !in_session, {what, ": resource manager owns"});
    check(status[0].valid && status[0].owner == DOM_RM, {what, ": RM reads real status"});
    for (int p = 1; p < N_PORTS; p++)
      check(status[p] == STATUS_DUMMY, {what, ": others read dummy"});
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w0, n;
    clear_cmds();
    tick(); tick(); rst_n = 1; tick();
    expect_rm_owner("after reset");
    check(fstatus.valid && fstatus.owner == DOM_RM, "fixed end reads real status");

    // refused delegations
    w0 = wipes;
    issue(1, MBOX_DELEGATE, DOM_UNTRUSTED, 5, 5);   // not from the resource manager
    expect_rm_owner("delegate from untrusted");
    issue(0, MBOX_DELEGATE, DOM_KEYBOARD, 5, 5);    // not on the delegable end
    expect_rm_owner("delegate to unknown domain");
    issue(0, MBOX_DELEGATE, DOM_RM, 5, 5);
    expect_rm_owner("delegate to itself");
    issue(0, MBOX_DELEGATE, DOM_TEE1, 5, 0);        // no time limit
    expect_rm_owner("zero time");
    issue(0, MBOX_DELEGATE, DOM_TEE1, 0, 5);
    expect_rm_owner("zero quota");
    check(wipes == w0, "refused commands do not wipe");

    // delegation to TEE1 (port 2), quota 3 messages, long time
    cmd[0] = '{op: MBOX_DELEGATE, target: DOM_TEE1, quota: 16'd3, tlimit: 16'd1000};
    #1 check(wipe, "delegation pulses wipe");
    tick(); clear_cmds();
    check(owner == 2 && owner_dom == DOM_TEE1 && in_session, "TEE1 owns");
    check(status[2] == '{valid: 1'b1, owner: DOM_TEE1, quota: 16'd3, tleft: 16'd1000}, "owner reads real status");
    check(status[0] == STATUS_DUMMY && status[1] == STATUS_DUMMY && status[3] == STATUS_DUMMY,
          "non-owners, the resource manager included, read dummy");
    check(fstatus.owner == DOM_TEE1 && fstatus.quota == 3, "fixed end sees the delegate");
    // attempts to take it away
    issue(0, MBOX_DELEGATE, DOM_TEE2, 5, 5);
    check(owner == 2, "resource manager cannot re-delegate during a session");
    issue(0, MBOX_YIELD, DOM_RM, 0, 0);
    check(owner == 2, "resource manager cannot yield for the delegate");
    issue(1, MBOX_YIELD, DOM_RM, 0, 0);
    check(owner == 2, "other domain cannot yield");
    // quota counts down on delivered messages
    pulse_rd();
    check(status[2].quota == 2, "quota 3 -> 2");
    pulse_rd();
    check(status[2].quota == 1 && owner == 2, "quota 2 -> 1");
    w0 = wipes;
    pulse_rd();
    // quota is zero now: expired this cycle, owner back at the next edge
    check(!access_ok && wipe, "quota expiry blocks access and wipes");
    tick();
    expect_rm_owner("after quota expiry");
    check(wipes == w0 + 1, "one wipe at expiry");

    // time limit: 3 ticks of 4 cycles, unlimited messages
    issue(0, MBOX_DELEGATE, DOM_TEE2, QUOTA_INFINITE, 16'd3);
    check(owner == 3, "TEE2 owns");
    n = 1;
    while (in_session && n < 100) begin
      if (n == 1) pulse_rd(); else tick();
      n++;
    end
    // delegation edge E0; tleft 3->2->1->0 at E4, E8, E12; owner returns at E13
    check(n - 1 == 13, $sformatf("time expiry after %0d cycles, expected 13", n - 1));
    expect_rm_owner("after time expiry");

    // unlimited quota does not count; yield returns the mailbox
    issue(0, MBOX_DELEGATE, DOM_UNTRUSTED, QUOTA_INFINITE, 16'd500);
    pulse_rd(); pulse_rd();
    check(status[1].quota == QUOTA_INFINITE, "unlimited quota stays unlimited");
    check(status[1].tleft < 500 || status[1].tleft == 500, "time shown");
    w0 = wipes;
    cmd[1] = '{op: MBOX_YIELD, target: DOM_RM, quota: '0, tlimit: '0};
    #1 check(wipe, "yield pulses wipe");
    tick(); clear_cmds();
    expect_rm_owner("after yield");

    // write budget of a delegate writer
    issue(0, MBOX_DELEGATE, DOM_TEE1, 16'd2, 16'd500);
    check(wr_allowed, "delegate may write");
    pulse_wr();
    check(wr_allowed, "one message written");
    pulse_wr();
    check(!wr_allowed && owner == 2, "budget used up, session still open until delivery");
    pulse_rd(); pulse_rd(); tick();
    expect_rm_owner("after delivery of both messages");
    check(wr_allowed, "resource manager writes freely");

    // reset returns the mailbox
    issue(0, MBOX_DELEGATE, DOM_TEE2, 16'd5, 16'd500);
    rst_n = 0; tick(); rst_n = 1; tick();
    expect_rm_owner("after reset in session");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
