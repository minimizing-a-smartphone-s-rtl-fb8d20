// tb_mailbox_fw: self-checking test of the fixed-writer mailbox.
//
// Uses 4-word messages, a 2-message queue and a 4-cycle tick. The fixed writer
// (an input device's domain) sends messages; first the resource manager reads
// them, then the reader end is delegated to the untrusted domain with a quota of
// one message. Checks that only the owner sees rd_valid and data (others read
// zero), that the delegate receives the exact words, that the session ends after
// one delivered message and wipes what the writer queued beyond it, and that the
// delegate cannot read past its quota.
module tb_mailbox_fw;
  import octo_pkg::*;
  localparam int unsigned MW = 4, QM = 2, TICK = 4;
  logic clk = 0, rst_n = 0;
  mbox_cmd_t    cmd [N_PORTS];
  mbox_status_t status [N_PORTS];
  mbox_status_t fstatus;
  logic         rv [N_PORTS];
  logic         rr [N_PORTS];
  logic [31:0]  rd [N_PORTS];
  logic         wv = 0, wr;
  logic [31:0]  wd = '0;
  dom_id_e      owner_dom;
  logic         in_session, busy;
  int checks = 0, failures = 0;
  int leaks = 0;
  logic [31:0]  got [$];

  mailbox_fw #(.MSG_WORDS(MW), .QUEUE_MSGS(QM), .TICK_CYCLES(TICK)) dut (
    .clk, .rst_n, .cmd_i(cmd), .status_o(status), .d_rd_valid_o(rv), .d_rd_ready_i(rr),
    .d_rd_data_o(rd), .fixed_status_o(fstatus), .f_wr_valid_i(wv), .f_wr_ready_o(wr),
    .f_wr_data_i(wd), .owner_dom_o(owner_dom), .in_session_o(in_session), .busy_o(busy));

  always #5 clk = ~clk;

  // Confidentiality: a port other than the owner's never sees data.
  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < N_PORTS; p++)
      if (p != int'(dut.owner) && (rv[p] || rd[p] != '0)) leaks++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic idle();
    for (int p = 0; p < N_PORTS; p++) begin
      cmd[p] = '{op: MBOX_NOP, target: DOM_RM, quota: '0, tlimit: '0};
      rr[p] = 0;
    end
  endtask
  task automatic issue(input int p, input mbox_op_e op, input dom_id_e tgt,
                       input logic [15:0] q, input logic [15:0] t);
    cmd[p] = '{op: op, target: tgt, quota: q, tlimit: t};
    tick();
    cmd[p] = '{op: MBOX_NOP, target: DOM_RM, quota: '0, tlimit: '0};
  endtask
  task automatic write_msg(input logic [31:0] base, output int accepted);
    int i = 0, cyc = 0;
    accepted = 0;
    while (i < MW && cyc < 4 * MW) begin
      wv = 1; wd = base + i;
      if (wr) begin accepted++; i++; end
      tick();
      cyc++;
    end
    wv = 0;
  endtask
  task automatic wait_idle();
    int n = 0;
    while (busy && n < 100) begin tick(); n++; end
  endtask
  // Port p reads whatever it is offered for n cycles, stopping if the session ends.
  task automatic drain(input int p, input int n);
    rr[p] = 1;
    repeat (n) begin
      if (rv[p]) got.push_back(rd[p]);
      tick();
    end
    rr[p] = 0;
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int acc;
    idle();
    tick(); rst_n = 1; tick();
    wait_idle();
    check(owner_dom == DOM_RM, "resource manager owns after reset");

    write_msg(32'h100, acc);
    check(acc == MW, "fixed writer message accepted");
    check(rv[0] && !rv[1] && !rv[2] && !rv[3], "only the resource manager is offered data");
    got.delete(); drain(1, 6);
    check(got.size() == 0, "non-owner reads nothing");
    drain(0, 6);
    check(got.size() == MW, "resource manager reads the message");
    for (int i = 0; i < got.size(); i++) check(got[i] == 32'h100 + i, "RM word");

    // delegate the reader end to the untrusted domain, one message
    issue(0, MBOX_DELEGATE, DOM_UNTRUSTED, 16'd1, 16'd200);
    wait_idle();
    check(status[1].valid && status[1].owner == DOM_UNTRUSTED && status[1].quota == 1, "delegate verifies");
    check(fstatus.owner == DOM_UNTRUSTED, "fixed writer verifies delegate");
    check(status[0] == STATUS_DUMMY, "resource manager reads dummy");
    write_msg(32'h200, acc); check(acc == MW, "writer message 1");
    write_msg(32'h300, acc); check(acc == MW, "writer message 2");
    got.delete(); drain(0, 4);
    check(got.size() == 0, "resource manager cannot read during session");
    drain(2, 4);
    check(got.size() == 0, "TEE1 cannot read during session");
    drain(1, 12);
    check(got.size() == MW, $sformatf("delegate read %0d words within its quota", got.size()));
    for (int i = 0; i < got.size(); i++) check(got[i] == 32'h200 + i, "delegate word");
    check(owner_dom == DOM_RM && !in_session, "quota used: back to the resource manager");
    wait_idle();
    got.delete(); drain(0, 6);
    check(got.size() == 0, "second message wiped at expiry");
    for (int i = 0; i < MW * QM; i++) check(dut.u_queue.mem[i] == '0, "storage zeroed");
    check(leaks == 0, $sformatf("%0d cycles leaked data to a non-owner", leaks));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
