// tb_reset_guard: self-checking test of the reset guard.
//
// Directed cases first (a free domain is reset one cycle after the request; a
// domain on the fixed end of a mailbox in session is not; a domain that is the
// delegate of another domain's mailbox is not; the reset follows once the session
// ends), then 2000 cycles of random sessions, owners and requests compared
// against a reference model written from the rule: reset only if no mailbox in
// session has the domain at its fixed end or as its owner.
module tb_reset_guard;
  import octo_pkg::*;
  logic    clk = 0, rst_n = 0;
  logic    req [N_DOM];
  logic    sess [N_MBOX];
  dom_id_e own [N_MBOX];
  logic    drst [N_DOM];
  logic    blk [N_DOM];
  logic    exp_rst [N_DOM];
  logic    exp_blk [N_DOM];
  int checks = 0, failures = 0;
  int blocked_seen = 0, forwarded_seen = 0;
  // fixed-end domains in the guard's default order
  localparam dom_id_e FIXED [N_MBOX] = '{DOM_SERIAL_OUT, DOM_STORAGE, DOM_STORAGE, DOM_NETWORK,
                                          DOM_NETWORK, DOM_TEE1, DOM_TEE2, DOM_KEYBOARD,
                                          DOM_STORAGE, DOM_STORAGE, DOM_NETWORK, DOM_NETWORK};
  localparam dom_id_e DELEG [4] = '{DOM_RM, DOM_UNTRUSTED, DOM_TEE1, DOM_TEE2};

  reset_guard dut (.clk, .rst_n, .rst_req_i(req), .mbox_session_i(sess),
                   .mbox_owner_i(own), .dom_rst_o(drst), .blocked_o(blk));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  task automatic clear();
    for (int d = 0; d < N_DOM; d++) req[d] = 0;
    for (int m = 0; m < N_MBOX; m++) begin sess[m] = 0; own[m] = DOM_RM; end
  endtask
  function automatic bit busy(int d);
    for (int m = 0; m < N_MBOX; m++)
      if (sess[m] && (int'(FIXED[m]) == d || int'(own[m]) == d)) return 1;
    return 0;
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear();
    tick(); rst_n = 1; tick();
    // free domain
    req[DOM_TEE1] = 1; tick();
    check(drst[DOM_TEE1] && !blk[DOM_TEE1], "free TEE1 is reset");
    req[DOM_TEE1] = 0; tick();
    check(!drst[DOM_TEE1], "reset released");
    // storage command mailbox (index 1) delegated to TEE2
    sess[1] = 1; own[1] = DOM_TEE2;
    req[DOM_STORAGE] = 1; req[DOM_TEE2] = 1; req[DOM_TEE1] = 1; tick();
    check(!drst[DOM_STORAGE] && blk[DOM_STORAGE], "fixed-end domain in session not reset");
    check(!drst[DOM_TEE2] && blk[DOM_TEE2], "delegate in session not reset");
    check(drst[DOM_TEE1], "uninvolved domain still reset");
    sess[1] = 0; own[1] = DOM_RM; tick();
    check(drst[DOM_STORAGE] && drst[DOM_TEE2], "reset goes through after the session");
    clear(); tick();

    // random
    for (int c = 0; c < 2000; c++) begin
      for (int m = 0; m < N_MBOX; m++) begin
        sess[m] = ($urandom_range(0, 5) == 0);
        own[m]  = sess[m] ? DELEG[$urandom_range(1, 3)] : DOM_RM;
      end
      for (int d = 0; d < N_DOM; d++) begin
        req[d] = $urandom_range(0, 1);
        exp_rst[d] = req[d] && !busy(d);
        exp_blk[d] = req[d] &&  busy(d);
      end
      tick();
      for (int d = 0; d < N_DOM; d++) begin
        check(drst[d] == exp_rst[d] && blk[d] == exp_blk[d], $sformatf("random cycle %0d domain %0d", c, d));
        if (exp_blk[d]) blocked_seen++;
        if (exp_rst[d]) forwarded_seen++;
      end
    end
    check(blocked_seen > 100 && forwarded_seen > 100, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
