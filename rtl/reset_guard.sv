// reset_guard: lets the resource manager reset a domain only outside sessions.
//
// The resource manager (through the power management unit) asks for a domain to
// be reset by raising rst_req_i[d]. The guard forwards the request to the domain,
// and to the mailboxes whose fixed end that domain is, only when no mailbox with
// an ongoing delegation involves the domain: neither as the domain on the fixed
// end of a mailbox someone else is using, nor as the delegate of another domain's
// mailbox. A refused request is flagged on blocked_o[d]; the resource manager
// simply fails to reset the domain until every session involving it has been
// yielded or has expired.
//
// Interface: level-sensitive requests; per-mailbox session flag, fixed-end domain
// (hard-wired, a parameter) and owner domain from the mailboxes. Timing: outputs
// are registered, so a forwarded reset follows the request by one cycle and is
// withdrawn one cycle after a session starts. The rule comes from the document;
// the registered, level-held interface is this design's choice.
module reset_guard
  import octo_pkg::*;
#(
  parameter int unsigned N_MBOX_P = octo_pkg::N_MBOX,
  parameter dom_id_e     MBOX_FIXED_DOM [N_MBOX_P] = '{DOM_SERIAL_OUT, DOM_STORAGE, DOM_STORAGE,
                                                       DOM_NETWORK, DOM_NETWORK, DOM_TEE1, DOM_TEE2,
                                                       DOM_KEYBOARD, DOM_STORAGE, DOM_STORAGE,
                                                       DOM_NETWORK, DOM_NETWORK}
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    rst_req_i     [N_DOM],
  input  logic    mbox_session_i[N_MBOX_P],
  input  dom_id_e mbox_owner_i  [N_MBOX_P],
  output logic    dom_rst_o     [N_DOM],
  output logic    blocked_o     [N_DOM]
);
  logic busy [N_DOM];

  always_comb begin
    for (int d = 0; d < N_DOM; d++) begin
      busy[d] = 1'b0;
      for (int m = 0; m < N_MBOX_P; m++) begin
        if (mbox_session_i[m] &&
            (MBOX_FIXED_DOM[m] == dom_id_e'(d) || mbox_owner_i[m] == dom_id_e'(d)))
          busy[d] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < N_DOM; d++) begin
        dom_rst_o[d] <= 1'b0;
        blocked_o[d] <= 1'b0;
      end
    end else begin
      for (int d = 0; d < N_DOM; d++) begin
        dom_rst_o[d] <= rst_req_i[d] && !busy[d];
        blocked_o[d] <= rst_req_i[d] &&  busy[d];
      end
    end
  end

  // A domain in a session is never reset.
  for (genvar d = 0; d < N_DOM; d++) begin : g_chk
    a_no_reset_in_session: assert property (@(posedge clk) disable iff (!rst_n)
      busy[d] |=> !dom_rst_o[d]);
  end

endmodule
