// mbox_ctrl: delegation controller and status register of one mailbox.
//
// The delegable end of a mailbox is wired to N_PORTS domains; port 0 is the
// resource manager, which owns that end after reset. The resource manager may
// hand the end to one other port with a DELEGATE command carrying a message quota
// and a time limit. From then on (a session) only the delegate can use the
// mailbox and no command from anyone else changes the owner or the quota. The
// session ends when the delegate sends YIELD, when the remaining message quota
// reaches zero or when the remaining time reaches zero; ownership then returns to
// the resource manager. Every change of owner (delegate, yield, expiry) asks the
// queue to wipe itself, through the combinational wipe_o in the same cycle.
//
// Quota: a message counts when its last word is read out of the queue
// (rd_msg_done_i), so a session's last message is delivered before the session
// ends. A delegate on the writer side is additionally stopped from starting more
// messages than its quota (wr_msg_done_i and wr_allowed_o). A quota of all ones
// is unlimited; a time limit of zero is refused, so every session ends. Time is
// counted in ticks of TICK_CYCLES clock cycles.
//
// Status: status_o[p] is the real status only for the current owner, and
// fixed_status_o always is; every other port reads STATUS_DUMMY. Commands and
// status follow the document's description of the mailbox; the encodings, the
// tick, the point at which a message counts and refusing a zero time limit are
// this design's choices.
module mbox_ctrl
  import octo_pkg::*;
#(
  parameter int unsigned N_PORTS     = octo_pkg::N_PORTS,
  parameter int unsigned TICK_CYCLES = 100000,
  parameter dom_id_e     PORT_DOM [N_PORTS] = octo_pkg::PORT_DOM
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  mbox_cmd_t                  cmd_i [N_PORTS],
  input  logic                       rd_msg_done_i,
  input  logic                       wr_msg_done_i,
  output logic [$clog2(N_PORTS)-1:0] owner_o,
  output dom_id_e                    owner_dom_o,
  output logic                       in_session_o,
  output logic                       access_ok_o,
  output logic                       wr_allowed_o,
  output logic                       wipe_o,
  output mbox_status_t               status_o [N_PORTS],
  output mbox_status_t               fixed_status_o
);
  localparam int unsigned PW = $clog2(N_PORTS);
  localparam int unsigned TW = (TICK_CYCLES > 1) ? $clog2(TICK_CYCLES) : 1;

  logic [PW-1:0]      owner_q;
  logic [QUOTA_W-1:0] quota_q, wr_left_q;
  logic [TIME_W-1:0]  tleft_q;
  logic [TW-1:0]      tick_q;

  logic          in_session, expired, do_delegate, do_yield;
  logic          target_ok;
  logic [PW-1:0] target_port;

  assign in_session = (owner_q != '0);
  assign expired    = in_session && ((quota_q == '0) || (tleft_q == '0));

  // Which delegable port the resource manager names as target.
  always_comb begin
    target_ok   = 1'b0;
    target_port = '0;
    for (int p = 1; p < N_PORTS; p++) begin
      if (PW'(p) != '0 && cmd_i[0].target == PORT_DOM[p]) begin
        target_ok   = 1'b1;
        target_port = PW'(p);
      end
    end
  end

  assign do_delegate = !in_session && (cmd_i[0].op == MBOX_DELEGATE) && target_ok &&
                       (cmd_i[0].quota != '0) && (cmd_i[0].tlimit != '0);
  assign do_yield    = in_session && !expired && (cmd_i[owner_q].op == MBOX_YIELD);
  assign wipe_o      = do_delegate || do_yield || expired;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      owner_q   <= '0;
      quota_q   <= '0;
      wr_left_q <= '0;
      tleft_q   <= '0;
      tick_q    <= '0;
    end else if (expired || do_yield) begin
      owner_q   <= '0;
      quota_q   <= '0;
      wr_left_q <= '0;
      tleft_q   <= '0;
      tick_q    <= '0;
    end else if (do_delegate) begin
      owner_q   <= target_port;
      quota_q   <= cmd_i[0].quota;
      wr_left_q <= cmd_i[0].quota;
      tleft_q   <= cmd_i[0].tlimit;
      tick_q    <= '0;
    end else if (in_session) begin
      if (tick_q == TW'(TICK_CYCLES - 1)) begin
        tick_q  <= '0;
        tleft_q <= tleft_q - 1'b1;
      end else begin
        tick_q  <= tick_q + 1'b1;
      end
      if (rd_msg_done_i && quota_q != QUOTA_INFINITE) quota_q <= quota_q - 1'b1;
      if (wr_msg_done_i && wr_left_q != QUOTA_INFINITE && wr_left_q != '0)
        wr_left_q <= wr_left_q - 1'b1;
    end
  end

  assign owner_o      = owner_q;
  assign owner_dom_o  = PORT_DOM[owner_q];
  assign in_session_o = in_session;
  assign access_ok_o  = !expired;
  assign wr_allowed_o = !expired && (!in_session || wr_left_q != '0);

  always_comb begin
    fixed_status_o = '{valid: 1'b1, owner: PORT_DOM[owner_q], quota: quota_q, tleft: tleft_q};
    for (int p = 0; p < N_PORTS; p++)
      status_o[p] = (PW'(p) == owner_q) ? fixed_status_o : STATUS_DUMMY;
  end

  // Only a yield or an expiry takes the delegable end away from a delegate.
  a_irrevocable: assert property (@(posedge clk) disable iff (!rst_n)
    in_session && !expired && !do_yield |=> $stable(owner_q));
  // A session never outlives its quota or its time.
  a_expiry_returns: assert property (@(posedge clk) disable iff (!rst_n)
    expired |=> owner_q == '0);
  // The owner changes only together with a wipe of the queue.
  a_change_wipes: assert property (@(posedge clk) disable iff (!rst_n)
    !wipe_o |=> $stable(owner_q));
  // During a session the remaining quota and time never grow.
  a_quota_falls: assert property (@(posedge clk) disable iff (!rst_n)
    in_session && !wipe_o |=> quota_q <= $past(quota_q) && tleft_q <= $past(tleft_q));
  // Every port but the owner reads the dummy status.
  for (genvar p = 0; p < N_PORTS; p++) begin : g_chk
    a_dummy: assert property (@(posedge clk) disable iff (!rst_n)
      PW'(p) != owner_q |-> status_o[p] == STATUS_DUMMY);
  end

endmodule
