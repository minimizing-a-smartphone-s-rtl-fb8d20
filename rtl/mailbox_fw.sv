// mailbox_fw: verifiably delegable mailbox with a fixed writer.
//
// The mirror image of mailbox_fr: one domain (an input device's domain, or the
// response and data-out side of an I/O service) is hard-wired to the write side of
// the message queue, and the read side is the delegable end shared by N_PORTS
// domains (port 0 the resource manager). A multiplexer hands the queue's output
// only to the current owner; every other port sees rd_valid low and reads zero,
// so nothing of the session leaks to them. Status, delegation, yield, expiry and
// wiping behave as in mailbox_fr (see mbox_ctrl). A message counts against the
// delegate's quota when it has read the message's last word; once the quota is
// used up the session ends and whatever the fixed writer has queued beyond it is
// wiped.
//
// Interface: valid/ready word handshakes; one-cycle mbox_cmd_t commands.
// Timing: a word is readable the cycle after it is written; a wipe takes
// MSG_WORDS*QUEUE_MSGS cycles. The fixed-writer/delegable-reader arrangement is
// the document's; the rest is as chosen for mailbox_fr.
module mailbox_fw
  import octo_pkg::*;
#(
  parameter int unsigned N_PORTS     = octo_pkg::N_PORTS,
  parameter int unsigned MSG_WORDS   = octo_pkg::CTRL_MSG_WORDS,
  parameter int unsigned QUEUE_MSGS  = octo_pkg::QUEUE_MSGS,
  parameter int unsigned TICK_CYCLES = 100000
) (
  input  logic               clk,
  input  logic               rst_n,
  // delegable end: commands, status and the read side of the queue
  input  mbox_cmd_t          cmd_i      [N_PORTS],
  output mbox_status_t       status_o   [N_PORTS],
  output logic               d_rd_valid_o [N_PORTS],
  input  logic               d_rd_ready_i [N_PORTS],
  output logic [DATA_W-1:0]  d_rd_data_o  [N_PORTS],
  // fixed end: status and the write side of the queue
  output mbox_status_t       fixed_status_o,
  input  logic               f_wr_valid_i,
  output logic               f_wr_ready_o,
  input  logic [DATA_W-1:0]  f_wr_data_i,
  // to the reset guard
  output dom_id_e            owner_dom_o,
  output logic               in_session_o,
  output logic               busy_o
);
  localparam int unsigned DEPTH = MSG_WORDS * QUEUE_MSGS;
  localparam int unsigned PW    = $clog2(N_PORTS);
  localparam int unsigned WW    = (MSG_WORDS > 1) ? $clog2(MSG_WORDS) : 1;

  logic [PW-1:0]     owner;
  logic              access_ok, wipe;
  logic              q_rd_valid, q_rd_ready;
  logic [DATA_W-1:0] q_rd_data;
  logic [WW-1:0]     rd_word_q;
  logic              rd_fire, rd_msg_done;

  mbox_ctrl #(.N_PORTS(N_PORTS), .TICK_CYCLES(TICK_CYCLES)) u_ctrl (
    .clk, .rst_n, .cmd_i,
    .rd_msg_done_i (rd_msg_done),
    .wr_msg_done_i (1'b0),
    .owner_o       (owner),
    .owner_dom_o,
    .in_session_o,
    .access_ok_o   (access_ok),
    .wr_allowed_o  (),
    .wipe_o        (wipe),
    .status_o,
    .fixed_status_o
  );

  msg_queue #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_queue (
    .clk, .rst_n, .wipe, .busy(busy_o),
    .wr_valid (f_wr_valid_i), .wr_ready (f_wr_ready_o), .wr_data (f_wr_data_i),
    .rd_valid (q_rd_valid),   .rd_ready (q_rd_ready),   .rd_data (q_rd_data),
    .count    ()
  );

  // Multiplexer: only the owner sees and takes the queue's output.
  assign q_rd_ready = d_rd_ready_i[owner] && access_ok;
  always_comb begin
    for (int p = 0; p < N_PORTS; p++) begin
      d_rd_valid_o[p] = (PW'(p) == owner) && access_ok && q_rd_valid;
      d_rd_data_o[p]  = (PW'(p) == owner) ? q_rd_data : '0;
    end
  end

  assign rd_fire     = q_rd_valid && q_rd_ready;
  assign rd_msg_done = rd_fire && (rd_word_q == WW'(MSG_WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                rd_word_q <= '0;
    else if (wipe)             rd_word_q <= '0;
    else if (rd_fire)          rd_word_q <= rd_msg_done ? '0 : rd_word_q + 1'b1;
  end

  // Only the owner's port is ever offered the read side, and others see no data.
  for (genvar p = 0; p < N_PORTS; p++) begin : g_chk
    a_mux_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
      PW'(p) != owner |-> !d_rd_valid_o[p] && d_rd_data_o[p] == '0);
  end

endmodule
