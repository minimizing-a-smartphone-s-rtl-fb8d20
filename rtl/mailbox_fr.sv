// mailbox_fr: verifiably delegable mailbox with a fixed reader.
//
// One domain is hard-wired to the read side of the message queue. The write side
// is the delegable end: it is wired to N_PORTS domains (port 0 the resource
// manager) and a multiplexer lets only the current owner chosen by mbox_ctrl
// through. Non-owners see wr_ready low and their words are ignored. Any domain can
// read a status register; only the owner and the fixed reader get the real value
// (owner, remaining message quota, remaining time), the others a dummy value.
// Every change of owner wipes the queue, and reset (the guarded reset of the
// fixed reader's domain, or the system reset) returns the mailbox to the
// resource manager and wipes it too.
//
// Messages are MSG_WORDS words long (16 for a 64 B control-plane message, 128 for
// a 512 B data-plane message) and the queue holds QUEUE_MSGS of them. Word
// counters on both sides find message boundaries: a delegate may start no more
// messages than its quota, and a message counts against the quota when the fixed
// reader has taken its last word.
//
// Interface: valid/ready word handshakes; commands are one-cycle mbox_cmd_t
// values. Timing: a word is readable the cycle after it is written; a wipe makes
// the queue unavailable for MSG_WORDS*QUEUE_MSGS cycles. The structure (fixed
// reader, multiplexer, status register, message queue) follows the original
// mailbox design; word width, handshakes and counting are this design's choices.
module mailbox_fr
  import octo_pkg::*;
#(
  parameter int unsigned N_PORTS     = octo_pkg::N_PORTS,
  parameter int unsigned MSG_WORDS   = octo_pkg::CTRL_MSG_WORDS,
  parameter int unsigned QUEUE_MSGS  = octo_pkg::QUEUE_MSGS,
  parameter int unsigned TICK_CYCLES = 100000
) (
  input  logic               clk,
  input  logic               rst_n,
  // delegable end: commands, status and the write side of the queue
  input  mbox_cmd_t          cmd_i      [N_PORTS],
  output mbox_status_t       status_o   [N_PORTS],
  input  logic               d_wr_valid_i [N_PORTS],
  input  logic [DATA_W-1:0]  d_wr_data_i  [N_PORTS],
  output logic               d_wr_ready_o [N_PORTS],
  // fixed end: status and the read side of the queue
  output mbox_status_t       fixed_status_o,
  output logic               f_rd_valid_o,
  input  logic               f_rd_ready_i,
  output logic [DATA_W-1:0]  f_rd_data_o,
  // to the reset guard
  output dom_id_e            owner_dom_o,
  output logic               in_session_o,
  output logic               busy_o
);
  localparam int unsigned DEPTH = MSG_WORDS * QUEUE_MSGS;
  localparam int unsigned PW    = $clog2(N_PORTS);
  localparam int unsigned WW    = (MSG_WORDS > 1) ? $clog2(MSG_WORDS) : 1;

  logic [PW-1:0]     owner;
  logic              wr_allowed, wipe;
  logic              q_wr_valid, q_wr_ready, q_rd_valid;
  logic [DATA_W-1:0] q_wr_data;
  logic [WW-1:0]     wr_word_q, rd_word_q;
  logic              wr_fire, rd_fire, wr_msg_done, rd_msg_done;

  mbox_ctrl #(.N_PORTS(N_PORTS), .TICK_CYCLES(TICK_CYCLES)) u_ctrl (
    .clk, .rst_n, .cmd_i,
    .rd_msg_done_i (rd_msg_done),
    .wr_msg_done_i (wr_msg_done),
    .owner_o       (owner),
    .owner_dom_o,
    .in_session_o,
    .access_ok_o   (),
    .wr_allowed_o  (wr_allowed),
    .wipe_o        (wipe),
    .status_o,
    .fixed_status_o
  );

  // Multiplexer: only the owner's write reaches the queue.
  assign q_wr_valid = d_wr_valid_i[owner] && wr_allowed;
  assign q_wr_data  = d_wr_data_i[owner];
  always_comb begin
    for (int p = 0; p < N_PORTS; p++)
      d_wr_ready_o[p] = (PW'(p) == owner) && wr_allowed && q_wr_ready;
  end

  msg_queue #(.DATA_W(DATA_W), .DEPTH(DEPTH)) u_queue (
    .clk, .rst_n, .wipe, .busy(busy_o),
    .wr_valid (q_wr_valid), .wr_ready (q_wr_ready), .wr_data (q_wr_data),
    .rd_valid (q_rd_valid), .rd_ready (f_rd_ready_i), .rd_data (f_rd_data_o),
    .count    ()
  );
  assign f_rd_valid_o = q_rd_valid;

  assign wr_fire     = q_wr_valid && q_wr_ready;
  assign rd_fire     = q_rd_valid && f_rd_ready_i;
  assign wr_msg_done = wr_fire && (wr_word_q == WW'(MSG_WORDS - 1));
  assign rd_msg_done = rd_fire && (rd_word_q == WW'(MSG_WORDS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_word_q <= '0;
      rd_word_q <= '0;
    end else if (wipe) begin
      wr_word_q <= '0;
      rd_word_q <= '0;
    end else begin
      if (wr_fire) wr_word_q <= wr_msg_done ? '0 : wr_word_q + 1'b1;
      if (rd_fire) rd_word_q <= rd_msg_done ? '0 : rd_word_q + 1'b1;
    end
  end

  // Only the owner's port is ever offered the write side.
  for (genvar p = 0; p < N_PORTS; p++) begin : g_chk
    a_mux_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
      d_wr_ready_o[p] |-> PW'(p) == owner);
  end

endmodule
