// msg_queue: the message queue inside a mailbox, a word FIFO that can be wiped.
//
// A mailbox must leave nothing of one session to the next, so besides a normal
// first-in first-out store this queue has a wipe operation: it drops every word
// at once (pointers and count cleared) and then writes zero into every entry, one
// entry per cycle. While the wipe runs, busy is high and the queue neither accepts
// nor offers words. Reset also starts a wipe, so the storage never holds stale or
// random data once busy falls.
//
// Interface: valid/ready handshakes on both sides; a word moves on a clock edge
// where valid and ready are both high. Timing: a written word is readable the
// next cycle; a wipe takes DEPTH cycles. Queue size (4 messages) follows the
// mailbox description; the word width and the zero-filling wipe are this design's
// choices for "the data in the queue is wiped".
module msg_queue #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wipe,
  output logic                       busy,
  input  logic                       wr_valid,
  output logic                       wr_ready,
  input  logic [DATA_W-1:0]          wr_data,
  output logic                       rd_valid,
  input  logic                       rd_ready,
  output logic [DATA_W-1:0]          rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [AW-1:0]     wr_ptr, rd_ptr, wipe_idx;
  logic              do_wr, do_rd;

  assign wr_ready = !busy && !wipe && (count != DEPTH[$bits(count)-1:0]);
  assign rd_valid = !busy && !wipe && (count != '0);
  assign rd_data  = mem[rd_ptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      busy     <= 1'b1;
      wipe_idx <= '0;
    end else if (wipe) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      busy     <= 1'b1;
      wipe_idx <= '0;
    end else if (busy) begin
      wipe_idx <= incr(wipe_idx);
      if (wipe_idx == AW'(DEPTH - 1)) busy <= 1'b0;
    end else begin
      if (do_wr) wr_ptr <= incr(wr_ptr);
      if (do_rd) rd_ptr <= incr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  // Storage: one write port shared by the wipe and by normal writes.
  always_ff @(posedge clk) begin
    if (busy && !wipe) mem[wipe_idx] <= '0;
    else if (do_wr)    mem[wr_ptr]   <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
