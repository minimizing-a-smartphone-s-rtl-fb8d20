// hw_queue: a permanent, hard-wired FIFO between two fixed domains.
//
// Unlike a mailbox, a permanent queue has no delegable end: one domain is wired
// to its write side and one to its read side for good. The machine uses them for
// links every domain always needs (each domain to the microcontroller that
// mediates the TPM, the TEEs and the untrusted domain to the resource manager)
// and, with a last-of-packet bit in the word, as the packet FIFOs the network
// domain reaches through the DMA arbiter. Reset empties the queue.
//
// Interface: valid/ready on both sides. Timing: a word written in one cycle can be
// read in the next; full throughput of one word per cycle each way. The document
// only names these queues; their depth and width are this design's choices.
module hw_queue #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
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
  logic [AW-1:0]     wr_ptr, rd_ptr;
  logic              do_wr, do_rd;

  assign wr_ready = (count != DEPTH[$bits(count)-1:0]);
  assign rd_valid = (count != '0);
  assign rd_data  = mem[rd_ptr];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == AW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == AW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
