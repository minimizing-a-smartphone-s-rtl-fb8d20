// boot_rom: bootloader memory that can be turned, once, into read-only memory.
//
// A domain's bootloader is stored here. After power-on the memory is writable
// through its load port, so the bootloader image can be placed in it; raising
// lock_i then turns it into a ROM for good. Once locked, writes are ignored and
// nothing but a power-on reset (por_n) clears the lock: domain resets issued by
// the resource manager do not reach this block. Reads work in both states.
//
// Interface: synchronous single-port load (wr_en_i, wr_addr_i, wr_data_i), a
// separate synchronous read port (rd_en_i, rd_addr_i, rd_data_o one cycle later)
// and the lock input and flag. The irreversible read-only transition is the
// document's; the size, the two ports and the power-on-only clearing are this
// design's choices.
module boot_rom #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned DEPTH  = 4096
) (
  input  logic                     clk,
  input  logic                     por_n,
  input  logic                     wr_en_i,
  input  logic [$clog2(DEPTH)-1:0] wr_addr_i,
  input  logic [DATA_W-1:0]        wr_data_i,
  input  logic                     lock_i,
  output logic                     locked_o,
  input  logic                     rd_en_i,
  input  logic [$clog2(DEPTH)-1:0] rd_addr_i,
  output logic [DATA_W-1:0]        rd_data_o
);
  logic [DATA_W-1:0] mem [DEPTH];
  logic              locked_q;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n)      locked_q <= 1'b0;
    else if (lock_i) locked_q <= 1'b1;
  end
  assign locked_o = locked_q;

  always_ff @(posedge clk) begin
    if (wr_en_i && !locked_q) mem[wr_addr_i] <= wr_data_i;
    if (rd_en_i)              rd_data_o      <= mem[rd_addr_i];
  end

  a_lock_sticky: assert property (@(posedge clk) disable iff (!por_n) locked_q |=> locked_q);

endmodule
