// tb_msg_queue: self-checking test of the wipeable mailbox message queue.
//
// Uses an 8-entry queue. Checks that reset starts a wipe lasting DEPTH cycles,
// that words come out in order, that the queue refuses a word when full and
// offers none when empty, that simultaneous read and write keep the count, and
// that a wipe empties the queue, lasts DEPTH cycles and leaves every storage
// entry zero.
module tb_msg_queue;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0, wipe = 0, busy;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [31:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  msg_queue #(.DATA_W(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Inputs change 1 time unit after a rising edge; outputs are looked at then too.
  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic push(input logic [31:0] d);
    wr_valid = 1; wr_data = d;
    tick(); wr_valid = 0;
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    tick(); tick();
    rst_n = 1;
    tick();
    check(busy, "busy after reset");
    n = 0;
    while (busy) begin tick(); n++; end
    check(n == DEPTH - 1, $sformatf("reset wipe took %0d cycles", n));
    check(!rd_valid && wr_ready && count == 0, "empty after wipe");
    // fill
    for (int i = 0; i < DEPTH; i++) push(32'hA000_0000 + i);
    check(count == DEPTH, "count full");
    check(!wr_ready, "not ready when full");
    // refused write leaves contents
    push(32'hDEAD_BEEF);
    check(count == DEPTH, "refused write");
    // drain in order
    for (int i = 0; i < DEPTH; i++) begin
      check(rd_valid && rd_data == 32'hA000_0000 + i, $sformatf("order %0d got %h", i, rd_data));
      rd_ready = 1; tick(); rd_ready = 0;
    end
    check(!rd_valid && count == 0, "empty after drain");
    // simultaneous read and write
    push(32'h1); push(32'h2);
    wr_valid = 1; wr_data = 32'h3; rd_ready = 1;
    tick(); wr_valid = 0; rd_ready = 0;
    check(count == 2 && rd_data == 32'h2, "simultaneous read/write");
    // wipe
    push(32'h5555_0001); push(32'h5555_0002);
    wipe = 1; tick(); wipe = 0;
    check(busy && count == 0 && !rd_valid && !wr_ready, "wipe empties queue at once");
    n = 0;
    while (busy) begin tick(); n++; end
    check(n == DEPTH, $sformatf("wipe took %0d cycles", n));
    for (int i = 0; i < DEPTH; i++)
      check(dut.mem[i] == '0, $sformatf("entry %0d wiped", i));
    push(32'h7777_0000);
    check(rd_valid && rd_data == 32'h7777_0000, "usable after wipe");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
