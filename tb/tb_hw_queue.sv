// tb_hw_queue: self-checking test of the permanent hardware queue.
//
// Sends a stream of random words through an 8-entry queue while the reader takes
// words at random moments, compares the output with a reference list kept by the
// testbench, checks back-pressure when full, and checks that reset empties it.
module tb_hw_queue;
  localparam int unsigned DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_valid = 0, wr_ready, rd_valid, rd_ready = 0;
  logic [31:0] wr_data = '0, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [31:0] ref_q [$];
  int sent = 0, got = 0, full_seen = 0;

  hw_queue #(.DATA_W(32), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) begin @(posedge clk); #1; end
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  // Looked at on the falling edge, where the next rising edge's transfers are known.
  always @(negedge clk) if (rst_n) begin
    check(count == ref_q.size(), "count matches");
    if (rd_valid && rd_ready) begin
      check(ref_q.size() > 0 && rd_data == ref_q[0], $sformatf("word %0d", got));
      if (ref_q.size() > 0) void'(ref_q.pop_front());
      got++;
    end
    if (wr_valid && wr_ready) ref_q.push_back(wr_data);
    if (count == DEPTH) begin
      full_seen++;
      check(!wr_ready, "no ready when full");
    end
  end

  initial begin
    repeat (2) begin @(posedge clk); #1; end
    rst_n = 1;
    begin @(posedge clk); #1; end
    check(rd_valid == 0 && count == 0, "empty after reset");
    // phase 1: writer faster than reader
    for (int i = 0; i < 400; i++) begin
      wr_valid = ($urandom_range(0, 3) != 0);
      wr_data  = $urandom;
      rd_ready = (i > 200) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      begin @(posedge clk); #1; end
    end
    wr_valid = 0; rd_ready = 1;
    repeat (DEPTH + 2) begin @(posedge clk); #1; end
    rd_ready = 0;
    check(full_seen > 0, "queue filled at least once");
    check(got > 100, "words flowed");
    // reset empties
    wr_valid = 1; wr_data = 32'h1234; begin @(posedge clk); #1; end wr_valid = 0;
    begin @(posedge clk); #1; end
    rst_n = 0; ref_q.delete(); begin @(posedge clk); #1; end rst_n = 1; begin @(posedge clk); #1; end
    check(!rd_valid && count == 0, "reset empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
