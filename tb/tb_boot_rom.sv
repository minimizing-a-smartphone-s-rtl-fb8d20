// tb_boot_rom: self-checking test of the lockable bootloader memory.
//
// Loads a 64-word image, reads it back (one-cycle read latency), locks the
// memory, tries to overwrite every word and checks that nothing changed, that the
// lock survives lock_i falling, and that only a power-on reset clears it.
module tb_boot_rom;
  localparam int unsigned DEPTH = 64;
  logic clk = 0, por_n = 0;
  logic wr_en = 0, lock = 0, locked, rd_en = 0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  boot_rom #(.DATA_W(32), .DEPTH(DEPTH)) dut (
    .clk, .por_n, .wr_en_i(wr_en), .wr_addr_i(wr_addr), .wr_data_i(wr_data),
    .lock_i(lock), .locked_o(locked), .rd_en_i(rd_en), .rd_addr_i(rd_addr), .rd_data_o(rd_data));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask
  function automatic logic [31:0] img(int i); return 32'hB007_0000 ^ (i * 32'h0101_0101); endfunction
  task automatic write(input int a, input logic [31:0] d);
    wr_en = 1; wr_addr = 6'(a); wr_data = d; tick(); wr_en = 0;
  endtask
  task automatic read_all(input string what);
    for (int i = 0; i < DEPTH; i++) begin
      rd_en = 1; rd_addr = 6'(i); tick(); rd_en = 0;
      check(rd_data == img(i), $sformatf("%s word %0d", what, i));
    end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(); por_n = 1; tick();
    check(!locked, "writable after power-on");
    for (int i = 0; i < DEPTH; i++) write(i, img(i));
    read_all("loaded");
    lock = 1; tick(); lock = 0;
    check(locked, "locked");
    for (int i = 0; i < DEPTH; i++) write(i, 32'hFFFF_0000 + i);
    read_all("after write attempts");
    repeat (10) tick();
    check(locked, "lock stays after lock_i falls");
    por_n = 0; tick(); por_n = 1; tick();
    check(!locked, "power-on reset clears the lock");
    write(5, 32'h1234_5678);
    rd_en = 1; rd_addr = 6'd5; tick(); rd_en = 0;
    check(rd_data == 32'h1234_5678, "writable again after power-on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
