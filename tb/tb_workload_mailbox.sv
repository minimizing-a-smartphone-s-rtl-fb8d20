// tb_workload_mailbox: the two mailbox workloads, at full size.
//
// Throughput: the resource manager delegates the writer end of a data-plane
// mailbox (512 B messages, 4-message queue, 1 ms tick at 100 MHz) to the
// untrusted domain with a quota of 10,000 messages. The untrusted domain writes
// 10,000 messages of 128 words as fast as the mailbox accepts them; the fixed
// reader always takes words. Every word is checked, the cycles are counted and
// the rate at 100 MHz is printed. When the 10,000th message has been delivered
// the writer end must be back with the resource manager.
//
// Latency: a control-plane pair (64 B messages). The untrusted domain, delegate of
// both the writer end of one mailbox and the reader end of the other (unlimited
// quota), sends one message; the fixed domain reads it and answers with one
// message. The round trip is measured from the first word written to the last
// word of the answer read.
//
// File read: the storage domain, fixed writer of a data-plane mailbox, sends a
// 1 MB file (2048 messages of 512 B) to TEE 1, which holds the reader end with a
// quota of exactly 2048 messages. Every word is checked, and the session must end
// by quota right after the last word, with the reader end back at the resource
// manager.
module tb_workload_mailbox;
  import octo_pkg::*;
  localparam int unsigned N_MSG = 10000;
  localparam int unsigned DW = DATA_MSG_WORDS, CW = CTRL_MSG_WORDS;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask
  task automatic tick(); @(posedge clk); #1; endtask

  always #5 clk = ~clk;

  // data-plane mailbox, fixed reader
  mbox_cmd_t    d_cmd [N_PORTS];
  mbox_status_t d_st [N_PORTS];
  mbox_status_t d_fst;
  logic         d_wv [N_PORTS], d_wr [N_PORTS];
  logic [31:0]  d_wd [N_PORTS];
  logic         d_rv, d_rr = 1;
  logic [31:0]  d_rd;
  dom_id_e      d_owner;
  logic         d_sess, d_busy;
  mailbox_fr #(.MSG_WORDS(DW)) u_data (
    .clk, .rst_n, .cmd_i(d_cmd), .status_o(d_st), .d_wr_valid_i(d_wv), .d_wr_data_i(d_wd),
    .d_wr_ready_o(d_wr), .fixed_status_o(d_fst), .f_rd_valid_o(d_rv), .f_rd_ready_i(d_rr),
    .f_rd_data_o(d_rd), .owner_dom_o(d_owner), .in_session_o(d_sess), .busy_o(d_busy));

  // control-plane request mailbox (fixed reader) and answer mailbox (fixed writer)
  mbox_cmd_t    q_cmd [N_PORTS], a_cmd [N_PORTS];
  mbox_status_t q_st [N_PORTS], a_st [N_PORTS];
  mbox_status_t q_fst, a_fst;
  logic         q_wv [N_PORTS], q_wr [N_PORTS];
  logic [31:0]  q_wd [N_PORTS];
  logic         q_rv, q_rr = 0;
  logic [31:0]  q_rd;
  logic         a_rv [N_PORTS], a_rr [N_PORTS];
  logic [31:0]  a_rd [N_PORTS];
  logic         a_wv = 0, a_wr;
  logic [31:0]  a_wd = '0;
  dom_id_e      q_owner, a_owner;
  logic         q_sess, q_busy, a_sess, a_busy;
  mailbox_fr u_req (
    .clk, .rst_n, .cmd_i(q_cmd), .status_o(q_st), .d_wr_valid_i(q_wv), .d_wr_data_i(q_wd),
    .d_wr_ready_o(q_wr), .fixed_status_o(q_fst), .f_rd_valid_o(q_rv), .f_rd_ready_i(q_rr),
    .f_rd_data_o(q_rd), .owner_dom_o(q_owner), .in_session_o(q_sess), .busy_o(q_busy));
  mailbox_fw u_ans (
    .clk, .rst_n, .cmd_i(a_cmd), .status_o(a_st), .d_rd_valid_o(a_rv), .d_rd_ready_i(a_rr),
    .d_rd_data_o(a_rd), .fixed_status_o(a_fst), .f_wr_valid_i(a_wv), .f_wr_ready_o(a_wr),
    .f_wr_data_i(a_wd), .owner_dom_o(a_owner), .in_session_o(a_sess), .busy_o(a_busy));

  // data-plane mailbox, fixed writer (storage data out)
  localparam int unsigned FILE_MSGS = 1024 * 1024 / 512;
  mbox_cmd_t    s_cmd [N_PORTS];
  mbox_status_t s_st [N_PORTS];
  mbox_status_t s_fst;
  logic         s_rv [N_PORTS], s_rr [N_PORTS];
  logic [31:0]  s_rd [N_PORTS];
  logic         s_wv = 0, s_wr;
  logic [31:0]  s_wd = '0;
  dom_id_e      s_owner;
  logic         s_sess, s_busy;
  mailbox_fw #(.MSG_WORDS(DW)) u_file (
    .clk, .rst_n, .cmd_i(s_cmd), .status_o(s_st), .d_rd_valid_o(s_rv), .d_rd_ready_i(s_rr),
    .d_rd_data_o(s_rd), .fixed_status_o(s_fst), .f_wr_valid_i(s_wv), .f_wr_ready_o(s_wr),
    .f_wr_data_i(s_wd), .owner_dom_o(s_owner), .in_session_o(s_sess), .busy_o(s_busy));

  // Fixed reader of the data-plane mailbox: checks every word.
  int unsigned rx_words = 0, bad_words = 0;
  longint unsigned t_first = 0, t_last = 0;
  always @(posedge clk) if (rst_n && d_rv && d_rr) begin
    if (d_rd !== {rx_words[15:0] ^ 16'hA5C3, rx_words[15:0]}) bad_words++;
    rx_words++;
    t_last = longint'($time);
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned w;
    longint unsigned cycles, rt_start, rt_end;
    real mbps;
    for (int p = 0; p < N_PORTS; p++) begin
      d_cmd[p] = '{op: MBOX_NOP, target: DOM_RM, quota: '0, tlimit: '0};
      q_cmd[p] = d_cmd[p]; a_cmd[p] = d_cmd[p]; s_cmd[p] = d_cmd[p]; s_rr[p] = 0;
      d_wv[p] = 0; d_wd[p] = '0; q_wv[p] = 0; q_wd[p] = '0; a_rr[p] = 0;
    end
    repeat (2) tick();
    rst_n = 1;
    while (d_busy || q_busy || a_busy || s_busy) tick();

    // ---- throughput ----
    d_cmd[0] = '{op: MBOX_DELEGATE, target: DOM_UNTRUSTED, quota: 16'(N_MSG), tlimit: 16'd100};
    tick();
    d_cmd[0].op = MBOX_NOP;
    check(d_sess && d_owner == DOM_UNTRUSTED, "data mailbox delegated to the untrusted domain");
    while (d_busy) tick();
    t_first = longint'($time);
    w = 0;
    while (w < N_MSG * DW) begin
      d_wv[1] = 1;
      d_wd[1] = {w[15:0] ^ 16'hA5C3, w[15:0]};
      if (d_wr[1]) w++;
      tick();
    end
    d_wv[1] = 0;
    repeat (4) tick();
    check(rx_words == N_MSG * DW, $sformatf("all words delivered (%0d)", rx_words));
    check(bad_words == 0, $sformatf("every word correct (%0d wrong)", bad_words));
    check(!d_sess && d_owner == DOM_RM, "writer end back with the resource manager after 10,000 messages");
    cycles = (t_last - t_first) / 10 + 1;
    mbps = real'(N_MSG) * 512.0 / (real'(cycles) * 10.0e-9) / 1.0e6;
    $display("throughput: %0d messages of 512 B in %0d cycles = %0.1f MB/s at 100 MHz", N_MSG, cycles, mbps);
    check(cycles <= N_MSG * DW + N_MSG * DW / 20, "about one word per cycle");

    // ---- latency ----
    q_cmd[0] = '{op: MBOX_DELEGATE, target: DOM_UNTRUSTED, quota: QUOTA_INFINITE, tlimit: 16'd10};
    a_cmd[0] = q_cmd[0];
    tick();
    q_cmd[0].op = MBOX_NOP; a_cmd[0].op = MBOX_NOP;
    while (q_busy || a_busy) tick();
    check(q_owner == DOM_UNTRUSTED && a_owner == DOM_UNTRUSTED, "control pair delegated");
    rt_start = longint'($time);
    fork
      begin : sender
        int unsigned i = 0;
        while (i < CW) begin
          q_wv[1] = 1; q_wd[1] = 32'hC000_0000 + i;
          if (q_wr[1]) i++;
          tick();
        end
        q_wv[1] = 0;
      end
      begin : fixed_end
        int unsigned r = 0, s = 0;
        int unsigned bad = 0;
        q_rr = 1;
        while (r < CW) begin
          if (q_rv) begin
            if (q_rd != 32'hC000_0000 + r) bad++;
            r++;
          end
          tick();
        end
        q_rr = 0;
        check(bad == 0, "request received intact");
        while (s < CW) begin
          a_wv = 1; a_wd = 32'hA000_0000 + s;
          if (a_wr) s++;
          tick();
        end
        a_wv = 0;
      end
      begin : receiver
        int unsigned r = 0, bad = 0;
        a_rr[1] = 1;
        while (r < CW) begin
          if (a_rv[1]) begin
            if (a_rd[1] != 32'hA000_0000 + r) bad++;
            r++;
          end
          tick();
        end
        a_rr[1] = 0;
        rt_end = longint'($time);
        check(bad == 0, "answer received intact");
      end
    join
    $display("latency: 64 B round trip in %0d cycles = %0d ns at 100 MHz", (rt_end - rt_start) / 10, rt_end - rt_start);
    check((rt_end - rt_start) / 10 <= 3 * CW + 8, "round trip within three message times");

    // ---- 1 MB file read ----
    s_cmd[0] = '{op: MBOX_DELEGATE, target: DOM_TEE1, quota: 16'(FILE_MSGS), tlimit: 16'd1000};
    tick();
    s_cmd[0].op = MBOX_NOP;
    check(s_owner == DOM_TEE1 && s_st[2].quota == 16'(FILE_MSGS), "TEE 1 sees its file-read quota");
    while (s_busy) tick();
    fork
      begin : storage
        int unsigned i = 0;
        while (i < FILE_MSGS * DW) begin
          s_wv = 1; s_wd = i ^ 32'h5A5A_0000;
          if (s_wr) i++;
          tick();
        end
        s_wv = 0;
      end
      begin : tee1
        int unsigned r, bad;
        longint unsigned t0;
        r = 0; bad = 0;
        t0 = longint'($time);
        s_rr[2] = 1;
        while (r < FILE_MSGS * DW) begin
          if (s_rv[2]) begin
            if (s_rd[2] != (r ^ 32'h5A5A_0000)) bad++;
            r++;
          end
          tick();
        end
        s_rr[2] = 0;
        $display("file read: 1 MB in %0d cycles", (longint'($time) - t0) / 10);
        check((longint'($time) - t0) / 10 <= FILE_MSGS * DW + 8, "about one word per cycle");
        check(bad == 0, $sformatf("file received intact (%0d wrong words)", bad));
        check(s_sess && s_st[2].quota == '0, "quota used up by the last word");
        tick();
        check(!s_sess && s_owner == DOM_RM, "session ends by quota one cycle after the last word");
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
