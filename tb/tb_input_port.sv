// tb_input_port: 4-port, 2 KB (32-block) instance of the switch input buffer,
// driven like a link at one word every two cycles by a sender that respects
// per-VC credits (16 blocks each), and read by an emulated scheduler.
// Checks: each VOQ delivers its packets in order and intact, with the header's
// hop index advanced; head length and arrival time offered to the scheduler are
// right; the first word follows a grant by two cycles; a packet granted while
// still arriving is forwarded before its tail arrives (cut-through) without
// overtaking the writer; the buffer fills to exactly its credit budget without
// loss; freed blocks return one credit each, per VC; credit symbols on the link
// are passed on.
module tb_input_port;
  import qos_pkg::*;
  localparam int N = 4, NQ = 2 * N, BUFB = 2048, VC_BLK = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  ts_t now;
  link_word_t link_in;
  logic crd_rx_valid, crd_rx_vc, grant_valid, xo_valid, xo_last, busy, crd_ret_valid, crd_ret_vc;
  logic [8:0] crd_rx_n;
  logic [NQ-1:0] req_valid;
  len_t req_len [NQ];
  ts_t  req_ts  [NQ];
  logic [2:0] grant_q;
  word_t xo_data;

  input_port #(.NPORTS(N), .BUF_BYTES(BUFB)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) now <= rst_n ? now + 1'b1 : '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // expected contents per queue: packets as flat word lists with a length list
  word_t exp_w [NQ][$];
  int    exp_len [NQ][$];
  int    exp_ts  [NQ][$];
  int    credits [2];
  int    crd_back [2], crd_rx_seen;
  int    sent_words;          // data words put on the link so far
  bit    reader_on;

  always @(posedge clk) if (rst_n) begin
    if (crd_ret_valid) begin credits[crd_ret_vc]++; crd_back[crd_ret_vc]++; end
    if (crd_rx_valid) begin
      crd_rx_seen++;
      check(crd_rx_vc == 1'b1 && crd_rx_n == 9'd5, "credit symbol passed on");
    end
  end

  function automatic word_t mk_hdr(input int tc, input int len, input int port, input int id);
    word_t h;
    h = {$urandom, $urandom};
    h[63:61] = 3'(tc); h[60:52] = 9'(len); h[51:48] = 4'd1;
    h[15:12] = 4'(port);            // route field for hop 1
    h[7:0] = 8'(id);
    return h;
  endfunction

  task automatic link_word(input word_t w, input bit ctrl);
    link_in = '{valid: 1'b1, ctrl: ctrl, data: w};
    @(negedge clk);
    link_in = '0;
    @(negedge clk);
  endtask

  task automatic send_pkt(input int tc, input int len, input int port, input int id);
    int q, vc, blks;
    word_t h, eh;
    vc = tc >= 4; q = vc * N + port; blks = (len + 7) / 8;
    wait (credits[vc] >= blks);
    @(negedge clk);
    credits[vc] -= blks;
    h = mk_hdr(tc, len, port, id);
    eh = h; eh[51:48] = 4'd2;
    exp_len[q].push_back(len);
    exp_ts[q].push_back(-1);
    exp_w[q].push_back(eh);
    for (int k = 1; k < len; k++) exp_w[q].push_back({$urandom, $urandom});
    link_in = '{valid: 1'b1, ctrl: 1'b0, data: h};
    @(negedge clk);
    exp_ts[q][exp_ts[q].size() - 1] = int'(now) - 1;
    link_in = '0; @(negedge clk);
    for (int k = 1; k < len; k++) begin
      link_word(exp_w[q][exp_w[q].size() - len + k], 1'b0);
      sent_words++;
    end
  endtask

  // emulated scheduler: grants a random requesting queue, then checks the packet
  int pkts_read, grant_cyc;
  task automatic read_one(input int q);
    int len, k;
    word_t w;
    len = exp_len[q][0];
    check(req_len[q] == 9'(len), "req_len");
    check(int'(req_ts[q]) == exp_ts[q][0], "req_ts");
    grant_valid = 1; grant_q = 3'(q);
    @(negedge clk);
    grant_valid = 0;
    grant_cyc = 1;
    k = 0;
    while (k < len) begin
      @(posedge clk); #1;
      grant_cyc++;
      if (xo_valid) begin
        if (k == 0) check(grant_cyc == 2, "grant to first word latency");
        w = exp_w[q].pop_front();
        check(xo_data == w, $sformatf("data q%0d word %0d", q, k));
        check(xo_last == (k == len - 1), "last flag");
        k++;
      end
      if (grant_cyc > 4000) begin check(0, "reader hang"); break; end
    end
    void'(exp_len[q].pop_front()); void'(exp_ts[q].pop_front());
    pkts_read++;
    @(negedge clk);
  endtask

  int ct_sent_at_first, ct_base;
  initial begin
    link_in = '0; grant_valid = 0; grant_q = '0; now = '0;
    credits = '{VC_BLK, VC_BLK}; crd_back = '{0, 0}; crd_rx_seen = 0; sent_words = 0;
    pkts_read = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- fill: both VCs to their full budget, nothing read
    send_pkt(0, 16, 1, 1);   // 2 blocks
    send_pkt(5, 9, 2, 2);    // 2 blocks
    send_pkt(1, 1, 1, 3);    // 1 block
    send_pkt(6, 64, 3, 4);   // 8 blocks
    send_pkt(2, 100, 0, 5);  // 13 blocks -> VC 0 full
    send_pkt(7, 48, 2, 6);   // 6 blocks  -> VC 1 full
    link_word(credit_word(1'b1, 9'd5), 1'b1);
    repeat (4) @(negedge clk);
    check(credits[0] == 0 && credits[1] == 0, "budget used");
    check(req_valid == 8'b1100_0011, $sformatf("requests %b", req_valid));
    check(crd_rx_seen == 1, "credit symbol seen");
    // ---- drain in a chosen order
    read_one(1); read_one(4 + 2); read_one(1); read_one(0); read_one(4 + 3); read_one(4 + 2);
    repeat (4) @(negedge clk);
    check(req_valid == '0, "empty");
    check(crd_back[0] == 16 && crd_back[1] == 16, $sformatf("credits back %0d %0d", crd_back[0], crd_back[1]));
    // ---- cut-through: grant while the packet is still arriving
    ct_base = sent_words;
    fork
      send_pkt(3, 120, 2, 7);
      begin
        wait (req_valid[2]);
        @(negedge clk);
        ct_sent_at_first = -1;
        fork
          begin @(posedge xo_valid); ct_sent_at_first = sent_words - ct_base; end
          read_one(2);
        join
      end
    join
    check(ct_sent_at_first >= 0 && ct_sent_at_first < 20, $sformatf("cut-through (%0d words in)", ct_sent_at_first));
    // ---- random concurrent traffic
    reader_on = 1;
    fork
      begin
        for (int p = 0; p < 150; p++)
          send_pkt($urandom_range(0, 7), $urandom_range(1, 80), $urandom_range(0, N - 1), p);
        reader_on = 0;
      end
      begin
        while (reader_on || req_valid != '0) begin
          @(negedge clk);
          if (req_valid != '0 && $urandom_range(0, 3) == 0) begin
            int q;
            do q = $urandom_range(0, NQ - 1); while (!req_valid[q]);
            read_one(q);
          end
        end
      end
    join
    repeat (4) @(negedge clk);
    for (int q = 0; q < NQ; q++) check(exp_w[q].size() == 0, "all delivered");
    check(pkts_read == 157, $sformatf("packets read %0d", pkts_read));
    check(credits[0] == VC_BLK && credits[1] == VC_BLK, "all credits back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("wd: credits %0d %0d req %b exp %0d %0d %0d %0d %0d %0d %0d %0d read %0d", credits[0], credits[1], req_valid, exp_len[0].size(), exp_len[1].size(), exp_len[2].size(), exp_len[3].size(), exp_len[4].size(), exp_len[5].size(), exp_len[6].size(), exp_len[7].size(), pkts_read);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
