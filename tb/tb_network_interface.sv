// tb_network_interface: eight-class interface with 64-word class queues and no
// initial downstream credits.
// Transmit: every class queue is filled with eight one-block packets (the host
// is held off once a queue is full), then exactly the credits for one WRR round
// are granted (10 blocks on VC 0 for classes 0..3, 26 on VC 1 for classes 4..7).
// With weights 1..8 the round must hold exactly w(c) packets of class c, in
// round-robin order starting after class 0, and then transmission must stop.
// Receive: packets arriving from the switch are delivered to the host intact
// with rx_last on the right word, and one credit per block comes back per VC.
module tb_network_interface;
  import qos_pkg::*;
  localparam int BUFB = 4096;  // 64 words per class
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic host_valid, host_ready, host_last, rx_valid, rx_last, pkt_start, crd_sent;
  word_t host_data, rx_data;
  logic [2:0] host_tc;
  logic [7:0] weight [NUM_TC];
  link_word_t link_out, link_in;

  network_interface #(.BUF_BYTES(BUFB), .LINK_DIV(2), .DN_CREDITS(0)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // line monitor
  int tx_tc [$];
  word_t tx_words [$];
  int crd_sum [2];
  int rem;
  always @(posedge clk) if (rst_n && link_out.valid) begin
    if (link_out.ctrl) crd_sum[link_out.data[0]] += int'(link_out.data[16:8]);
    else begin
      tx_words.push_back(link_out.data);
      if (rem == 0) begin tx_tc.push_back(int'(hdr_tc(link_out.data))); rem = int'(hdr_len(link_out.data)) - 1; end
      else rem--;
    end
  end
  // host receive monitor
  word_t rx_words [$];
  int rx_lasts;
  always @(posedge clk) if (rst_n && rx_valid) begin
    rx_words.push_back(rx_data);
    if (rx_last) rx_lasts++;
  end

  function automatic word_t mk_hdr(input int tc, input int len);
    word_t h;
    h = {$urandom, $urandom}; h[63:61] = 3'(tc); h[60:52] = 9'(len);
    return h;
  endfunction

  word_t exp_tx [NUM_TC][$];
  task automatic host_pkt(input int tc, input int len);
    for (int k = 0; k < len; k++) begin
      word_t w;
      w = (k == 0) ? mk_hdr(tc, len) : {$urandom, $urandom};
      host_valid = 1; host_data = w; host_tc = 3'(tc); host_last = (k == len - 1);
      @(posedge clk);
      while (!host_ready) @(posedge clk);
      exp_tx[tc].push_back(w);
      #1;
    end
    host_valid = 0; host_last = 0;
  endtask

  int cnt [NUM_TC];
  word_t exp_rx [$];
  initial begin
    int exp_order [$];
    host_valid = 0; host_data = '0; host_tc = '0; host_last = 0; link_in = '0;
    for (int c = 0; c < NUM_TC; c++) weight[c] = 8'(c + 1);
    crd_sum = '{0, 0}; rem = 0; rx_lasts = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < NUM_TC; c++) for (int p = 0; p < 8; p++) host_pkt(c, 8);
    // queue full: a ninth packet is refused
    @(negedge clk);
    host_valid = 1; host_data = mk_hdr(3, 8); host_tc = 3'd3;
    #1 check(!host_ready, "full queue refuses");
    host_valid = 0;
    check(tx_tc.size() == 0, "nothing sent without credits");
    // one round worth of credits
    @(negedge clk);
    link_in = '{valid: 1'b1, ctrl: 1'b1, data: credit_word(1'b0, 9'd10)}; @(negedge clk);
    link_in = '{valid: 1'b1, ctrl: 1'b1, data: credit_word(1'b1, 9'd26)}; @(negedge clk);
    link_in = '0;
    repeat (36 * 16 + 200) @(negedge clk);
    check(tx_tc.size() == 36, $sformatf("one round sent (%0d)", tx_tc.size()));
    foreach (cnt[c]) cnt[c] = 0;
    foreach (tx_tc[i]) cnt[tx_tc[i]]++;
    for (int c = 0; c < NUM_TC; c++) check(cnt[c] == c + 1, $sformatf("class %0d got %0d", c, cnt[c]));
    for (int c = 1; c <= NUM_TC; c++) for (int k = 0; k < ((c % NUM_TC) + 1); k++) exp_order.push_back(c % NUM_TC);
    foreach (tx_tc[i]) check(i < exp_order.size() && tx_tc[i] == exp_order[i], "WRR order");
    begin
      int pos [NUM_TC];
      int tc;
      foreach (pos[c]) pos[c] = 0;
      for (int i = 0; i < tx_words.size(); i += 8) begin
        tc = int'(hdr_tc(tx_words[i]));
        for (int k = 0; k < 8; k++) check(tx_words[i + k] == exp_tx[tc][pos[tc] + k], "tx data");
        pos[tc] += 8;
      end
    end
    // ---- receive side
    for (int p = 0; p < 6; p++) begin
      int len, tc;
      len = $urandom_range(1, 30); tc = p;
      for (int k = 0; k < len; k++) begin
        word_t w;
        w = (k == 0) ? mk_hdr(tc, len) : {$urandom, $urandom};
        exp_rx.push_back(w);
        link_in = '{valid: 1'b1, ctrl: 1'b0, data: w};
        @(negedge clk); link_in = '0; @(negedge clk);
      end
    end
    repeat (40) @(negedge clk);
    check(rx_lasts == 6, "rx packet ends");
    check(rx_words.size() == exp_rx.size(), "rx word count");
    foreach (exp_rx[i]) check(i < rx_words.size() && rx_words[i] == exp_rx[i], "rx data");
    begin
      int b0, b1, pos, len;
      b0 = 0; b1 = 0; pos = 0;
      while (pos < exp_rx.size()) begin
        len = int'(hdr_len(exp_rx[pos]));
        if (hdr_tc(exp_rx[pos]) < 4) b0 += (len + 7) / 8; else b1 += (len + 7) / 8;
        pos += len;
      end
      check(crd_sum[0] == b0 && crd_sum[1] == b1, $sformatf("rx credits %0d/%0d %0d/%0d", crd_sum[0], b0, crd_sum[1], b1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
