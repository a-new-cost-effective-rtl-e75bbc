// tb_qos_cluster: end-to-end test of the whole design at its default size:
// sixteen hosts, each behind an eight-class network interface, on one 16-port
// two-VC switch. Every host sends packets of all eight classes to random
// destinations, half of them to node 0 so that its port is oversubscribed;
// node 1 instead sends one burst of long best-effort packets to node 0.
// Checks: every packet is delivered once, intact, to the node its route names,
// with the hop index advanced; each (source, destination, class) flow stays in
// order. Mechanisms that must each be seen at least once (a failure otherwise):
// cut-through (a packet's header reaches its destination before the sender's
// host has handed over its last word), a QoS packet overtaking an older
// best-effort packet to the same destination, weighted round-robin letting a
// lower class go while a higher class of the same node waits, host back-pressure
// (interface queue full), credit symbols sent by interfaces and by the switch,
// and crossbar connections made.
module tb_qos_cluster;
  import qos_pkg::*;
  localparam int N = 16;
  localparam int PKTS = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0]   weight [NUM_TC];
  logic [N-1:0] host_valid, host_ready, host_last, rx_valid, rx_last;
  logic [N-1:0] ni_pkt_start, sw_pkt_start, xbar_grant, ni_crd_sent, sw_crd_sent;
  word_t        host_data [N], rx_data [N];
  logic [2:0]   host_tc [N];

  qos_cluster dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic int key(input int src, input int seq);
    return src * 100000 + seq;
  endfunction

  word_t exp_words [int][$];
  int    exp_dst [int];
  int    exp_tc [int];
  bit    host_done_pkt [int];      // last word handed to the interface
  int    accepted_at [int];
  int    delivered;
  int    last_seq [N][N][NUM_TC];
  int    n_cut_through, n_overtake, n_wrr, n_backpressure, n_ni_crd, n_sw_crd, n_grant;
  int    cyc;
  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      n_ni_crd += $countones(ni_crd_sent);
      n_sw_crd += $countones(sw_crd_sent);
      n_grant  += $countones(xbar_grant);
    end
  end

  for (genvar s = 0; s < N; s++) begin : g_host
    // sender
    initial begin
      host_valid[s] = 0; host_last[s] = 0; host_data[s] = '0; host_tc[s] = '0;
      wait (rst_n);
      repeat (s) @(posedge clk);
      for (int n = 1; n <= PKTS; n++) begin
        int dst, tc, len, k;
        word_t h, w;
        dst = ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(0, N - 1);
        tc = $urandom_range(0, 7);
        len = $urandom_range(1, 64);
        // node 1 sends one long burst of best-effort packets to node 0
        if (s == 1) begin dst = 0; tc = 7; len = 64; end
        h = '0;
        h[63:61] = 3'(tc); h[60:52] = 9'(len); h[11:8] = 4'(dst); h[7:0] = 8'(s);
        h[47:20] = 28'(n);
        exp_words[key(s, n)].push_back(h);
        for (k = 1; k < len; k++) exp_words[key(s, n)].push_back({8'(s), 24'(n), $urandom});
        exp_dst[key(s, n)] = dst;
        exp_tc[key(s, n)] = tc;
        for (k = 0; k < len; k++) begin
          w = exp_words[key(s, n)][k];
          @(negedge clk);
          host_valid[s] = 1; host_data[s] = w; host_tc[s] = 3'(tc); host_last[s] = (k == len - 1);
          @(posedge clk);
          while (!host_ready[s]) begin
            if (k == 0) n_backpressure++;
            @(posedge clk);
          end
          if (k == 0) accepted_at[key(s, n)] = cyc;
        end
        host_done_pkt[key(s, n)] = 1;
        @(negedge clk);
        host_valid[s] = 0; host_last[s] = 0;
      end
    end

    // receiver at node s
    initial begin
      int rem, src, seq, idx, kk;
      word_t w, e;
      rem = 0; src = 0; seq = 0; idx = 0;
      wait (rst_n);
      forever begin
        @(posedge clk);
        if (!rx_valid[s]) continue;
        w = rx_data[s];
        if (rem == 0) begin
          src = int'(w[7:0]); seq = int'(w[47:20]); kk = key(src, seq);
          rem = int'(hdr_len(w)); idx = 0;
          check(exp_words.exists(kk), "known packet");
          if (!exp_words.exists(kk)) begin rem = 0; continue; end
          check(exp_dst[kk] == s, "delivered to its destination");
          check(seq > last_seq[src][s][hdr_tc(w)], "flow order");
          last_seq[src][s][hdr_tc(w)] = seq;
          if (!host_done_pkt.exists(kk)) n_cut_through++;
          // QoS packet overtaking an older best-effort one to this node
          if (hdr_tc(w) < 4)
            foreach (exp_words[o])
              if (o != kk && exp_tc[o] >= 4 && exp_dst[o] == s && accepted_at.exists(o) &&
                  accepted_at[o] < accepted_at[kk]) begin
                n_overtake++;
                break;
              end
          // WRR: a lower class of the same source delivered while a higher
          // class packet of that source, accepted earlier, is still pending
          foreach (exp_words[o])
            if (o / 100000 == src && o != kk && exp_tc[o] < hdr_tc(w) &&
                accepted_at.exists(o) && accepted_at[o] < accepted_at[kk]) begin
              n_wrr++;
              break;
            end
        end
        e = exp_words[kk][idx];
        if (idx == 0) e[51:48] = 4'd1;
        check(w == e, "packet data");
        check(rx_last[s] == (rem == 1), "rx_last");
        idx++; rem--;
        if (rem == 0) begin
          exp_words.delete(kk);
          delivered++;
        end
      end
    end
  end

  initial begin
    weight = '{8'd16, 8'd12, 8'd8, 8'd8, 8'd4, 8'd2, 8'd1, 8'd1};
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) for (int c = 0; c < NUM_TC; c++)
      last_seq[a][b][c] = 0;
    delivered = 0; cyc = 0;
    n_cut_through = 0; n_overtake = 0; n_wrr = 0; n_backpressure = 0;
    n_ni_crd = 0; n_sw_crd = 0; n_grant = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (delivered == N * PKTS);
    repeat (200) @(posedge clk);
    check(exp_words.size() == 0, "all packets delivered");
    check(n_grant == N * PKTS, $sformatf("crossbar connections %0d", n_grant));
    $display("mechanisms: cut_through=%0d qos_overtakes=%0d wrr_reorders=%0d host_backpressure=%0d ni_credit_symbols=%0d sw_credit_symbols=%0d xbar_grants=%0d cycles=%0d",
             n_cut_through, n_overtake, n_wrr, n_backpressure, n_ni_crd, n_sw_crd, n_grant, cyc);
    check(n_cut_through > 0, "cut-through seen");
    check(n_overtake > 0, "QoS overtake seen");
    check(n_wrr > 0, "WRR reorder seen");
    check(n_backpressure > 0, "host back-pressure seen");
    check(n_ni_crd > 0, "interface credit symbols seen");
    check(n_sw_crd > 0, "switch credit symbols seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("delivered %0d of %0d", delivered, N * PKTS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
