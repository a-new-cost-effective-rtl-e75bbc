// tb_qos_switch: 4-port switch with the full 16 KB buffers, every port attached
// to an emulated end node that sends at line rate (one word every two cycles),
// spends and receives credits in-band, and returns credits for what it receives.
// Phases:
//  A. idle switch: header cut-through latency, link_in to link_out, must be 5 or
//     6 cycles (depends on the line-slot phase);
//  B. two nodes flood output 3 with long best-effort packets while a third sends
//     short QoS packets to it: QoS packets must overtake waiting best-effort
//     packets and wait at most about four best-effort packet line times (at
//     most one crossbar transfer and one line transfer of 64 words ahead of it);
//  C. random all-to-all traffic of all classes, with one receiver withholding
//     credits for a while (back-pressure through the switch to the senders).
// Always: every packet reaches the port its route names, intact, with the hop
// index advanced, and each (source, class) flow stays in order.
module tb_qos_switch;
  import qos_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  link_word_t link_in [N], link_out [N];
  logic [N-1:0] out_pkt_start, xbar_grant, out_crd_sent;

  qos_switch #(.NPORTS(N)) dut (.*);
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ---------------------------------------------------------------- packets
  typedef struct { int src, dst, tc, len, seq; } pkt_t;
  pkt_t  txq [N][$];
  word_t exp_words [int][$];          // key: src*1000000 + seq
  int    sent_cyc [int];
  int    next_seq [N];
  int    last_seq [N][N][NUM_TC];
  int    delivered, qos_max_lat, overtakes;
  int    credits [N][2];
  int    ret_pend [N][2];
  bit    withhold [N];

  function automatic int key(input int src, input int seq);
    return src * 1000000 + seq;
  endfunction

  task automatic add_pkt(input int src, input int dst, input int tc, input int len);
    pkt_t p;
    word_t h;
    p = '{src: src, dst: dst, tc: tc, len: len, seq: next_seq[src]++};
    h = '0;
    h[63:61] = 3'(tc); h[60:52] = 9'(len); h[51:48] = 4'd0; h[11:8] = 4'(dst); h[7:0] = 8'(src);
    h[47:20] = 28'(p.seq);
    exp_words[key(src, p.seq)].push_back(h);
    for (int k = 1; k < len; k++) exp_words[key(src, p.seq)].push_back({8'(src), 24'(p.seq), $urandom});
    txq[src].push_back(p);
  endtask

  // ---------------------------------------------------------------- senders
  for (genvar p = 0; p < N; p++) begin : g_node
    initial begin
      int k, vc;
      pkt_t cur;
      bit active;
      link_in[p] = '0;
      active = 0; k = 0;
      wait (rst_n);
      forever begin
        @(negedge clk);
        link_in[p] = '0;
        if (cyc % 2 != 0) continue;
        if (!withhold[p] && (ret_pend[p][0] != 0 || ret_pend[p][1] != 0)) begin
          vc = (ret_pend[p][0] != 0) ? 0 : 1;
          link_in[p] = '{valid: 1'b1, ctrl: 1'b1, data: credit_word(vc[0], 9'(ret_pend[p][vc]))};
          ret_pend[p][vc] = 0;
        end else if (active || txq[p].size() != 0) begin
          if (!active) begin
            vc = txq[p][0].tc >= 4;
            if (credits[p][vc] < (txq[p][0].len + 7) / 8) continue;
            cur = txq[p].pop_front();
            credits[p][vc] -= (cur.len + 7) / 8;
            active = 1; k = 0;
            sent_cyc[key(p, cur.seq)] = cyc;
          end
          link_in[p] = '{valid: 1'b1, ctrl: 1'b0, data: exp_words[key(p, cur.seq)][k]};
          k++;
          if (k == cur.len) active = 0;
        end
      end
    end

    // receiver / credit monitor of output p
    initial begin
      int rem, src, seq, idx, lat;
      word_t w, e;
      rem = 0; src = 0; seq = 0; idx = 0;
      wait (rst_n);
      forever begin
        @(posedge clk);
        if (!link_out[p].valid) continue;
        w = link_out[p].data;
        if (link_out[p].ctrl) begin
          credits[p][w[0]] += int'(w[16:8]);
          continue;
        end
        if (rem == 0) begin
          src = int'(w[7:0]); seq = int'(w[47:20]);
          rem = int'(hdr_len(w)); idx = 0;
          check(exp_words.exists(key(src, seq)), "known packet");
          check(int'(w[11:8]) == p, "routed to the right port");
          check(seq > last_seq[src][p][hdr_tc(w)], "flow order");
          last_seq[src][p][hdr_tc(w)] = seq;
          lat = cyc - sent_cyc[key(src, seq)];
          if (hdr_tc(w) < 4 && lat > qos_max_lat) qos_max_lat = lat;
        end
        if (exp_words.exists(key(src, seq))) begin
          e = exp_words[key(src, seq)][idx];
          if (idx == 0) e[51:48] = 4'd1;
          check(w == e, "packet data");
        end
        idx++; rem--;
        if (rem == 0) begin
          ret_pend[p][int'(hdr_tc(exp_words[key(src, seq)][0]) >= 4)] +=
            (int'(hdr_len(exp_words[key(src, seq)][0])) + 7) / 8;
          exp_words.delete(key(src, seq));
          delivered++;
        end
      end
    end
  end

  // count QoS packets leaving output 3 while an older best-effort packet for
  // output 3 is still inside the switch
  always @(posedge clk) if (rst_n && link_out[3].valid && !link_out[3].ctrl) begin : ovt
    int s, q;
    word_t w;
    w = link_out[3].data;
    if (hdr_tc(w) < 4 && exp_words.exists(key(int'(w[7:0]), int'(w[47:20]))) &&
        exp_words[key(int'(w[7:0]), int'(w[47:20]))][0] == {w[63:52], 4'd0, w[47:0]}) begin
      foreach (exp_words[kk]) begin
        if (sent_cyc.exists(kk) && hdr_tc(exp_words[kk][0]) >= 4 &&
            exp_words[kk][0][11:8] == 4'd3 &&
            sent_cyc[kk] < sent_cyc[key(int'(w[7:0]), int'(w[47:20]))]) begin
          overtakes++;
          break;
        end
      end
    end
  end

  int t0, lat_a, grants, starts, crds;
  always @(posedge clk) if (rst_n) begin
    grants += $countones(xbar_grant);
    starts += $countones(out_pkt_start);
    crds   += $countones(out_crd_sent);
  end

  initial begin
    int n_before;
    for (int s = 0; s < N; s++) begin
      next_seq[s] = 1;
      for (int d = 0; d < N; d++) for (int c = 0; c < NUM_TC; c++) last_seq[s][d][c] = 0;
      credits[s] = '{128, 128}; ret_pend[s] = '{0, 0}; withhold[s] = 0;
    end
    delivered = 0; qos_max_lat = 0; overtakes = 0; grants = 0; starts = 0; crds = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- A: latency on an idle switch
    add_pkt(1, 2, 0, 4);
    wait (sent_cyc.exists(key(1, 1)));
    // header sampled from link_in at the next edge; link_out is registered, so
    // it is sampled one edge after the switch produced it
    t0 = int'($time) + 5;
    @(posedge clk iff (link_out[2].valid && !link_out[2].ctrl));
    lat_a = (int'($time) - t0) / 10 - 1;
    check(lat_a >= 5 && lat_a <= 6, $sformatf("cut-through latency %0d cycles", lat_a));
    repeat (50) @(negedge clk);
    // ---- B: QoS packets into a port flooded by best effort
    for (int i = 0; i < 12; i++) begin add_pkt(0, 3, 6, 64); add_pkt(1, 3, 5, 64); end
    repeat (300) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      add_pkt(2, 3, i % 4, 8);
      repeat (150) @(negedge clk);
    end
    wait (delivered == 1 + 24 + 8);
    check(overtakes >= 4, $sformatf("QoS overtook best effort %0d times", overtakes));
    check(qos_max_lat <= 4 * 64, $sformatf("QoS max latency %0d cycles", qos_max_lat));
    // ---- C: random traffic, with port 0 holding back credits for a while
    withhold[0] = 1;
    for (int i = 0; i < 400; i++)
      add_pkt($urandom_range(0, N - 1), $urandom_range(0, N - 1), $urandom_range(0, 7), $urandom_range(1, 120));
    repeat (3000) @(negedge clk);
    n_before = delivered;
    withhold[0] = 0;
    wait (delivered == 33 + 400);
    repeat (100) @(negedge clk);
    check(exp_words.size() == 0, "everything delivered");
    for (int s = 0; s < N; s++)
      check(credits[s][0] == 128 && credits[s][1] == 128, $sformatf("node %0d credits back", s));
    check(grants == 433 && starts == 433, $sformatf("grants %0d starts %0d", grants, starts));
    check(crds > 0, "credit symbols sent");
    $display("mechanisms: latency=%0d overtakes=%0d qos_max_lat=%0d stalled_delivered=%0d credit_symbols=%0d",
             lat_a, overtakes, qos_max_lat, n_before, crds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
