// table3_run: one run of the evaluated per-host traffic mix on a qos_cluster of
// a given size; used by tb_table3_traffic, which runs the two switch variants
// of the evaluation (16 ports with 16 KB + 16 KB per port, and 8 ports with
// 32 KB + 32 KB per port, the same memory per switch).
//   class 0 network control   1.00 % of the offered load, self-similar
//   class 1 audio            16.33 %, constant bit rate, 16-word packets
//   class 2 video            16.33 %, constant bit rate, 64-word packets
//   class 3 controlled load  16.33 %, constant bit rate, 32-word packets
//   classes 4..7 (excellent, preferential, plain best effort, background)
//                            12.5 % each, self-similar
// Self-similar traffic comes in bursts of BURST packets to one destination;
// packet sizes follow a Pareto law (minimum 8 words, shape 1.6, at most 256
// words) and the gaps between bursts are exponential. Each constant-rate class
// is one connection per host. Destinations follow Zipf's law with order 1 over
// a random ranking of the other nodes, drawn per host and class. Hosts generate
// traffic for GEN_CYCLES cycles at LOAD of the line rate and hand packets to
// their interface in generation order.
//
// Checks: every packet arrives once, intact, at its destination, and each
// (source, destination, class) flow stays in order. Performance checks: the
// mean latency (generation to header delivery) of the QoS classes is below that
// of the best-effort classes, and so is their worst latency. A per-class table
// of mean and maximum latency is printed. `done` rises when the run has ended;
// `checks` and `failures` are then final. The burst length, sizes of the
// constant-rate packets, load and WRR weights are this bench's choices.
module table3_run
  import qos_pkg::*;
#(
  parameter int    N            = 16,
  parameter int    BUF_BYTES    = 16384,
  parameter string NAME         = "run"
) (
  input  logic clk,
  output logic done = 1'b0,
  output int   checks = 0,
  output int   failures = 0
);
  localparam int GEN_CYCLES = 20000;
  localparam real LOAD      = 0.8;
  localparam int BURST      = 20;
  localparam real LINE_WPC  = 0.5;            // line words per core cycle

  logic rst_n = 1'b0;
  logic [7:0]   weight [NUM_TC];
  logic [N-1:0] host_valid, host_ready, host_last, rx_valid, rx_last;
  logic [N-1:0] ni_pkt_start, sw_pkt_start, xbar_grant, ni_crd_sent, sw_crd_sent;
  word_t        host_data [N], rx_data [N];
  logic [2:0]   host_tc [N];

  qos_cluster #(.NPORTS(N), .IN_BUF_BYTES(BUF_BYTES), .OUT_BUF_BYTES(BUF_BYTES)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s %s t=%0t", NAME, what, $time); end
  endtask

  function automatic real urand();
    return (real'($urandom) + 1.0) / 4294967297.0;   // (0,1)
  endfunction

  // Zipf(k = 1) rank over N-1 destinations, mapped through a ranking
  function automatic int zipf_rank();
    real h, u, acc;
    h = 0.0;
    for (int i = 1; i < N; i++) h += 1.0 / real'(i);
    u = urand() * h;
    acc = 0.0;
    for (int i = 1; i < N; i++) begin
      acc += 1.0 / real'(i);
      if (u <= acc) return i - 1;
    end
    return N - 2;
  endfunction

  function automatic int pareto_len();
    real x;
    x = 8.0 * $pow(urand(), -1.0 / 1.6);
    if (x > 256.0) x = 256.0;
    return int'($floor(x));
  endfunction

  typedef struct {
    int t;      // generation cycle
    int tc;
    int len;
    int dst;
  } gen_t;

  gen_t  plan [N][$];
  int    rank_map [N][NUM_TC][N-1];
  int    cyc;

  function automatic real share(input int c);
    case (c)
      0: return 0.01;
      1, 2, 3: return 0.1633;
      default: return 0.125;
    endcase
  endfunction

  // build every host's packet list, in time order
  task automatic build_plan();
    real next_t [NUM_TC];
    int  burst_left [NUM_TC], burst_dst [NUM_TC], cbr_dst [NUM_TC];
    int  cbr_len [NUM_TC];
    real rate, mean_gap;
    gen_t g;
    cbr_len[1] = 16; cbr_len[2] = 64; cbr_len[3] = 32;
    for (int s = 0; s < N; s++) begin
      for (int c = 0; c < NUM_TC; c++) begin
        int k;
        k = 0;
        for (int d = 0; d < N; d++) if (d != s) begin rank_map[s][c][k] = d; k++; end
        for (int i = N - 2; i > 0; i--) begin
          int j, tmp;
          j = $urandom_range(0, i);
          tmp = rank_map[s][c][i]; rank_map[s][c][i] = rank_map[s][c][j]; rank_map[s][c][j] = tmp;
        end
        burst_left[c] = 0;
        burst_dst[c] = 0;
        cbr_dst[c] = rank_map[s][c][zipf_rank()];
        next_t[c] = urand() * 200.0;
      end
      for (int t = 0; t < GEN_CYCLES; t++) begin
        for (int c = 0; c < NUM_TC; c++) begin
          while (next_t[c] <= real'(t)) begin
            rate = share(c) * LOAD * LINE_WPC;           // words per cycle
            g.t = t; g.tc = c;
            if (c >= 1 && c <= 3) begin
              g.len = cbr_len[c];
              g.dst = cbr_dst[c];
              next_t[c] += real'(g.len) / rate;
            end else begin
              if (burst_left[c] == 0) begin
                burst_left[c] = BURST;
                burst_dst[c] = rank_map[s][c][zipf_rank()];
              end
              g.len = pareto_len();
              g.dst = burst_dst[c];
              burst_left[c]--;
              if (burst_left[c] == 0) begin
                // exponential gap after a burst; mean Pareto size about 20 words
                mean_gap = real'(BURST) * 20.0 / rate;
                next_t[c] += -mean_gap * $ln(urand());
              end else begin
                next_t[c] += real'(g.len) / LINE_WPC;    // burst sent back to back
              end
            end
            plan[s].push_back(g);
          end
        end
      end
    end
  endtask

  function automatic int key(input int src, input int seq);
    return src * 100000 + seq;
  endfunction

  word_t exp_words [int][$];
  int    exp_dst [int];
  int    gen_at [int];
  int    delivered, total;
  int    last_seq [N][N][NUM_TC];
  longint lat_sum [NUM_TC];
  int    lat_max [NUM_TC], lat_n [NUM_TC];

  always @(posedge clk) if (rst_n) cyc++;

  for (genvar s = 0; s < N; s++) begin : g_host
    initial begin
      host_valid[s] = 0; host_last[s] = 0; host_data[s] = '0; host_tc[s] = '0;
      wait (rst_n);
      for (int n = 1; n <= plan[s].size(); n++) begin
        int dst, tc, len, k, kk;
        word_t h, w;
        dst = plan[s][n-1].dst; tc = plan[s][n-1].tc; len = plan[s][n-1].len;
        kk = key(s, n);
        h = '0;
        h[63:61] = 3'(tc); h[60:52] = 9'(len); h[11:8] = 4'(dst); h[7:0] = 8'(s);
        h[47:20] = 28'(n);
        exp_words[kk].push_back(h);
        for (k = 1; k < len; k++) exp_words[kk].push_back({8'(s), 24'(n), $urandom});
        exp_dst[kk] = dst;
        gen_at[kk] = plan[s][n-1].t;
        while (cyc < plan[s][n-1].t) @(posedge clk);
        for (k = 0; k < len; k++) begin
          w = exp_words[kk][k];
          @(negedge clk);
          host_valid[s] = 1; host_data[s] = w; host_tc[s] = 3'(tc); host_last[s] = (k == len - 1);
          @(posedge clk);
          while (!host_ready[s]) @(posedge clk);
        end
        @(negedge clk);
        host_valid[s] = 0; host_last[s] = 0;
      end
    end

    initial begin
      int rem, src, seq, idx, kk, c, lat;
      word_t w, e;
      rem = 0; src = 0; seq = 0; idx = 0; kk = 0;
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
          c = int'(hdr_tc(w));
          check(seq > last_seq[src][s][c], "flow order");
          last_seq[src][s][c] = seq;
          lat = cyc - gen_at[kk];
          lat_sum[c] += longint'(lat);
          lat_n[c]++;
          if (lat > lat_max[c]) lat_max[c] = lat;
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
    real qos_mean, be_mean;
    longint qs, bs;
    int qn, bn, qmax, bmax;
    weight = '{8'd8, 8'd40, 8'd40, 8'd40, 8'd8, 8'd8, 8'd8, 8'd8};
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) for (int c = 0; c < NUM_TC; c++)
      last_seq[a][b][c] = 0;
    for (int c = 0; c < NUM_TC; c++) begin lat_sum[c] = 0; lat_max[c] = 0; lat_n[c] = 0; end
    delivered = 0; cyc = 0; done = 0; rst_n = 0; checks = 0; failures = 0;
    build_plan();
    total = 0;
    for (int s = 0; s < N; s++) total += plan[s].size();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (delivered == total);
    repeat (200) @(posedge clk);
    check(exp_words.size() == 0, "all packets delivered");
    qs = 0; bs = 0; qn = 0; bn = 0; qmax = 0; bmax = 0;
    for (int c = 0; c < NUM_TC; c++) begin
      $display("%s class %0d: packets=%0d mean_latency=%0d max_latency=%0d cycles",
               NAME, c, lat_n[c], (lat_n[c] != 0) ? int'(lat_sum[c] / longint'(lat_n[c])) : 0, lat_max[c]);
      if (c < 4) begin qs += lat_sum[c]; qn += lat_n[c]; if (lat_max[c] > qmax) qmax = lat_max[c]; end
      else       begin bs += lat_sum[c]; bn += lat_n[c]; if (lat_max[c] > bmax) bmax = lat_max[c]; end
    end
    qos_mean = real'(qs) / real'(qn);
    be_mean  = real'(bs) / real'(bn);
    $display("%s packets=%0d qos_mean=%0.1f be_mean=%0.1f qos_max=%0d be_max=%0d cycles=%0d",
             NAME, total, qos_mean, be_mean, qmax, bmax, cyc);
    check(qn > 0 && bn > 0, "both categories carried");
    check(qos_mean < be_mean, "QoS mean latency below best effort");
    check(qmax < bmax, "QoS worst latency below best effort");
    done = 1;
  end
endmodule
