// tb_output_port: two-VC switch output port with small buffers and four
// downstream credits per VC.
// Checks: packets leave intact and in per-VC order; a QoS (VC 0) packet that
// arrives after a best-effort one still leaves first (strict priority); the line
// never carries words closer than LINK_DIV cycles; a packet waits until the
// downstream buffer has credits for all of its blocks; freed blocks come back as
// credit symbols whose counts add up per VC; the reserved space is returned as
// words leave. A random phase then runs 80 packets of random length and VC
// against a downstream model that returns credits after a random delay,
// checking per-VC order, data, that credits are never overdrawn and that
// randomly freed blocks all come back as credit symbols.
module tb_output_port;
  import qos_pkg::*;
  localparam int LD = 2, BUFB = 1024, QD = BUFB / 8 / 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_vc, in_last, rsv_valid, rsv_vc, crd_in_valid, crd_in_vc;
  logic crd_ret_valid, crd_ret_vc, pkt_start, crd_sent;
  word_t in_data;
  len_t rsv_len;
  logic [8:0] crd_in_n;
  logic [6:0] space [2];
  logic [7:0] weight [2];
  link_word_t link_out;

  output_port #(.NVC(2), .BUF_BYTES(BUFB), .LINK_DIV(LD), .DN_CREDITS(4), .WRR(1'b0)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // ---- link monitor
  word_t sent_q [$];            // data words in line order
  int    pkt_order [$];         // source id (header src field) of each packet
  int    crd_sum [2];
  int    last_word_cyc, cyc;
  bit    in_pkt;
  int    rem;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && link_out.valid) begin
      check(cyc - last_word_cyc >= LD, "line pacing");
      last_word_cyc = cyc;
      if (link_out.ctrl) begin crd_sum[link_out.data[0]] += int'(link_out.data[16:8]); end
      else begin
        sent_q.push_back(link_out.data);
        if (!in_pkt) begin
          pkt_order.push_back(int'(link_out.data[7:0]));
          if (phase2) begin
            int v, b;
            v = int'(tc_to_vc(hdr_tc(link_out.data)));
            b = int'(blocks_of(hdr_len(link_out.data)));
            avail[v] -= b;
            check(avail[v] >= 0, "downstream credits never overdrawn");
            ret_due.push_back(cyc + $urandom_range(5, 120));
            ret_vc.push_back(v);
            ret_n.push_back(b);
          end
          rem = int'(hdr_len(link_out.data)) - 1;
          in_pkt = rem != 0;
        end else begin
          rem--;
          in_pkt = rem != 0;
        end
      end
    end
  end

  word_t exp_words [int][$];    // by packet id

  // ---- downstream model for the random phase
  bit    phase2;
  int    avail [2];
  int    ret_due [$], ret_vc [$], ret_n [$];
  always @(negedge clk) begin
    if (phase2) begin
      crd_in_valid = 0;
      if (ret_due.size() != 0 && ret_due[0] <= cyc) begin
        crd_in_valid = 1; crd_in_vc = ret_vc[0][0]; crd_in_n = 9'(ret_n[0]);
        avail[ret_vc[0]] += ret_n[0];
        void'(ret_due.pop_front()); void'(ret_vc.pop_front()); void'(ret_n.pop_front());
      end
    end
  end

  function automatic word_t mk_hdr(input int tc, input int len, input int id);
    word_t h;
    h = '0; h[63:61] = 3'(tc); h[60:52] = 9'(len); h[7:0] = 8'(id);
    return h;
  endfunction

  task automatic send_pkt(input int vc, input int len, input int id);
    @(negedge clk);
    rsv_valid = 1; rsv_vc = vc[0]; rsv_len = 9'(len);
    @(negedge clk);
    rsv_valid = 0;
    for (int k = 0; k < len; k++) begin
      word_t w;
      w = (k == 0) ? mk_hdr(vc * 4, len, id) : {8'(id), 24'(k), $urandom};
      exp_words[id].push_back(w);
      in_valid = 1; in_vc = vc[0]; in_data = w; in_last = (k == len - 1);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
  endtask

  int n_before;

  initial begin
    in_valid = 0; in_vc = 0; in_last = 0; in_data = '0; rsv_valid = 0; rsv_vc = 0; rsv_len = '0;
    crd_in_valid = 0; crd_in_vc = 0; crd_in_n = '0; crd_ret_valid = 0; crd_ret_vc = 0;
    weight = '{default: 8'd0};
    crd_sum = '{0, 0}; cyc = 0; phase2 = 0; last_word_cyc = -10; in_pkt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(space[0] == 7'(QD) && space[1] == 7'(QD), "initial space");
    // L: long best-effort packet (3 blocks), then M (VC 1) and H (VC 0)
    send_pkt(1, 24, 1);
    check(space[1] == 7'(QD - 24 + 12) || space[1] < 7'(QD), "space reserved");
    send_pkt(1, 8, 2);
    send_pkt(0, 4, 3);
    repeat (100) @(negedge clk);
    check(pkt_order.size() == 3, "three packets out");
    if (pkt_order.size() == 3) begin
      check(pkt_order[0] == 1, "L first");
      check(pkt_order[1] == 3, "QoS packet overtakes");
      check(pkt_order[2] == 2, "best effort last");
    end
    check(space[0] == 7'(QD) && space[1] == 7'(QD), "space returned");
    // VC 1 credits now 4 - 3 - 1 = 0: packet N (2 blocks) must wait
    send_pkt(1, 9, 4);
    repeat (60) @(negedge clk);
    n_before = pkt_order.size();
    check(n_before == 3, "stalled without credits");
    crd_in_valid = 1; crd_in_vc = 1; crd_in_n = 9'd1; @(negedge clk); crd_in_valid = 0;
    repeat (20) @(negedge clk);
    check(pkt_order.size() == 3, "stalled with one credit");
    // a VC 0 packet still flows (its credits are separate)
    send_pkt(0, 2, 5);
    repeat (20) @(negedge clk);
    check(pkt_order.size() == 4 && pkt_order[3] == 5, "VC 0 not blocked by VC 1");
    crd_in_valid = 1; crd_in_vc = 1; crd_in_n = 9'd1; @(negedge clk); crd_in_valid = 0;
    repeat (40) @(negedge clk);
    check(pkt_order.size() == 5 && pkt_order[4] == 4, "sent after credits");
    // credit return: 3 blocks of VC 0 and 5 of VC 1, some back to back
    for (int k = 0; k < 8; k++) begin
      crd_ret_valid = 1; crd_ret_vc = (k >= 3); @(negedge clk);
    end
    crd_ret_valid = 0;
    repeat (20) @(negedge clk);
    check(crd_sum[0] == 3 && crd_sum[1] == 5, $sformatf("credit symbols %0d %0d", crd_sum[0], crd_sum[1]));
    // data integrity, packet by packet in line order
    begin
      int pos;
      pos = 0;
      foreach (pkt_order[p]) begin
        foreach (exp_words[pkt_order[p]][k]) begin
          check(pos < sent_q.size() && sent_q[pos] == exp_words[pkt_order[p]][k], "data");
          pos++;
        end
      end
      check(pos == sent_q.size(), "no extra words");
    end
    // ---- random phase
    begin
      int pos0, ord0, nret [2], crd0 [2], last_id [2], vc, len, id, pos;
      bit done_ret;
      pos0 = sent_q.size(); ord0 = pkt_order.size();
      crd0 = crd_sum; nret = '{0, 0}; last_id = '{0, 0}; done_ret = 0;
      // downstream holds VC 0: 4-1-1 = 2 and VC 1: 4-3-1+2-2 = 0 credits;
      // return what phase one used so both start full
      avail = '{2, 0};
      ret_due.push_back(0); ret_vc.push_back(0); ret_n.push_back(2);
      ret_due.push_back(0); ret_vc.push_back(1); ret_n.push_back(4);
      phase2 = 1;
      fork
        begin
          for (int i = 0; i < 80; i++) begin
            vc = $urandom_range(0, 1);
            len = $urandom_range(1, 32);
            id = 100 + i;
            while (space[vc] < 7'(len)) @(negedge clk);
            send_pkt(vc, len, id);
            if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 30)) @(negedge clk);
          end
        end
        begin
          for (int i = 0; i < 400; i++) begin
            crd_ret_valid = ($urandom_range(0, 3) == 0);
            crd_ret_vc = $urandom_range(0, 1);
            if (crd_ret_valid) nret[crd_ret_vc]++;
            @(negedge clk);
          end
          crd_ret_valid = 0;
        end
      join
      while (pkt_order.size() < ord0 + 80) @(negedge clk);
      repeat (100) @(negedge clk);
      check(crd_sum[0] - crd0[0] == nret[0] && crd_sum[1] - crd0[1] == nret[1],
            $sformatf("random credit return %0d/%0d %0d/%0d", crd_sum[0] - crd0[0], nret[0],
                      crd_sum[1] - crd0[1], nret[1]));
      check(space[0] == 7'(QD) && space[1] == 7'(QD), "space returned after random phase");
      pos = pos0;
      for (int p = ord0; p < pkt_order.size(); p++) begin
        id = pkt_order[p];
        vc = int'(tc_to_vc(hdr_tc(exp_words[id][0])));
        check(id > last_id[vc], "per-VC order");
        last_id[vc] = id;
        foreach (exp_words[id][k]) begin
          check(pos < sent_q.size() && sent_q[pos] == exp_words[id][k], "random data");
          pos++;
        end
      end
      check(pos == sent_q.size(), "no extra words in random phase");
      check(pkt_order.size() == ord0 + 80, "all random packets sent");
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
