// tb_switch_scheduler: 4-port instance of the packet-mode crossbar scheduler.
// Directed cases: VC 0 beats an older VC 1 packet; within a VC the oldest head
// packet wins; an input offered two grants accepts the VC 0 one; a packet that
// does not fit the output buffer partition is not granted; a connection is held
// until the input reports its last word and no other input is connected to
// that output meanwhile; grants appear one cycle after the request.
// Random phase: emulated inputs with random queues; every grant is checked
// against the selection rules (nothing better was waiting) and for conflicts.
module tb_switch_scheduler;
  import qos_pkg::*;
  localparam int N = 4, NQ = 2 * N, SW = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [NQ-1:0] req_valid [N];
  len_t          req_len   [N][NQ];
  ts_t           req_ts    [N][NQ];
  logic [SW-1:0] out_space [N][2];
  logic [N-1:0]  in_done, grant_valid, out_busy, rsv_valid;
  logic [2:0]    grant_q   [N];
  logic [1:0]    out_src   [N];
  logic          out_vc    [N], rsv_vc [N];
  len_t          rsv_len   [N];

  switch_scheduler #(.NPORTS(N), .SPACE_W(SW)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  task automatic clear();
    for (int i = 0; i < N; i++) begin
      req_valid[i] = '0;
      for (int q = 0; q < NQ; q++) begin req_len[i][q] = 9'd8; req_ts[i][q] = '0; end
    end
    for (int o = 0; o < N; o++) begin out_space[o][0] = 10'd512; out_space[o][1] = 10'd512; end
    in_done = '0;
  endtask

  task automatic finish_all();
    @(negedge clk); clear(); in_done = '1; @(negedge clk); in_done = '0; @(negedge clk);
  endtask

  // random-phase emulation
  int  busy_left [N];
  bit  busy [N];
  int  conn_in_of_out [N];

  initial begin
    clear();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- 1: VC 0 wins over an older VC 1 packet at the same output
    @(negedge clk);
    req_valid[0][1*N+2] = 1; req_ts[0][1*N+2] = 16'd5;
    req_valid[1][0*N+2] = 1; req_ts[1][0*N+2] = 16'd50;
    @(posedge clk); #1;
    check(grant_valid == 4'b0010 && grant_q[1] == 3'(0*N+2), "vc0 precedence");
    check(out_busy[2] && out_src[2] == 2'd1 && out_vc[2] == 0, "xbar config");
    check(rsv_valid[2] && rsv_len[2] == 9'd8 && rsv_vc[2] == 0, "reservation");
    // held: input 0 still requests, no new grant while connected
    @(negedge clk); req_valid[1] = '0;
    repeat (5) begin @(posedge clk); #1; check(grant_valid == '0 && out_busy[2] && out_src[2] == 1, "held"); end
    @(negedge clk); in_done[1] = 1; @(negedge clk); in_done[1] = 0;
    check(!out_busy[2] || out_src[2] == 2'd0, "released");
    @(posedge clk); #1;
    check(out_busy[2] && out_src[2] == 2'd0 && out_vc[2] == 1, "vc1 served after");
    finish_all();
    // ---- 2: FIFO within VC 0 (older time stamp wins, with wrap-around)
    @(negedge clk);
    req_valid[0][0*N+1] = 1; req_ts[0][0*N+1] = 16'h0003;
    req_valid[2][0*N+1] = 1; req_ts[2][0*N+1] = 16'hFFF0;  // older across wrap
    req_valid[3][0*N+1] = 1; req_ts[3][0*N+1] = 16'h0010;
    @(posedge clk); #1;
    check(grant_valid == 4'b0100 && grant_q[2] == 3'(1), "oldest first");
    finish_all();
    // ---- 3: input accepts its VC 0 grant
    @(negedge clk);
    req_valid[0][1*N+0] = 1; req_ts[0][1*N+0] = 16'd1;
    req_valid[0][0*N+3] = 1; req_ts[0][0*N+3] = 16'd9;
    @(posedge clk); #1;
    check(grant_valid == 4'b0001 && grant_q[0] == 3'(0*N+3), "accept vc0");
    finish_all();
    // ---- 4: output space
    @(negedge clk);
    req_valid[1][0*N+0] = 1; req_len[1][0*N+0] = 9'd100; out_space[0][0] = 10'd99;
    @(posedge clk); #1;
    check(grant_valid == '0, "no space, no grant");
    @(negedge clk); out_space[0][0] = 10'd100;
    @(posedge clk); #1;
    check(grant_valid == 4'b0010, "fits exactly");
    finish_all();
    // ---- 5: parallel matching, all four pairs in one cycle
    @(negedge clk);
    for (int i = 0; i < N; i++) req_valid[i][1*N + (i+1)%N] = 1;
    @(posedge clk); #1;
    check(grant_valid == 4'b1111, "full match");
    finish_all();
    // ---- random phase
    foreach (busy[i]) begin busy[i] = 0; busy_left[i] = 0; end
    foreach (conn_in_of_out[o]) conn_in_of_out[o] = -1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      in_done = '0;
      // grants of the last edge: those inputs are now busy
      for (int i = 0; i < N; i++) if (grant_valid[i]) begin
        int q;
        q = int'(grant_q[i]);
        busy[i] = 1; busy_left[i] = $urandom_range(2, 12);
        conn_in_of_out[q % N] = i;
        req_valid[i][q] = 0;
      end
      // emulated inputs mask requests while busy
      for (int i = 0; i < N; i++) if (busy[i]) for (int q = 0; q < NQ; q++) req_valid[i][q] = 0;
      for (int i = 0; i < N; i++) begin
        if (busy[i]) begin
          busy_left[i]--;
          if (busy_left[i] == 0) in_done[i] = 1;
        end
        for (int q = 0; q < NQ; q++) begin
          if (!busy[i] && !req_valid[i][q] && $urandom_range(0, 20) == 0) begin
            req_valid[i][q] = 1; req_len[i][q] = 9'($urandom_range(1, 256));
            req_ts[i][q] = 16'(n);
          end
        end
      end
      for (int o = 0; o < N; o++) for (int v = 0; v < 2; v++)
        out_space[o][v] = 10'($urandom_range(0, 512));
      @(posedge clk); #1;
      for (int i = 0; i < N; i++) if (grant_valid[i]) begin
        int q, o, v;
        q = int'(grant_q[i]); o = q % N; v = q / N;
        check(!busy[i], "grant to idle input");
        check(conn_in_of_out[o] == -1, "output free");
        if (conn_in_of_out[o] != -1) $display("  o=%0d held by %0d, granted to %0d busy=%0d left=%0d", o, conn_in_of_out[o], i, busy[conn_in_of_out[o]], busy_left[conn_in_of_out[o]]);
        check(rsv_valid[o] && rsv_len[o] == req_len[i][q], "rsv");
        // nothing strictly better was waiting at this output from an idle input
        for (int j = 0; j < N; j++) for (int w = 0; w < 2; w++) begin
          int qq;
          qq = w * N + o;
          if (!busy[j] && req_valid[j][qq] && (j != i || w != v) && out_space[o][w] >= 10'(req_len[j][qq])) begin
            bit better;
            better = (w < v) || (w == v && ts_older(req_ts[j][qq], req_ts[i][q]));
            // a better request can only lose if its input accepted elsewhere
            if (better) begin check(grant_valid[j], "selection rule"); if (!grant_valid[j]) $display("  i=%0d q=%0d j=%0d w=%0d busyj=%0d o=%0d", i, q, j, w, busy[j], o); end
          end
        end
      end
      // connections end at the edge after the grants were chosen
      for (int i = 0; i < N; i++) if (in_done[i]) begin
        busy[i] = 0;
        for (int o = 0; o < N; o++) if (conn_in_of_out[o] == i) conn_in_of_out[o] = -1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
