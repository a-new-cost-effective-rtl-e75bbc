// switch_scheduler: central packet-mode crossbar scheduler of the two-VC switch.
//
// Every input port offers the head packet of each of its 2*NPORTS virtual output
// queues. The scheduler runs one request-grant-accept round per cycle, like a
// single iSLIP iteration, but with a different selection rule that lets the
// switch reuse the order chosen by the network interfaces:
//   * VC 0 (QoS) always wins over VC 1 (best effort);
//   * within a VC the oldest head packet wins (FIFO across queues: arrival time
//     stamps are compared), lowest index breaking ties.
// Each free output grants one free input whose request fits in that output's
// buffer partition for the VC; each input accepts the best of its grants. The
// match is kept (packet mode) until the input signals the last word of the
// packet, so the output can start sending on the line as soon as the first word
// arrives. On a match the scheduler reserves the packet's space in the output
// buffer, so a transfer never stalls for lack of output space.
//
// Timing: requests are sampled combinationally; grants, crossbar settings and
// reservations are registered and appear one cycle later. A connection is freed
// in the cycle after `in_done` (the input's last word) and may be reused then.
// The precedence rules follow the switch description; the single iteration, the
// time-stamp comparison and the space reservation are this design's choices.
module switch_scheduler
  import qos_pkg::*;
#(
  parameter int unsigned NPORTS = 16,
  parameter int unsigned SPACE_W = 12
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [2*NPORTS-1:0]           req_valid [NPORTS],
  input  len_t                          req_len   [NPORTS][2*NPORTS],
  input  ts_t                           req_ts    [NPORTS][2*NPORTS],
  input  logic [SPACE_W-1:0]            out_space [NPORTS][2],
  input  logic [NPORTS-1:0]             in_done,
  // to the input ports
  output logic [NPORTS-1:0]             grant_valid,
  output logic [$clog2(2*NPORTS)-1:0]   grant_q [NPORTS],
  // crossbar configuration
  output logic [NPORTS-1:0]             out_busy,
  output logic [$clog2(NPORTS)-1:0]     out_src [NPORTS],
  output logic                          out_vc  [NPORTS],
  // output-buffer reservations
  output logic [NPORTS-1:0]             rsv_valid,
  output logic                          rsv_vc  [NPORTS],
  output len_t                          rsv_len [NPORTS]
);
  localparam int unsigned PW = $clog2(NPORTS);
  localparam int unsigned QW = $clog2(2*NPORTS);

  logic [NPORTS-1:0] in_busy;
  logic [PW-1:0]     in_out [NPORTS];

  // grant phase results, per output
  logic              g_ok  [NPORTS];
  logic [PW-1:0]     g_in  [NPORTS];
  logic              g_vc  [NPORTS];
  ts_t               g_ts  [NPORTS];
  // accept phase results, per input
  logic              a_ok  [NPORTS];
  logic [PW-1:0]     a_out [NPORTS];
  logic              a_vc  [NPORTS];
  ts_t               a_ts  [NPORTS];

  // Is candidate (vc_a, ts_a) strictly better than (vc_b, ts_b)?
  function automatic logic better(input logic vc_a, input ts_t ts_a,
                                  input logic vc_b, input ts_t ts_b);
    if (vc_a != vc_b) return (vc_a == 1'b0);
    return ts_older(ts_a, ts_b);
  endfunction

  always_comb begin
    // ---- grant: each free output picks the best free requesting input
    for (int o = 0; o < int'(NPORTS); o++) begin
      g_ok[o] = 1'b0;
      g_in[o] = '0;
      g_vc[o] = 1'b0;
      g_ts[o] = '0;
      if (!out_busy[o]) begin
        for (int i = 0; i < int'(NPORTS); i++) begin
          for (int v = 0; v < 2; v++) begin
            if (!in_busy[i] && req_valid[i][v*NPORTS+o] &&
                out_space[o][v] >= SPACE_W'(req_len[i][v*NPORTS+o]) &&
                (!g_ok[o] || better(v[0], req_ts[i][v*NPORTS+o], g_vc[o], g_ts[o]))) begin
              g_ok[o] = 1'b1;
              g_in[o] = PW'(i);
              g_vc[o] = v[0];
              g_ts[o] = req_ts[i][v*NPORTS+o];
            end
          end
        end
      end
    end
    // ---- accept: each input picks the best of the grants it received
    for (int i = 0; i < int'(NPORTS); i++) begin
      a_ok[i]  = 1'b0;
      a_out[i] = '0;
      a_vc[i]  = 1'b0;
      a_ts[i]  = '0;
      for (int o = 0; o < int'(NPORTS); o++) begin
        if (g_ok[o] && g_in[o] == PW'(i) &&
            (!a_ok[i] || better(g_vc[o], g_ts[o], a_vc[i], a_ts[i]))) begin
          a_ok[i]  = 1'b1;
          a_out[i] = PW'(o);
          a_vc[i]  = g_vc[o];
          a_ts[i]  = g_ts[o];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_busy     <= '0;
      out_busy    <= '0;
      grant_valid <= '0;
      rsv_valid   <= '0;
      for (int p = 0; p < int'(NPORTS); p++) begin
        in_out[p]  <= '0;
        out_src[p] <= '0;
        out_vc[p]  <= 1'b0;
        grant_q[p] <= '0;
        rsv_vc[p]  <= 1'b0;
        rsv_len[p] <= '0;
      end
    end else begin
      grant_valid <= '0;
      rsv_valid   <= '0;
      // release finished connections
      for (int i = 0; i < int'(NPORTS); i++) begin
        if (in_done[i] && in_busy[i]) begin
          in_busy[i]          <= 1'b0;
          out_busy[in_out[i]] <= 1'b0;
        end
      end
      // set up new ones
      for (int i = 0; i < int'(NPORTS); i++) begin
        if (a_ok[i]) begin
          in_busy[i]            <= 1'b1;
          in_out[i]             <= a_out[i];
          grant_valid[i]        <= 1'b1;
          grant_q[i]            <= QW'({a_vc[i], a_out[i]});
          out_busy[a_out[i]]    <= 1'b1;
          out_src[a_out[i]]     <= PW'(i);
          out_vc[a_out[i]]      <= a_vc[i];
          rsv_valid[a_out[i]]   <= 1'b1;
          rsv_vc[a_out[i]]      <= a_vc[i];
          rsv_len[a_out[i]]     <= req_len[i][{a_vc[i], a_out[i]}];
        end
      end
    end
  end

  // A granted packet's input is busy until done, so requests are never double-booked.
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_one_src: assert property (@(posedge clk) disable iff (!rst_n)
      rsv_valid[o] |-> out_busy[o]);
  end
endmodule
