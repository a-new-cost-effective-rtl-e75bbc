// qos_switch: single-chip combined input/output-queued (CIOQ) virtual
// cut-through switch with only two virtual channels per port.
//
// Main idea: the end-node interfaces already send their packets in a good order
// for QoS, so the switch does not need one VC per traffic class. All regulated
// traffic shares VC 0 and all best-effort traffic VC 1; VC 0 has absolute
// priority, and inside a VC the switch serves head packets in arrival order,
// merging its ordered input flows into ordered output flows.
//
// Structure (per port an input_port and an output_port, plus one crossbar and
// one central switch_scheduler):
//   link_in[p] -> input_port[p]  (header decode, block allocation, 2 x NPORTS VOQs)
//              -> crossbar        (connection held for a whole packet)
//              -> output_port[o]  (VC 0 / VC 1 queues, credit queue, line pacing)
//              -> link_out[o]
// Links are bidirectional: credits for blocks freed in input_port[p] are sent
// back on link_out[p], and credit symbols arriving on link_in[p] refill the
// counters of output_port[p].
//
// Timing: the core runs at one 64-bit word per cycle (16 Gb/s at 250 MHz); the
// lines run at one word every LINK_DIV cycles (8 Gb/s), so the core has an
// internal speedup of two. Defaults are the described chip: 16 ports, 16 KB of
// input buffer and 16 KB of output buffer per port.
module qos_switch
  import qos_pkg::*;
#(
  parameter int unsigned NPORTS        = 16,
  parameter int unsigned IN_BUF_BYTES  = 16384,
  parameter int unsigned OUT_BUF_BYTES = 16384,
  parameter int unsigned LINK_DIV      = 2,
  parameter int unsigned DN_CREDITS    = IN_BUF_BYTES / 64 / 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  link_word_t  link_in  [NPORTS],
  output link_word_t  link_out [NPORTS],
  // observation: one pulse per packet started on each output line, per
  // crossbar connection made and per credit symbol sent
  output logic [NPORTS-1:0] out_pkt_start,
  output logic [NPORTS-1:0] xbar_grant,
  output logic [NPORTS-1:0] out_crd_sent
);
  localparam int unsigned NQ      = 2 * NPORTS;
  localparam int unsigned PW      = $clog2(NPORTS);
  localparam int unsigned SPACE_W = $clog2(OUT_BUF_BYTES / 8 / 2 + 1);

  ts_t now;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // input side
  logic               crd_rx_valid [NPORTS];
  logic               crd_rx_vc    [NPORTS];
  logic [8:0]         crd_rx_n     [NPORTS];
  logic [NQ-1:0]      req_valid    [NPORTS];
  len_t               req_len      [NPORTS][NQ];
  ts_t                req_ts       [NPORTS][NQ];
  logic [NPORTS-1:0]  grant_valid;
  logic [$clog2(NQ)-1:0] grant_q   [NPORTS];
  logic [NPORTS-1:0]  xi_valid, xi_last;
  word_t              xi_data      [NPORTS];
  logic               crd_ret_valid [NPORTS];
  logic               crd_ret_vc    [NPORTS];
  logic               in_busy       [NPORTS];  // the scheduler tracks busy inputs itself

  // scheduler / crossbar
  logic [NPORTS-1:0]  out_busy;
  logic [PW-1:0]      out_src [NPORTS];
  logic               out_vc  [NPORTS];
  logic [NPORTS-1:0]  rsv_valid;
  logic               rsv_vc  [NPORTS];
  len_t               rsv_len [NPORTS];
  logic [SPACE_W-1:0] out_space [NPORTS][2];

  logic [NPORTS-1:0]  xo_valid, xo_last;
  word_t              xo_data [NPORTS];

  logic [7:0]         no_weight [2];
  assign no_weight = '{default: 8'd0};

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    input_port #(.NPORTS(NPORTS), .BUF_BYTES(IN_BUF_BYTES)) u_in (
      .clk, .rst_n, .now,
      .link_in(link_in[p]),
      .crd_rx_valid(crd_rx_valid[p]), .crd_rx_vc(crd_rx_vc[p]), .crd_rx_n(crd_rx_n[p]),
      .req_valid(req_valid[p]), .req_len(req_len[p]), .req_ts(req_ts[p]),
      .grant_valid(grant_valid[p]), .grant_q(grant_q[p]),
      .xo_valid(xi_valid[p]), .xo_data(xi_data[p]), .xo_last(xi_last[p]),
      .busy(in_busy[p]),
      .crd_ret_valid(crd_ret_valid[p]), .crd_ret_vc(crd_ret_vc[p])
    );

    output_port #(
      .NVC(2), .BUF_BYTES(OUT_BUF_BYTES), .LINK_DIV(LINK_DIV),
      .DN_CREDITS(DN_CREDITS), .WRR(1'b0)
    ) u_out (
      .clk, .rst_n,
      .in_valid(xo_valid[p]), .in_vc(out_vc[p]), .in_data(xo_data[p]), .in_last(xo_last[p]),
      .rsv_valid(rsv_valid[p]), .rsv_vc(rsv_vc[p]), .rsv_len(rsv_len[p]),
      .space(out_space[p]),
      .weight(no_weight),
      .crd_in_valid(crd_rx_valid[p]), .crd_in_vc(crd_rx_vc[p]), .crd_in_n(crd_rx_n[p]),
      .crd_ret_valid(crd_ret_valid[p]), .crd_ret_vc(crd_ret_vc[p]),
      .link_out(link_out[p]),
      .pkt_start(out_pkt_start[p]), .crd_sent(out_crd_sent[p])
    );
  end

  switch_scheduler #(.NPORTS(NPORTS), .SPACE_W(SPACE_W)) u_sched (
    .clk, .rst_n,
    .req_valid, .req_len, .req_ts, .out_space,
    .in_done(xi_last),
    .grant_valid, .grant_q,
    .out_busy, .out_src, .out_vc,
    .rsv_valid, .rsv_vc, .rsv_len
  );

  assign xbar_grant = grant_valid;

  crossbar #(.NPORTS(NPORTS)) u_xbar (
    .in_valid(xi_valid), .in_data(xi_data), .in_last(xi_last),
    .out_en(out_busy), .out_sel(out_src),
    .out_valid(xo_valid), .out_data(xo_data), .out_last(xo_last)
  );
endmodule
