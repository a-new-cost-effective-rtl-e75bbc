// qos_cluster: one two-VC QoS switch with an eight-class network interface on
// each of its ports, the building block of the cluster interconnect.
//
// Every end node's network_interface schedules its eight traffic-class queues
// by weighted round-robin and sends the result over a bidirectional link to a
// port of the qos_switch; the switch keeps only a QoS VC and a best-effort VC,
// gives the QoS VC absolute priority and otherwise serves packets in arrival
// order, so the per-class order chosen at the interfaces is carried through the
// fabric. Credits flow back in-band on every link in both directions.
//
// Ports: per end node a host transmit channel (host_*), a host receive channel
// (rx_*), and the WRR weights shared by all interfaces (in 64-byte blocks per
// round, one per class). Observation outputs pulse when an interface starts a
// packet (ni_pkt_start), when the switch starts a packet on an output line
// (sw_pkt_start) and when the switch connects an input to an output
// (xbar_grant), and when a credit symbol is sent by an interface
// (ni_crd_sent) or by the switch (sw_crd_sent). Defaults: 16 ports, 16 KB per switch input and output buffer,
// 64 KB of queues per interface, line rate of one word every two cycles.
module qos_cluster
  import qos_pkg::*;
#(
  parameter int unsigned NPORTS        = 16,
  parameter int unsigned IN_BUF_BYTES  = 16384,
  parameter int unsigned OUT_BUF_BYTES = 16384,
  parameter int unsigned NI_BUF_BYTES  = 65536,
  parameter int unsigned LINK_DIV      = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [7:0]        weight     [NUM_TC],
  input  logic [NPORTS-1:0] host_valid,
  output logic [NPORTS-1:0] host_ready,
  input  word_t             host_data  [NPORTS],
  input  logic [NPORTS-1:0] host_last,
  input  logic [2:0]        host_tc    [NPORTS],
  output logic [NPORTS-1:0] rx_valid,
  output word_t             rx_data    [NPORTS],
  output logic [NPORTS-1:0] rx_last,
  output logic [NPORTS-1:0] ni_pkt_start,
  output logic [NPORTS-1:0] sw_pkt_start,
  output logic [NPORTS-1:0] xbar_grant,
  output logic [NPORTS-1:0] ni_crd_sent,
  output logic [NPORTS-1:0] sw_crd_sent
);
  link_word_t ni_to_sw [NPORTS];
  link_word_t sw_to_ni [NPORTS];

  qos_switch #(
    .NPORTS(NPORTS), .IN_BUF_BYTES(IN_BUF_BYTES), .OUT_BUF_BYTES(OUT_BUF_BYTES),
    .LINK_DIV(LINK_DIV), .DN_CREDITS(IN_BUF_BYTES / 64 / 2)
  ) u_sw (
    .clk, .rst_n,
    .link_in(ni_to_sw), .link_out(sw_to_ni),
    .out_pkt_start(sw_pkt_start), .xbar_grant, .out_crd_sent(sw_crd_sent)
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_ni
    network_interface #(
      .BUF_BYTES(NI_BUF_BYTES), .LINK_DIV(LINK_DIV), .DN_CREDITS(IN_BUF_BYTES / 64 / 2)
    ) u_ni (
      .clk, .rst_n,
      .host_valid(host_valid[p]), .host_ready(host_ready[p]),
      .host_data(host_data[p]), .host_last(host_last[p]), .host_tc(host_tc[p]),
      .weight,
      .rx_valid(rx_valid[p]), .rx_data(rx_data[p]), .rx_last(rx_last[p]),
      .link_out(ni_to_sw[p]), .link_in(sw_to_ni[p]),
      .pkt_start(ni_pkt_start[p]), .crd_sent(ni_crd_sent[p])
    );
  end
endmodule
