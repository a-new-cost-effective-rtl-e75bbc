// network_interface: end-node interface that does the fine-grained QoS
// scheduling the two-VC switches then preserve.
//
// Transmit side: one queue per traffic class (eight), filled by the host, and a
// weighted round-robin scheduler that picks whole packets from them (an
// output_port with NVC = 8 and WRR = 1). The order in which packets leave here is
// the order the switches will keep: a switch only merges already-ordered flows.
// On the link, QoS classes 0..3 travel on switch VC 0 and best-effort classes
// 4..7 on VC 1, and a packet leaves only when the switch input has credits for
// all its blocks in that VC.
//
// Receive side: packets from the switch go straight to the host, whose buffers
// are taken to be large enough never to stall. For every 64-byte block delivered
// (and for the tail of each packet) one credit of the packet's VC is returned to
// the switch through the transmit side's credit queue. Credit symbols arriving
// from the switch feed the transmit side's credit counters.
//
// Host transmit interface: a packet is a run of words, header first, ending with
// host_last; host_tc selects the queue and must stay constant over the packet.
// host_ready is high inside a packet, and before a header only if the class
// queue has room for the whole packet (taken from the header's length field).
// Host receive interface: rx_valid/rx_data/rx_last, one word per link word.
// The eight classes and WRR scheduling follow the evaluated configuration; the
// per-class (not per-destination) queues and the queue size are this design's
// own.
module network_interface
  import qos_pkg::*;
#(
  parameter int unsigned BUF_BYTES  = 65536,
  parameter int unsigned LINK_DIV   = 2,
  parameter int unsigned DN_CREDITS = 128
) (
  input  logic        clk,
  input  logic        rst_n,
  // host transmit
  input  logic        host_valid,
  output logic        host_ready,
  input  word_t       host_data,
  input  logic        host_last,
  input  logic [2:0]  host_tc,
  input  logic [7:0]  weight [NUM_TC],
  // host receive
  output logic        rx_valid,
  output word_t       rx_data,
  output logic        rx_last,
  // link
  output link_word_t  link_out,
  input  link_word_t  link_in,
  // observation
  output logic        pkt_start,
  output logic        crd_sent
);
  localparam int unsigned SPACE_W = $clog2(BUF_BYTES / 8 / NUM_TC + 1);

  logic               in_pkt;
  logic [SPACE_W-1:0] space [NUM_TC];
  logic               host_fire, host_hdr;
  len_t               host_len;

  assign host_len   = hdr_len(host_data);
  assign host_ready = in_pkt || (space[host_tc] >= SPACE_W'(host_len));
  assign host_fire  = host_valid && host_ready;
  assign host_hdr   = host_fire && !in_pkt;

  // ---- receive side
  logic rx_active, rx_vc;
  len_t rx_cnt, rx_len;
  logic crd_ret_valid, crd_ret_vc;
  logic rx_data_in, rx_hdr;

  assign rx_data_in = link_in.valid && !link_in.ctrl;
  assign rx_hdr     = rx_data_in && !rx_active;

  always_comb begin
    logic vc_now;
    len_t len_now, cnt_now;
    vc_now  = rx_hdr ? tc_to_vc(hdr_tc(link_in.data)) : rx_vc;
    len_now = rx_hdr ? hdr_len(link_in.data) : rx_len;
    cnt_now = rx_hdr ? '0 : rx_cnt;
    rx_valid      = rx_data_in;
    rx_data       = link_in.data;
    rx_last       = rx_data_in && (cnt_now == len_now - len_t'(1));
    crd_ret_valid = rx_data_in && (cnt_now[2:0] == 3'd7 || rx_last);
    crd_ret_vc    = vc_now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt    <= 1'b0;
      rx_active <= 1'b0;
      rx_vc     <= 1'b0;
      rx_cnt    <= '0;
      rx_len    <= '0;
    end else begin
      if (host_fire) in_pkt <= !host_last;
      if (rx_data_in) begin
        if (rx_hdr) begin
          rx_vc  <= tc_to_vc(hdr_tc(link_in.data));
          rx_len <= hdr_len(link_in.data);
          rx_cnt <= len_t'(1);
        end else begin
          rx_cnt <= rx_cnt + len_t'(1);
        end
        rx_active <= !rx_last;
      end
    end
  end

  output_port #(
    .NVC(NUM_TC), .BUF_BYTES(BUF_BYTES), .LINK_DIV(LINK_DIV),
    .DN_CREDITS(DN_CREDITS), .WRR(1'b1)
  ) u_tx (
    .clk, .rst_n,
    .in_valid(host_fire), .in_vc(host_tc), .in_data(host_data), .in_last(host_last),
    .rsv_valid(host_hdr), .rsv_vc(host_tc), .rsv_len(host_len), .space,
    .weight,
    .crd_in_valid(link_in.valid && link_in.ctrl), .crd_in_vc(link_in.data[0]),
    .crd_in_n(link_in.data[16:8]),
    .crd_ret_valid, .crd_ret_vc,
    .link_out, .pkt_start, .crd_sent
  );
endmodule
