// route_decode: header decoding, routing and VC allocation of a switch input port.
//
// Routing is source routing: the header carries the whole path as a list of
// output-port numbers and a hop index. The decoder picks the port for this hop,
// maps the traffic class onto one of the two switch VCs (QoS classes to VC 0,
// best-effort classes to VC 1) and returns the header with the hop index advanced,
// ready to be stored and forwarded to the next switch. It is purely
// combinational; the input port registers its results in the same cycle the
// header word is written. Source routing and the QoS/best-effort VC split follow
// the switch architecture; the header layout (see qos_pkg) is this design's own.
module route_decode
  import qos_pkg::*;
#(
  parameter int unsigned NPORTS = 16
) (
  input  word_t                      hdr_in,
  output logic [$clog2(NPORTS)-1:0]  out_port,
  output logic                       vc,
  output len_t                       len,
  output logic [2:0]                 tc,
  output word_t                      hdr_out
);
  pkt_hdr_t h, n;
  logic [3:0] turn;

  always_comb begin
    h        = pkt_hdr_t'(hdr_in);
    turn     = (h.hop < 4'(ROUTE_HOPS)) ? h.route[h.hop*4 +: 4] : 4'd0;
    out_port = turn[$clog2(NPORTS)-1:0];
    vc       = tc_to_vc(h.tc);
    len      = h.len;
    tc       = h.tc;
    n        = h;
    n.hop    = h.hop + 4'd1;
    hdr_out  = word_t'(n);
  end
endmodule
