// qos_pkg: types and constants shared by the two-VC QoS switch and its network
// interfaces.
//
// The switch keeps only two virtual channels per port: VC 0 carries all
// regulated (QoS) traffic and VC 1 all best-effort traffic. The end-node network
// interfaces keep one queue per traffic class (eight) and schedule them; the
// switches then merge the already-ordered flows. Buffers are managed in blocks of
// 64 bytes, i.e. eight 64-bit words, and link-level flow control counts blocks.
//
// Packet header (first 64-bit word of every packet), a format chosen for this
// design in the style of source-routed fabrics:
//   [63:61] tc     traffic class, 0 = highest priority; 0..3 are QoS classes
//   [60:52] len    packet length in 64-bit words including the header, 1..256
//   [51:48] hop    index of the route field to use at the next switch
//   [47:8]  route  ten 4-bit output-port numbers, hop 0 in bits [11:8]
//   [7:0]   src    source end-node number (carried, not interpreted)
//
// Link words: a link carries one `link_word_t` per cycle when `valid`. With
// `ctrl` set the word is a credit symbol rather than packet data:
//   data[0]     VC whose credits are returned
//   data[16:8]  number of 64-byte blocks returned
package qos_pkg;

  localparam int unsigned DATA_W        = 64;
  localparam int unsigned WORDS_PER_BLK = 8;     // 64-byte block / 8-byte word
  localparam int unsigned LEN_W         = 9;     // packet length field width
  localparam int unsigned NUM_TC        = 8;
  localparam int unsigned TS_W          = 16;    // arrival time stamp width
  localparam int unsigned ROUTE_HOPS    = 10;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [LEN_W-1:0]  len_t;
  typedef logic [TS_W-1:0]   ts_t;

  typedef struct packed {
    logic [2:0]  tc;
    logic [8:0]  len;
    logic [3:0]  hop;
    logic [39:0] route;
    logic [7:0]  src;
  } pkt_hdr_t;

  typedef struct packed {
    logic  valid;
    logic  ctrl;
    word_t data;
  } link_word_t;

  // QoS traffic classes (network control, audio, video, controlled load) use
  // switch VC 0; best-effort classes use VC 1.
  function automatic logic tc_to_vc(input logic [2:0] tc);
    return tc[2];
  endfunction

  function automatic len_t hdr_len(input word_t w);
    return w[60:52];
  endfunction

  function automatic logic [2:0] hdr_tc(input word_t w);
    return w[63:61];
  endfunction

  // Number of 64-byte blocks a packet of `len` words occupies.
  function automatic logic [LEN_W-1:0] blocks_of(input len_t len);
    return LEN_W'((len + LEN_W'(WORDS_PER_BLK - 1)) >> 3);
  endfunction

  function automatic word_t credit_word(input logic vc, input logic [8:0] n);
    word_t w;
    w = '0;
    w[0] = vc;
    w[16:8] = n;
    return w;
  endfunction

  // True when time stamp a is older than b (modulo wrap-around).
  function automatic logic ts_older(input ts_t a, input ts_t b);
    ts_t d;
    d = a - b;
    return d[TS_W-1];
  endfunction

endpackage
