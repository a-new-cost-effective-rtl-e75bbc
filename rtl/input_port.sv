// input_port: switch input buffer with two VCs, each split into one virtual
// output queue (VOQ) per switch output, all sharing one physical memory.
//
// How it works. Arriving packets are written into a memory of 64-byte blocks
// (eight 64-bit words). The header is decoded on arrival (route_decode): it gives
// the output port and the VC, and so the logical queue q = vc*NPORTS + out. A
// block is taken from the block_allocator for the header and for every further
// eight words; blocks of one packet are chained with `next_blk`, and the last
// block of a packet is chained to the first block of the next packet of the same
// queue, so each VOQ is one linked list of blocks. Every packet starts on a fresh
// block, so a packet of L words holds exactly ceil(L/8) blocks, matching the
// credits the upstream port spent on it.
//
// The head packet of every non-empty queue is offered to the switch scheduler as
// soon as its header is stored (cut-through: scheduling overlaps writing). When
// granted, the port streams the packet to the crossbar at one word per cycle,
// stalling only if it would overtake the word still arriving on the link. Each
// block is freed after its last word is read, and one credit for that VC is
// passed to the paired output port, which returns it upstream in-band.
//
// Interface and timing:
//  * link_in: one link word per cycle at most; control words are credit symbols
//    for the paired output port and appear on crd_rx_*.
//  * req_valid/req_len/req_ts[q]: head packet of queue q, its length and arrival
//    time. Masked while a packet is being sent.
//  * grant_valid/grant_q: start sending the head packet of queue q. The first
//    word appears on xo_* two cycles later (registered start, synchronous memory
//    read); xo_last marks the final word.
//  * crd_ret_valid/crd_ret_vc: one block of that VC was freed.
// Memory size, VC count and per-queue structure follow the switch description;
// the packet header layout, the time stamps and the read stall rule are this
// design's own.
module input_port
  import qos_pkg::*;
#(
  parameter int unsigned NPORTS    = 16,
  parameter int unsigned BUF_BYTES = 16384
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  ts_t                      now,
  // link from the upstream node
  input  link_word_t               link_in,
  output logic                     crd_rx_valid,
  output logic                     crd_rx_vc,
  output logic [8:0]               crd_rx_n,
  // requests to the switch scheduler
  output logic [2*NPORTS-1:0]      req_valid,
  output len_t                     req_len [2*NPORTS],
  output ts_t                      req_ts  [2*NPORTS],
  input  logic                     grant_valid,
  input  logic [$clog2(2*NPORTS)-1:0] grant_q,
  // crossbar side
  output logic                     xo_valid,
  output word_t                    xo_data,
  output logic                     xo_last,
  output logic                     busy,
  // freed blocks, to the paired output port's credit queue
  output logic                     crd_ret_valid,
  output logic                     crd_ret_vc
);
  localparam int unsigned NBLK  = BUF_BYTES / (WORDS_PER_BLK * DATA_W / 8);
  localparam int unsigned BW    = $clog2(NBLK);
  localparam int unsigned NQ    = 2 * NPORTS;
  localparam int unsigned QW    = $clog2(NQ);
  localparam int unsigned PW    = $clog2(NPORTS);
  localparam int unsigned CW    = $clog2(NBLK + 1);

  typedef logic [BW-1:0] blk_t;

  // ---------------------------------------------------------------- storage
  word_t mem [NBLK*WORDS_PER_BLK];
  blk_t  next_blk [NBLK];
  len_t  blk_len  [NBLK];
  ts_t   blk_ts   [NBLK];

  blk_t            head_blk [NQ];
  blk_t            tail_blk [NQ];
  logic [CW-1:0]   pkt_cnt  [NQ];

  // ---------------------------------------------------------------- decode
  logic [PW-1:0] dec_port;
  logic          dec_vc;
  len_t          dec_len;
  logic [2:0]    dec_tc;
  word_t         dec_hdr;

  route_decode #(.NPORTS(NPORTS)) u_dec (
    .hdr_in(link_in.data), .out_port(dec_port), .vc(dec_vc),
    .len(dec_len), .tc(dec_tc), .hdr_out(dec_hdr)
  );

  // ---------------------------------------------------------------- allocator
  logic alloc_req, alloc_ok, free_req;
  blk_t alloc_idx, free_idx;
  logic [CW-1:0] free_count;

  block_allocator #(.NBLK(NBLK)) u_alloc (
    .clk, .rst_n, .alloc_req, .alloc_ok, .alloc_idx,
    .free_req, .free_idx, .free_count
  );

  // ---------------------------------------------------------------- writer
  logic          wr_active;
  logic [QW-1:0] wr_q;
  blk_t          wr_first, wr_blk;
  len_t          wr_cnt, wr_len;

  logic          data_in, hdr_in;
  logic          wr_en;
  logic [BW+2:0] wr_addr;
  word_t         wr_data;

  assign data_in  = link_in.valid && !link_in.ctrl;
  assign hdr_in   = data_in && !wr_active;
  assign alloc_req = data_in && (hdr_in || wr_cnt[2:0] == 3'd0);

  always_comb begin
    wr_en   = data_in;
    wr_data = hdr_in ? dec_hdr : link_in.data;
    if (alloc_req) wr_addr = {alloc_idx, 3'd0};
    else           wr_addr = {wr_blk, wr_cnt[2:0]};
  end

  assign crd_rx_valid = link_in.valid && link_in.ctrl;
  assign crd_rx_vc    = link_in.data[0];
  assign crd_rx_n     = link_in.data[16:8];

  // ---------------------------------------------------------------- reader
  logic          rd_active;
  logic [QW-1:0] rd_q;
  blk_t          rd_first, rd_blk;
  logic [2:0]    rd_off;
  len_t          rd_cnt, rd_len;
  logic          rd_vc;

  logic          rd_last, rd_fire, rd_ok;
  len_t          rd_need;

  always_comb begin
    rd_last = (rd_cnt == rd_len - len_t'(1));
    // Reading the last word of a block also follows its link, so the next
    // word must already be stored (it is what sets the link).
    rd_need = rd_cnt + len_t'(rd_off == 3'd7 && !rd_last);
    rd_ok   = !(wr_active && wr_first == rd_first) || (rd_need < wr_cnt);
    rd_fire = rd_active && rd_ok;
  end

  assign free_req = rd_fire && (rd_off == 3'd7 || rd_last);
  assign free_idx = rd_blk;
  assign busy     = rd_active;

  // Queue update bookkeeping
  logic          dec_now;
  assign dec_now = rd_fire && rd_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_active <= 1'b0;
      wr_q      <= '0;
      wr_first  <= '0;
      wr_blk    <= '0;
      wr_cnt    <= '0;
      wr_len    <= '0;
      rd_active <= 1'b0;
      rd_q      <= '0;
      rd_first  <= '0;
      rd_blk    <= '0;
      rd_off    <= '0;
      rd_cnt    <= '0;
      rd_len    <= '0;
      rd_vc     <= 1'b0;
      for (int q = 0; q < int'(NQ); q++) begin
        pkt_cnt[q]  <= '0;
        head_blk[q] <= '0;
        tail_blk[q] <= '0;
      end
    end else begin
      // ---- reader
      if (grant_valid && !rd_active) begin
        rd_active <= 1'b1;
        rd_q      <= grant_q;
        rd_first  <= head_blk[grant_q];
        rd_blk    <= head_blk[grant_q];
        rd_off    <= '0;
        rd_cnt    <= '0;
        rd_len    <= blk_len[head_blk[grant_q]];
        rd_vc     <= grant_q[QW-1];
      end else if (rd_fire) begin
        rd_cnt <= rd_cnt + len_t'(1);
        rd_off <= rd_off + 3'd1;
        if (rd_off == 3'd7) rd_blk <= next_blk[rd_blk];
        if (rd_last) begin
          rd_active <= 1'b0;
          if (pkt_cnt[rd_q] > CW'(1)) head_blk[rd_q] <= next_blk[rd_blk];
        end
      end

      // ---- writer (its head update has precedence over the reader's)
      if (data_in) begin
        if (hdr_in) begin
          wr_q      <= QW'({dec_vc, dec_port});
          wr_first  <= alloc_idx;
          wr_blk    <= alloc_idx;
          wr_cnt    <= len_t'(1);
          wr_len    <= dec_len;
          wr_active <= (dec_len > len_t'(1));
          blk_len[alloc_idx] <= dec_len;
          blk_ts[alloc_idx]  <= now;
          if ((pkt_cnt[QW'({dec_vc, dec_port})] - CW'(dec_now && rd_q == QW'({dec_vc, dec_port}))) == '0)
            head_blk[QW'({dec_vc, dec_port})] <= alloc_idx;
          else
            next_blk[tail_blk[QW'({dec_vc, dec_port})]] <= alloc_idx;
          tail_blk[QW'({dec_vc, dec_port})] <= alloc_idx;
        end else begin
          wr_cnt <= wr_cnt + len_t'(1);
          if (wr_cnt == wr_len - len_t'(1)) wr_active <= 1'b0;
          if (alloc_req) begin
            next_blk[wr_blk] <= alloc_idx;
            wr_blk           <= alloc_idx;
            tail_blk[wr_q]   <= alloc_idx;
          end
        end
      end

      // ---- packet counts
      for (int q = 0; q < int'(NQ); q++) begin
        pkt_cnt[q] <= pkt_cnt[q]
                    + CW'(hdr_in && q == int'({dec_vc, dec_port}))
                    - CW'(dec_now && q == int'(rd_q));
      end
    end
  end

  // ---------------------------------------------------------------- memory
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xo_valid      <= 1'b0;
      xo_last       <= 1'b0;
      xo_data       <= '0;
      crd_ret_valid <= 1'b0;
      crd_ret_vc    <= 1'b0;
    end else begin
      xo_valid      <= rd_fire;
      xo_last       <= rd_fire && rd_last;
      if (rd_fire) xo_data <= mem[{rd_blk, rd_off}];
      crd_ret_valid <= free_req;
      crd_ret_vc    <= rd_vc;
    end
  end

  // ---------------------------------------------------------------- requests
  always_comb begin
    for (int q = 0; q < int'(NQ); q++) begin
      req_valid[q] = (pkt_cnt[q] != '0) && !rd_active;
      req_len[q]   = blk_len[head_blk[q]];
      req_ts[q]    = blk_ts[head_blk[q]];
    end
  end

  a_alloc_ok: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_req |-> alloc_ok);
  a_grant_idle: assert property (@(posedge clk) disable iff (!rst_n)
    grant_valid |-> !rd_active && pkt_cnt[grant_q] != '0);
endmodule
