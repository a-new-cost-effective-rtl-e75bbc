// output_port: output buffer, output scheduler and link transmitter.
//
// The buffer memory is split statically into one FIFO per VC (a switch port has
// two: VC 0 for QoS and VC 1 for best effort), so neither class can hog the
// other's space. A third queue holds outgoing credits: the paired input port
// reports every 64-byte block it frees, and the counts are sent back upstream as
// in-band credit symbols, since the link has no separate flow-control lines.
//
// Output scheduling is per packet and needs, before a packet starts, credits for
// all its blocks in the downstream buffer of its VC (virtual cut-through). Two
// policies are available:
//   * WRR = 0 (switch port): strict priority, lowest-numbered queue first, so VC 0
//     always goes before VC 1;
//   * WRR = 1 (network interface, one queue per traffic class): weighted
//     round-robin by `wrr_arbiter`.
// A packet is sent as soon as its header is in the queue; its remaining words
// follow as they arrive (the crossbar runs faster than the line, so gaps are
// rare). The line carries one word every LINK_DIV cycles: with a 64-bit word at
// 250 MHz, LINK_DIV = 2 gives the 8 Gb/s line rate. A credit symbol, when one is
// pending, takes a line slot, but never two slots in a row while data waits.
//
// Interface and timing:
//  * in_*: one word per cycle into queue in_vc; space must have been reserved
//    through rsv_* (by the switch scheduler or the interface's host side).
//  * space[v]: free words in queue v not yet reserved.
//  * crd_in_*: credits received from downstream, per downstream VC.
//  * crd_ret_*: one block freed by the paired input (to be returned upstream).
//  * link_out: registered link word.
// Queue v uses downstream VC v / (NVC/2): queues 0..NVC/2-1 are QoS.
module output_port
  import qos_pkg::*;
#(
  parameter int unsigned NVC        = 2,
  parameter int unsigned BUF_BYTES  = 16384,
  parameter int unsigned LINK_DIV   = 2,
  parameter int unsigned DN_CREDITS = 128,
  parameter bit          WRR        = 1'b0,
  parameter int unsigned SPACE_W    = $clog2(BUF_BYTES / 8 / NVC + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // from the crossbar / host
  input  logic                    in_valid,
  input  logic [$clog2(NVC)-1:0]  in_vc,
  input  word_t                   in_data,
  input  logic                    in_last,
  // space reservation
  input  logic                    rsv_valid,
  input  logic [$clog2(NVC)-1:0]  rsv_vc,
  input  len_t                    rsv_len,
  output logic [SPACE_W-1:0]      space [NVC],
  // WRR weights (used when WRR = 1), in 64-byte blocks
  input  logic [7:0]              weight [NVC],
  // credits from downstream
  input  logic                    crd_in_valid,
  input  logic                    crd_in_vc,
  input  logic [8:0]              crd_in_n,
  // blocks freed by the paired input port
  input  logic                    crd_ret_valid,
  input  logic                    crd_ret_vc,
  // line
  output link_word_t              link_out,
  // observation
  output logic                    pkt_start,
  output logic                    crd_sent
);
  localparam int unsigned QD  = BUF_BYTES / 8 / NVC;   // words per queue
  localparam int unsigned AW  = $clog2(QD);
  localparam int unsigned VW  = $clog2(NVC);
  localparam int unsigned CRW = 12;                    // credit counter width

  typedef logic [DATA_W:0] entry_t;                    // {last, data}

  entry_t          qmem   [NVC][QD];
  logic [AW-1:0]   wr_ptr [NVC];
  logic [AW-1:0]   rd_ptr [NVC];
  logic [AW:0]     count  [NVC];

  logic [CRW-1:0]  dn_crd  [2];
  logic [8:0]      pend    [2];

  // ---------------------------------------------------------------- tx state
  logic            tx_active;
  logic [VW-1:0]   tx_vc;
  logic [$clog2(LINK_DIV+1)-1:0] slot;
  logic            slot_now;
  logic            last_was_crd;

  function automatic logic dvc_of(input int v);
    return (v >= int'(NVC) / 2);
  endfunction

  // head-of-queue view
  logic [NVC-1:0]  elig;
  len_t            head_len [NVC];
  always_comb begin
    for (int v = 0; v < int'(NVC); v++) begin
      head_len[v] = hdr_len(qmem[v][rd_ptr[v]][DATA_W-1:0]);
      elig[v] = (count[v] != '0) &&
                (dn_crd[dvc_of(v)] >= CRW'(blocks_of(head_len[v])));
    end
  end

  // packet selection
  logic          sel_valid;
  logic [VW-1:0] sel_vc;
  logic          take;

  if (WRR) begin : g_wrr
    wrr_arbiter #(.N(NVC), .WGT_W(8)) u_wrr (
      .clk, .rst_n, .req(elig), .weight,
      .gnt_valid(sel_valid), .gnt_idx(sel_vc),
      .take, .take_cost(8'(blocks_of(head_len[sel_vc])))
    );
  end else begin : g_strict
    always_comb begin
      sel_valid = 1'b0;
      sel_vc    = '0;
      for (int v = int'(NVC) - 1; v >= 0; v--) begin
        if (elig[v]) begin
          sel_valid = 1'b1;
          sel_vc    = VW'(v);
        end
      end
    end
  end

  // slot decisions
  logic send_crd, send_data, crd_vc;
  logic [VW-1:0] data_vc;
  always_comb begin
    slot_now  = (slot == '0);
    crd_vc    = (pend[0] != '0) ? 1'b0 : 1'b1;
    data_vc   = tx_active ? tx_vc : sel_vc;
    send_data = slot_now && (tx_active ? (count[tx_vc] != '0) : sel_valid);
    send_crd  = slot_now && (pend[0] != '0 || pend[1] != '0) &&
                !(last_was_crd && send_data);
    if (send_crd) send_data = 1'b0;
    take      = send_data && !tx_active;
  end

  logic deq;
  logic [VW-1:0] deq_vc;
  assign deq    = send_data;
  assign deq_vc = data_vc;

  logic [NVC-1:0] enq_v, deq_v;
  always_comb begin
    for (int v = 0; v < int'(NVC); v++) begin
      enq_v[v] = in_valid && in_vc == VW'(v);
      deq_v[v] = deq && deq_vc == VW'(v);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_active    <= 1'b0;
      tx_vc        <= '0;
      slot         <= '0;
      last_was_crd <= 1'b0;
      link_out     <= '0;
      pkt_start    <= 1'b0;
      crd_sent     <= 1'b0;
      for (int d = 0; d < 2; d++) begin
        dn_crd[d] <= CRW'(DN_CREDITS);
        pend[d]   <= '0;
      end
      for (int v = 0; v < int'(NVC); v++) begin
        wr_ptr[v] <= '0;
        rd_ptr[v] <= '0;
        count[v]  <= '0;
        space[v]  <= SPACE_W'(QD);
      end
    end else begin
      slot      <= (slot == ($clog2(LINK_DIV+1))'(LINK_DIV - 1)) ? '0 : slot + 1'b1;
      link_out  <= '0;
      pkt_start <= 1'b0;
      crd_sent  <= 1'b0;
      if (slot_now) last_was_crd <= send_crd;

      // queues
      for (int v = 0; v < int'(NVC); v++) begin
        if (enq_v[v]) wr_ptr[v] <= wr_ptr[v] + 1'b1;
        if (deq_v[v]) rd_ptr[v] <= rd_ptr[v] + 1'b1;
        count[v] <= count[v] + (AW+1)'(enq_v[v]) - (AW+1)'(deq_v[v]);
        space[v] <= space[v] + SPACE_W'(deq_v[v])
                  - ((rsv_valid && rsv_vc == VW'(v)) ? SPACE_W'(rsv_len) : '0);
      end

      // credits: outgoing queue
      for (int d = 0; d < 2; d++) begin
        pend[d] <= pend[d] + 9'(crd_ret_valid && crd_ret_vc == d[0])
                 - ((send_crd && crd_vc == d[0]) ? pend[d] : 9'd0);
      end
      // credits: downstream counters
      for (int d = 0; d < 2; d++) begin
        dn_crd[d] <= dn_crd[d]
                   + ((crd_in_valid && crd_in_vc == d[0]) ? CRW'(crd_in_n) : '0)
                   - ((take && dvc_of(int'(sel_vc)) == d[0]) ?
                        CRW'(blocks_of(head_len[sel_vc])) : '0);
      end

      if (send_crd) begin
        link_out <= '{valid: 1'b1, ctrl: 1'b1, data: credit_word(crd_vc, pend[crd_vc])};
        crd_sent <= 1'b1;
      end else if (send_data) begin
        link_out <= '{valid: 1'b1, ctrl: 1'b0, data: qmem[data_vc][rd_ptr[data_vc]][DATA_W-1:0]};
        if (!tx_active) begin
          tx_vc     <= sel_vc;
          pkt_start <= 1'b1;
        end
        tx_active <= !qmem[data_vc][rd_ptr[data_vc]][DATA_W];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) qmem[in_vc][wr_ptr[in_vc]] <= {in_last, in_data};
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> count[in_vc] < (AW+1)'(QD));
endmodule
