// wrr_arbiter: weighted round-robin selection among N queues, at packet
// granularity, as used by the network-interface output scheduler.
//
// The arbiter keeps a current queue and a budget. While the current queue has a
// packet ready and budget left, it keeps the turn; otherwise the turn passes to
// the next requesting queue in round-robin order and that queue's budget is
// reloaded from its weight. Weights and costs are in 64-byte blocks, so a queue
// with weight W sends about W blocks per round; a queue whose budget runs out in
// the middle of a packet still finishes that packet (budget saturates at zero). A
// weight of zero still lets the queue send one packet when its turn comes, so no
// queue is starved.
//
// Interface and timing: `gnt_valid`/`gnt_idx` are combinational from `req` and the
// state. Raising `take` with the packet's `take_cost` commits the grant at the
// clock edge. How the weights are chosen belongs to the admission control and is
// outside this block.
module wrr_arbiter #(
  parameter int unsigned N     = 8,
  parameter int unsigned WGT_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N-1:0]          req,
  input  logic [WGT_W-1:0]      weight [N],
  output logic                  gnt_valid,
  output logic [$clog2(N)-1:0]  gnt_idx,
  input  logic                  take,
  input  logic [WGT_W-1:0]      take_cost
);
  localparam int unsigned IW = $clog2(N);

  logic [IW-1:0]    cur;
  logic [WGT_W-1:0] budget;
  logic             keep;

  always_comb begin
    keep      = req[cur] && budget != '0;
    gnt_valid = 1'b0;
    gnt_idx   = cur;
    if (keep) begin
      gnt_valid = 1'b1;
    end else begin
      // first requester after `cur`, wrapping round to `cur` itself last
      for (int k = int'(N); k >= 1; k--) begin
        if (req[(int'(cur) + k) % int'(N)]) begin
          gnt_valid = 1'b1;
          gnt_idx   = IW'((int'(cur) + k) % int'(N));
        end
      end
    end
  end

  function automatic logic [WGT_W-1:0] sat_sub(input logic [WGT_W-1:0] a,
                                               input logic [WGT_W-1:0] b);
    return (a > b) ? a - b : '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= '0;
      budget <= '0;
    end else if (take && gnt_valid) begin
      if (keep) begin
        budget <= sat_sub(budget, take_cost);
      end else begin
        cur    <= gnt_idx;
        budget <= sat_sub(weight[gnt_idx], take_cost);
      end
    end
  end
endmodule
