// block_allocator: free list of the 64-byte blocks of an input-port buffer.
//
// The input buffer is one physical memory shared by all logical queues; space is
// handed out one 64-byte block at a time as packet data arrives, and blocks are
// linked into per-queue lists by the input port. This allocator keeps one bit per
// block (1 = free) and hands out the lowest-numbered free block through a priority
// encoder, so allocation needs no linked free list of its own.
//
// Interface and timing: `alloc_idx` is valid whenever `alloc_ok` is high; raising
// `alloc_req` takes that block at the next clock edge. `free_req`/`free_idx`
// returns a block at the next edge. One allocation and one release may happen in
// the same cycle. `free_count` is the number of free blocks. After reset every
// block is free. Asking for a block when none is free, or freeing a free block,
// is a protocol error caught by assertions.
module block_allocator #(
  parameter int unsigned NBLK = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      alloc_req,
  output logic                      alloc_ok,
  output logic [$clog2(NBLK)-1:0]   alloc_idx,
  input  logic                      free_req,
  input  logic [$clog2(NBLK)-1:0]   free_idx,
  output logic [$clog2(NBLK+1)-1:0] free_count
);
  logic [NBLK-1:0] free_vec;

  always_comb begin
    alloc_ok  = 1'b0;
    alloc_idx = '0;
    for (int i = NBLK - 1; i >= 0; i--) begin
      if (free_vec[i]) begin
        alloc_ok  = 1'b1;
        alloc_idx = ($clog2(NBLK))'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      free_vec   <= '1;
      free_count <= ($clog2(NBLK+1))'(NBLK);
    end else begin
      if (alloc_req && alloc_ok) free_vec[alloc_idx] <= 1'b0;
      if (free_req)              free_vec[free_idx]  <= 1'b1;
      free_count <= free_count + ($clog2(NBLK+1))'(free_req)
                               - ($clog2(NBLK+1))'(alloc_req && alloc_ok);
    end
  end

  a_no_empty_alloc: assert property (@(posedge clk) disable iff (!rst_n)
    alloc_req |-> alloc_ok);
  a_no_double_free: assert property (@(posedge clk) disable iff (!rst_n)
    free_req |-> !free_vec[free_idx]);
endmodule
