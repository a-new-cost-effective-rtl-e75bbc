// tb_block_allocator: random allocate/free traffic against a reference bitmap.
// Checks that every allocated block was free, that the lowest free block is
// handed out, that the free count matches, and that a full drain allocates all
// blocks exactly once.
module tb_block_allocator;
  localparam int NBLK = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic alloc_req, alloc_ok, free_req;
  logic [5:0] alloc_idx, free_idx;
  logic [6:0] free_count;
  bit   ref_free [NBLK];
  int   ref_cnt;

  block_allocator #(.NBLK(NBLK)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  function automatic int lowest_free();
    for (int i = 0; i < NBLK; i++) if (ref_free[i]) return i;
    return -1;
  endfunction

  initial begin
    alloc_req = 0; free_req = 0; free_idx = 0;
    foreach (ref_free[i]) ref_free[i] = 1;
    ref_cnt = NBLK;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int lf, fi, b;
      @(negedge clk);
      lf = lowest_free();
      check(alloc_ok == (lf >= 0), "alloc_ok");
      if (lf >= 0) check(alloc_idx == 6'(lf), "lowest free");
      check(free_count == 7'(ref_cnt), "free_count");
      alloc_req = (lf >= 0) && ($urandom_range(0, 99) < (n < 1500 ? 60 : 40));
      free_req = 0;
      fi = $urandom_range(0, NBLK - 1);
      for (int k = 0; k < NBLK; k++) begin
        b = (fi + k) % NBLK;
        if (!ref_free[b] && $urandom_range(0, 1) != 0) begin
          free_req = 1; free_idx = 6'(b); break;
        end
      end
      @(posedge clk);
      #1;
      if (alloc_req) begin ref_free[lf] = 0; ref_cnt--; end
      if (free_req)  begin ref_free[free_idx] = 1; ref_cnt++; end
      alloc_req = 0; free_req = 0;
    end
    // drain: every block handed out once
    @(negedge clk);
    for (int i = 0; i < NBLK; i++) if (!ref_free[i]) begin
      free_req = 1; free_idx = 6'(i); @(negedge clk); ref_free[i] = 1;
    end
    free_req = 0;
    @(negedge clk);
    check(free_count == 7'(NBLK), "all free");
    for (int i = 0; i < NBLK; i++) begin
      check(alloc_ok && alloc_idx == 6'(i), "drain order");
      alloc_req = 1; @(negedge clk);
    end
    alloc_req = 0;
    check(!alloc_ok && free_count == 0, "empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
