// tb_wrr_arbiter: weighted round-robin arbiter of the interface scheduler.
// Part 1: all eight queues always request, every packet costs one block; over
// whole rounds each queue must get exactly its weight in grants, in round-robin
// order. Part 2: random requests and costs, compared grant by grant with a
// behavioural reference of the same policy.
module tb_wrr_arbiter;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req;
  logic [7:0]   weight [N];
  logic         gnt_valid, take;
  logic [2:0]   gnt_idx;
  logic [7:0]   take_cost;
  int           got [N];

  wrr_arbiter #(.N(N), .WGT_W(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  // reference state
  int r_cur, r_budget;

  initial begin
    int total, exp_idx;
    bit keep;
    req = '0; take = 0; take_cost = 1;
    for (int i = 0; i < N; i++) weight[i] = 8'(i + 1);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- part 1: shares
    foreach (got[i]) got[i] = 0;
    req = '1; take = 1; take_cost = 1;
    total = 0;
    for (int i = 0; i < N; i++) total += i + 1;
    // first grant after reset goes to queue 1 (round robin from queue 0, budget 0)
    for (int n = 0; n < 10 * total; n++) begin
      @(negedge clk);
      check(gnt_valid, "valid");
      got[gnt_idx]++;
    end
    for (int i = 0; i < N; i++) check(got[i] == 10 * (i + 1), $sformatf("share q%0d=%0d", i, got[i]));
    // ---- part 2: reference comparison
    @(negedge clk); take = 0; rst_n = 0; @(negedge clk); rst_n = 1;
    r_cur = 0; r_budget = 0;
    for (int i = 0; i < N; i++) weight[i] = 8'($urandom_range(0, 6));
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req = N'($urandom);
      take = $urandom_range(0, 3) != 0;
      take_cost = 8'($urandom_range(1, 5));
      #1;
      keep = req[r_cur] && r_budget > 0;
      exp_idx = -1;
      if (keep) exp_idx = r_cur;
      else for (int k = 1; k <= N; k++) if (req[(r_cur + k) % N]) begin exp_idx = (r_cur + k) % N; break; end
      check(gnt_valid == (exp_idx >= 0), "ref valid");
      if (exp_idx >= 0) begin
        check(gnt_idx == 3'(exp_idx), "ref idx");
        if (take) begin
          if (keep) r_budget = (r_budget > take_cost) ? r_budget - take_cost : 0;
          else begin
            r_cur = exp_idx;
            r_budget = (weight[exp_idx] > take_cost) ? weight[exp_idx] - take_cost : 0;
          end
        end
      end
    end
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
