// tb_knap_parallel_ga: runs the parallel Knapsack GA (2 pipelines, S=64).
// Loads a 64-item instance (optimum found here by dynamic programming) and
// a mutation rate, then runs. Checks: each pipeline evaluates one individual
// per clock; every evaluated fitness equals the value recomputed here from
// the chromosome; dout_evaluate counts all evaluations; dout_best_fitness is
// the best evaluated fitness and never exceeds the optimum, reaching 95% of
// it; migrations occur in pipeline 1 and never in pipeline 0, which has no
// predecessor.
// The island chain follows the document; the instance and thresholds are
// this testbench's own.
module tb_knap_parallel_ga;
  localparam int NPIPE = 2, S = 64, FW = 16, VW = 8, IW = 6, RB = 10;
  localparam int CAP = 60, RUN = 20000;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic clken_rate = 0;
  logic [RB-1:0] din_rate = '0;
  logic item_we = 0, cap_we = 0;
  logic [IW-1:0] item_idx;
  logic [VW-1:0] item_value, item_volume;
  logic [VW+IW-1:0] cap_in;
  logic [FW-1:0] dout_best_fitness;
  logic [15:0] dout_evaluate;
  logic init_done;
  logic [NPIPE-1:0] evt_eval, evt_accept, evt_migrate;

  knap_parallel_ga dut (.*);

  int checks = 0, failures = 0;
  int val[S], vol[S];
  int opt = 0, best = 0, evals = 0, migr[NPIPE], accepts = 0;
  logic running = 0;

  function automatic int ref_fit(logic [S-1:0] g);
    int sv = 0, sw = 0;
    for (int i = 0; i < S; i++) if (g[i]) begin sv += val[i]; sw += vol[i]; end
    return (sw > CAP) ? 0 : sv;
  endfunction

  for (genvar p = 0; p < NPIPE; p++) begin : g_mon
    always @(negedge clk) begin
      if (running) begin
        checks++;
        if (!dut.g_pipe[p].u_pipe.ev_strobe) begin failures++; $display("pipe %0d idle", p); end
        else if (int'(dut.g_pipe[p].u_pipe.ev_cfit) != ref_fit(dut.g_pipe[p].u_pipe.ev_gene)) begin
          failures++; $display("pipe %0d wrong fitness", p);
        end
      end
    end
  end

  always @(negedge clk) begin
    if (!reset) begin
      for (int p = 0; p < NPIPE; p++) begin
        if (evt_eval[p]) evals++;
        if (evt_migrate[p]) migr[p]++;
        if (evt_accept[p]) accepts++;
      end
      if (dut.g_pipe[0].u_pipe.ev_strobe && int'(dut.g_pipe[0].u_pipe.ev_cfit) > best)
        best = int'(dut.g_pipe[0].u_pipe.ev_cfit);
      if (dut.g_pipe[1].u_pipe.ev_strobe && int'(dut.g_pipe[1].u_pipe.ev_cfit) > best)
        best = int'(dut.g_pipe[1].u_pipe.ev_cfit);
    end
  end

  initial begin
    int dp[CAP + 1];
    foreach (migr[p]) migr[p] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int i = 0; i < S; i++) begin
      val[i] = $urandom_range(10, 120); vol[i] = $urandom_range(1, 8);
      item_we = 1; item_idx = IW'(i); item_value = VW'(val[i]); item_volume = VW'(vol[i]);
      @(negedge clk);
    end
    item_we = 0; cap_we = 1; cap_in = (VW+IW)'(CAP);
    clken_rate = 1; din_rate = RB'(12);
    @(negedge clk);
    cap_we = 0; clken_rate = 0;
    foreach (dp[c]) dp[c] = 0;
    for (int i = 0; i < S; i++)
      for (int c = CAP; c >= vol[i]; c--) if (dp[c - vol[i]] + val[i] > dp[c]) dp[c] = dp[c - vol[i]] + val[i];
    opt = dp[CAP];
    while (!init_done) @(negedge clk);
    repeat (12) @(negedge clk);
    running = 1;
    repeat (RUN) @(negedge clk);
    running = 0;
    repeat (2) @(negedge clk);
    $display("optimum %0d best %0d evals %0d migrations %0d/%0d accepts %0d", opt,
             dout_best_fitness, evals, migr[0], migr[1], accepts);
    checks++;
    if (dout_evaluate != 16'(evals)) begin failures++; $display("evaluate %0d exp %0d", dout_evaluate, evals); end
    checks++;
    if (int'(dout_best_fitness) != best || best > opt || best * 100 < opt * 95) begin
      failures++; $display("best wrong or not converged");
    end
    checks++;
    if (migr[0] != 0 || migr[1] == 0) begin failures++; $display("migration pattern wrong"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN + 3000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
