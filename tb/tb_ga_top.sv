// tb_ga_top: end-to-end run of both GA circuits at their default sizes
// (Knapsack: 64 items, 2 pipelines; TSP: 51 cities, 4 pipelines).
// Loads a knapsack instance whose optimum is found here by dynamic
// programming and a 51-city instance with rounded Euclidean distances, sets
// the mutation rate, and runs both circuits for RUN clocks. Checks:
//  * knapsack: both pipelines evaluate one individual per clock, the
//    evaluation count matches, the best fitness never exceeds the optimum
//    and reaches 97% of it;
//  * TSP: the best tour shortens well below the early best, the evaluation
//    count matches;
//  * every mechanism occurs at least once: knapsack replacement, migration,
//    lethal individual; TSP replacement, migration, mutation, PMX stall;
//    and the mutation-rate load reaches every pipeline.
// Sizes are the document's defaults; the problem instances are random ones
// generated here, not the document's benchmark data.
module tb_ga_top;
  localparam int KS = 64, KP = 2, TN = 51, TP = 4, CAP = 60, RUN = 150000;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic clken_rate = 0;
  logic [9:0] din_rate = '0;
  logic knap_item_we = 0, knap_cap_we = 0;
  logic [5:0] knap_item_idx;
  logic [7:0] knap_item_value, knap_item_volume;
  logic [13:0] knap_cap_in;
  logic [15:0] knap_best_fitness, knap_evaluate;
  logic knap_init_done;
  logic [KP-1:0] knap_evt_eval, knap_evt_accept, knap_evt_migrate;
  logic tsp_tbl_we = 0;
  logic [11:0] tsp_tbl_addr;
  logic [7:0] tsp_tbl_data;
  logic [15:0] tsp_best_fitness, tsp_evaluate;
  logic tsp_init_done;
  logic [TP-1:0] tsp_evt_eval, tsp_evt_accept, tsp_evt_migrate, tsp_evt_mutate, tsp_evt_xo_stall;

  ga_top dut (.*);

  int checks = 0, failures = 0;
  int val[KS], vol[KS];
  int opt = 0;
  int k_eval = 0, k_acc = 0, k_migr = 0, k_lethal = 0, k_idle = 0;
  int t_eval = 0, t_acc = 0, t_migr = 0, t_mut = 0, t_stall = 0, t_early = 65535;
  logic running = 0;

  always @(negedge clk) begin
    if (!reset) begin
      for (int p = 0; p < KP; p++) begin
        if (knap_evt_eval[p]) k_eval++;
        if (knap_evt_accept[p]) k_acc++;
        if (knap_evt_migrate[p]) k_migr++;
      end
      for (int p = 0; p < TP; p++) begin
        if (tsp_evt_eval[p]) t_eval++;
        if (tsp_evt_accept[p]) t_acc++;
        if (tsp_evt_migrate[p]) t_migr++;
        if (tsp_evt_mutate[p]) t_mut++;
        if (tsp_evt_xo_stall[p]) t_stall++;
      end
      if (t_eval > 0 && t_eval <= 200 && tsp_best_fitness < t_early) t_early = int'(tsp_best_fitness);
      if (dut.u_knap.g_pipe[0].u_pipe.ev_strobe && dut.u_knap.g_pipe[0].u_pipe.ev_cfit == 0) k_lethal++;
      if (dut.u_knap.g_pipe[1].u_pipe.ev_strobe && dut.u_knap.g_pipe[1].u_pipe.ev_cfit == 0) k_lethal++;
      if (running && knap_evt_eval != '1) k_idle++;
      if (running) begin
        checks++;
        if (int'(knap_best_fitness) > opt) begin failures++; $display("knapsack best above optimum"); end
      end
    end
  end

  initial begin
    int dp[CAP + 1];
    int x[TN], y[TN];
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int i = 0; i < KS; i++) begin
      val[i] = $urandom_range(10, 120); vol[i] = $urandom_range(1, 8);
      knap_item_we = 1; knap_item_idx = 6'(i); knap_item_value = 8'(val[i]); knap_item_volume = 8'(vol[i]);
      @(negedge clk);
    end
    knap_item_we = 0; knap_cap_we = 1; knap_cap_in = 14'(CAP);
    @(negedge clk);
    knap_cap_we = 0;
    foreach (dp[c]) dp[c] = 0;
    for (int i = 0; i < KS; i++)
      for (int c = CAP; c >= vol[i]; c--) if (dp[c - vol[i]] + val[i] > dp[c]) dp[c] = dp[c - vol[i]] + val[i];
    opt = dp[CAP];
    for (int i = 0; i < TN; i++) begin x[i] = $urandom_range(0, 60); y[i] = $urandom_range(0, 60); end
    for (int a = 0; a < TN; a++)
      for (int b = 0; b < TN; b++) begin
        real dx, dy;
        dx = real'(x[a] - x[b]); dy = real'(y[a] - y[b]);
        tsp_tbl_we = 1; tsp_tbl_addr = 12'(a * TN + b); tsp_tbl_data = 8'(int'($sqrt(dx * dx + dy * dy)));
        @(negedge clk);
      end
    tsp_tbl_we = 0;
    clken_rate = 1; din_rate = 10'd12;
    @(negedge clk);
    clken_rate = 0;
    checks++;
    if (dut.u_knap.g_pipe[1].u_pipe.rate != 10'd12 || dut.u_tsp.g_pipe[3].u_pipe.rate != 10'd12) begin
      failures++; $display("rate load did not reach the pipelines");
    end
    // knapsack evaluates per gene at 12/1024; TSP per tour, so raise it after a while
    while (!knap_init_done || !tsp_init_done) @(negedge clk);
    repeat (12) @(negedge clk);
    k_lethal = 0;
    running = 1;
    repeat (RUN / 2) @(negedge clk);
    running = 0;
    @(negedge clk);
    clken_rate = 1; din_rate = 10'd300;
    @(negedge clk);
    clken_rate = 0;
    repeat (RUN / 2) @(negedge clk);
    $display("knapsack: optimum %0d best %0d evals %0d acc %0d migr %0d lethal %0d",
             opt, knap_best_fitness, k_eval, k_acc, k_migr, k_lethal);
    $display("tsp: early best %0d best %0d evals %0d acc %0d migr %0d mut %0d stall clocks %0d",
             t_early, tsp_best_fitness, t_eval, t_acc, t_migr, t_mut, t_stall);
    checks++;
    if (k_idle != 0) begin failures++; $display("knapsack pipelines idled %0d clocks", k_idle); end
    checks++;
    if (knap_evaluate != 16'(k_eval) || tsp_evaluate != 16'(t_eval)) begin
      failures++; $display("evaluation counts");
    end
    checks++;
    if (int'(knap_best_fitness) * 100 < opt * 97) begin failures++; $display("knapsack not converged"); end
    checks++;
    if (int'(tsp_best_fitness) * 10 > t_early * 8) begin failures++; $display("tsp no progress"); end
    checks++;
    if (k_acc == 0) begin failures++; $display("mechanism missing: knapsack replacement"); end
    checks++;
    if (k_migr == 0) begin failures++; $display("mechanism missing: knapsack migration"); end
    checks++;
    if (k_lethal == 0) begin failures++; $display("mechanism missing: lethal individual"); end
    checks++;
    if (t_acc == 0) begin failures++; $display("mechanism missing: tsp replacement"); end
    checks++;
    if (t_migr == 0) begin failures++; $display("mechanism missing: tsp migration"); end
    checks++;
    if (t_mut == 0) begin failures++; $display("mechanism missing: tsp mutation"); end
    checks++;
    if (t_stall == 0) begin failures++; $display("mechanism missing: PMX stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN + 20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
