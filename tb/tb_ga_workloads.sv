// tb_ga_workloads: the problem sizes and pipeline counts other than the
// default ones, run on the parallel GA modules rebuilt by parameter.
//  * Knapsack with 16 items on 1 pipeline and 128 items on 3 pipelines.
//    Random items (value 10..120, volume 1..8), capacity equal to the item
//    count; the optimum is found here by dynamic programming. Every pipeline
//    must evaluate one chromosome per clock, each fitness must equal the
//    value recomputed here, and the best fitness must reach 90% of the
//    optimum without ever exceeding it.
//  * TSP with 76 cities on 2 pipelines and 101 cities on 1 pipeline, 7-bit
//    city labels, distance tables of 2^13 and 2^14 words, and two PMX
//    crossover copies per pipeline. Cities on a random 60x60 grid, rounded
//    Euclidean distances. Every evaluated tour must be a permutation with the
//    recomputed closed length; each pipeline must finish an evaluation at
//    least every N+4 clocks on average (a single crossover copy needs about
//    1.4*N); the best tour must fall below 85% of the best early tour after TEVALS
//    evaluations per pipeline.
// Each instance loads its own problem data (a TSP instance is held in reset
// until its distance table is complete); the four run concurrently.
// The sizes are those the document reports results for; the problem data is
// generated here.
module tb_ga_workloads;
  localparam int FW = 16, VW = 8, DW = 8, RB = 10;
  localparam int KRUN = 20000, TEVALS = 1500;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, finished = 0;

  // ---------------- Knapsack sizes ----------------
  for (genvar w = 0; w < 2; w++) begin : g_knap
    localparam int S     = (w == 0) ? 16 : 128;
    localparam int NPIPE = (w == 0) ? 1 : 3;
    localparam int IW    = $clog2(S);
    localparam int CAP   = S;

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

    knap_parallel_ga #(.NPIPE(NPIPE), .S(S)) dut (.*);

    int val[S], vol[S];
    int opt = 0, best = 0, idle = 0, wrong = 0, evals = 0;
    logic running = 0;

    function automatic int ref_fit(logic [S-1:0] g);
      int sv, sw;
      sv = 0; sw = 0;
      for (int i = 0; i < S; i++) if (g[i]) begin sv += val[i]; sw += vol[i]; end
      return (sw > CAP) ? 0 : sv;
    endfunction

    for (genvar p = 0; p < NPIPE; p++) begin : g_mon
      always @(negedge clk) begin
        if (running) begin
          if (!dut.g_pipe[p].u_pipe.ev_strobe) idle++;
          else begin
            evals++;
            if (int'(dut.g_pipe[p].u_pipe.ev_cfit) != ref_fit(dut.g_pipe[p].u_pipe.ev_gene)) wrong++;
            if (int'(dut.g_pipe[p].u_pipe.ev_cfit) > best) best = int'(dut.g_pipe[p].u_pipe.ev_cfit);
          end
        end
      end
    end

    initial begin
      int dp[CAP + 1];
      @(negedge clk);
      while (reset) @(negedge clk);
      for (int i = 0; i < S; i++) begin
        val[i] = $urandom_range(10, 120); vol[i] = $urandom_range(1, 8);
        item_we = 1; item_idx = IW'(i); item_value = VW'(val[i]); item_volume = VW'(vol[i]);
        @(negedge clk);
      end
      item_we = 0; cap_we = 1; cap_in = (VW+IW)'(CAP);
      clken_rate = 1; din_rate = RB'(1024 / S);
      @(negedge clk);
      cap_we = 0; clken_rate = 0;
      foreach (dp[c]) dp[c] = 0;
      for (int i = 0; i < S; i++)
        for (int c = CAP; c >= vol[i]; c--) if (dp[c - vol[i]] + val[i] > dp[c]) dp[c] = dp[c - vol[i]] + val[i];
      opt = dp[CAP];
      while (!init_done) @(negedge clk);
      repeat (12) @(negedge clk);
      running = 1;
      repeat (KRUN) @(negedge clk);
      running = 0;
      repeat (2) @(negedge clk);
      $display("knapsack %0d items, %0d pipelines: optimum %0d best %0d, %0d evaluations in %0d clocks",
               S, NPIPE, opt, dout_best_fitness, evals, KRUN);
      checks += 3;
      if (idle != 0 || evals != KRUN * NPIPE) begin failures++; $display("  %0d idle pipeline clocks", idle); end
      if (wrong != 0) begin failures++; $display("  %0d wrong fitness values", wrong); end
      if (int'(dout_best_fitness) != best || best > opt || best * 10 < opt * 9) begin
        failures++; $display("  best wrong or not converged");
      end
      finished++;
    end
  end

  // ---------------- TSP sizes, duplicated crossover ----------------
  for (genvar w = 0; w < 2; w++) begin : g_tsp
    localparam int N     = (w == 0) ? 76 : 101;
    localparam int NPIPE = (w == 0) ? 2 : 1;
    localparam int GB    = 7;
    localparam int TAW   = (w == 0) ? 13 : 14;

    logic reset = 1;  // this instance leaves reset once its table is loaded
    logic clken_rate = 0;
    logic [RB-1:0] din_rate = '0;
    logic tbl_we = 0;
    logic [TAW-1:0] tbl_addr;
    logic [DW-1:0] tbl_data;
    logic [FW-1:0] dout_best_fitness;
    logic [15:0] dout_evaluate;
    logic init_done;
    logic [NPIPE-1:0] evt_eval, evt_accept, evt_migrate, evt_mutate, evt_xo_stall;

    tsp_parallel_ga #(.NPIPE(NPIPE), .N(N), .GB(GB), .TAW(TAW), .NXO(2)) dut (.*);

    int d[N][N];
    int evals = 0, bad = 0, best = 65535, early_best = 65535, t_first = 0, t_last = 0, migr = 0;

    always @(negedge clk) if (!reset) migr += $countones(evt_migrate);

    for (genvar p = 0; p < NPIPE; p++) begin : g_mon
      int tour[N];
      int widx = 0;
      always @(negedge clk) begin
        if (!reset && dut.g_pipe[p].u_pipe.ev_strobe) begin
          tour[widx] = int'(dut.g_pipe[p].u_pipe.ev_gene);
          widx++;
          if (dut.g_pipe[p].u_pipe.ev_last) begin
            int len;
            bit [N-1:0] seen;
            len = 0; seen = '0;
            for (int i = 0; i < N; i++) begin
              seen[tour[i]] = 1'b1;
              len += d[tour[i]][tour[(i + 1) % N]];
            end
            if (~seen != '0 || widx != N || int'(dut.g_pipe[p].u_pipe.ev_cfit) != len) bad++;
            if (len < best) best = len;
            if (evals < 20 * NPIPE && len < early_best) early_best = len;
            if (evals == 20 * NPIPE) t_first = int'($time);
            evals++;
            t_last = int'($time);
            widx = 0;
          end
        end
      end
    end

    initial begin
      int x[N], y[N];
      int e0, per;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin x[i] = $urandom_range(0, 60); y[i] = $urandom_range(0, 60); end
      for (int a = 0; a < N; a++)
        for (int b = 0; b < N; b++) begin
          real dx, dy;
          dx = real'(x[a] - x[b]); dy = real'(y[a] - y[b]);
          d[a][b] = int'($sqrt(dx * dx + dy * dy));
          tbl_we = 1; tbl_addr = TAW'(a * N + b); tbl_data = DW'(d[a][b]);
          @(negedge clk);
        end
      tbl_we = 0;
      reset = 0;
      clken_rate = 1; din_rate = RB'(300);
      @(negedge clk);
      clken_rate = 0;
      while (evals < TEVALS * NPIPE) @(negedge clk);
      repeat (3) @(negedge clk);
      e0  = evals - 20 * NPIPE - 1;
      per = (t_last - t_first) / 10 * NPIPE / e0;
      $display("tsp %0d cities, %0d pipelines: early best %0d best %0d, %0d clocks per evaluation and pipeline",
               N, NPIPE, early_best, dout_best_fitness, per);
      checks += 4;
      if (bad != 0) begin failures++; $display("  %0d bad tours", bad); end
      if (per > N + 4) begin failures++; $display("  too slow"); end
      if (int'(dout_best_fitness) != best || best * 100 > early_best * 85) begin
        failures++; $display("  best %0d exp %0d, no progress", dout_best_fitness, best);
      end
      if ((NPIPE > 1) != (migr > 0)) begin failures++; $display("  %0d migrations", migr); end
      finished++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait (finished == 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
