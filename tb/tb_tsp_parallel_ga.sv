// tb_tsp_parallel_ga: runs the parallel TSP GA (4 pipelines, 51 cities).
// Cities on a random 60x60 grid, rounded Euclidean distances. In every
// pipeline each evaluated tour must be a permutation with the fitness
// recomputed here. dout_evaluate must count all evaluations and
// dout_best_fitness must equal the shortest evaluated tour. Migrations must
// occur in pipelines 1..3 and never in pipeline 0; every pipeline must show
// mutation, replacement and the PMX stall; the best tour must end well below
// the best of the early evaluations.
// The island chain follows the document; the instance and thresholds are
// this testbench's own.
module tb_tsp_parallel_ga;
  localparam int NPIPE = 4, N = 51, GB = 6, FW = 16, DW = 8, TAW = 12, RB = 10;
  localparam int EVALS = 8000;
  logic clk = 0, reset = 1;
  always #5 clk = ~clk;

  logic clken_rate = 0;
  logic [RB-1:0] din_rate = '0;
  logic tbl_we = 0;
  logic [TAW-1:0] tbl_addr;
  logic [DW-1:0] tbl_data;
  logic [FW-1:0] dout_best_fitness;
  logic [15:0] dout_evaluate;
  logic init_done;
  logic [NPIPE-1:0] evt_eval, evt_accept, evt_migrate, evt_mutate, evt_xo_stall;

  tsp_parallel_ga dut (.*);

  int checks = 0, failures = 0;
  int d[N][N];
  int evals = 0, best = 65535, early_best = 65535;
  int migr[NPIPE], muts[NPIPE], accs[NPIPE], stalls[NPIPE];
  logic running = 0;

  task automatic check_tour(input int p, input int tour[N], input int widx, input int fit);
    int len;
    bit [N-1:0] seen;
    len = 0; seen = '0;
    for (int i = 0; i < N; i++) begin
      seen[tour[i]] = 1'b1;
      len += d[tour[i]][tour[(i + 1) % N]];
    end
    checks++;
    if (~seen != '0 || widx != N || fit != len) begin
      failures++; $display("pipe %0d: bad tour or fitness %0d exp %0d", p, fit, len);
    end
    if (len < best) best = len;
    if (evals < 200 && len < early_best) early_best = len;
  endtask

  for (genvar p = 0; p < NPIPE; p++) begin : g_mon
    int tour[N];
    int widx = 0;
    always @(negedge clk) begin
      if (!reset && dut.g_pipe[p].u_pipe.ev_strobe) begin
        tour[widx] = int'(dut.g_pipe[p].u_pipe.ev_gene);
        widx++;
        if (dut.g_pipe[p].u_pipe.ev_last) begin
          check_tour(p, tour, widx, int'(dut.g_pipe[p].u_pipe.ev_cfit));
          widx = 0;
        end
      end
    end
  end

  always @(negedge clk) begin
    if (!reset) begin
      for (int p = 0; p < NPIPE; p++) begin
        if (evt_eval[p]) evals++;
        if (evt_migrate[p]) migr[p]++;
        if (evt_mutate[p]) muts[p]++;
        if (evt_accept[p]) accs[p]++;
        if (evt_xo_stall[p]) stalls[p]++;
      end
    end
  end

  initial begin
    int x[N], y[N];
    foreach (migr[p]) begin migr[p] = 0; muts[p] = 0; accs[p] = 0; stalls[p] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
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
    clken_rate = 1; din_rate = RB'(300);
    @(negedge clk);
    clken_rate = 0;
    while (evals < EVALS) @(negedge clk);
    repeat (3) @(negedge clk);
    $display("early best %0d final best %0d (%0d evals); migrations %0d %0d %0d %0d",
             early_best, dout_best_fitness, evals, migr[0], migr[1], migr[2], migr[3]);
    checks++;
    if (dout_evaluate != 16'(evals)) begin failures++; $display("evaluate count"); end
    checks++;
    if (int'(dout_best_fitness) != best || best * 10 > early_best * 8) begin
      failures++; $display("best %0d exp %0d", dout_best_fitness, best);
    end
    for (int p = 0; p < NPIPE; p++) begin
      checks++;
      if ((p == 0) != (migr[p] == 0) || muts[p] == 0 || accs[p] == 0 || stalls[p] == 0) begin
        failures++; $display("pipe %0d mechanisms: migr %0d mut %0d acc %0d stall %0d", p,
                             migr[p], muts[p], accs[p], stalls[p]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * N * EVALS) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
