// tb_tsp_pipeline: runs one TSP GA pipeline (51 cities, POP=64).
// 51 cities on a random 60x60 grid; the table holds rounded Euclidean
// distances. Every tour leaving the evaluation module must be a permutation
// and its fitness must equal the closed tour length recomputed here;
// replacements must match the offspring that beat their parent. The PMX
// stall (crossover phase), mutation and replacement must all occur, an
// offspring must be produced on average at least every 2N clocks, and the
// best tour must end well below the best tour evaluated early in the run.
// The module chain follows the document; the instance and thresholds are
// this testbench's own.
module tb_tsp_pipeline;
  localparam int N = 51, GB = 6, FW = 16, DW = 8, TAW = 12, RB = 10;
  localparam int EVALS = 5000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clken_rate = 0;
  logic [RB-1:0] din_rate = '0;
  logic tbl_we = 0;
  logic [TAW-1:0] tbl_addr;
  logic [DW-1:0] tbl_data;
  logic dout_other_first_gene, dout_other_strobe;
  logic [GB-1:0] dout_other_gene;
  logic [FW-1:0] best_fit;
  logic init_done, res_pulse, acc_pulse, migr_pulse, mut_pulse, xo_busy;

  tsp_pipeline dut (
    .clk, .rst, .clken_rate, .din_rate, .tbl_we, .tbl_addr, .tbl_data,
    .din_other_first_gene(1'b0), .din_other_strobe(1'b0), .din_other_gene('0),
    .dout_other_first_gene, .dout_other_strobe, .dout_other_gene,
    .best_fit, .init_done, .res_pulse, .acc_pulse, .migr_pulse, .mut_pulse, .xo_busy
  );

  int checks = 0, failures = 0;
  int d[N][N];
  int tour[N];
  int widx = 0, evals = 0, exp_acc = 0, acc = 0, muts = 0, stall = 0, early_best = 65535;
  int cycles = 0;
  logic running = 0, running_d = 0;
  // acc_pulse is registered: it follows its evaluation by one clock
  always @(negedge clk) begin
    running_d <= running;
    if (running_d && acc_pulse) acc++;
  end

  always @(negedge clk) begin
    if (running) begin
      cycles++;
      if (dut.ev_strobe) begin
        tour[widx] = int'(dut.ev_gene);
        widx++;
        if (dut.ev_last) begin
          int len;
          bit [N-1:0] seen;
          len = 0; seen = '0;
          for (int i = 0; i < N; i++) begin
            seen[tour[i]] = 1'b1;
            len += d[tour[i]][tour[(i + 1) % N]];
          end
          evals++;
          checks += 2;
          if (~seen != '0 || widx != N) begin failures++; $display("not a tour"); end
          if (int'(dut.ev_cfit) != len) begin failures++; $display("len %0d exp %0d", dut.ev_cfit, len); end
          if (dut.ev_cfit < dut.ev_pfit) exp_acc++;
          if (evals <= 64 && len < early_best) early_best = len;
          widx = 0;
        end
      end
      if (mut_pulse) muts++;
      if (xo_busy) stall++;
    end
  end

  initial begin
    int x[N], y[N];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
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
    while (!init_done) @(negedge clk);
    running = 1;
    while (evals < EVALS) @(negedge clk);
    running = 0;
    repeat (2) @(negedge clk);
    $display("early best %0d final best %0d, %0d evals in %0d clocks, stall %0d, muts %0d, acc %0d",
             early_best, best_fit, evals, cycles, stall, muts, acc);
    checks++;
    if (acc != exp_acc || acc == 0) begin failures++; $display("accepted %0d exp %0d", acc, exp_acc); end
    checks++;
    if (muts == 0 || stall == 0) begin failures++; $display("mechanism missing"); end
    checks++;
    if (cycles > 2 * N * (evals + 2)) begin failures++; $display("too slow"); end
    checks++;
    if (int'(best_fit) * 10 > early_best * 8) begin failures++; $display("no progress"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * N * EVALS + 20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
