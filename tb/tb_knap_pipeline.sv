// tb_knap_pipeline: runs one Knapsack GA pipeline (S=64, POP=64).
// Loads a 64-item instance (volumes 1..4, capacity 40) whose optimum is found
// here by dynamic programming. Every evaluation leaving the evaluation module
// is recomputed here from its chromosome; replacements counted by the
// management module must match the offspring that beat their parent. After
// the initial fill one evaluation must finish every clock. The best fitness
// must never exceed the optimum and must reach 95% of it.
// The module chain follows the document; the instance and thresholds are
// this testbench's own.
module tb_knap_pipeline;
  localparam int S = 64, POP = 64, FW = 16, VW = 8, IW = 6, RB = 10;
  localparam int CAP = 40, RUN = 20000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic clken_rate = 0;
  logic [RB-1:0] din_rate = '0;
  logic item_we = 0, cap_we = 0;
  logic [IW-1:0] item_idx;
  logic [VW-1:0] item_value, item_volume;
  logic [VW+IW-1:0] cap_in;
  logic dout_other_strobe;
  logic [S-1:0] dout_other_gene;
  logic [FW-1:0] best_fit;
  logic init_done, res_pulse, acc_pulse, migr_pulse;

  knap_pipeline dut (
    .clk, .rst, .clken_rate, .din_rate, .item_we, .item_idx, .item_value, .item_volume,
    .cap_we, .cap_in, .din_other_strobe(1'b0), .din_other_gene('0),
    .dout_other_strobe, .dout_other_gene, .best_fit, .init_done, .res_pulse, .acc_pulse,
    .migr_pulse
  );

  int checks = 0, failures = 0;
  int val[S], vol[S];
  int evals = 0, lethal = 0, exp_acc = 0, acc = 0, opt = 0, idle = 0;
  logic running = 0, running_d = 0;
  // acc_pulse is registered: it follows its evaluation by one clock
  always @(negedge clk) begin
    running_d <= running;
    if (running_d && acc_pulse) acc++;
  end

  function automatic int ref_fit(logic [S-1:0] g);
    int sv = 0, sw = 0;
    for (int i = 0; i < S; i++) if (g[i]) begin sv += val[i]; sw += vol[i]; end
    return (sw > CAP) ? 0 : sv;
  endfunction

  always @(negedge clk) begin
    if (running) begin
      if (dut.ev_strobe) begin
        evals++;
        checks++;
        if (int'(dut.ev_cfit) != ref_fit(dut.ev_gene)) begin
          failures++; $display("fitness %0d exp %0d", dut.ev_cfit, ref_fit(dut.ev_gene));
        end
        if (dut.ev_cfit == 0) lethal++;
        if (dut.ev_cfit > dut.ev_pfit) exp_acc++;
      end else idle++;
      checks++;
      if (int'(best_fit) > opt) begin failures++; $display("best %0d above optimum %0d", best_fit, opt); end
    end
  end

  initial begin
    int dp[CAP + 1];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < S; i++) begin
      val[i] = $urandom_range(10, 120); vol[i] = $urandom_range(1, 4);
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
    $display("optimum %0d best %0d evals %0d lethal %0d accepted %0d", opt, best_fit, evals, lethal, acc);
    checks++;
    if (idle != 0 || evals != RUN) begin failures++; $display("%0d idle clocks", idle); end
    checks++;
    if (acc != exp_acc || acc == 0) begin failures++; $display("accepted %0d exp %0d", acc, exp_acc); end
    checks++;
    if (lethal == 0) begin failures++; $display("no lethal individual seen"); end
    checks++;
    if (int'(best_fit) * 100 < opt * 95) begin failures++; $display("did not converge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN + 2000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
