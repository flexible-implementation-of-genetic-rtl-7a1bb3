// tb_ga_management: checks the population store (W=8, BEATS=4, POP=8,
// rotated-tour initial fill, maximising).
//  1. After the fill, with ready held high, chromosomes stream out back to
//     back (one word per clock, first/last flags), each equal to the stored
//     individual at the address it carries; over the run every address is
//     chosen (random selection).
//  2. Offspring are returned; one that is better than the given parent
//     fitness must replace the parent's chromosome and fitness, one that is
//     not must leave memory unchanged. Read-back checks both; best_fit must
//     track the best offspring fitness returned.
//  3. While ready is low, nothing new may start.
// The replacement rule checked follows the document; the stimulus and the
// reference model are this testbench's own.
module tb_ga_management;
  localparam int W = 8, BEATS = 4, POP = 8, AW = 3, FW = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ready_i = 0;
  logic o_strobe, o_first, o_last;
  logic [W-1:0] o_gene;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_fit;
  logic i_strobe = 0, i_first = 0, i_last = 0;
  logic [W-1:0] i_gene;
  logic [AW-1:0] i_addr;
  logic [FW-1:0] i_pfit, i_cfit;
  logic init_done, res_pulse, acc_pulse;
  logic [FW-1:0] best_fit;

  ga_management #(.W(W), .BEATS(BEATS), .POP(POP), .AW(AW), .FW(FW), .MINIMIZE(1'b0),
                  .INIT_MODE(1)) dut (.*);

  int checks = 0, failures = 0;
  int model[POP][BEATS];
  int fmodel[POP];
  int used[POP];
  int widx = 0, accepts = 0;
  logic [AW-1:0] cur_a;
  int best = 0;

  // monitor: every word read must match the model
  always @(negedge clk) begin
    if (!rst && o_strobe) begin
      checks++;
      if (o_first) begin cur_a = o_addr; widx = 0; used[o_addr]++; end
      if (o_addr !== cur_a || int'(o_gene) != model[cur_a][widx] || int'(o_fit) != fmodel[cur_a] ||
          o_first !== (widx == 0) || o_last !== (widx == BEATS - 1)) begin
        failures++;
        $display("read mismatch addr %0d word %0d got %0d exp %0d fit %0d/%0d", cur_a, widx,
                 o_gene, model[cur_a][widx], o_fit, fmodel[cur_a]);
      end
      widx++;
    end
    if (!rst && acc_pulse) accepts++;
  end

  task automatic read_phase(input int clocks);
    int gaps = 0;
    ready_i = 1;
    repeat (clocks) begin
      @(negedge clk);
      if (!o_strobe) gaps++;
    end
    ready_i = 0;
    repeat (BEATS + 2) @(negedge clk);
    checks++;
    if (gaps > 1) begin failures++; $display("%0d idle clocks while ready", gaps); end
  endtask

  task automatic give(input int a, input int pf, input int cf);
    int g[BEATS];
    foreach (g[k]) g[k] = $urandom_range(0, 255);
    for (int k = 0; k < BEATS; k++) begin
      i_strobe = 1; i_first = (k == 0); i_last = (k == BEATS - 1); i_gene = W'(g[k]);
      i_addr = AW'(a); i_pfit = FW'(pf); i_cfit = FW'(cf);
      @(negedge clk);
    end
    i_strobe = 0; i_first = 0; i_last = 0;
    if (cf > pf) begin
      model[a] = g; fmodel[a] = cf;
    end
    if (cf > best) best = cf;
  endtask

  initial begin
    for (int j = 0; j < POP; j++) begin
      fmodel[j] = 0; used[j] = 0;
      for (int k = 0; k < BEATS; k++) model[j][k] = (j + k) % BEATS;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    while (!init_done) @(negedge clk);
    // nothing may start without ready
    repeat (10) begin
      @(negedge clk);
      checks++;
      if (o_strobe) begin failures++; $display("started without ready"); end
    end
    read_phase(200);
    for (int r = 0; r < 30; r++) begin
      int a, pf, cf;
      a = $urandom_range(0, POP - 1);
      pf = $urandom_range(0, 100);
      cf = $urandom_range(0, 100);
      give(a, pf, cf);
      if (r % 3 == 2) give($urandom_range(0, POP - 1), 50, 50);   // tie: rejected
      repeat (BEATS + 1) @(negedge clk);
    end
    // back-to-back returns, all better
    for (int r = 0; r < 8; r++) give(r, 0, 200 + r);
    repeat (BEATS + 2) @(negedge clk);
    read_phase(400);
    checks++;
    if (int'(best_fit) != best) begin failures++; $display("best %0d exp %0d", best_fit, best); end
    foreach (used[j]) begin
      checks++;
      if (used[j] == 0) begin failures++; $display("address %0d never chosen", j); end
    end
    checks++;
    if (accepts == 0) begin failures++; $display("no replacement"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
