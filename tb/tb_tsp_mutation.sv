// tb_tsp_mutation: checks the TSP label-exchange mutation.
// Streams random tours. With rate 0 every tour must pass unchanged. With
// rate 1023 almost every tour must differ from its input in exactly two
// loci whose cities are exchanged (or not at all when the two drawn cities
// coincide), so the output is still a permutation; mut_pulse must count the
// mutated tours. With rate 256 about a quarter of the tours are mutated.
// Each word leaves one clock after it entered.
// The label exchange follows the document; the per-tour rate r/1024 is this
// design's own.
module tb_tsp_mutation;
  localparam int N = 51, GB = 6, AW = 6, FW = 16, RB = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic rate_we = 0;
  logic [RB-1:0] rate_in, rate;
  logic i_strobe = 0, i_first = 0, i_last = 0;
  logic [GB-1:0] i_gene;
  logic [AW-1:0] i_addr;
  logic [FW-1:0] i_fit;
  logic o_strobe, o_first, o_last, mut_pulse;
  logic [GB-1:0] o_gene;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_fit;

  tsp_mutation #(.N(N), .GB(GB), .AW(AW), .FW(FW), .RB(RB)) dut (.*);

  int checks = 0, failures = 0, pulses = 0;
  always @(posedge clk) if (!rst && mut_pulse) pulses++;

  task automatic run(input int r, input int tours, input int lo, input int hi);
    int p[N], o[N];
    int changed_tours = 0;
    pulses = 0;
    @(negedge clk);
    rate_we = 1; rate_in = RB'(r);
    @(negedge clk);
    rate_we = 0;
    for (int t = 0; t < tours; t++) begin
      int diffs = 0, d0 = -1, d1 = -1;
      for (int i = 0; i < N; i++) p[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(0, i); tmp = p[i]; p[i] = p[j]; p[j] = tmp;
      end
      for (int i = 0; i < N; i++) begin
        i_strobe = 1; i_first = (i == 0); i_last = (i == N - 1); i_gene = GB'(p[i]);
        i_addr = AW'(t); i_fit = FW'(t);
        @(negedge clk);
        checks++;
        if (!o_strobe || o_first !== (i == 0) || o_last !== (i == N - 1) ||
            o_addr !== AW'(t) || o_fit !== FW'(t)) begin
          failures++; $display("timing/side band");
        end
        o[i] = int'(o_gene);
      end
      i_strobe = 0;
      for (int i = 0; i < N; i++) if (o[i] != p[i]) begin
        diffs++; if (d0 < 0) d0 = i; else d1 = i;
      end
      checks++;
      if (!(diffs == 0 || (diffs == 2 && o[d0] == p[d1] && o[d1] == p[d0]))) begin
        failures++; $display("not a swap: %0d loci differ", diffs);
      end
      if (diffs != 0) changed_tours++;
    end
    @(negedge clk);
    checks++;
    if (changed_tours < lo || changed_tours > hi || pulses < changed_tours) begin
      failures++; $display("rate %0d: %0d changed, %0d pulses", r, changed_tours, pulses);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(0, 20, 0, 0);
    run(1023, 100, 90, 100);
    run(256, 200, 30, 75);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
