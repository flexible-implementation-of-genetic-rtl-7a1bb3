// tb_tsp_xo_bank: checks the duplicated PMX crossover (two copies).
// A producer sends random 51-city tours back to back whenever ready_o is
// high. The testbench keeps its own record of which copy each tour goes to
// (the lowest-numbered copy whose ready is high), so each copy's parent1 and
// parent2 are known. When a copy enters its PMX phase the loci it drew are
// applied by the PMX rule to those two tours; that offspring is expected on
// the merged output when the same copy is loaded next. Every output tour
// must equal the expected one, be a permutation and carry the worse parent's
// address and fitness. Rate: with two copies a new tour must be accepted
// on average within N+2 clocks, against about 1.4*N for a single copy.
// Duplication follows the document; the dispatch rule checked is this
// design's own.
module tb_tsp_xo_bank;
  localparam int N = 51, GB = 6, AW = 6, FW = 16, NXO = 2, TOURS = 200;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic ready_o;
  logic i_strobe = 0, i_first = 0, i_last = 0;
  logic [GB-1:0] i_gene;
  logic [AW-1:0] i_addr;
  logic [FW-1:0] i_fit;
  logic o_strobe, o_first, o_last, xo_busy;
  logic [GB-1:0] o_gene;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_fit;

  tsp_xo_bank #(.N(N), .GB(GB), .AW(AW), .FW(FW), .NXO(NXO), .MINIMIZE(1'b1)) dut (.*);

  typedef struct { int g[N]; int a; int f; } tour_t;
  tour_t hist[NXO][2];
  int    nsent[NXO];
  tour_t cq[NXO][$];
  tour_t eq[$];
  int checks = 0, failures = 0, children = 0, stall = 0, widx = 0;
  int got[N];
  logic [NXO-1:0] busy_d = '0;

  // reference PMX per copy, evaluated when that copy starts its PMX phase
  always @(negedge clk) begin
    for (int k = 0; k < NXO; k++) begin
      if (dut.c_busy[k] && !busy_d[k]) begin
        tour_t c, p1, p2;
        int n1, n2;
        n1 = int'(dut.c_n1[k]);
        n2 = int'(dut.c_n2[k]);
        p1 = hist[k][(nsent[k] - 2) % 2];
        p2 = hist[k][(nsent[k] - 1) % 2];
        c.g = p1.g;
        for (int i = n1; i < n2; i++) begin
          int v;
          v = p2.g[i];
          for (int m = 0; m < N; m++) if (c.g[m] == v) begin c.g[m] = c.g[i]; c.g[i] = v; break; end
        end
        if (p1.f < p2.f) begin c.a = p2.a; c.f = p2.f; end
        else begin c.a = p1.a; c.f = p1.f; end
        cq[k].push_back(c);
      end
    end
    busy_d <= dut.c_busy;
    if (xo_busy) stall++;
    if (!rst && o_strobe) begin
      got[widx] = int'(o_gene);
      checks++;
      if (o_first !== (widx == 0) || o_last !== (widx == N - 1)) begin failures++; $display("flags"); end
      widx++;
      if (o_last) begin
        tour_t c;
        bit [N-1:0] seen;
        seen = '0;
        widx = 0; children++;
        checks++;
        if (eq.size() == 0) begin failures++; $display("child without operation"); end
        else begin
          c = eq.pop_front();
          if (got != c.g) begin failures++; $display("child differs from PMX reference"); end
          if (int'(o_addr) != c.a || int'(o_fit) != c.f) begin failures++; $display("worse parent wrong"); end
        end
        foreach (got[i]) seen[got[i]] = 1'b1;
        checks++;
        if (~seen != '0) begin failures++; $display("child is not a permutation"); end
      end
    end
  end

  initial begin
    tour_t t;
    int p[N];
    int k, t0, t1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    t0 = 0; t1 = 0;
    for (int n = 0; n <= TOURS; n++) begin
      while (!ready_o) @(negedge clk);
      if (n == 2) t0 = int'($time);
      if (n == TOURS) t1 = int'($time);
      k = -1;
      for (int c = NXO - 1; c >= 0; c--) if (dut.c_ready[c]) k = c;
      for (int i = 0; i < N; i++) p[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(0, i); tmp = p[i]; p[i] = p[j]; p[j] = tmp;
      end
      t.g = p; t.a = $urandom_range(0, 63); t.f = $urandom_range(0, 40);
      if (cq[k].size() != 0) eq.push_back(cq[k].pop_front());
      hist[k][nsent[k] % 2] = t;
      nsent[k]++;
      for (int i = 0; i < N; i++) begin
        i_strobe = 1; i_first = (i == 0); i_last = (i == N - 1); i_gene = GB'(p[i]);
        i_addr = AW'(t.a); i_fit = FW'(t.f);
        @(negedge clk);
      end
      i_strobe = 0; i_first = 0; i_last = 0;
    end
    repeat (3) @(negedge clk);
    $display("%0d children, %0d clocks for %0d tours, %0d stall clocks",
             children, (t1 - t0) / 10, TOURS - 2, stall);
    checks++;
    if (children != TOURS + 1 - NXO - NXO) begin failures++; $display("children %0d", children); end
    checks++;
    if ((t1 - t0) / 10 > (TOURS - 2) * (N + 2)) begin failures++; $display("too slow"); end
    checks++;
    if (nsent[0] < TOURS / 4 || nsent[1] < TOURS / 4) begin failures++; $display("copies unevenly used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
