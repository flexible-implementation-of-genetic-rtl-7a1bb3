// tb_tsp_crossover: checks the PMX crossover against a reference model.
// A producer sends random tours (N=51) whenever ready_o is high, each as N
// consecutive words. For every operation the loci N1 <= N2 drawn by the
// module (xo_n1/xo_n2 when it enters the crossover phase) are applied here to
// the previous and current individual by the PMX rule (copy parent1; for each
// locus i in [N1,N2) exchange, in the copy, the city parent2 has at i with
// the city at i). The offspring streamed out during the next load must equal
// that result, be a permutation, and carry the address and fitness of the
// worse (longer) parent. The crossover phase must last exactly N2-N1+1 clocks.
// The PMX steps follow the document; the ready handshake checked here is
// this design's own.
module tb_tsp_crossover;
  localparam int N = 51, GB = 6, AW = 6, FW = 16;
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
  logic [GB:0] xo_n1, xo_n2;

  tsp_crossover #(.N(N), .GB(GB), .AW(AW), .FW(FW), .MINIMIZE(1'b1)) dut (.*);

  int checks = 0, failures = 0, ops = 0, children = 0, busy_cnt = 0, exp_busy = 0;
  int hist[2][N];
  int hist_a[2], hist_f[2];
  int nsent = 0;

  typedef struct { int g[N]; int a; int f; } child_t;
  child_t cq[$];
  int got[N];
  int widx = 0;
  logic busy_d = 0;

  // reference model, evaluated when the crossover phase starts
  always @(negedge clk) begin
    busy_d <= xo_busy;
    if (xo_busy) busy_cnt++;
    if (xo_busy && !busy_d) begin
      child_t c;
      int n1, n2;
      n1 = int'(xo_n1);
      n2 = int'(xo_n2);
      if (busy_cnt > 1) begin
        checks++;
        if (busy_cnt - 1 != exp_busy) begin failures++; $display("xover clocks %0d exp %0d", busy_cnt - 1, exp_busy); end
      end
      busy_cnt = 1;
      exp_busy = n2 - n1 + 1;
      ops++;
      // parent1 = individual before the newest, parent2 = newest
      c.g = hist[(nsent - 2) % 2];
      for (int i = n1; i < n2; i++) begin
        int v;
        v = hist[(nsent - 1) % 2][i];
        for (int m = 0; m < N; m++) if (c.g[m] == v) begin c.g[m] = c.g[i]; c.g[i] = v; break; end
      end
      if (hist_f[(nsent - 2) % 2] < hist_f[(nsent - 1) % 2]) begin
        c.a = hist_a[(nsent - 1) % 2]; c.f = hist_f[(nsent - 1) % 2];
      end else begin
        c.a = hist_a[(nsent - 2) % 2]; c.f = hist_f[(nsent - 2) % 2];
      end
      cq.push_back(c);
    end
    if (!rst && o_strobe) begin
      got[widx] = int'(o_gene);
      checks++;
      if (o_first !== (widx == 0) || o_last !== (widx == N - 1)) begin failures++; $display("flags"); end
      widx++;
      if (o_last) begin
        child_t c;
        bit [N-1:0] seen;
        seen = '0;
        widx = 0; children++;
        checks++;
        if (cq.size() == 0) begin failures++; $display("child without operation"); end
        else begin
          c = cq.pop_front();
          if (got != c.g) begin failures++; $display("child differs from PMX reference"); end
          if (int'(o_addr) != c.a || int'(o_fit) != c.f) begin failures++; $display("worse parent wrong"); end
        end
        foreach (got[i]) seen[got[i]] = 1'b1;
        checks++;
        if (~seen != '0) begin failures++; $display("child is not a permutation %h", seen); end
      end
    end
  end

  initial begin
    int p[N];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 60; t++) begin
      while (!ready_o) @(negedge clk);
      for (int i = 0; i < N; i++) p[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(0, i); tmp = p[i]; p[i] = p[j]; p[j] = tmp;
      end
      hist[nsent % 2] = p;
      hist_a[nsent % 2] = $urandom_range(0, 63);
      hist_f[nsent % 2] = $urandom_range(0, 40);
      nsent++;
      for (int i = 0; i < N; i++) begin
        i_strobe = 1; i_first = (i == 0); i_last = (i == N - 1); i_gene = GB'(p[i]);
        i_addr = AW'(hist_a[(nsent - 1) % 2]); i_fit = FW'(hist_f[(nsent - 1) % 2]);
        @(negedge clk);
      end
      i_strobe = 0; i_first = 0; i_last = 0;
      if (t % 4 == 3) repeat ($urandom_range(1, 10)) @(negedge clk);
    end
    // one more load flushes the last offspring
    while (!ready_o) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      i_strobe = 1; i_first = (i == 0); i_last = (i == N - 1); i_gene = GB'(i);
      @(negedge clk);
    end
    i_strobe = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (children != 59 || ops < 59) begin failures++; $display("children %0d ops %0d", children, ops); end
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
