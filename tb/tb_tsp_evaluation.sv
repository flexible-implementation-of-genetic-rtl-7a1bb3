// tb_tsp_evaluation: checks the TSP tour-length evaluation.
// Writes a random 8-bit distance table (address N*C1+C2, N=51), streams
// random tours back to back and with gaps, and compares each fitness with
// the closed tour length computed here. The fitness must come with the last
// city of its tour, exactly 2 clocks after that city entered; the tour,
// flags, address and parent fitness must pass through unchanged.
// Table addressing n*C1+C2 follows the document; counting the closing leg
// is this design's own choice.
module tb_tsp_evaluation;
  localparam int N = 51, GB = 6, AW = 6, FW = 16, DW = 8, TAW = 12, LAT = 2;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic tbl_we = 0;
  logic [TAW-1:0] tbl_addr;
  logic [DW-1:0] tbl_data;
  logic i_strobe = 0, i_first = 0, i_last = 0;
  logic [GB-1:0] i_gene;
  logic [AW-1:0] i_addr;
  logic [FW-1:0] i_pfit;
  logic o_strobe, o_first, o_last;
  logic [GB-1:0] o_gene;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_pfit, o_cfit;

  tsp_evaluation #(.N(N), .GB(GB), .AW(AW), .FW(FW), .DW(DW), .TAW(TAW)) dut (.*);

  int checks = 0, failures = 0, tours = 0;
  int d[N][N];
  int cyc = 0;
  always @(posedge clk) cyc++;

  typedef struct { logic [GB-1:0] g; logic f, l; logic [AW-1:0] a; logic [FW-1:0] pf; int fit; int t; } w_t;
  w_t q[$];

  always @(posedge clk) begin
    if (!rst && o_strobe) begin
      w_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected word"); end
      else begin
        e = q.pop_front();
        if (o_gene !== e.g || o_first !== e.f || o_last !== e.l || o_addr !== e.a ||
            o_pfit !== e.pf || cyc - e.t != LAT) begin
          failures++; $display("word mismatch at %0d", cyc);
        end
        if (e.l) begin
          checks++; tours++;
          if (o_cfit !== FW'(e.fit)) begin failures++; $display("fit %0d exp %0d", o_cfit, e.fit); end
        end
      end
    end
  end

  initial begin
    int p[N];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        d[a][b] = (a == b) ? 0 : $urandom_range(1, 255);
        tbl_we = 1; tbl_addr = TAW'(a * N + b); tbl_data = DW'(d[a][b]);
        @(negedge clk);
      end
    tbl_we = 0;
    for (int t = 0; t < 40; t++) begin
      int len;
      logic [AW-1:0] a;
      logic [FW-1:0] pf;
      len = 0;
      a = AW'($urandom);
      pf = FW'($urandom);
      for (int i = 0; i < N; i++) p[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, tmp;
        j = $urandom_range(0, i); tmp = p[i]; p[i] = p[j]; p[j] = tmp;
      end
      for (int i = 0; i < N; i++) len += d[p[i]][p[(i + 1) % N]];
      for (int i = 0; i < N; i++) begin
        w_t e;
        if (t % 3 == 2) while ($urandom_range(0, 3) == 0) @(negedge clk);
        i_strobe = 1; i_first = (i == 0); i_last = (i == N - 1); i_gene = GB'(p[i]);
        i_addr = a; i_pfit = pf;
        e.g = i_gene; e.f = i_first; e.l = i_last; e.a = a; e.pf = pf; e.fit = len; e.t = cyc + 1;
        q.push_back(e);
        @(negedge clk);
        i_strobe = 0;
      end
    end
    repeat (5) @(negedge clk);
    checks++;
    if (tours != 40 || q.size() != 0) begin failures++; $display("tours %0d", tours); end
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
