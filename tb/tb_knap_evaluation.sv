// tb_knap_evaluation: checks the pipelined Knapsack fitness.
// Loads random item values/volumes and a capacity, streams random
// chromosomes one per clock (with idle gaps), and compares every output with
// a sum computed here; also checks that each result leaves exactly
// log2(S)+2 clocks after its chromosome entered and that address, parent
// fitness and chromosome travel with it. Lethal (over-capacity) and feasible
// chromosomes are both counted and must both occur.
// The fitness rule follows the document; the expected latency log2(S)+2 is
// this design's own pipeline depth.
module tb_knap_evaluation;
  localparam int S = 64, AW = 6, FW = 16, VW = 8, IW = 6, LAT = 8;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic item_we = 0, cap_we = 0, i_strobe = 0;
  logic [IW-1:0] item_idx;
  logic [VW-1:0] item_value, item_volume;
  logic [VW+IW-1:0] cap_in;
  logic [S-1:0] i_gene;
  logic [AW-1:0] i_addr;
  logic [FW-1:0] i_pfit;
  logic o_strobe;
  logic [S-1:0] o_gene;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_pfit, o_cfit;

  knap_evaluation #(.S(S), .AW(AW), .FW(FW), .VW(VW)) dut (.*);

  int checks = 0, failures = 0, lethal = 0, feasible = 0;
  int val[S], vol[S];
  int capacity = 1200;
  typedef struct { logic [S-1:0] g; logic [AW-1:0] a; logic [FW-1:0] pf; int fit; int t; } exp_t;
  exp_t q[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  function automatic int ref_fit(logic [S-1:0] g);
    int sv = 0, sw = 0;
    for (int i = 0; i < S; i++) if (g[i]) begin sv += val[i]; sw += vol[i]; end
    return (sw > capacity) ? 0 : sv;
  endfunction

  // monitor
  always @(posedge clk) begin
    if (!rst && o_strobe) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = q.pop_front();
        if (o_cfit !== FW'(e.fit) || o_gene !== e.g || o_addr !== e.a || o_pfit !== e.pf) begin
          failures++;
          $display("mismatch fit %0d exp %0d", o_cfit, e.fit);
        end
        checks++;
        if (cyc - e.t != LAT) begin failures++; $display("latency %0d", cyc - e.t); end
        if (e.fit == 0) lethal++; else feasible++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < S; i++) begin
      val[i] = $urandom_range(1, 255);
      vol[i] = $urandom_range(1, 60);
      @(negedge clk);
      item_we = 1; item_idx = IW'(i); item_value = VW'(val[i]); item_volume = VW'(vol[i]);
    end
    @(negedge clk);
    item_we = 0; cap_we = 1; cap_in = (VW+IW)'(capacity);
    @(negedge clk);
    cap_we = 0;
    for (int n = 0; n < 400; n++) begin
      exp_t e;
      @(negedge clk);
      i_strobe = ($urandom_range(0, 3) != 0);
      // density varies so both feasible and lethal chromosomes occur
      for (int i = 0; i < S; i++) i_gene[i] = ($urandom_range(0, 99) < (n % 60));
      i_addr = AW'($urandom); i_pfit = FW'($urandom);
      if (i_strobe) begin
        e.g = i_gene; e.a = i_addr; e.pf = i_pfit; e.fit = ref_fit(i_gene); e.t = cyc + 1;
        q.push_back(e);
      end
    end
    @(negedge clk) i_strobe = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0 || lethal == 0 || feasible == 0) begin
      failures++; $display("left %0d lethal %0d feasible %0d", q.size(), lethal, feasible);
    end
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
