// tb_knap_crossover: checks the Knapsack uniform crossover.
// Streams random individuals (with idle gaps). For each individual after the
// first, one offspring must leave one clock later; every gene on which the
// two parents agree must be kept, the genes on which they differ must come
// from both parents over the run (the mask is random, not constant), and the
// forwarded address/fitness must be those of the lower-fitness parent.
// The uniform crossover and worse-parent rule follow the document; the
// reference model is this testbench's own.
module tb_knap_crossover;
  localparam int S = 64, AW = 6, FW = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic i_strobe = 0;
  logic [S-1:0] i_gene;
  logic [AW-1:0] i_addr;
  logic [FW-1:0] i_fit;
  logic o_strobe;
  logic [S-1:0] o_gene;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_fit;

  knap_crossover #(.S(S), .AW(AW), .FW(FW)) dut (.*);

  int checks = 0, failures = 0, from1 = 0, from2 = 0, n_in = 0, n_out = 0;
  logic [S-1:0] p1, p2;
  logic [AW-1:0] a1, a2;
  logic [FW-1:0] f1, f2;
  logic have_p1 = 0, expect_out = 0;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      // check the output produced by the previous clock's input
      if (expect_out) begin
        checks++;
        if (!o_strobe) begin failures++; $display("missing output"); end
        else begin
          n_out++;
          if (((p1 ~^ p2) & (o_gene ^ p1)) != '0) begin failures++; $display("agreeing gene changed"); end
          from1 += $countones((p1 ^ p2) & ~(o_gene ^ p1));
          from2 += $countones((p1 ^ p2) & ~(o_gene ^ p2));
          checks++;
          if (f1 < f2 ? (o_addr !== a1 || o_fit !== f1) : (o_addr !== a2 || o_fit !== f2)) begin
            failures++; $display("wrong worse parent");
          end
        end
      end else begin
        checks++;
        if (o_strobe) begin failures++; $display("spurious output"); end
      end
      i_strobe = (n < 499) && ($urandom_range(0, 4) != 0);
      i_gene = {$urandom, $urandom};
      i_addr = AW'($urandom);
      i_fit = FW'($urandom_range(0, 20));
      expect_out = i_strobe && have_p1;
      if (i_strobe) begin
        p1 = p2; a1 = a2; f1 = f2;
        p2 = i_gene; a2 = i_addr; f2 = i_fit;
        have_p1 = 1; n_in++;
      end
    end
    @(negedge clk) i_strobe = 0;
    checks++;
    if (from1 < 1000 || from2 < 1000 || n_out != n_in - 1) begin
      failures++; $display("mix %0d/%0d outs %0d ins %0d", from1, from2, n_out, n_in);
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
