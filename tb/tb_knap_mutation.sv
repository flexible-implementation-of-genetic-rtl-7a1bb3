// tb_knap_mutation: checks the Knapsack bit-flip mutation.
// With rate 0 every chromosome must pass unchanged; with rate 102 (about
// 10%) and rate 512 (50%) the fraction of flipped genes over many
// chromosomes must be near rate/1024; with rate 1023 nearly all genes flip.
// Output follows input by exactly one clock; address and fitness pass.
// Per-bit inversion follows the document; the r/1024 rate scale is this
// design's own.
module tb_knap_mutation;
  localparam int S = 64, AW = 6, FW = 16, RB = 10;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic rate_we = 0;
  logic [RB-1:0] rate_in, rate;
  logic i_strobe = 0;
  logic [S-1:0] i_gene;
  logic [AW-1:0] i_addr;
  logic [FW-1:0] i_fit;
  logic o_strobe;
  logic [S-1:0] o_gene;
  logic [AW-1:0] o_addr;
  logic [FW-1:0] o_fit;

  knap_mutation #(.S(S), .AW(AW), .FW(FW), .RB(RB)) dut (.*);

  int checks = 0, failures = 0;

  task automatic run(input int r, input int lo_ppm, input int hi_ppm);
    int flips = 0, total = 0;
    logic [S-1:0] g;
    logic [AW-1:0] a;
    logic [FW-1:0] f;
    @(negedge clk);
    rate_we = 1; rate_in = RB'(r);
    @(negedge clk);
    rate_we = 0;
    for (int n = 0; n < 400; n++) begin
      i_strobe = 1; g = {$urandom, $urandom}; a = AW'($urandom); f = FW'($urandom);
      i_gene = g; i_addr = a; i_fit = f;
      @(negedge clk);
      checks++;
      if (!o_strobe || o_addr !== a || o_fit !== f) begin failures++; $display("side band / timing"); end
      flips += $countones(o_gene ^ g);
      total += S;
    end
    i_strobe = 0;
    checks++;
    if (longint'(flips) * 1000000 < longint'(lo_ppm) * total ||
        longint'(flips) * 1000000 > longint'(hi_ppm) * total) begin
      failures++; $display("rate %0d: %0d of %0d flipped", r, flips, total);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    run(0, 0, 0);
    run(102, 85000, 115000);
    run(512, 470000, 530000);
    run(1023, 990000, 1000000);
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
