// knap_crossover: uniform crossover for the Knapsack GA pipeline.
//
// Register r keeps the chromosome, address and fitness of the last
// individual received (parent1). Each clock a new individual (parent2)
// arrives; the offspring takes every gene from parent1 or parent2 according
// to a fresh random mask bit, so one offspring leaves per clock with one
// clock of latency. Alongside the offspring the module forwards the address
// and fitness of the worse of the two parents (lower fitness; on a tie,
// parent2), which the management module may later overwrite. The first
// individual after reset only fills r and produces no output.
// Uniform crossover, the register r, a single offspring per crossover and the
// forwarding of the worse parent follow the document; the random source and
// the tie rule are this design's own choices.
module knap_crossover #(
  parameter int unsigned S    = 64,
  parameter int unsigned AW   = 6,
  parameter int unsigned FW   = 16,
  parameter logic [31:0] SEED = 32'd65000
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          i_strobe,
  input  logic [S-1:0]  i_gene,
  input  logic [AW-1:0] i_addr,
  input  logic [FW-1:0] i_fit,
  output logic          o_strobe,
  output logic [S-1:0]  o_gene,
  output logic [AW-1:0] o_addr,
  output logic [FW-1:0] o_fit
);
  logic          r_valid;
  logic [S-1:0]  r_gene;
  logic [AW-1:0] r_addr;
  logic [FW-1:0] r_fit;
  logic [S-1:0]  mask;

  ga_rng #(.WIDTH(S), .SEED(SEED)) u_rng (.clk, .rst, .en(1'b1), .rnd(mask));

  always_ff @(posedge clk) begin
    if (rst) begin
      r_valid  <= 1'b0;
      o_strobe <= 1'b0;
    end else begin
      o_strobe <= i_strobe && r_valid;
      if (i_strobe) r_valid <= 1'b1;
    end
    if (i_strobe) begin
      o_gene <= (mask & r_gene) | (~mask & i_gene);
      if (r_fit < i_fit) begin
        o_addr <= r_addr;
        o_fit  <= r_fit;
      end else begin
        o_addr <= i_addr;
        o_fit  <= i_fit;
      end
      r_gene <= i_gene;
      r_addr <= i_addr;
      r_fit  <= i_fit;
    end
  end
endmodule
