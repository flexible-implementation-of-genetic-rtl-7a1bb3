// tsp_mutation: label-exchange mutation for the TSP GA pipeline.
//
// At the first word of each tour two random cities N1, N2 in [0, N-1] are
// drawn and, with probability rate/1024, the tour is mutated: while its words
// stream through, every occurrence of N1 is replaced by N2 and of N2 by N1.
// In a tour (a permutation) this swaps the loci of the two cities, so the
// result is still a valid tour. One word per clock, one clock of latency; the
// first/last flags and the worse parent's address and fitness pass through.
// `rate` is a 10-bit register loaded through rate_we/rate_in; mut_pulse marks
// the first word of each tour that was mutated.
// The exchange rule follows the document; the 10-bit rate scale (from the
// generated circuit's rate port) and RATE_INIT are this design's own choices.
module tsp_mutation #(
  parameter int unsigned N         = 51,
  parameter int unsigned GB        = 6,
  parameter int unsigned AW        = 6,
  parameter int unsigned FW        = 16,
  parameter int unsigned RB        = 10,
  parameter int unsigned RATE_INIT = 256,
  parameter logic [31:0] SEED      = 32'd45000
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rate_we,
  input  logic [RB-1:0] rate_in,
  input  logic          i_strobe,
  input  logic          i_first,
  input  logic          i_last,
  input  logic [GB-1:0] i_gene,
  input  logic [AW-1:0] i_addr,
  input  logic [FW-1:0] i_fit,
  output logic          o_strobe,
  output logic          o_first,
  output logic          o_last,
  output logic [GB-1:0] o_gene,
  output logic [AW-1:0] o_addr,
  output logic [FW-1:0] o_fit,
  output logic          mut_pulse,
  output logic [RB-1:0] rate
);
  import ga_pkg::*;

  logic [47:0]   rnd;
  logic          mut_l, mut_c;
  logic [GB-1:0] a_l, b_l, a_c, b_c;
  logic          do_mut;
  logic [GB-1:0] ra, rb;

  ga_rng #(.WIDTH(48), .SEED(SEED)) u_rng (.clk, .rst, .en(1'b1), .rnd);

  assign do_mut = (rnd[RB-1:0] < rate);
  assign ra     = GB'(rand_below(rnd[31:16], 16'(N)));
  assign rb     = GB'(rand_below(rnd[47:32], 16'(N)));
  assign mut_c  = i_first ? do_mut : mut_l;
  assign a_c    = i_first ? ra : a_l;
  assign b_c    = i_first ? rb : b_l;

  always_ff @(posedge clk) begin
    if (rst) begin
      rate      <= RB'(RATE_INIT);
      o_strobe  <= 1'b0;
      mut_pulse <= 1'b0;
      mut_l     <= 1'b0;
    end else begin
      if (rate_we) rate <= rate_in;
      o_strobe  <= i_strobe;
      mut_pulse <= i_strobe && i_first && do_mut;
      if (i_strobe && i_first) mut_l <= do_mut;
    end
    if (i_strobe && i_first) begin
      a_l <= ra;
      b_l <= rb;
    end
    o_first <= i_first;
    o_last  <= i_last;
    o_addr  <= i_addr;
    o_fit   <= i_fit;
    if (mut_c && i_gene == a_c)      o_gene <= b_c;
    else if (mut_c && i_gene == b_c) o_gene <= a_c;
    else                             o_gene <= i_gene;
  end
endmodule
