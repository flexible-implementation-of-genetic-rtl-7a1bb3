// knap_mutation: bit-flip mutation for the Knapsack GA pipeline.
//
// Every gene of the incoming offspring is inverted independently with
// probability rate/1024, where `rate` is a 10-bit register loaded through
// rate_we/rate_in (the generated circuit's clken_rate/din_rate inputs).
// Each gene has its own 10-bit random number per clock, compared against
// the rate. One chromosome per clock, one clock of latency; the worse
// parent's address and fitness pass through unchanged.
// Per-gene inversion with a given rate follows the document; the 10-bit rate
// scale is taken from the generated circuit's rate port width, and the reset
// value RATE_INIT is this design's own choice.
module knap_mutation #(
  parameter int unsigned S         = 64,
  parameter int unsigned AW        = 6,
  parameter int unsigned FW        = 16,
  parameter int unsigned RB        = 10,
  parameter int unsigned RATE_INIT = 16,
  parameter logic [31:0] SEED      = 32'd45000
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          rate_we,
  input  logic [RB-1:0] rate_in,
  input  logic          i_strobe,
  input  logic [S-1:0]  i_gene,
  input  logic [AW-1:0] i_addr,
  input  logic [FW-1:0] i_fit,
  output logic          o_strobe,
  output logic [S-1:0]  o_gene,
  output logic [AW-1:0] o_addr,
  output logic [FW-1:0] o_fit,
  output logic [RB-1:0] rate
);
  logic [S*RB-1:0] rnd;
  logic [S-1:0]    flip;

  ga_rng #(.WIDTH(S * RB), .SEED(SEED)) u_rng (.clk, .rst, .en(1'b1), .rnd);

  always_comb begin
    for (int i = 0; i < S; i++) flip[i] = (rnd[i*RB +: RB] < rate);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rate     <= RB'(RATE_INIT);
      o_strobe <= 1'b0;
    end else begin
      if (rate_we) rate <= rate_in;
      o_strobe <= i_strobe;
    end
    o_gene <= i_gene ^ flip;
    o_addr <= i_addr;
    o_fit  <= i_fit;
  end
endmodule
