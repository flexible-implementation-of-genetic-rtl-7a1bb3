// knap_parallel_ga: Knapsack GA with NPIPE concurrent pipelines (islands).
//
// NPIPE copies of knap_pipeline run side by side. Pipeline i's management
// output is fanned out to its own immigration module and to that of
// pipeline i+1, forming a chain: pipeline 0 has no previous pipeline (its
// immigrant input is tied off) and the last pipeline's output goes nowhere,
// as drawn in the parallel architecture. Item values, volumes, capacity and
// the mutation rate are broadcast to every pipeline. After reset and POP
// clocks of initial fill, NPIPE individuals are evaluated per clock.
// dout_best_fitness is the best fitness any pipeline has evaluated;
// dout_evaluate counts evaluations (modulo 2^16); evt_* are per-pipeline
// single-clock event flags (evaluation, replacement, migration).
// The chain of pipelines follows the document's parallel architecture; the
// counters and event flags are this design's own additions for observation.
module knap_parallel_ga #(
  parameter int unsigned NPIPE     = 2,
  parameter int unsigned S         = 64,
  parameter int unsigned POP       = 64,
  parameter int unsigned AW        = $clog2(POP),
  parameter int unsigned FW        = 16,
  parameter int unsigned VW        = 8,
  parameter int unsigned IW        = $clog2(S),
  parameter int unsigned RB        = 10,
  parameter int unsigned RATE_INIT = 16,
  parameter int unsigned EVW       = 16,
  parameter int unsigned CW        = 16,
  parameter int unsigned PERIOD    = 10
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             clken_rate,
  input  logic [RB-1:0]    din_rate,
  input  logic             item_we,
  input  logic [IW-1:0]    item_idx,
  input  logic [VW-1:0]    item_value,
  input  logic [VW-1:0]    item_volume,
  input  logic             cap_we,
  input  logic [VW+IW-1:0] cap_in,
  output logic [FW-1:0]    dout_best_fitness,
  output logic [EVW-1:0]   dout_evaluate,
  output logic             init_done,
  output logic [NPIPE-1:0] evt_eval,
  output logic [NPIPE-1:0] evt_accept,
  output logic [NPIPE-1:0] evt_migrate
);
  import ga_pkg::*;

  logic             oth_strobe [NPIPE+1];
  logic [S-1:0]     oth_gene   [NPIPE+1];
  logic [FW-1:0]    best       [NPIPE];
  logic [NPIPE-1:0] done;

  assign oth_strobe[0] = 1'b0;
  assign oth_gene[0]   = '0;

  for (genvar p = 0; p < NPIPE; p++) begin : g_pipe
    knap_pipeline #(
      .S(S), .POP(POP), .AW(AW), .FW(FW), .VW(VW), .IW(IW), .RB(RB), .RATE_INIT(RATE_INIT),
      .CW(CW), .PERIOD(PERIOD),
      .SEED1(32'd65000 + 32'(p) * 32'd7919), .SEED2(32'd65000 + 32'(p) * 32'd104729),
      .SEED3(32'd45000 + 32'(p) * 32'd15485863), .SEED4(32'd65000 + 32'(p) * 32'd32452843)
    ) u_pipe (
      .clk, .rst(reset), .clken_rate, .din_rate,
      .item_we, .item_idx, .item_value, .item_volume, .cap_we, .cap_in,
      .din_other_strobe(oth_strobe[p]), .din_other_gene(oth_gene[p]),
      .dout_other_strobe(oth_strobe[p+1]), .dout_other_gene(oth_gene[p+1]),
      .best_fit(best[p]), .init_done(done[p]),
      .res_pulse(evt_eval[p]), .acc_pulse(evt_accept[p]), .migr_pulse(evt_migrate[p])
    );
  end

  assign init_done = &done;

  always_comb begin
    dout_best_fitness = best[0];
    for (int p = 1; p < NPIPE; p++)
      if (fit_better(32'(best[p]), 32'(dout_best_fitness), 1'b0)) dout_best_fitness = best[p];
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      dout_evaluate <= '0;
    end else begin
      logic [EVW-1:0] inc;
      inc = '0;
      for (int p = 0; p < NPIPE; p++) inc = inc + EVW'(evt_eval[p]);
      dout_evaluate <= dout_evaluate + inc;
    end
  end
endmodule
