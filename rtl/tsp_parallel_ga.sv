// tsp_parallel_ga: TSP GA with NPIPE concurrent pipelines (islands).
//
// NPIPE copies of tsp_pipeline run side by side, chained as in the parallel
// architecture: pipeline i's management output (first-gene flag, strobe,
// gene) goes to its own immigration module and to pipeline i+1's; pipeline 0
// has no previous pipeline and the last pipeline's output goes nowhere. The
// distance table and the mutation rate are broadcast to every pipeline.
// dout_best_fitness is the shortest tour length any pipeline has evaluated
// (all ones before the first evaluation); dout_evaluate counts evaluations
// (modulo 2^16); evt_* are per-pipeline single-clock event flags.
// Default sizes are those of the generated 51-city circuit: population 64,
// 6-bit genes and addresses, 16-bit fitness, 12-bit table address,
// migration period 10, 16-bit migration counter, 10-bit rate. The counters
// and event flags are this design's own additions for observation.
// NXO is the number of PMX crossover copies per pipeline. The chain follows
// the document's parallel architecture and the defaults its generated circuit.
module tsp_parallel_ga #(
  parameter int unsigned NPIPE     = 4,
  parameter int unsigned N         = 51,
  parameter int unsigned GB        = 6,
  parameter int unsigned POP       = 64,
  parameter int unsigned AW        = 6,
  parameter int unsigned FW        = 16,
  parameter int unsigned DW        = 8,
  parameter int unsigned TAW       = 12,
  parameter int unsigned RB        = 10,
  parameter int unsigned RATE_INIT = 256,
  parameter int unsigned EVW       = 16,
  parameter int unsigned CW        = 16,
  parameter int unsigned PERIOD    = 10,
  parameter int unsigned NXO       = 1
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             clken_rate,
  input  logic [RB-1:0]    din_rate,
  input  logic             tbl_we,
  input  logic [TAW-1:0]   tbl_addr,
  input  logic [DW-1:0]    tbl_data,
  output logic [FW-1:0]    dout_best_fitness,
  output logic [EVW-1:0]   dout_evaluate,
  output logic             init_done,
  output logic [NPIPE-1:0] evt_eval,
  output logic [NPIPE-1:0] evt_accept,
  output logic [NPIPE-1:0] evt_migrate,
  output logic [NPIPE-1:0] evt_mutate,
  output logic [NPIPE-1:0] evt_xo_stall
);
  import ga_pkg::*;

  logic             oth_first  [NPIPE+1];
  logic             oth_strobe [NPIPE+1];
  logic [GB-1:0]    oth_gene   [NPIPE+1];
  logic [FW-1:0]    best       [NPIPE];
  logic [NPIPE-1:0] done;

  assign oth_first[0]  = 1'b0;
  assign oth_strobe[0] = 1'b0;
  assign oth_gene[0]   = '0;

  for (genvar p = 0; p < NPIPE; p++) begin : g_pipe
    tsp_pipeline #(
      .N(N), .GB(GB), .POP(POP), .AW(AW), .FW(FW), .DW(DW), .TAW(TAW), .RB(RB),
      .RATE_INIT(RATE_INIT), .CW(CW), .PERIOD(PERIOD), .NXO(NXO),
      .SEED1(32'd65000 + 32'(p) * 32'd7919), .SEED2(32'd65000 + 32'(p) * 32'd104729),
      .SEED3(32'd45000 + 32'(p) * 32'd15485863), .SEED4(32'd65000 + 32'(p) * 32'd32452843)
    ) u_pipe (
      .clk, .rst(reset), .clken_rate, .din_rate, .tbl_we, .tbl_addr, .tbl_data,
      .din_other_first_gene(oth_first[p]), .din_other_strobe(oth_strobe[p]),
      .din_other_gene(oth_gene[p]),
      .dout_other_first_gene(oth_first[p+1]), .dout_other_strobe(oth_strobe[p+1]),
      .dout_other_gene(oth_gene[p+1]),
      .best_fit(best[p]), .init_done(done[p]),
      .res_pulse(evt_eval[p]), .acc_pulse(evt_accept[p]), .migr_pulse(evt_migrate[p]),
      .mut_pulse(evt_mutate[p]), .xo_busy(evt_xo_stall[p])
    );
  end

  assign init_done = &done;

  always_comb begin
    dout_best_fitness = best[0];
    for (int p = 1; p < NPIPE; p++)
      if (fit_better(32'(best[p]), 32'(dout_best_fitness), 1'b1)) dout_best_fitness = best[p];
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
