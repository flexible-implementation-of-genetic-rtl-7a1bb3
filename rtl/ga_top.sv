// ga_top: the two problem-specific GA circuits side by side.
//
// The same pipeline architecture is instantiated for two problems, each as a
// complete, independent parallel GA with its own ports:
//  * knap_*  a 64-item 0/1 Knapsack GA with 2 concurrent pipelines
//            (maximises the total value of the packed items);
//  * tsp_*   a 51-city travelling-salesman GA with 4 concurrent pipelines
//            (minimises the closed tour length).
// Both share the clock, reset and the mutation-rate load port (rate r means
// probability r/1024; knapsack per gene, TSP per tour). Problem data is
// loaded through each circuit's own ports before or after reset: knapsack
// item values, volumes and capacity; the TSP distance table at address
// 51*C1+C2. Results: best fitness so far and a count of evaluations.
// TSP_NXO sets the number of PMX crossover copies per TSP pipeline (1, as in
// the measured configuration). The two circuits, their sizes and the
// parallel-GA port names follow the document; placing both in one top and
// sharing the rate port is this design's own choice.
module ga_top #(
  parameter int unsigned KNAP_NPIPE = 2,
  parameter int unsigned KNAP_S     = 64,
  parameter int unsigned KNAP_POP   = 64,
  parameter int unsigned TSP_NPIPE  = 4,
  parameter int unsigned TSP_N      = 51,
  parameter int unsigned TSP_GB     = 6,
  parameter int unsigned TSP_POP    = 64,
  parameter int unsigned TSP_AW     = 6,
  parameter int unsigned TSP_TAW    = 12,
  parameter int unsigned TSP_NXO    = 1
) (
  input  logic                       clk,
  input  logic                       reset,
  input  logic                       clken_rate,
  input  logic [9:0]                 din_rate,
  // Knapsack circuit
  input  logic                       knap_item_we,
  input  logic [$clog2(KNAP_S)-1:0]  knap_item_idx,
  input  logic [7:0]                 knap_item_value,
  input  logic [7:0]                 knap_item_volume,
  input  logic                       knap_cap_we,
  input  logic [8+$clog2(KNAP_S)-1:0] knap_cap_in,
  output logic [15:0]                knap_best_fitness,
  output logic [15:0]                knap_evaluate,
  output logic                       knap_init_done,
  output logic [KNAP_NPIPE-1:0]      knap_evt_eval,
  output logic [KNAP_NPIPE-1:0]      knap_evt_accept,
  output logic [KNAP_NPIPE-1:0]      knap_evt_migrate,
  // TSP circuit
  input  logic                       tsp_tbl_we,
  input  logic [TSP_TAW-1:0]         tsp_tbl_addr,
  input  logic [7:0]                 tsp_tbl_data,
  output logic [15:0]                tsp_best_fitness,
  output logic [15:0]                tsp_evaluate,
  output logic                       tsp_init_done,
  output logic [TSP_NPIPE-1:0]       tsp_evt_eval,
  output logic [TSP_NPIPE-1:0]       tsp_evt_accept,
  output logic [TSP_NPIPE-1:0]       tsp_evt_migrate,
  output logic [TSP_NPIPE-1:0]       tsp_evt_mutate,
  output logic [TSP_NPIPE-1:0]       tsp_evt_xo_stall
);
  knap_parallel_ga #(.NPIPE(KNAP_NPIPE), .S(KNAP_S), .POP(KNAP_POP)) u_knap (
    .clk, .reset, .clken_rate, .din_rate,
    .item_we(knap_item_we), .item_idx(knap_item_idx), .item_value(knap_item_value),
    .item_volume(knap_item_volume), .cap_we(knap_cap_we), .cap_in(knap_cap_in),
    .dout_best_fitness(knap_best_fitness), .dout_evaluate(knap_evaluate),
    .init_done(knap_init_done), .evt_eval(knap_evt_eval), .evt_accept(knap_evt_accept),
    .evt_migrate(knap_evt_migrate)
  );

  tsp_parallel_ga #(.NPIPE(TSP_NPIPE), .N(TSP_N), .GB(TSP_GB), .POP(TSP_POP), .AW(TSP_AW),
                    .TAW(TSP_TAW), .NXO(TSP_NXO)) u_tsp (
    .clk, .reset, .clken_rate, .din_rate,
    .tbl_we(tsp_tbl_we), .tbl_addr(tsp_tbl_addr), .tbl_data(tsp_tbl_data),
    .dout_best_fitness(tsp_best_fitness), .dout_evaluate(tsp_evaluate),
    .init_done(tsp_init_done), .evt_eval(tsp_evt_eval), .evt_accept(tsp_evt_accept),
    .evt_migrate(tsp_evt_migrate), .evt_mutate(tsp_evt_mutate), .evt_xo_stall(tsp_evt_xo_stall)
  );
endmodule
