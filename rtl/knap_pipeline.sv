// knap_pipeline: one Knapsack GA pipeline (one island).
//
// management -> immigration -> crossover -> mutation -> evaluation ->
// management. Every module moves one complete S-bit chromosome per clock, so
// after the initial fill (POP clocks) the pipeline starts one new individual
// and finishes one evaluation every clock. Latency around the loop is
// 1 (memory read) + 1 (crossover) + 1 (mutation) + log2(S)+2 (evaluation)
// clocks. The management module's output also leaves the pipeline on
// dout_other_* for the next pipeline's immigration module; din_other_* is the
// previous pipeline's stream (tie din_other_strobe low in a single pipeline).
// The four seeds give each random source its own sequence.
// The module chain follows the document's basic architecture; widths not
// given by the document are this design's own choices (see the modules).
module knap_pipeline #(
  parameter int unsigned S         = 64,
  parameter int unsigned POP       = 64,
  parameter int unsigned AW        = $clog2(POP),
  parameter int unsigned FW        = 16,
  parameter int unsigned VW        = 8,
  parameter int unsigned IW        = $clog2(S),
  parameter int unsigned RB        = 10,
  parameter int unsigned RATE_INIT = 16,
  parameter int unsigned CW        = 16,
  parameter int unsigned PERIOD    = 10,
  parameter logic [31:0] SEED1     = 32'd65000,
  parameter logic [31:0] SEED2     = 32'd65000,
  parameter logic [31:0] SEED3     = 32'd45000,
  parameter logic [31:0] SEED4     = 32'd65000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clken_rate,
  input  logic [RB-1:0]    din_rate,
  input  logic             item_we,
  input  logic [IW-1:0]    item_idx,
  input  logic [VW-1:0]    item_value,
  input  logic [VW-1:0]    item_volume,
  input  logic             cap_we,
  input  logic [VW+IW-1:0] cap_in,
  input  logic             din_other_strobe,
  input  logic [S-1:0]     din_other_gene,
  output logic             dout_other_strobe,
  output logic [S-1:0]     dout_other_gene,
  output logic [FW-1:0]    best_fit,
  output logic             init_done,
  output logic             res_pulse,
  output logic             acc_pulse,
  output logic             migr_pulse
);
  logic          mg_strobe, mg_first, mg_last;
  logic [S-1:0]  mg_gene;
  logic [AW-1:0] mg_addr;
  logic [FW-1:0] mg_fit;
  logic          im_strobe, im_first, im_last;
  logic [S-1:0]  im_gene;
  logic [AW-1:0] im_addr;
  logic [FW-1:0] im_fit;
  logic          xo_strobe, mu_strobe, ev_strobe;
  logic [S-1:0]  xo_gene, mu_gene, ev_gene;
  logic [AW-1:0] xo_addr, mu_addr, ev_addr;
  logic [FW-1:0] xo_fit, mu_fit, ev_pfit, ev_cfit;
  logic [RB-1:0] rate;

  ga_management #(
    .W(S), .BEATS(1), .POP(POP), .AW(AW), .FW(FW), .MINIMIZE(1'b0), .INIT_MODE(0),
    .SEED({SEED4[15:0], SEED1[15:0]})
  ) u_mgmt (
    .clk, .rst, .ready_i(1'b1),
    .o_strobe(mg_strobe), .o_first(mg_first), .o_last(mg_last), .o_gene(mg_gene),
    .o_addr(mg_addr), .o_fit(mg_fit),
    .i_strobe(ev_strobe), .i_first(1'b1), .i_last(1'b1), .i_gene(ev_gene),
    .i_addr(ev_addr), .i_pfit(ev_pfit), .i_cfit(ev_cfit),
    .init_done, .res_pulse, .acc_pulse, .best_fit
  );

  assign dout_other_strobe = mg_strobe;
  assign dout_other_gene   = mg_gene;

  ga_immigration #(.W(S), .BEATS(1), .AW(AW), .FW(FW), .CW(CW), .PERIOD(PERIOD)) u_imm (
    .clk, .rst,
    .own_strobe(mg_strobe), .own_first(mg_first), .own_last(mg_last), .own_gene(mg_gene),
    .own_addr(mg_addr), .own_fit(mg_fit),
    .oth_strobe(din_other_strobe), .oth_first(1'b1), .oth_last(1'b1), .oth_gene(din_other_gene),
    .o_strobe(im_strobe), .o_first(im_first), .o_last(im_last), .o_gene(im_gene),
    .o_addr(im_addr), .o_fit(im_fit), .migr_pulse
  );

  knap_crossover #(.S(S), .AW(AW), .FW(FW), .SEED(SEED2)) u_xo (
    .clk, .rst,
    .i_strobe(im_strobe && im_first && im_last), .i_gene(im_gene), .i_addr(im_addr), .i_fit(im_fit),
    .o_strobe(xo_strobe), .o_gene(xo_gene), .o_addr(xo_addr), .o_fit(xo_fit)
  );

  knap_mutation #(.S(S), .AW(AW), .FW(FW), .RB(RB), .RATE_INIT(RATE_INIT), .SEED(SEED3)) u_mu (
    .clk, .rst, .rate_we(clken_rate), .rate_in(din_rate),
    .i_strobe(xo_strobe), .i_gene(xo_gene), .i_addr(xo_addr), .i_fit(xo_fit),
    .o_strobe(mu_strobe), .o_gene(mu_gene), .o_addr(mu_addr), .o_fit(mu_fit), .rate
  );

  knap_evaluation #(.S(S), .AW(AW), .FW(FW), .VW(VW), .IW(IW)) u_ev (
    .clk, .rst, .item_we, .item_idx, .item_value, .item_volume, .cap_we, .cap_in,
    .i_strobe(mu_strobe), .i_gene(mu_gene), .i_addr(mu_addr), .i_pfit(mu_fit),
    .o_strobe(ev_strobe), .o_gene(ev_gene), .o_addr(ev_addr), .o_pfit(ev_pfit), .o_cfit(ev_cfit)
  );
endmodule
