// tsp_pipeline: one TSP GA pipeline (one island).
//
// management -> immigration -> PMX crossover -> mutation -> evaluation ->
// management, all moving a tour as N city labels of GB bits, one label per
// clock with first/last flags. The crossover's ready output paces the
// management module: a new individual is read out only when a crossover
// copy is waiting for one, so with one copy (NXO=1, the default) the
// pipeline stalls while PMX steps run and each offspring takes about
// N + (N2-N1) + 4 clocks; with NXO=2 copies it takes about N+1. The management module's
// output also leaves on dout_other_* (first-gene flag, strobe, gene) for the
// next pipeline; din_other_* comes from the previous one (tie
// din_other_strobe low in a single pipeline). The distance table is written
// through tbl_*, the mutation rate through clken_rate/din_rate.
// The module chain and the port names of the inter-pipeline link follow the
// document; the handshake is this design's own choice.
module tsp_pipeline #(
  parameter int unsigned N         = 51,
  parameter int unsigned GB        = 6,
  parameter int unsigned POP       = 64,
  parameter int unsigned AW        = 6,
  parameter int unsigned FW        = 16,
  parameter int unsigned DW        = 8,
  parameter int unsigned TAW       = 12,
  parameter int unsigned RB        = 10,
  parameter int unsigned RATE_INIT = 256,
  parameter int unsigned CW        = 16,
  parameter int unsigned PERIOD    = 10,
  parameter int unsigned NXO       = 1,
  parameter logic [31:0] SEED1     = 32'd65000,
  parameter logic [31:0] SEED2     = 32'd65000,
  parameter logic [31:0] SEED3     = 32'd45000,
  parameter logic [31:0] SEED4     = 32'd65000
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           clken_rate,
  input  logic [RB-1:0]  din_rate,
  input  logic           tbl_we,
  input  logic [TAW-1:0] tbl_addr,
  input  logic [DW-1:0]  tbl_data,
  input  logic           din_other_first_gene,
  input  logic           din_other_strobe,
  input  logic [GB-1:0]  din_other_gene,
  output logic           dout_other_first_gene,
  output logic           dout_other_strobe,
  output logic [GB-1:0]  dout_other_gene,
  output logic [FW-1:0]  best_fit,
  output logic           init_done,
  output logic           res_pulse,
  output logic           acc_pulse,
  output logic           migr_pulse,
  output logic           mut_pulse,
  output logic           xo_busy
);
  logic          mg_strobe, mg_first, mg_last;
  logic [GB-1:0] mg_gene;
  logic [AW-1:0] mg_addr;
  logic [FW-1:0] mg_fit;
  logic          im_strobe, im_first, im_last;
  logic [GB-1:0] im_gene;
  logic [AW-1:0] im_addr;
  logic [FW-1:0] im_fit;
  logic          xo_strobe, xo_first, xo_last, xo_ready;
  logic [GB-1:0] xo_gene;
  logic [AW-1:0] xo_addr;
  logic [FW-1:0] xo_fit;
  logic          mu_strobe, mu_first, mu_last;
  logic [GB-1:0] mu_gene;
  logic [AW-1:0] mu_addr;
  logic [FW-1:0] mu_fit;
  logic          ev_strobe, ev_first, ev_last;
  logic [GB-1:0] ev_gene;
  logic [AW-1:0] ev_addr;
  logic [FW-1:0] ev_pfit, ev_cfit;
  logic [RB-1:0] rate;

  // the link carries no last flag: count the neighbour's words to find it
  logic [GB-1:0] oth_cnt;
  logic          oth_last;
  always_ff @(posedge clk) begin
    if (rst)                   oth_cnt <= '0;
    else if (din_other_strobe) oth_cnt <= din_other_first_gene ? GB'(1) : oth_cnt + 1'b1;
  end
  assign oth_last = din_other_strobe &&
                    (32'(din_other_first_gene ? '0 : oth_cnt) == N - 1);

  ga_management #(
    .W(GB), .BEATS(N), .POP(POP), .AW(AW), .FW(FW), .MINIMIZE(1'b1), .INIT_MODE(1),
    .SEED({SEED4[15:0], SEED1[15:0]})
  ) u_mgmt (
    .clk, .rst, .ready_i(xo_ready),
    .o_strobe(mg_strobe), .o_first(mg_first), .o_last(mg_last), .o_gene(mg_gene),
    .o_addr(mg_addr), .o_fit(mg_fit),
    .i_strobe(ev_strobe), .i_first(ev_first), .i_last(ev_last), .i_gene(ev_gene),
    .i_addr(ev_addr), .i_pfit(ev_pfit), .i_cfit(ev_cfit),
    .init_done, .res_pulse, .acc_pulse, .best_fit
  );

  assign dout_other_first_gene = mg_first;
  assign dout_other_strobe     = mg_strobe;
  assign dout_other_gene       = mg_gene;

  ga_immigration #(.W(GB), .BEATS(N), .AW(AW), .FW(FW), .CW(CW), .PERIOD(PERIOD)) u_imm (
    .clk, .rst,
    .own_strobe(mg_strobe), .own_first(mg_first), .own_last(mg_last), .own_gene(mg_gene),
    .own_addr(mg_addr), .own_fit(mg_fit),
    .oth_strobe(din_other_strobe), .oth_first(din_other_first_gene), .oth_last(oth_last),
    .oth_gene(din_other_gene),
    .o_strobe(im_strobe), .o_first(im_first), .o_last(im_last), .o_gene(im_gene),
    .o_addr(im_addr), .o_fit(im_fit), .migr_pulse
  );

  tsp_xo_bank #(.N(N), .GB(GB), .AW(AW), .FW(FW), .NXO(NXO), .MINIMIZE(1'b1), .SEED(SEED2)) u_xo (
    .clk, .rst, .ready_o(xo_ready),
    .i_strobe(im_strobe), .i_first(im_first), .i_last(im_last), .i_gene(im_gene),
    .i_addr(im_addr), .i_fit(im_fit),
    .o_strobe(xo_strobe), .o_first(xo_first), .o_last(xo_last), .o_gene(xo_gene),
    .o_addr(xo_addr), .o_fit(xo_fit), .xo_busy
  );

  tsp_mutation #(.N(N), .GB(GB), .AW(AW), .FW(FW), .RB(RB), .RATE_INIT(RATE_INIT), .SEED(SEED3)) u_mu (
    .clk, .rst, .rate_we(clken_rate), .rate_in(din_rate),
    .i_strobe(xo_strobe), .i_first(xo_first), .i_last(xo_last), .i_gene(xo_gene),
    .i_addr(xo_addr), .i_fit(xo_fit),
    .o_strobe(mu_strobe), .o_first(mu_first), .o_last(mu_last), .o_gene(mu_gene),
    .o_addr(mu_addr), .o_fit(mu_fit), .mut_pulse, .rate
  );

  tsp_evaluation #(.N(N), .GB(GB), .AW(AW), .FW(FW), .DW(DW), .TAW(TAW)) u_ev (
    .clk, .rst, .tbl_we, .tbl_addr, .tbl_data,
    .i_strobe(mu_strobe), .i_first(mu_first), .i_last(mu_last), .i_gene(mu_gene),
    .i_addr(mu_addr), .i_pfit(mu_fit),
    .o_strobe(ev_strobe), .o_first(ev_first), .o_last(ev_last), .o_gene(ev_gene),
    .o_addr(ev_addr), .o_pfit(ev_pfit), .o_cfit(ev_cfit)
  );
endmodule
