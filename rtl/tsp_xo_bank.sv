// tsp_xo_bank: NXO copies of the PMX crossover sharing one stream.
//
// The PMX crossover needs N + (N2-N1) + 1 clocks per offspring, where the
// PMX part depends on two random loci, so a single copy stalls the pipeline
// while it steps. With NXO > 1 copies the bank hands each arriving parent to
// an idle copy: on the first word of a chromosome the lowest-numbered copy
// whose ready is high is chosen, and that choice is held until the last
// word. A copy emits its previous offspring while it loads, so outputs of
// different copies never overlap (only one copy loads at a time) and the
// output is simply the stream of whichever copy has its strobe high. Every
// copy keeps its own parent1, so each offspring mixes two parents that were
// sent to the same copy; the first chromosome a copy receives only loads it.
//
// Interface: the same stream ports as tsp_crossover. ready_o is high while
// any copy waits for a parent; a producer that sees it high may start a
// chromosome (all N words on consecutive clocks) on a later clock, because a
// waiting copy stays ready until it receives a word. xo_busy is high while
// every copy is running PMX steps, i.e. while the producer is held back by
// the crossover alone. Timing per copy is that of tsp_crossover; with two
// copies a new parent is accepted about every N+1 clocks.
// Duplicating a variable-latency module to reach a constant rate follows the
// document; the lowest-ready-first choice and the output merge are this
// design's own. NXO defaults to 1, the configuration measured in the
// document, where the bank reduces to a single crossover.
module tsp_xo_bank #(
  parameter int unsigned N        = 51,
  parameter int unsigned GB       = 6,
  parameter int unsigned AW       = 6,
  parameter int unsigned FW       = 16,
  parameter int unsigned NXO      = 1,
  parameter bit          MINIMIZE = 1'b1,
  parameter logic [31:0] SEED     = 32'd65000
) (
  input  logic          clk,
  input  logic          rst,
  output logic          ready_o,
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
  output logic          xo_busy
);
  localparam int unsigned SW = (NXO > 1) ? $clog2(NXO) : 1;

  logic [NXO-1:0] c_ready, c_busy, c_ostrobe, c_ofirst, c_olast, c_sel;
  logic [GB-1:0]  c_ogene [NXO];
  logic [AW-1:0]  c_oaddr [NXO];
  logic [FW-1:0]  c_ofit  [NXO];
  logic [GB:0]    c_n1 [NXO];
  logic [GB:0]    c_n2 [NXO];

  logic [SW-1:0] pick, held, cur;
  logic          pick_ok;

  // lowest-numbered copy that is waiting for a parent
  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int k = NXO - 1; k >= 0; k--)
      if (c_ready[k]) begin
        pick    = SW'(k);
        pick_ok = 1'b1;
      end
  end

  assign cur = i_first ? pick : held;

  always_ff @(posedge clk) begin
    if (rst)                     held <= '0;
    else if (i_strobe && i_first) held <= pick;
  end

  always_comb
    for (int k = 0; k < NXO; k++) c_sel[k] = i_strobe && (cur == SW'(k));

  assign ready_o = |c_ready;
  assign xo_busy = &c_busy;

  for (genvar k = 0; k < NXO; k++) begin : g_xo
    tsp_crossover #(.N(N), .GB(GB), .AW(AW), .FW(FW), .MINIMIZE(MINIMIZE),
                    .SEED(SEED + 32'(k) * 32'd7919)) u_xo (
      .clk, .rst, .ready_o(c_ready[k]),
      .i_strobe(c_sel[k]), .i_first, .i_last, .i_gene, .i_addr, .i_fit,
      .o_strobe(c_ostrobe[k]), .o_first(c_ofirst[k]), .o_last(c_olast[k]),
      .o_gene(c_ogene[k]), .o_addr(c_oaddr[k]), .o_fit(c_ofit[k]),
      .xo_busy(c_busy[k]), .xo_n1(c_n1[k]), .xo_n2(c_n2[k])
    );
  end

  // merge: at most one copy sends at a time
  always_comb begin
    o_strobe = 1'b0;
    o_first  = c_ofirst[0];
    o_last   = c_olast[0];
    o_gene   = c_ogene[0];
    o_addr   = c_oaddr[0];
    o_fit    = c_ofit[0];
    for (int k = 0; k < NXO; k++)
      if (c_ostrobe[k]) begin
        o_strobe = 1'b1;
        o_first  = c_ofirst[k];
        o_last   = c_olast[k];
        o_gene   = c_ogene[k];
        o_addr   = c_oaddr[k];
        o_fit    = c_ofit[k];
      end
  end

  // a chromosome starts only on a copy that is waiting for one
  a_start_ready: assert property (@(posedge clk) disable iff (rst)
                                  (i_strobe && i_first) |-> pick_ok);
  // two copies never send in the same clock
  a_one_sender: assert property (@(posedge clk) disable iff (rst)
                                 $onehot0(c_ostrobe));
endmodule
