// ga_management: population store of one GA pipeline.
//
// Holds POP individuals, each a chromosome of BEATS words of W bits plus a
// FW-bit fitness. Two independent activities run concurrently:
//
//  * Issue (step 1). When the downstream `ready_i` is high and no chromosome
//    is being sent, an individual is chosen at random and streamed out one
//    word per clock (o_first marks word 0, o_last word BEATS-1); its address
//    and stored fitness ride along on every word. Memory reads are
//    registered, so a word appears one clock after it is selected. With
//    BEATS=1 and ready_i tied high a new individual leaves every clock.
//  * Replacement (step 2). The returning stream carries the offspring's
//    words, and on its last word the worse parent's address and fitness and
//    the offspring's fitness. Words are collected in one of two receive
//    buffers. If the offspring is strictly better than the worse parent
//    (larger fitness, or smaller when MINIMIZE), its fitness is written at
//    once and its chromosome is copied into the parent's slot over the next
//    BEATS clocks while the other buffer receives the next offspring.
//
// After reset the memory is filled (POP*BEATS clocks) before the first
// issue: INIT_MODE 0 writes sparse random bits, each set with probability
// 1/8 (Knapsack: few items, so most initial individuals fit the knapsack and
// the search does not start on a plateau of lethal individuals whose
// fitness is 0), INIT_MODE 1 writes a
// rotated identity tour, word k of individual j = (k+j) mod BEATS, so that
// every TSP individual is a valid permutation. Stored fitness starts at the
// worst value (0, or all ones when MINIMIZE) so any evaluated offspring
// replaces an initial individual. best_fit is the best offspring fitness seen.
// The issue/replace protocol and the compare-then-overwrite rule follow the
// document; random selection, the double receive buffer, the initial
// population and the reset values are this design's own choices. A slot
// being overwritten may be read in the same period; the GA tolerates this.
module ga_management #(
  parameter int unsigned W         = 64,
  parameter int unsigned BEATS     = 1,
  parameter int unsigned POP       = 64,
  parameter int unsigned AW        = $clog2(POP),
  parameter int unsigned FW        = 16,
  parameter bit          MINIMIZE  = 1'b0,
  parameter int unsigned INIT_MODE = 0,
  parameter logic [31:0] SEED      = 32'd65000
) (
  input  logic          clk,
  input  logic          rst,
  // step 1: individual to crossover / immigration
  input  logic          ready_i,
  output logic          o_strobe,
  output logic          o_first,
  output logic          o_last,
  output logic [W-1:0]  o_gene,
  output logic [AW-1:0] o_addr,
  output logic [FW-1:0] o_fit,
  // step 2: offspring from evaluation
  input  logic          i_strobe,
  input  logic          i_first,
  input  logic          i_last,
  input  logic [W-1:0]  i_gene,
  input  logic [AW-1:0] i_addr,
  input  logic [FW-1:0] i_pfit,
  input  logic [FW-1:0] i_cfit,
  // status
  output logic          init_done,
  output logic          res_pulse,
  output logic          acc_pulse,
  output logic [FW-1:0] best_fit
);
  import ga_pkg::*;

  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;
  localparam int unsigned WORDS = POP * BEATS;
  localparam int unsigned MW    = (WORDS > 1) ? $clog2(WORDS) : 1;
  localparam logic [FW-1:0] WORST = MINIMIZE ? {FW{1'b1}} : '0;

  logic [W-1:0]  mem  [WORDS];
  logic [FW-1:0] fmem [POP];

  logic [3*W+15:0] rnd;
  ga_rng #(.WIDTH(3 * W + 16), .SEED(SEED)) u_rng (.clk, .rst, .en(1'b1), .rnd);

  function automatic logic [MW-1:0] word_addr(input logic [AW-1:0] ind, input logic [BW-1:0] beat);
    return MW'(ind) * MW'(BEATS) + MW'(beat);
  endfunction

  // ---------------- initial fill ----------------
  logic [AW-1:0] ini_ind;
  logic [BW-1:0] ini_beat;

  function automatic logic [W-1:0] init_word(input logic [AW-1:0] ind, input logic [BW-1:0] beat,
                                             input logic [3*W-1:0] r);
    logic [31:0] s;
    if (INIT_MODE == 0) return r[W-1:0] & r[2*W-1:W] & r[3*W-1:2*W];
    s = (32'(beat) + 32'(ind)) % BEATS;
    return W'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ini_ind   <= '0;
      ini_beat  <= '0;
      init_done <= 1'b0;
    end else if (!init_done) begin
      if (32'(ini_beat) == BEATS - 1) begin
        ini_beat <= '0;
        if (32'(ini_ind) == POP - 1) init_done <= 1'b1;
        else                         ini_ind   <= ini_ind + 1'b1;
      end else begin
        ini_beat <= ini_beat + 1'b1;
      end
    end
  end

  // ---------------- step 1: issue ----------------
  logic          iactive;
  logic [BW-1:0] ibeat;
  logic [AW-1:0] cur_ind;
  logic          rd_valid, rd_last;
  logic [AW-1:0] rd_ind;
  logic [BW-1:0] rd_beat;

  always_comb begin
    rd_valid = iactive || (init_done && ready_i);
    rd_ind   = iactive ? cur_ind : AW'(rand_below(rnd[3*W+15:3*W], 16'(POP)));
    rd_beat  = iactive ? ibeat : '0;
    rd_last  = (32'(rd_beat) == BEATS - 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      iactive <= 1'b0;
      ibeat   <= '0;
      cur_ind <= '0;
    end else if (rd_valid) begin
      iactive <= !rd_last;
      ibeat   <= rd_last ? '0 : rd_beat + 1'b1;
      cur_ind <= rd_ind;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) o_strobe <= 1'b0;
    else     o_strobe <= rd_valid;
    o_first <= (rd_beat == '0);
    o_last  <= rd_last;
    o_gene  <= mem[word_addr(rd_ind, rd_beat)];
    o_addr  <= rd_ind;
    o_fit   <= fmem[rd_ind];
  end

  // ---------------- step 2: replacement ----------------
  logic [W-1:0]  rbuf [2][BEATS];
  logic          wsel;
  logic [BW-1:0] wbeat, wbeat_cur;
  logic          accept;
  logic          cp_active, cp_sel;
  logic [AW-1:0] cp_ind;
  logic [BW-1:0] cp_beat;
  logic          cp_last;

  assign wbeat_cur = i_first ? '0 : wbeat;
  assign accept    = i_strobe && i_last && fit_better(32'(i_cfit), 32'(i_pfit), MINIMIZE);
  assign cp_last   = (32'(cp_beat) == BEATS - 1);

  always_ff @(posedge clk) begin
    if (i_strobe) rbuf[wsel][wbeat_cur] <= i_gene;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wsel      <= 1'b0;
      wbeat     <= '0;
      cp_active <= 1'b0;
      cp_sel    <= 1'b0;
      cp_ind    <= '0;
      cp_beat   <= '0;
      res_pulse <= 1'b0;
      acc_pulse <= 1'b0;
      best_fit  <= WORST;
    end else begin
      res_pulse <= i_strobe && i_last;
      acc_pulse <= accept;
      if (i_strobe) wbeat <= wbeat_cur + 1'b1;
      if (i_strobe && i_last) begin
        wsel <= !wsel;
        if (fit_better(32'(i_cfit), 32'(best_fit), MINIMIZE)) best_fit <= i_cfit;
      end
      if (accept) begin
        cp_active <= 1'b1;
        cp_sel    <= wsel;
        cp_ind    <= i_addr;
        cp_beat   <= '0;
      end else if (cp_active) begin
        cp_active <= !cp_last;
        cp_beat   <= cp_beat + 1'b1;
      end
    end
  end

  // single write port per memory: initial fill, then chromosome copy
  always_ff @(posedge clk) begin
    if (!init_done && !rst)
      mem[word_addr(ini_ind, ini_beat)] <= init_word(ini_ind, ini_beat, rnd[3*W-1:0]);
    else if (cp_active)
      mem[word_addr(cp_ind, cp_beat)] <= rbuf[cp_sel][cp_beat];
  end

  always_ff @(posedge clk) begin
    if (!init_done && !rst)
      fmem[ini_ind] <= WORST;
    else if (accept)
      fmem[i_addr] <= i_cfit;
  end

  // An accepted offspring may only arrive once the previous copy is on its
  // last word; otherwise the copy would be cut short.
  a_copy_free: assert property (@(posedge clk) disable iff (rst)
                                accept |-> (!cp_active || cp_last));
endmodule
