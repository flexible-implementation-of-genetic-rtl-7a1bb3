// ga_immigration: individual exchange between neighbouring GA pipelines.
//
// Sits between a pipeline's management module and its crossover module.
// Normally it passes its own management module's stream straight through
// (combinationally, so it adds no latency and `ready` needs no extra slack).
// A counter, loaded with PERIOD-1, counts down once per individual passed.
// When it reaches 0 the module captures the next complete chromosome that
// the previous pipeline's management module sends (that stream is fanned out
// to this module as well as to its own crossover module) into a one-entry
// buffer. The next own individual that starts then has its chromosome
// replaced, word for word, by the buffered immigrant, and the counter is
// reloaded. `migr_pulse` marks each completed substitution.
//
// The document's Knapsack design decrements the counter every clock, which is
// once per individual there because one individual moves per clock; counting
// individuals keeps the same migration ratio for multi-clock chromosomes
// (TSP). Capturing into a buffer and substituting on the own stream's timing
// is this design's choice: it keeps the downstream handshake untouched when
// the two pipelines are not aligned. Only the chromosome crosses between
// pipelines (first-word flag, strobe and word, as in the generated circuit's
// inter-pipeline ports); the immigrant keeps the address and stored fitness
// of the own individual it displaces, so crossover bookkeeping and
// replacement stay within the own population. The stored fitness is then only
// an estimate until the slot is next overwritten.
module ga_immigration #(
  parameter int unsigned W      = 64,
  parameter int unsigned BEATS  = 1,
  parameter int unsigned AW     = 6,
  parameter int unsigned FW     = 16,
  parameter int unsigned CW     = 16,
  parameter int unsigned PERIOD = 10
) (
  input  logic          clk,
  input  logic          rst,
  // own management module
  input  logic          own_strobe,
  input  logic          own_first,
  input  logic          own_last,
  input  logic [W-1:0]  own_gene,
  input  logic [AW-1:0] own_addr,
  input  logic [FW-1:0] own_fit,
  // previous pipeline's management module
  input  logic          oth_strobe,
  input  logic          oth_first,
  input  logic          oth_last,
  input  logic [W-1:0]  oth_gene,
  // to crossover module
  output logic          o_strobe,
  output logic          o_first,
  output logic          o_last,
  output logic [W-1:0]  o_gene,
  output logic [AW-1:0] o_addr,
  output logic [FW-1:0] o_fit,
  output logic          migr_pulse
);
  localparam int unsigned BW = (BEATS > 1) ? $clog2(BEATS) : 1;

  logic [CW-1:0] cnt;
  logic          full, cap_active, sub_active;
  logic [BW-1:0] cap_idx, own_idx, cap_cur, own_cur;
  logic [W-1:0]  buf_gene [BEATS];
  logic          want, cap_beat, sub;

  assign want     = (cnt == '0) && !full;
  assign cap_beat = oth_strobe && (cap_active || (oth_first && want));
  assign cap_cur  = oth_first ? '0 : cap_idx;
  assign own_cur  = own_first ? '0 : own_idx;
  assign sub      = own_strobe && (own_first ? full : sub_active);

  always_comb begin
    o_strobe = own_strobe;
    o_first  = own_first;
    o_last   = own_last;
    o_gene   = sub ? buf_gene[own_cur] : own_gene;
    o_addr   = own_addr;
    o_fit    = own_fit;
  end

  always_ff @(posedge clk) begin
    if (cap_beat) buf_gene[cap_cur] <= oth_gene;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt        <= CW'(PERIOD - 1);
      full       <= 1'b0;
      cap_active <= 1'b0;
      sub_active <= 1'b0;
      cap_idx    <= '0;
      own_idx    <= '0;
      migr_pulse <= 1'b0;
    end else begin
      migr_pulse <= 1'b0;
      if (cap_beat) begin
        cap_idx    <= cap_cur + 1'b1;
        cap_active <= !oth_last;
        if (oth_last) full <= 1'b1;
      end
      if (own_strobe) begin
        own_idx <= own_cur + 1'b1;
        if (own_first) sub_active <= full && !own_last;
        else if (own_last) sub_active <= 1'b0;
        if (own_last) begin
          if (sub) begin
            full       <= 1'b0;
            cnt        <= CW'(PERIOD - 1);
            migr_pulse <= 1'b1;
          end else if (cnt != '0) begin
            cnt <= cnt - 1'b1;
          end
        end
      end
    end
  end
endmodule
