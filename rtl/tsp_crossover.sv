// tsp_crossover: PMX (partially mapped crossover) for the TSP GA pipeline.
//
// A tour is N city labels of GB bits, received one label per clock. Two
// register sets PA[0], PA[1] hold the two parents; the role bit p1sel says
// which one is PA1 (parent1, turned into the offspring in place) and which
// PA2 (parent2, the newest individual). RS is the inverse of PA1: RS[c] is
// the locus of city c in PA1, so the locus of a city is found in one clock.
//
// One operation:
//  LOAD   N clocks. The next individual is written into PA2 word by word.
//         In the same clock the previous offspring, which sits in that
//         register, is read out towards the mutation module (so loading and
//         sending overlap), and RS is rebuilt for the current PA1.
//  XOVER  Two random loci N1 <= N2 <= N are drawn. While N1 != N2, one
//         clock each: v = PA2[N1], M = RS[v]; PA1[M] <= PA1[N1];
//         PA1[N1] <= v; RS updated to match; N1 <= N1+1. One more clock
//         ends the operation: PA1 holds the offspring, the roles swap so
//         the unchanged parent2 becomes parent1 of the next operation, and
//         the worse parent's address and fitness (larger tour length) are
//         kept to accompany the offspring.
// The very first individual after reset is only loaded (no parent1 yet).
// `ready_o` is high while waiting for the first word of the next load; a
// producer may start a chromosome only while it is high and must then send
// all N words on consecutive clocks. Cost per offspring: N + (N2-N1) + 1
// clocks plus the producer's turnaround. xo_n1/xo_n2 report the loci drawn
// for the operation in progress.
// PA1/PA2/RS, the step rule, the role swap and the overlapped load/send
// follow the document; the random source, the ready handshake and the
// closing clock are this design's own choices.
module tsp_crossover #(
  parameter int unsigned N        = 51,
  parameter int unsigned GB       = 6,
  parameter int unsigned AW       = 6,
  parameter int unsigned FW       = 16,
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
  output logic          xo_busy,
  output logic [GB:0]   xo_n1,
  output logic [GB:0]   xo_n2
);
  import ga_pkg::*;

  typedef enum logic {S_LOAD, S_XOVER} state_t;
  state_t state;

  logic [GB-1:0] pa [2][N];
  logic [GB-1:0] rs [N];
  logic          p1sel, have_p1, loading, child_valid;
  logic [GB-1:0] ldidx, k;
  logic [AW-1:0] p1_addr, p2_addr, ch_addr;
  logic [FW-1:0] p1_fit, p2_fit, ch_fit;
  logic [GB:0]   n1, n2;
  logic [31:0]   rnd;
  logic [GB:0]   r1, r2;

  ga_rng #(.WIDTH(32), .SEED(SEED)) u_rng (.clk, .rst, .en(1'b1), .rnd);

  assign r1      = (GB+1)'(rand_below(rnd[15:0],  16'(N + 1)));
  assign r2      = (GB+1)'(rand_below(rnd[31:16], 16'(N + 1)));
  assign ready_o = (state == S_LOAD) && !loading;
  assign k       = i_first ? '0 : ldidx;
  assign xo_busy = (state == S_XOVER);
  assign xo_n1   = n1;
  assign xo_n2   = n2;

  // PMX step operands
  logic [GB-1:0] v, a, m;
  logic [GB-1:0] n1g;
  assign n1g = n1[GB-1:0];
  assign v   = pa[!p1sel][n1g];
  assign a   = pa[p1sel][n1g];
  assign m   = rs[v];

  always_ff @(posedge clk) begin
    if (state == S_LOAD && i_strobe) begin
      pa[!p1sel][k]  <= i_gene;
      rs[pa[p1sel][k]] <= k;
    end else if (state == S_XOVER && n1 != n2) begin
      pa[p1sel][m]   <= a;
      pa[p1sel][n1g] <= v;
      rs[a]          <= m;
      rs[v]          <= n1g;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_LOAD;
      p1sel       <= 1'b0;
      have_p1     <= 1'b0;
      loading     <= 1'b0;
      child_valid <= 1'b0;
      ldidx       <= '0;
      n1          <= '0;
      n2          <= '0;
      o_strobe    <= 1'b0;
    end else begin
      o_strobe <= 1'b0;
      case (state)
        S_LOAD: if (i_strobe) begin
          o_strobe <= child_valid;
          ldidx    <= k + 1'b1;
          loading  <= !i_last;
          if (i_last) begin
            child_valid <= 1'b0;
            if (!have_p1) begin
              have_p1 <= 1'b1;
              p1sel   <= !p1sel;
            end else begin
              state <= S_XOVER;
              n1    <= (r1 < r2) ? r1 : r2;
              n2    <= (r1 < r2) ? r2 : r1;
            end
          end
        end
        S_XOVER: begin
          if (n1 == n2) begin
            state       <= S_LOAD;
            child_valid <= 1'b1;
            p1sel       <= !p1sel;
          end else begin
            n1 <= n1 + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // side band: parent bookkeeping and output word
  always_ff @(posedge clk) begin
    if (state == S_LOAD && i_strobe) begin
      o_first <= i_first;
      o_last  <= i_last;
      o_gene  <= pa[!p1sel][k];
      o_addr  <= ch_addr;
      o_fit   <= ch_fit;
      if (i_first) begin
        p2_addr <= i_addr;
        p2_fit  <= i_fit;
      end
      if (i_last && !have_p1) begin
        p1_addr <= p2_addr;
        p1_fit  <= p2_fit;
      end
    end
    if (state == S_XOVER && n1 == n2) begin
      if (fit_better(32'(p1_fit), 32'(p2_fit), MINIMIZE)) begin
        ch_addr <= p2_addr;
        ch_fit  <= p2_fit;
      end else begin
        ch_addr <= p1_addr;
        ch_fit  <= p1_fit;
      end
      p1_addr <= p2_addr;
      p1_fit  <= p2_fit;
    end
  end
endmodule
