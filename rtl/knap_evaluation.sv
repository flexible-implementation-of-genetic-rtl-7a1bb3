// knap_evaluation: pipelined Knapsack fitness.
//
// Item i has a value reg_value[i] and a volume reg_volume[i] (VW bits each),
// and the knapsack a capacity; all are loaded from outside before the run
// (item_we / cap_we). For each chromosome the selected values and volumes
// are summed in two binary adder trees of log2(S) registered levels, so a
// new chromosome can enter every clock. The fitness is the value sum, or 0
// when the volume sum exceeds the capacity (a lethal individual).
// Timing: one register stage selects the leaf terms, log2(S) stages add,
// one stage applies the capacity rule: LAT = log2(S)+2 clocks from input to
// output. The chromosome, the worse parent's address and its fitness travel
// in a matching delay line and leave together with the offspring fitness.
// The adder trees and the fitness rule follow the document; the item and
// capacity widths, the load port and the two extra stages are this design's
// own choices. S must be a power of two.
module knap_evaluation #(
  parameter int unsigned S  = 64,
  parameter int unsigned AW = 6,
  parameter int unsigned FW = 16,
  parameter int unsigned VW = 8,
  parameter int unsigned IW = (S > 1) ? $clog2(S) : 1
) (
  input  logic              clk,
  input  logic              rst,
  // problem data
  input  logic              item_we,
  input  logic [IW-1:0]     item_idx,
  input  logic [VW-1:0]     item_value,
  input  logic [VW-1:0]     item_volume,
  input  logic              cap_we,
  input  logic [VW+IW-1:0]  cap_in,
  // offspring from mutation
  input  logic              i_strobe,
  input  logic [S-1:0]      i_gene,
  input  logic [AW-1:0]     i_addr,
  input  logic [FW-1:0]     i_pfit,
  // to management
  output logic              o_strobe,
  output logic [S-1:0]      o_gene,
  output logic [AW-1:0]     o_addr,
  output logic [FW-1:0]     o_pfit,
  output logic [FW-1:0]     o_cfit
);
  localparam int unsigned L   = $clog2(S);
  localparam int unsigned SW  = VW + L;
  localparam int unsigned LAT = L + 2;

  logic [VW-1:0]    reg_value  [S];
  logic [VW-1:0]    reg_volume [S];
  logic [VW+IW-1:0] capacity;

  always_ff @(posedge clk) begin
    if (item_we) begin
      reg_value[item_idx]  <= item_value;
      reg_volume[item_idx] <= item_volume;
    end
    if (rst)         capacity <= '0;
    else if (cap_we) capacity <= cap_in;
  end

  // tree level 0 holds the selected leaf terms; level k holds S>>k sums
  logic [SW-1:0] tv [L+1][S];
  logic [SW-1:0] tw [L+1][S];

  always_ff @(posedge clk) begin
    for (int i = 0; i < S; i++) begin
      tv[0][i] <= i_gene[i] ? SW'(reg_value[i])  : '0;
      tw[0][i] <= i_gene[i] ? SW'(reg_volume[i]) : '0;
    end
    for (int k = 1; k <= L; k++) begin
      for (int i = 0; i < (S >> k); i++) begin
        tv[k][i] <= tv[k-1][2*i] + tv[k-1][2*i+1];
        tw[k][i] <= tw[k-1][2*i] + tw[k-1][2*i+1];
      end
    end
  end

  // side-band delay line, LAT stages
  logic          d_strobe [LAT];
  logic [S-1:0]  d_gene   [LAT];
  logic [AW-1:0] d_addr   [LAT];
  logic [FW-1:0] d_pfit   [LAT];

  always_ff @(posedge clk) begin
    for (int k = 0; k < LAT; k++) begin
      if (rst) d_strobe[k] <= 1'b0;
      else     d_strobe[k] <= (k == 0) ? i_strobe : d_strobe[k-1];
      d_gene[k] <= (k == 0) ? i_gene : d_gene[k-1];
      d_addr[k] <= (k == 0) ? i_addr : d_addr[k-1];
      d_pfit[k] <= (k == 0) ? i_pfit : d_pfit[k-1];
    end
  end

  always_ff @(posedge clk) begin
    o_cfit <= (tw[L][0] > SW'(capacity)) ? '0 : FW'(tv[L][0]);
  end

  assign o_strobe = d_strobe[LAT-1];
  assign o_gene   = d_gene[LAT-1];
  assign o_addr   = d_addr[LAT-1];
  assign o_pfit   = d_pfit[LAT-1];
endmodule
