// tsp_evaluation: tour-length fitness for the TSP GA pipeline.
//
// The distance between cities C1 and C2 is a DW-bit word at address
// N*C1 + C2 of a table of 2^TAW words, written from outside before the run
// (tbl_we/tbl_addr/tbl_data). As a tour streams in, one city per clock,
// the distance from the previous city is fetched and added to a running
// sum. On the last city the closing leg back to the first city is fetched
// in the same clock through a second read port, so the fitness is the
// length of the closed round trip.
// Timing: the table read is registered (one clock), the accumulation is the
// next clock, so the fitness is ready LAT=2 clocks after the last city. The
// tour words, flags, address and parent fitness travel through a matching
// two-stage delay line, so the fitness, the worse parent's data and the last
// tour word leave in the same clock; a new tour may follow immediately.
// The table layout (Eq. n*C1+C2), the 8-bit distance and the per-city
// accumulation follow the document; counting the closing leg, the second
// read port and the load port are this design's own choices.
module tsp_evaluation #(
  parameter int unsigned N   = 51,
  parameter int unsigned GB  = 6,
  parameter int unsigned AW  = 6,
  parameter int unsigned FW  = 16,
  parameter int unsigned DW  = 8,
  parameter int unsigned TAW = 12
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           tbl_we,
  input  logic [TAW-1:0] tbl_addr,
  input  logic [DW-1:0]  tbl_data,
  input  logic           i_strobe,
  input  logic           i_first,
  input  logic           i_last,
  input  logic [GB-1:0]  i_gene,
  input  logic [AW-1:0]  i_addr,
  input  logic [FW-1:0]  i_pfit,
  output logic           o_strobe,
  output logic           o_first,
  output logic           o_last,
  output logic [GB-1:0]  o_gene,
  output logic [AW-1:0]  o_addr,
  output logic [FW-1:0]  o_pfit,
  output logic [FW-1:0]  o_cfit
);
  localparam int unsigned LAT = 2;

  logic [DW-1:0] dist_tbl [2**TAW];

  always_ff @(posedge clk) begin
    if (tbl_we) dist_tbl[tbl_addr] <= tbl_data;
  end

  logic [GB-1:0]  prev, first_city;
  logic [TAW-1:0] addr_a, addr_b;
  logic [DW-1:0]  rd_a, rd_b;
  logic           s1_strobe, s1_first, s1_last;
  logic [FW-1:0]  acc;

  assign addr_a = TAW'(N * 32'(prev) + 32'(i_gene));
  assign addr_b = TAW'(N * 32'(i_gene) + 32'(i_first ? i_gene : first_city));

  // stage 1: fetch
  always_ff @(posedge clk) begin
    if (i_strobe) begin
      prev <= i_gene;
      if (i_first) first_city <= i_gene;
    end
    rd_a <= dist_tbl[addr_a];
    rd_b <= dist_tbl[addr_b];
    if (rst) s1_strobe <= 1'b0;
    else     s1_strobe <= i_strobe;
    s1_first <= i_first;
    s1_last  <= i_last;
  end

  // stage 2: accumulate
  always_ff @(posedge clk) begin
    if (s1_strobe) begin
      if (s1_first) acc <= '0;
      else          acc <= acc + FW'(rd_a);
      if (s1_last)  o_cfit <= (s1_first ? '0 : acc + FW'(rd_a)) + FW'(rd_b);
    end
  end

  // side-band delay line
  logic          d_strobe [LAT];
  logic          d_first  [LAT];
  logic          d_last   [LAT];
  logic [GB-1:0] d_gene   [LAT];
  logic [AW-1:0] d_addr   [LAT];
  logic [FW-1:0] d_pfit   [LAT];

  always_ff @(posedge clk) begin
    for (int s = 0; s < LAT; s++) begin
      if (rst) d_strobe[s] <= 1'b0;
      else     d_strobe[s] <= (s == 0) ? i_strobe : d_strobe[s-1];
      d_first[s] <= (s == 0) ? i_first : d_first[s-1];
      d_last[s]  <= (s == 0) ? i_last  : d_last[s-1];
      d_gene[s]  <= (s == 0) ? i_gene  : d_gene[s-1];
      d_addr[s]  <= (s == 0) ? i_addr  : d_addr[s-1];
      d_pfit[s]  <= (s == 0) ? i_pfit  : d_pfit[s-1];
    end
  end

  assign o_strobe = d_strobe[LAT-1];
  assign o_first  = d_first[LAT-1];
  assign o_last   = d_last[LAT-1];
  assign o_gene   = d_gene[LAT-1];
  assign o_addr   = d_addr[LAT-1];
  assign o_pfit   = d_pfit[LAT-1];
endmodule
