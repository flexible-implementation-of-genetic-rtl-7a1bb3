// ga_rng: pseudo-random bit source for the GA operators.
//
// WIDTH fresh bits are produced every clock from ceil(WIDTH/32) independent
// xorshift32 generators (x ^= x<<13; x ^= x>>17; x ^= x<<5) that step every
// cycle while `en` is high. Each lane gets its own non-zero seed derived from
// SEED and the lane number, so lanes are not copies of each other. The output
// is the registered generator state, valid from the first cycle after reset.
// Which random source the GA uses is not specified beyond "random"; a
// xorshift generator is this design's own choice because it costs three XOR
// layers per bit and has period 2^32-1.
module ga_rng #(
  parameter int unsigned WIDTH = 32,
  parameter logic [31:0] SEED  = 32'd65000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] rnd
);
  localparam int unsigned LANES = (WIDTH + 31) / 32;

  logic [31:0] state [LANES];
  logic [LANES*32-1:0] flat;

  function automatic logic [31:0] xs32(input logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] lane_seed(input int unsigned lane);
    logic [31:0] s;
    s = SEED ^ (32'(lane) * 32'h9E37_79B9) ^ 32'h5A5A_1234;
    return (s == 32'd0) ? 32'h1 : s;
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    always_ff @(posedge clk) begin
      if (rst)     state[l] <= lane_seed(l);
      else if (en) state[l] <= xs32(state[l]);
    end
    assign flat[l*32 +: 32] = state[l];
  end

  assign rnd = flat[WIDTH-1:0];
endmodule
