// Fibonacci linear feedback shift register.
//
// Each enabled rising clock edge shifts the state one place toward the MSB
// and enters, at bit 0, the XOR of the state bits marked in TAPS. The default
// TAPS = 7'b1100000 is x^7 + x^6 + 1, a maximal-length polynomial (period
// 127). rst loads SEED synchronously; SEED must not be zero. Stage count,
// polynomial and seed are this design's choices. q is the registered state.
module lfsr #(
  parameter int               WIDTH = 7,
  parameter logic [WIDTH-1:0] TAPS  = 7'b1100000,
  parameter logic [WIDTH-1:0] SEED  = 7'b0000001
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] q
);

  logic feedback;

  always_comb feedback = ^(q & TAPS);

  always_ff @(posedge clk) begin
    if (rst)     q <= SEED;
    else if (en) q <= {q[WIDTH-2:0], feedback};
  end

  initial assert (SEED != '0) else $error("lfsr: SEED must be nonzero");

endmodule
