// Weight decoder ("Logic"): session index to Set[n-1:0] and Reset[n-1:0].
//
// WEIGHTS holds one weight assignment per session, a weight_e code per
// generator output. A W_ONE bit raises Set[i], a W_ZERO bit raises Reset[i],
// a W_RAND bit raises neither, so the accumulator runs freely there. The
// default table has two sessions built by intersecting pairs of the c17
// test vectors 00101, 01010, 10010, 11111 (bit 4 first): the first pair
// gives 0---- and the second 1--1- ('-' = random). While rst is high every
// bit is put in Reset, which clears Register A and fills Register B with
// ones. Which test vectors are grouped, and the reset behaviour, are this
// design's choices. Purely combinational; an out-of-range session index
// (K not a power of two) gives all-random.
module weight_logic
  import wpg_pkg::*;
#(
  parameter int WIDTH = 5,
  parameter int K     = 2,
  parameter logic [K-1:0][WIDTH-1:0][1:0] WEIGHTS = {
    {W_ONE,  W_RAND, W_RAND, W_ONE,  W_RAND},   // session 1: T3 ^ T4 = 1--1-
    {W_ZERO, W_RAND, W_RAND, W_RAND, W_RAND}    // session 0: T1 ^ T2 = 0----
  },
  localparam int SW = (K > 1) ? $clog2(K) : 1
) (
  input  logic             rst,
  input  logic [SW-1:0]    session,
  output logic [WIDTH-1:0] set_v,
  output logic [WIDTH-1:0] reset_v
);

  always_comb begin
    set_v   = '0;
    reset_v = '0;
    if (rst) begin
      reset_v = '1;
    end else if (int'(session) < K) begin
      for (int i = 0; i < WIDTH; i++) begin
        set_v[i]   = (WEIGHTS[session][i] == W_ONE);
        reset_v[i] = (WEIGHTS[session][i] == W_ZERO);
      end
    end
  end

endmodule
