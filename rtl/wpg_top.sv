// Accumulator-based 3-weight test-per-clock pattern generator, with response
// compaction.
//
// The session counter steps through K weight sessions of N clock cycles. The
// weight decoder turns the current session into Set/Reset lines that hold
// each generator output at 0 or 1 or let it run. The accumulator adds
// Register B (reloaded every clock from the LFSR) into Register A; held bits
// pass their carry through, so the free bits form a pseudo-random sequence
// while the held bits stay constant. Register A is the test pattern cut_in.
// The CUT response is added into the compactor during every valid cycle.
//
// Timing: after rst falls, cut_in is a test pattern in every cycle where
// valid is high, K*N cycles in all, and then done rises and stays high. A new
// session's held bits take effect in the first cycle of that session. cut_resp
// is sampled at the same clock edge that ends the pattern's cycle, so the CUT
// must be combinational. ci is the adder's carry in.
//
// The structure (session counter, weight decoder, Set/Reset crossed onto the
// two accumulator registers, any adder) is the published method; the LFSR,
// the patterns per session, the default weight table, the reset behaviour
// and the compactor width are this design's choices.
module wpg_top
  import wpg_pkg::*;
#(
  parameter int          WIDTH      = 5,
  parameter int          K          = 2,
  parameter int          N          = 16,
  parameter logic [K-1:0][WIDTH-1:0][1:0] WEIGHTS = {
    {W_ONE,  W_RAND, W_RAND, W_ONE,  W_RAND},
    {W_ZERO, W_RAND, W_RAND, W_RAND, W_RAND}
  },
  parameter adder_kind_e ADDER_KIND = ADD_CELLS,
  parameter int          LFSR_W     = 7,
  parameter logic [LFSR_W-1:0] LFSR_TAPS = 7'b1100000,
  parameter logic [LFSR_W-1:0] LFSR_SEED = 7'b0000001,
  parameter int          RESP_W     = 2,
  parameter int          SIG_W      = 16,
  localparam int SW = (K > 1) ? $clog2(K) : 1,
  localparam int PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ci,
  output logic [WIDTH-1:0]  cut_in,
  input  logic [RESP_W-1:0] cut_resp,
  output logic              cout,
  output logic [SW-1:0]     session,
  output logic [PW-1:0]     pattern,
  output logic              valid,
  output logic              done,
  output logic [SIG_W-1:0]  signature
);

  logic [WIDTH-1:0]  set_v, reset_v;
  logic [WIDTH-1:0]  b_q;  // Register B: visible for debug only
  logic [LFSR_W-1:0] rnd;
  logic              running;

  session_counter #(.K(K), .N(N)) u_session (
    .clk    (clk),
    .rst    (rst),
    .session(session),
    .pattern(pattern),
    .running(running),
    .done   (done)
  );

  weight_logic #(.WIDTH(WIDTH), .K(K), .WEIGHTS(WEIGHTS)) u_logic (
    .rst    (rst),
    .session(session),
    .set_v  (set_v),
    .reset_v(reset_v)
  );

  lfsr #(.WIDTH(LFSR_W), .TAPS(LFSR_TAPS), .SEED(LFSR_SEED)) u_lfsr (
    .clk(clk),
    .rst(rst),
    .en (1'b1),
    .q  (rnd)
  );

  logic [WIDTH-1:0] b_d;
  always_comb begin
    for (int i = 0; i < WIDTH; i++) b_d[i] = rnd[i % LFSR_W];
  end

  accumulator #(.WIDTH(WIDTH), .ADDER_KIND(ADDER_KIND)) u_acc (
    .clk    (clk),
    .set_v  (set_v),
    .reset_v(reset_v),
    .b_d    (b_d),
    .cin    (ci),
    .a_q    (cut_in),
    .b_q    (b_q),
    .cout   (cout)
  );

  always_comb valid = running && !rst;

  response_compactor #(.RESP_W(RESP_W), .SIG_W(SIG_W)) u_comp (
    .clk      (clk),
    .rst      (rst),
    .en       (valid),
    .resp     (cut_resp),
    .signature(signature)
  );

endmodule
