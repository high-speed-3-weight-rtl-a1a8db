// Pattern and session counter.
//
// A test is K sessions of N patterns, one pattern per clock. The pattern
// counter counts 0..N-1 inside a session; when it wraps, the session counter
// (ceil(log2 K) bits) advances. After the N-th pattern of session K-1 both
// stop and done rises. running is high in every cycle that applies a pattern
// (after rst and before done). All outputs are registered, except running,
// which is the inverse of the registered done. rst is synchronous.
module session_counter #(
  parameter int K  = 2,
  parameter int N  = 16,
  localparam int SW = (K > 1) ? $clog2(K) : 1,
  localparam int PW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst,
  output logic [SW-1:0] session,
  output logic [PW-1:0] pattern,
  output logic          running,
  output logic          done
);

  localparam logic [SW-1:0] LAST_S = SW'(K - 1);
  localparam logic [PW-1:0] LAST_P = PW'(N - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      session <= '0;
      pattern <= '0;
      done    <= 1'b0;
    end else if (!done) begin
      if (pattern == LAST_P) begin
        pattern <= '0;
        if (session == LAST_S) done <= 1'b1;
        else                   session <= session + 1'b1;
      end else begin
        pattern <= pattern + 1'b1;
      end
    end
  end

  always_comb running = !done;

  initial assert (K >= 1 && N >= 1) else $error("session_counter: K and N must be positive");

endmodule
