// Self-checking test of session_counter with K=3 sessions of N=5 patterns:
// the session index steps after every N cycles, running is high for exactly
// K*N cycles, done rises after the last and everything then stays put.
module session_counter_tb;
  localparam int K = 3, N = 5;
  logic clk = 0, rst = 1;
  logic [1:0] session;
  logic [2:0] pattern;
  logic running, done;
  int checks = 0, failures = 0, n_running = 0;

  session_counter #(.K(K), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int c = 0; c < K * N + 6; c++) begin
      #1;
      checks++;
      if (c < K * N) begin
        if (session !== 2'(c / N) || pattern !== 3'(c % N) || !running || done) begin
          failures++;
          $display("FAIL cycle %0d: session=%0d pattern=%0d running=%0b done=%0b", c, session, pattern, running, done);
        end
      end else if (!done || running || session !== 2'(K - 1)) begin
        failures++;
        $display("FAIL cycle %0d after end: done=%0b running=%0b", c, done, running);
      end
      if (running) n_running++;
      @(negedge clk);
    end
    checks++;
    if (n_running != K * N) begin failures++; $display("FAIL ran %0d cycles", n_running); end
    rst = 1; @(negedge clk); rst = 0; #1;
    checks++;
    if (done || session != 0 || pattern != 0) begin failures++; $display("FAIL restart"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
