// End-to-end test of wpg_top at its default size, driving the c17 model.
//
// The testbench keeps its own model of the whole generator: the 7-bit LFSR
// (x^7 + x^6 + 1, seed 1), Registers A and B, the two weight sessions
// 0---- and 1--1-, the 2 x 16 pattern schedule and the running sum of c17
// responses. Every cycle it compares cut_in, cout, session, valid and done
// with the model, checks that held bits never move inside a session, and at
// the end compares the signature. It also counts the mechanisms of the
// design and fails if one never happened: a session change, a bit held at
// 0, a bit held at 1, a carry passed through a held bit, a free bit
// toggling, a carry out, and the end of the test. One pattern per clock
// (test per clock) is checked by counting valid cycles against K*N.
module wpg_top_tb;
  localparam int WIDTH = 5, K = 2, N = 16;

  logic clk = 0, rst = 1, ci = 0;
  logic [WIDTH-1:0] cut_in;
  logic [1:0] cut_resp;
  logic cout, valid, done;
  logic [0:0] session;
  logic [3:0] pattern;
  logic [15:0] signature;
  int checks = 0, failures = 0;

  wpg_top dut (.*);
  c17_model cut (.in(cut_in), .out(cut_resp));

  always #5 clk = ~clk;

  // reference tables, written out here independently of the RTL
  localparam logic [WIDTH-1:0] HOLD [K] = '{5'b10000, 5'b10010};
  localparam logic [WIDTH-1:0] HVAL [K] = '{5'b00000, 5'b10010};
  localparam logic [WIDTH-1:0] TVEC [4] = '{5'b00101, 5'b01010, 5'b10010, 5'b11111};

  function automatic logic [1:0] c17(input logic [4:0] x);
    logic g10, g11, g16, g19;
    g10 = ~(x[4] & x[2]);
    g11 = ~(x[2] & x[1]);
    g16 = ~(x[3] & g11);
    g19 = ~(g11 & x[0]);
    return {~(g10 & g16), ~(g16 & g19)};
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_switch = 0, n_hold0 = 0, n_hold1 = 0, n_carry_thru = 0, n_toggle = 0;
  int n_cout = 0, n_done = 0, n_valid = 0;
  bit seen_tvec [4];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: cut_in=%b session=%0d", what, $time, cut_in, session);
    end
  endtask

  initial begin
    logic [6:0] m_lfsr;
    logic [WIDTH-1:0] m_a, m_b, prev_a;
    logic [WIDTH:0] sum, low;
    int m_sess, m_pat, prev_sess;
    bit m_done;
    int unsigned m_sig;

    repeat (3) @(negedge clk);
    chk(cut_in == 0 && signature == 0 && !done, "reset state");
    rst = 0;
    m_lfsr = 7'd1; m_a = '0; m_b = '1;
    m_sess = 0; m_pat = 0; m_done = 0; m_sig = 0;
    prev_sess = 0; prev_a = '0;

    for (int cyc = 0; cyc < K * N + 8; cyc++) begin
      ci = 1'($urandom);
      #1;
      // held bits take effect at once
      m_a = (m_a & ~HOLD[m_sess]) | HVAL[m_sess];
      m_b = (m_b & ~HOLD[m_sess]) | (HOLD[m_sess] & ~HVAL[m_sess]);
      sum = {1'b0, m_a} + {1'b0, m_b} + (WIDTH + 1)'(ci);

      chk(cut_in === m_a, "pattern");
      chk(cout === sum[WIDTH], "carry out");
      chk(int'(session) == m_sess && valid == !m_done && done == m_done, "control");
      chk((cut_in & HOLD[m_sess]) == HVAL[m_sess], "held bits");

      if (valid) begin
        n_valid++;
        if (int'(pattern) != m_pat) chk(0, "pattern index");
        for (int t = 0; t < 4; t++)
          if (cut_in == TVEC[t] && ((TVEC[t] & HOLD[m_sess]) == HVAL[m_sess])) seen_tvec[t] = 1;
        if (m_sess != prev_sess) n_switch++;
        if ((HOLD[m_sess] & ~HVAL[m_sess]) != 0) n_hold0++;
        if ((HOLD[m_sess] & HVAL[m_sess]) != 0) n_hold1++;
        if (((cut_in ^ prev_a) & ~HOLD[m_sess]) != 0) n_toggle++;
        if (cout) n_cout++;
        for (int k = 0; k < WIDTH; k++) begin
          low = {1'b0, m_a & WIDTH'((1 << k) - 1)} + {1'b0, m_b & WIDTH'((1 << k) - 1)}
                + (WIDTH + 1)'(ci);
          if (HOLD[m_sess][k] && low[k]) n_carry_thru++;
        end
      end
      prev_sess = m_sess;
      prev_a = cut_in;

      // clock edge: advance the model
      @(posedge clk);
      if (!m_done) begin
        m_sig += c17(m_a);
        if (m_pat == N - 1) begin
          m_pat = 0;
          if (m_sess == K - 1) m_done = 1; else m_sess++;
        end else m_pat++;
      end
      m_a = sum[WIDTH-1:0];
      m_b = m_lfsr[WIDTH-1:0];
      m_lfsr = {m_lfsr[5:0], m_lfsr[6] ^ m_lfsr[5]};
      @(negedge clk);
      if (done && n_done == 0) n_done = 1;
    end

    chk(signature == 16'(m_sig), "signature");
    chk(n_valid == K * N, "one pattern per clock, K*N patterns");
    chk(n_switch > 0, "session change happened");
    chk(n_hold0 > 0, "bit held at 0 happened");
    chk(n_hold1 > 0, "bit held at 1 happened");
    chk(n_carry_thru > 0, "carry through a held bit happened");
    chk(n_toggle > 0, "free bit toggled");
    chk(n_cout > 0, "carry out happened");
    chk(n_done > 0, "test ended");
    $display("patterns %0d, session changes %0d, hold0 %0d, hold1 %0d, carries through held bits %0d, toggles %0d, couts %0d",
             n_valid, n_switch, n_hold0, n_hold1, n_carry_thru, n_toggle, n_cout);
    $display("Table I vectors reproduced in their sessions: T1 %0d T2 %0d T3 %0d T4 %0d, signature %h",
             seen_tvec[0], seen_tvec[1], seen_tvec[2], seen_tvec[3], signature);

    // a second run after reset must repeat the first one
    rst = 1; @(negedge clk); @(negedge clk);
    chk(cut_in == 0 && signature == 0 && !done && session == 0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
