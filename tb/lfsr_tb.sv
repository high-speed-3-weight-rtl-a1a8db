// Self-checking test of lfsr at its default size: after reset the state is
// the seed, each step matches x^7 + x^6 + 1 computed here bit by bit, the
// state is never zero, it holds when en is low, and the period is 127.
module lfsr_tb;
  logic clk = 0, rst = 1, en = 0;
  logic [6:0] q;
  int checks = 0, failures = 0;

  lfsr dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] m;
    int period;
    @(negedge clk); @(negedge clk);
    checks++;
    if (q !== 7'd1) begin failures++; $display("FAIL seed %b", q); end
    rst = 0; en = 1;
    m = 7'd1;
    period = 0;
    for (int i = 1, steps = 0; i <= 133; i++) begin
      en = !(i >= 40 && i < 43);  // three cycles with the register stopped
      @(negedge clk);
      if (en) begin
        m = {m[5:0], m[6] ^ m[5]};
        steps++;
        if (period == 0 && m == 7'd1) period = steps;
      end
      checks++;
      if (q !== m || q == 0) begin failures++; $display("FAIL step %0d: q=%b expected %b", i, q, m); end
    end
    checks++;
    if (period != 127) begin failures++; $display("FAIL period %0d", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
