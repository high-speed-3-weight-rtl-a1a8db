// Self-checking test of sr_dff: clocked capture, asynchronous set and reset
// between clock edges, reset-over-set priority and holding while forced.
module sr_dff_tb;
  logic clk = 0, set = 0, reset = 0, d = 0, q;
  int checks = 0, failures = 0;

  sr_dff dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic model;
    reset = 1; #2; check(1'b0, "async reset");
    reset = 0; #1;
    // clocked capture of random data
    model = 0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); d = 1'($urandom);
      @(posedge clk); #1; model = d; check(model, "capture");
    end
    // set between edges, without a clock edge
    @(negedge clk); d = 0; #1; set = 1; #1; check(1'b1, "async set");
    @(posedge clk); #1; check(1'b1, "set holds over clock with d=0");
    @(negedge clk); set = 0; #1; check(1'b1, "keeps 1 after set falls");
    @(posedge clk); #1; check(1'b0, "captures d after set falls");
    @(negedge clk); d = 1; @(posedge clk); #1; check(1'b1, "capture 1");
    @(negedge clk); #1; reset = 1; #1; check(1'b0, "async reset mid-cycle");
    @(posedge clk); #1; check(1'b0, "reset holds with d=1");
    @(negedge clk); set = 1; #1; check(1'b0, "reset wins over set");
    reset = 0; #1; @(posedge clk); #1; check(1'b1, "set after reset released");
    // straight from forced-1 to forced-0 and back, with no free cycle between
    @(negedge clk); reset = 1; set = 0; #1; check(1'b0, "set -> reset switch");
    @(posedge clk); #1; @(negedge clk); reset = 0; set = 1; #1; check(1'b1, "reset -> set switch");
    @(posedge clk); #1; @(negedge clk); set = 0; d = 0; #1; check(1'b1, "keeps 1 after switch");
    @(posedge clk); #1; check(1'b0, "free again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
