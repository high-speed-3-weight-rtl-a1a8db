// Self-checking test of weight_logic at its defaults. Session 0 must hold
// bit 4 at 0 and free bits 3..0; session 1 must hold bits 4 and 1 at 1 and
// free bits 3, 2, 0; rst must put every bit in Reset; Set and Reset are
// never high together.
module weight_logic_tb;
  logic rst;
  logic [0:0] session;
  logic [4:0] set_v, reset_v;
  int checks = 0, failures = 0;

  weight_logic dut (.*);

  task automatic check(input logic [4:0] es, er, input string what);
    checks++;
    if (set_v !== es || reset_v !== er || (set_v & reset_v) != 0) begin
      failures++;
      $display("FAIL %s: set=%b reset=%b expected %b %b", what, set_v, reset_v, es, er);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; session = 0; #1; check(5'b00000, 5'b11111, "reset, session 0");
    session = 1;          #1; check(5'b00000, 5'b11111, "reset, session 1");
    rst = 0; session = 0; #1; check(5'b00000, 5'b10000, "session 0 = 0----");
    session = 1;          #1; check(5'b10010, 5'b00000, "session 1 = 1--1-");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
