// Self-checking test of response_compactor with an 8-bit signature so that
// wrap-around happens: random responses, random enable, reset clearing.
module response_compactor_tb;
  logic clk = 0, rst = 1, en = 0;
  logic [1:0] resp = 0;
  logic [7:0] signature;
  int checks = 0, failures = 0, wraps = 0;

  response_compactor #(.RESP_W(2), .SIG_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned model;
    @(negedge clk); rst = 0;
    model = 0;
    for (int i = 0; i < 600; i++) begin
      en = ($urandom_range(3) != 0);
      resp = 2'($urandom);
      @(negedge clk);
      if (en) begin
        if (model + resp > 255) wraps++;
        model = (model + resp) % 256;
      end
      checks++;
      if (signature !== 8'(model)) begin failures++; $display("FAIL step %0d: %0d vs %0d", i, signature, model); end
    end
    checks++;
    if (wraps == 0) failures++;
    rst = 1; @(negedge clk);
    checks++;
    if (signature != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
