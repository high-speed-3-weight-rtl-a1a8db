// Exhaustive test of full_adder against the eight rows of the full-adder
// truth table, including the four rows with a != b where cout equals cin.
module full_adder_tb;
  logic a, b, cin, s, cout;
  int checks = 0, failures = 0, pass_rows = 0;

  full_adder dut (.*);

  // rows {cin, a, b} -> {s, cout}
  localparam logic [1:0] TABLE [8] = '{2'b00, 2'b10, 2'b10, 2'b01,
                                       2'b10, 2'b01, 2'b01, 2'b11};

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      {cin, a, b} = 3'(r);
      #1;
      checks++;
      if ({s, cout} !== TABLE[r]) begin
        failures++;
        $display("FAIL row %0d: s=%0b cout=%0b", r + 1, s, cout);
      end
      if (a != b) begin
        checks++;
        pass_rows++;
        if (cout !== cin) begin
          failures++;
          $display("FAIL row %0d: carry not passed", r + 1);
        end
      end
    end
    checks++;
    if (pass_rows != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
