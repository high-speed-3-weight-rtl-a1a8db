// Self-checking test of acc_cell. Random Set/Reset/data/carry stimulus is
// applied and the A and B flip-flops and the carry out are compared with a
// model of the cell: A takes a ^ b ^ cin, B takes b_d, Set forces A=1, B=0,
// Reset forces A=0, B=1, and with A != B the carry passes through.
module acc_cell_tb;
  logic clk = 0, set_i = 0, reset_i = 0, b_d = 0, cin = 0;
  logic cout, a_q, b_q;
  int checks = 0, failures = 0, n_pass = 0;

  acc_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ma, mb, mc;
    reset_i = 1; #1;
    ma = 0; mb = 1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      case ($urandom_range(3))
        0: begin set_i = 1; reset_i = 0; end
        1: begin set_i = 0; reset_i = 1; end
        default: begin set_i = 0; reset_i = 0; end
      endcase
      b_d = 1'($urandom);
      cin = 1'($urandom);
      #1;
      if (set_i) begin ma = 1; mb = 0; end
      if (reset_i) begin ma = 0; mb = 1; end
      mc = (ma & mb) | (cin & (ma ^ mb));
      checks++;
      if (a_q !== ma || b_q !== mb || cout !== mc) begin
        failures++;
        $display("FAIL step %0d: a=%0b/%0b b=%0b/%0b cout=%0b/%0b", i, a_q, ma, b_q, mb, cout, mc);
      end
      if (set_i || reset_i) begin
        n_pass++;
        checks++;
        if (cout !== cin) begin failures++; $display("FAIL held cell did not pass carry"); end
      end
      @(posedge clk);
      if (!set_i && !reset_i) begin
        ma = ma ^ mb ^ cin;
        mb = b_d;
      end
    end
    checks++;
    if (n_pass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
