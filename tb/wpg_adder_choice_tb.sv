// The generator does not depend on how its adder is built. This test runs
// two copies of wpg_top side by side, one with the accumulator made of
// full-adder bit slices and one with an unmodified word-level adder between
// plain registers, through several complete tests with random carry in,
// and requires identical patterns, carries, control and signatures.
module wpg_adder_choice_tb;
  import wpg_pkg::*;
  logic clk = 0, rst = 1, ci = 0;
  logic [4:0] in_c, in_w;
  logic [1:0] resp_c, resp_w;
  logic cout_c, cout_w, valid_c, valid_w, done_c, done_w;
  logic [0:0] sess_c, sess_w;
  logic [3:0] pat_c, pat_w;
  logic [15:0] sig_c, sig_w;
  int checks = 0, failures = 0, runs = 0;

  wpg_top #(.ADDER_KIND(ADD_CELLS)) u_cells (
    .clk, .rst, .ci, .cut_in(in_c), .cut_resp(resp_c), .cout(cout_c), .session(sess_c),
    .pattern(pat_c), .valid(valid_c), .done(done_c), .signature(sig_c));
  wpg_top #(.ADDER_KIND(ADD_WORD)) u_word (
    .clk, .rst, .ci, .cut_in(in_w), .cut_resp(resp_w), .cout(cout_w), .session(sess_w),
    .pattern(pat_w), .valid(valid_w), .done(done_w), .signature(sig_w));
  c17_model cut_c (.in(in_c), .out(resp_c));
  c17_model cut_w (.in(in_w), .out(resp_w));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (runs = 0; runs < 4; runs++) begin
      rst = 1;
      repeat (2) @(negedge clk);
      rst = 0;
      while (!done_c) begin
        ci = (runs == 0) ? 1'b0 : 1'($urandom);
        #1;
        checks++;
        if ({in_c, cout_c, sess_c, pat_c, valid_c, done_c} !== {in_w, cout_w, sess_w, pat_w, valid_w, done_w}) begin
          failures++;
          $display("FAIL run %0d at %0t: cells %b word %b", runs, $time, in_c, in_w);
        end
        @(negedge clk);
      end
      checks++;
      if (sig_c !== sig_w || !done_w) begin failures++; $display("FAIL signatures %h %h", sig_c, sig_w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
