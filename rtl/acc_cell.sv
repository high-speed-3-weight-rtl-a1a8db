// One bit slice of the weighted-pattern accumulator.
//
// A full adder adds B[i], the fed-back A[i] and the carry in; its sum is the
// D input of the A flip-flop. The B flip-flop is loaded from b_d (the
// pseudo-random source). Set[i] drives the S pin of the A flip-flop and the R
// pin of the B flip-flop; Reset[i] drives the R pin of A and the S pin of B.
// So Set[i] gives A[i]=1, B[i]=0 and Reset[i] gives A[i]=0, B[i]=1: the two
// adder inputs differ, the cell passes cin to cout unchanged, and the output
// stays fixed. With both low the cell is an ordinary accumulator bit.
// A[i] and B[i] change on the rising clock edge, or at once when Set[i] or
// Reset[i] rises; cout is combinational.
module acc_cell (
  input  logic clk,
  input  logic set_i,
  input  logic reset_i,
  input  logic b_d,
  input  logic cin,
  output logic cout,
  output logic a_q,
  output logic b_q
);

  logic sum;

  full_adder u_fa (
    .a   (a_q),
    .b   (b_q),
    .cin (cin),
    .s   (sum),
    .cout(cout)
  );

  sr_dff u_a (.clk(clk), .set(set_i),   .reset(reset_i), .d(sum), .q(a_q));
  sr_dff u_b (.clk(clk), .set(reset_i), .reset(set_i),   .d(b_d), .q(b_q));

endmodule
