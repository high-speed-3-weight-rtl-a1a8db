// Behavioural model of the ISCAS-85 c17 benchmark, the circuit under test in
// the end-to-end testbench: five inputs, two outputs, six NAND gates.
// in[4:0] are the primary inputs 1, 2, 3, 6, 7 and out = {22, 23}.
module c17_model (
  input  logic [4:0] in,
  output logic [1:0] out
);
  logic n1, n2, n3, n6, n7, n10, n11, n16, n19;
  always_comb begin
    {n1, n2, n3, n6, n7} = in;
    n10 = ~(n1 & n3);
    n11 = ~(n3 & n6);
    n16 = ~(n2 & n11);
    n19 = ~(n11 & n7);
    out = {~(n10 & n16), ~(n16 & n19)};
  end
endmodule
