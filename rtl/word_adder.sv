// WIDTH-bit adder with carry in and carry out.
//
// {cout, s} = a + b + cin. The generator places no requirement on the adder
// architecture, so this is written at word level and left to synthesis; any
// fast adder can stand in its place. Purely combinational.
module word_adder #(
  parameter int WIDTH = 5
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  always_comb {cout, s} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, cin};

endmodule
