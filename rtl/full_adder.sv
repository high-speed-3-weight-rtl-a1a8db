// One-bit full adder.
//
// s = a ^ b ^ cin and cout = majority(a, b, cin). Whenever a != b the carry
// out equals the carry in; the weighted generator relies on exactly this to
// pass carries through bits that are held at a constant value.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  always_comb begin
    s    = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end

endmodule
