// Weighted-pattern accumulator: Register A, Register B and an adder.
//
// Every rising clock edge Register A takes A + B + cin and Register B takes
// b_d. Bit i is forced by Set[i] (A[i]=1, B[i]=0) or by Reset[i] (A[i]=0,
// B[i]=1) through the asynchronous set/reset pins of its two flip-flops. A
// forced bit keeps a constant output, and since its two adder inputs differ
// its carry out equals its carry in; the free bits therefore keep counting as
// if the forced bits were absent from the addition. Nothing inside the adder
// is changed to obtain this, so the adder can be of any kind:
//   ADD_CELLS  a ripple of acc_cell bit slices (full adder per bit),
//   ADD_WORD   two flip-flop registers around an unmodified word_adder.
// Both give the same sequence. a_q, b_q change on the clock edge or at once
// when a Set/Reset line rises; cout is combinational.
module accumulator
  import wpg_pkg::*;
#(
  parameter int          WIDTH      = 5,
  parameter adder_kind_e ADDER_KIND = ADD_CELLS
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] set_v,
  input  logic [WIDTH-1:0] reset_v,
  input  logic [WIDTH-1:0] b_d,
  input  logic             cin,
  output logic [WIDTH-1:0] a_q,
  output logic [WIDTH-1:0] b_q,
  output logic             cout
);

  if (ADDER_KIND == ADD_CELLS) begin : g_cells
    logic [WIDTH:0] carry;
    assign carry[0] = cin;
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      acc_cell u_cell (
        .clk    (clk),
        .set_i  (set_v[i]),
        .reset_i(reset_v[i]),
        .b_d    (b_d[i]),
        .cin    (carry[i]),
        .cout   (carry[i+1]),
        .a_q    (a_q[i]),
        .b_q    (b_q[i])
      );
    end
    assign cout = carry[WIDTH];
  end else begin : g_word
    logic [WIDTH-1:0] sum;
    word_adder #(.WIDTH(WIDTH)) u_add (
      .a   (a_q),
      .b   (b_q),
      .cin (cin),
      .s   (sum),
      .cout(cout)
    );
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      sr_dff u_a (.clk(clk), .set(set_v[i]),   .reset(reset_v[i]), .d(sum[i]), .q(a_q[i]));
      sr_dff u_b (.clk(clk), .set(reset_v[i]), .reset(set_v[i]),   .d(b_d[i]), .q(b_q[i]));
    end
  end

endmodule
