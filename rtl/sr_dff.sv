// D flip-flop with asynchronous, active-high set and reset.
//
// This is the storage element of both accumulator registers. Whenever reset
// is high q is 0, otherwise whenever set is high q is 1; with both low q
// takes d at the rising clock edge. Set and reset act at once, without a
// clock edge, and hold q for as long as they stay high. Reset winning over
// set is this design's choice: the weight decoder never raises both.
module sr_dff (
  input  logic clk,
  input  logic set,
  input  logic reset,
  input  logic d,
  output logic q
);

  // Set and reset are merged into one asynchronous load whose value is
  // "set and not reset", the form synthesis maps to a single flip-flop cell.
  // An edge-triggered load alone would miss a change of forced value while
  // the load stays high (a bit going straight from held-0 to held-1 at a
  // session change), so the output also bypasses the register while forced:
  // q is then the forced value at once, as in a level-sensitive set/reset
  // flip-flop, and the register takes it at the next clock edge.
  logic force_load, force_val, q_r;

  always_comb begin
    force_load = set | reset;
    force_val  = set & ~reset;
  end

  always_ff @(posedge clk or posedge force_load) begin
    if (force_load) q_r <= force_val;
    else            q_r <= d;
  end

  always_comb q = force_load ? force_val : q_r;

endmodule
