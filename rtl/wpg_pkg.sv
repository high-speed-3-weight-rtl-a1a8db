// Shared types of the accumulator-based 3-weight pattern generator.
//
// weight_e is the two-bit code that names the weight of one generator
// output during a test session: held at 0, held at 1, or pseudo-random
// (probability 0.5). adder_kind_e selects how the accumulator's adder is
// built; the generator works with any adder, so both give the same patterns.
package wpg_pkg;

  typedef enum logic [1:0] {
    W_ZERO = 2'b00,  // output held at 0: Reset[i] = 1
    W_ONE  = 2'b01,  // output held at 1: Set[i] = 1
    W_RAND = 2'b10   // output free-running: Set[i] = Reset[i] = 0
  } weight_e;

  typedef enum logic {
    ADD_CELLS = 1'b0,  // ripple of accumulator cells (FA + two flip-flops per bit)
    ADD_WORD  = 1'b1   // Register A and Register B around an unmodified word adder
  } adder_kind_e;

endpackage
