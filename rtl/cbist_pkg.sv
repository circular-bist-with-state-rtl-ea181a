// cbist_pkg: types shared by the circular BIST blocks.
//
// Every BIST cell of the circular chain is steered by two test-control
// lines, T1 and T2. Their four combinations select the cell's mode; the
// encoding below ({T1,T2}) is the one of the circular BIST cell with
// state-skipping input that this design is built around:
//   00 Reset  - every flip-flop loads 0 (this is how the initial state,
//               the all-zero seed, is set)
//   01 Shift  - each flip-flop loads its predecessor in the chain
//   10 Normal - each flip-flop loads its functional input Z_i
//   11 BIST   - each flip-flop loads Z_i xor its predecessor xor the
//               state-skipping input
package cbist_pkg;

  typedef enum logic [1:0] {
    MODE_RESET  = 2'b00,
    MODE_SHIFT  = 2'b01,
    MODE_NORMAL = 2'b10,
    MODE_BIST   = 2'b11
  } bist_mode_e;

endpackage
