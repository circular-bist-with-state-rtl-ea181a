// cbist_cell: one circular BIST cell with a state-skipping input.
//
// The cell replaces one functional flip-flop of the circuit. Its D input is
//   D = (Z & T1) ^ ((Q_prev ^ (skip & T1)) & T2)
// which gives the four modes of cbist_pkg:
//   T1 T2 = 00 Reset : D = 0
//           01 Shift : D = Q_prev              (skip is gated off by T1)
//           10 Normal: D = Z                    (system operation)
//           11 BIST  : D = Z ^ Q_prev ^ skip   (response compaction and
//                                               pattern generation at once)
// The state-skipping signal enters on the chain side (through Q_prev's XOR),
// never on the functional path from Z to D, so the system path keeps its
// single AND-XOR stage. The gate structure (two ANDs gated by T1/T2, two
// XORs) follows the published cell; a cell that has no state-skipping logic
// in front of it simply gets skip = 0.
//
// Timing: one rising-edge flip-flop, no reset pin (Reset is a mode, applied
// by holding T1 = T2 = 0 for a clock cycle).
module cbist_cell (
  input  logic clk,
  input  logic t1,
  input  logic t2,
  input  logic z,       // functional next-state input Z_i
  input  logic q_prev,  // Q_{i-1}, the preceding cell of the chain
  input  logic skip,    // state-skipping decode output for this cell
  output logic q        // Q_i
);

  logic chain_in;  // chain input after the state-skipping XOR
  logic d;

  always_comb begin
    chain_in = q_prev ^ (skip & t1);
    d        = (z & t1) ^ (chain_in & t2);
  end

  always_ff @(posedge clk) q <= d;

endmodule
