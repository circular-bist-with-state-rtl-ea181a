// skip_decoder: the state-skipping decode logic of the circular chain.
//
// Each of the K state skips is defined by three N-bit masks (bit i is
// chain flip-flop Q_{i+1}):
//   CARE[k]  - the literals of decoding cube d (1 = bit appears in d)
//   VALUE[k] - the value each cared bit must have (0 = complemented literal)
//   FLIP[k]  - the bits in which the normal next state s differs from the
//              target test cube c; these get an XOR in front of their
//              flip-flop
// Skip k decodes state p with one AND over its cube literals. When it fires,
// the bits FLIP[k] of the next state are complemented, so the chain jumps
// from s to a state matching c. Bits touched by several skips get one XOR
// per skip, i.e. the per-bit skip signal is the XOR of all firing skips that
// flip it. The masks are produced at design time by the skip-insertion
// procedure (conflict matrix, minimum column cover); the defaults are the
// 4-bit example: d = XX01 (Q3 = 0, Q4 = 1), complement Q2 and Q3.
//
// A bit that no skip flips has a constant-0 skip output (at the defaults,
// Q1 and Q4); its cell then has no state-skipping XOR in effect.
//
// Purely combinational; no clock.
module skip_decoder #(
  parameter int unsigned N = 4,
  parameter int unsigned K = 1,
  parameter logic [K-1:0][N-1:0] CARE  = {4'b1100},
  parameter logic [K-1:0][N-1:0] VALUE = {4'b1000},
  parameter logic [K-1:0][N-1:0] FLIP  = {4'b0110}
) (
  input  logic [N-1:0] state,  // chain state, bit i = Q_{i+1}
  output logic [K-1:0] hit,    // hit[k]: cube d of skip k decodes the state
  output logic [N-1:0] skip    // per-flip-flop state-skipping input
);

  always_comb begin
    skip = '0;
    for (int unsigned k = 0; k < K; k++) begin
      // AND of the cube's literals: every cared bit equals its value.
      hit[k] = ((state ^ VALUE[k]) & CARE[k]) == '0;
      if (hit[k]) skip = skip ^ FLIP[k];
    end
  end

endmodule
