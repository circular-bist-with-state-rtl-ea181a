// example_cut_model: behavioural model of a 4-flip-flop functional circuit for
// the testbenches (not part of the design).
//
// It is built so that the plain circular chain, started from 0000, walks the
// example state sequence 0000 1011 1100 0111 1010 1101 0101 0110 1001 (states
// written Q1 Q2 Q3 Q4). The transitions of the remaining states are invented
// for testing: 1001 goes back to 0110, so without state skipping the chain is
// caught in the limit cycle {0110, 1001}; the states reached after the skip
// 1101 -> 0011 lead round through 0011 1110 0100 1111 1000 0010 back to 0000.
//
// In BIST mode cell i loads Z_i ^ Q_{i-1}, so the model outputs
//   Z = next ^ {Q4, Q1, Q2, Q3}
// for the wanted plain-chain successor "next". It also offers obs, a made-up
// internal node (Q1 & Q2) for the observation-point MISR, and next_f, the
// plain successor in written order (Q1 in bit 3), for reference models.
module example_cut_model (
  input  logic [3:0] q,       // chain state, bit i = Q_{i+1}
  output logic [3:0] z,       // functional next state, bit i = Z_{i+1}
  output logic       obs,
  output logic [3:0] next_f   // successor without skipping, Q1 in bit 3
);

  logic [3:0] f;      // state in written order: f[3] = Q1 ... f[0] = Q4
  logic [3:0] rot_f;  // chain inputs {Q4, Q1, Q2, Q3} in written order
  logic [3:0] z_f;

  always_comb begin
    f = {q[0], q[1], q[2], q[3]};
    unique case (f)
      4'b0000: next_f = 4'b1011;
      4'b1011: next_f = 4'b1100;
      4'b1100: next_f = 4'b0111;
      4'b0111: next_f = 4'b1010;
      4'b1010: next_f = 4'b1101;
      4'b1101: next_f = 4'b0101;
      4'b0101: next_f = 4'b0110;
      4'b0110: next_f = 4'b1001;
      4'b1001: next_f = 4'b0110;
      4'b0011: next_f = 4'b1110;
      4'b1110: next_f = 4'b0100;
      4'b0100: next_f = 4'b1111;
      4'b1111: next_f = 4'b1000;
      4'b1000: next_f = 4'b0010;
      4'b0010: next_f = 4'b0000;
      default: next_f = 4'b0000;  // 0001
    endcase
    rot_f = {f[0], f[3], f[2], f[1]};
    z_f   = next_f ^ rot_f;
    z     = {z_f[0], z_f[1], z_f[2], z_f[3]};
    obs   = q[0] & q[1];
  end

endmodule
