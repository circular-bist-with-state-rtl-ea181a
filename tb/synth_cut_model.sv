// synth_cut_model: behavioural stand-in for an N-flip-flop functional
// circuit, for the testbenches only (not part of the design).
//
// Each next-state bit is a small nonlinear function of three state bits
// picked by a multiplicative hash of the bit index, plus a constant:
//   Z_i = Q[h(i,1)] ^ (Q[h(i,2)] & ~Q[h(i,3)]) ^ c_i
//   h(i,k) = ((i * 2654435761 + k * 40503) >> 7) mod N
//   c_i    = bit 3 of (i * 40503)
// Observation point j is the XOR of two state bits. The function has no
// meaning beyond giving the chain a long, irregular state sequence.
module synth_cut_model #(
  parameter int unsigned N       = 18,
  parameter int unsigned NUM_OBS = 1
) (
  input  logic [N-1:0]       q,
  output logic [N-1:0]       z,
  output logic [NUM_OBS-1:0] obs
);

  function automatic int unsigned h(int unsigned i, int unsigned k);
    longint unsigned v;
    v = (longint'(i) * 64'd2654435761 + longint'(k) * 64'd40503) >> 7;
    return int'(v % longint'(N));
  endfunction

  function automatic logic [N-1:0] next_z(logic [N-1:0] s);
    logic [N-1:0] r;
    int unsigned  c;
    for (int unsigned i = 0; i < N; i++) begin
      c    = i * 40503;
      r[i] = s[h(i, 1)] ^ (s[h(i, 2)] & ~s[h(i, 3)]) ^ c[3];
    end
    return r;
  endfunction

  always_comb begin
    z = next_z(q);
    for (int unsigned j = 0; j < NUM_OBS; j++)
      obs[j] = q[(11 * j + 4) % N] ^ q[(13 * j + 6) % N];
  end

endmodule
