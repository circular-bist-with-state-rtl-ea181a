// workload_run: one full self-test session of cbist_ss_top at a given chain
// size, observation-point count and test length, with state skips designed
// the way the method designs them (testbench helper, not part of the design).
//
// Skip design, done by constant functions at elaboration:
//   - The ring is simulated from the all-zero seed with the skips designed
//     so far. State P[k] of that sequence becomes state p of skip k and the
//     state after it is s.
//   - The target test cube c is s with two bits complemented (bits k and
//     N/2 + k), so FLIP[k] holds those two bits.
//   - The conflict matrix has one row per state before p, with a 1 where the
//     state differs from p. A greedy column cover (repeatedly take the
//     column that covers most uncovered rows) gives the literals of cube d:
//     CARE[k] = chosen columns, VALUE[k] = p on those columns.
// Checks during the session, on every BIST cycle:
//   - the chain state and MISR equal a reference that steps
//       next = Z(state) ^ rotate(state) ^ (bits flipped by matching cubes);
//   - up to and including p of skip 0 the chain equals a second reference
//     without any skips (the skips leave the earlier sequence untouched);
//   - skip k fires for the first time exactly at BIST cycle P[k].
// The session must take 1 + TL + N cycles and end with the signature back in
// the chain. Results are returned as counters.
module workload_run
  import cbist_pkg::*;
#(
  parameter int unsigned N       = 18,
  parameter int unsigned NUM_OBS = 1,
  parameter int unsigned TL      = 1000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output int   checks,
  output int   failures,
  output int   skips,
  output logic finished
);

  localparam int unsigned K = 2;
  localparam int unsigned P [K] = '{40, 90};  // cycle of state p per skip

  typedef logic [K-1:0][N-1:0] masks_t;

  // ---- the synthetic circuit, as a constant function (see synth_cut_model)
  function automatic int unsigned h(int unsigned i, int unsigned k);
    longint unsigned v;
    v = (longint'(i) * 64'd2654435761 + longint'(k) * 64'd40503) >> 7;
    return int'(v % longint'(N));
  endfunction

  function automatic logic [N-1:0] cut_z(logic [N-1:0] s);
    logic [N-1:0] r;
    int unsigned  c;
    for (int unsigned i = 0; i < N; i++) begin
      c    = i * 40503;
      r[i] = s[h(i, 1)] ^ (s[h(i, 2)] & ~s[h(i, 3)]) ^ c[3];
    end
    return r;
  endfunction

  // One BIST step of the ring with the first `nk` skips of the given masks.
  function automatic logic [N-1:0] ring_step(logic [N-1:0] s, logic [N-1:0] zz,
                                             masks_t care, masks_t value,
                                             masks_t flip, int unsigned nk);
    logic [N-1:0] n;
    n = zz ^ {s[N-2:0], s[N-1]};
    for (int unsigned k = 0; k < nk; k++)
      if (((s ^ value[k]) & care[k]) == '0) n ^= flip[k];
    return n;
  endfunction

  // Designs all K skips; sel picks which mask set to return (0 CARE,
  // 1 VALUE, 2 FLIP).
  function automatic masks_t design_skips(int unsigned sel);
    masks_t       care, value, flip;
    logic [N-1:0] seq [P[K-1] + 2];
    logic [N-1:0] p, row;
    bit           covered [P[K-1] + 1];
    int unsigned  best, best_n, n_cov, left;
    care = '0; value = '0; flip = '0;
    for (int unsigned k = 0; k < K; k++) begin
      seq[0] = '0;
      for (int unsigned t = 0; t <= P[k]; t++)
        seq[t+1] = ring_step(seq[t], cut_z(seq[t]), care, value, flip, k);
      p       = seq[P[k]];
      flip[k] = (N'(1) << k) | (N'(1) << (N / 2 + k));
      for (int unsigned t = 0; t < P[k]; t++) covered[t] = (seq[t] == p);
      left = 0;
      for (int unsigned t = 0; t < P[k]; t++) if (!covered[t]) left++;
      while (left > 0) begin
        best = 0; best_n = 0;
        for (int unsigned col = 0; col < N; col++) begin
          n_cov = 0;
          for (int unsigned t = 0; t < P[k]; t++) begin
            row = seq[t] ^ p;
            if (!covered[t] && row[col]) n_cov++;
          end
          if (n_cov > best_n) begin
            best = col; best_n = n_cov;
          end
        end
        care[k][best] = 1'b1;
        for (int unsigned t = 0; t < P[k]; t++) begin
          row = seq[t] ^ p;
          if (!covered[t] && row[best]) begin
            covered[t] = 1'b1;
            left--;
          end
        end
      end
      value[k] = p & care[k];
    end
    return (sel == 0) ? care : (sel == 1) ? value : flip;
  endfunction

  localparam masks_t CARE  = design_skips(0);
  localparam masks_t VALUE = design_skips(1);
  localparam masks_t FLIP  = design_skips(2);

  logic [N-1:0]       z, q, ref_q, ref_z, plain_q, plain_z;
  logic [NUM_OBS-1:0] obs, ref_obs, plain_obs;
  bist_mode_e         mode;
  logic               busy, done, scan_out, unloading;
  logic [K-1:0]       skip_hit;
  logic [15:0]        misr_sig, ref_misr;

  synth_cut_model #(.N(N), .NUM_OBS(NUM_OBS)) cut (.q, .z, .obs);
  synth_cut_model #(.N(N), .NUM_OBS(NUM_OBS)) ref_cut (.q(ref_q), .z(ref_z),
                                                        .obs(ref_obs));
  synth_cut_model #(.N(N), .NUM_OBS(NUM_OBS)) plain_cut (.q(plain_q),
                                                          .z(plain_z),
                                                          .obs(plain_obs));

  cbist_ss_top #(
    .N(N), .K(K), .CARE(CARE), .VALUE(VALUE), .FLIP(FLIP),
    .TEST_LEN(TL), .NUM_OBS(NUM_OBS)
  ) dut (.clk, .rst_n, .start, .z, .obs, .q, .mode, .busy, .done, .scan_out,
         .unloading, .skip_hit, .misr_sig);

  function automatic logic [15:0] misr_step(logic [15:0] s,
                                            logic [NUM_OBS-1:0] in);
    logic [15:0] n;
    for (int j = 0; j < 16; j++) begin
      n[j] = (j == 0) ? 1'b0 : s[j-1];
      if (j == 0 || j == 5 || j == 12) n[j] ^= s[15];
      if (j < NUM_OBS) n[j] ^= in[j];
    end
    return n;
  endfunction

  initial
    for (int k = 0; k < K; k++)
      $display("chain %0d: skip %0d at cycle %0d, cube d has %0d literals, flips %0d bits",
               N, k, P[k], $countones(CARE[k]), $countones(FLIP[k]));

  int n_reset, n_bist, n_shift;
  int first_hit [K];
  logic active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      checks <= 0; failures <= 0; skips <= 0; finished <= 1'b0;
      n_reset <= 0; n_bist <= 0; n_shift <= 0; active <= 1'b0;
      for (int k = 0; k < K; k++) first_hit[k] <= -1;
    end else begin
      unique case (mode)
        MODE_RESET: begin
          active   <= 1'b1;
          n_reset  <= n_reset + 1;
          ref_q    <= '0;
          plain_q  <= '0;
          ref_misr <= '0;
        end
        MODE_BIST: begin
          n_bist   <= n_bist + 1;
          checks   <= checks + 1 + (n_bist <= int'(P[0]) ? 1 : 0);
          if (q !== ref_q || misr_sig !== ref_misr ||
              (n_bist <= int'(P[0]) && q !== plain_q))
            failures <= failures + 1;
          if (skip_hit != '0) skips <= skips + 1;
          for (int k = 0; k < K; k++)
            if (skip_hit[k] && first_hit[k] < 0) first_hit[k] <= n_bist;
          ref_q    <= ring_step(ref_q, ref_z, CARE, VALUE, FLIP, K);
          plain_q  <= ring_step(plain_q, plain_z, CARE, VALUE, FLIP, 0);
          ref_misr <= misr_step(ref_misr, ref_obs);
        end
        MODE_SHIFT: n_shift <= n_shift + 1;
        default: if (active && done && !finished) begin
          finished <= 1'b1;
          checks   <= checks + 2 + K;
          failures <= failures
                    + ((n_reset != 1 || n_bist != int'(TL) ||
                        n_shift != int'(N)) ? 1 : 0)
                    + ((q !== ref_q || misr_sig !== ref_misr) ? 1 : 0)
                    + ((first_hit[0] != int'(P[0])) ? 1 : 0)
                    + ((first_hit[1] != int'(P[1])) ? 1 : 0);
        end
      endcase
    end
  end

endmodule
