// tb_cbist_ss_top: end-to-end self-test of the example circuit with every
// parameter of the top at its default (4-bit chain, one state skip,
// 50 000 BIST patterns, one observation point, 16-bit MISR).
//
// example_cut_model plays the functional circuit. The testbench:
//   1. runs Normal mode and checks the chain loads Z (system operation);
//   2. pulses start and follows the whole session, counting the Reset,
//      BIST and Shift cycles (1, TEST_LEN and N expected);
//   3. on every BIST cycle compares the chain state with a reference that
//      applies the intended state sequence plus the skip rule (cube XX01:
//      complement Q2 and Q3), and steps a reference MISR with the
//      observation point;
//   4. checks the bits shifted out on scan_out (Q4 first) against the
//      reference signature, the chain back in place after the unload, the
//      MISR signature, and that a second session gives the same result.
// Mechanisms counted, each must occur: Reset-mode seeding, BIST patterns,
// state skips, escape from the limit cycle (distinct states visited beyond
// the 9 of the plain chain), Shift-mode unload, Normal-mode operation and
// MISR compaction.
module tb_cbist_ss_top;
  import cbist_pkg::*;

  localparam int unsigned N  = 4;
  localparam int unsigned TL = 50000;

  logic clk = 1'b0, rst_n, start;
  logic [3:0] z, q, nf;
  logic [0:0] obs;
  bist_mode_e mode;
  logic busy, done, scan_out, unloading;
  logic [0:0] skip_hit;
  logic [15:0] misr_sig;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  example_cut_model cut (.q, .z, .obs(obs[0]), .next_f(nf));

  cbist_ss_top dut (.clk, .rst_n, .start, .z, .obs, .q, .mode, .busy, .done,
                    .scan_out, .unloading, .skip_hit, .misr_sig);

  // Reference state in written order and its intended successor.
  logic [3:0] ref_f, ref_q, ref_nf, ref_z;
  logic       ref_obs;
  assign ref_q = {ref_f[0], ref_f[1], ref_f[2], ref_f[3]};
  example_cut_model ref_cut (.q(ref_q), .z(ref_z), .obs(ref_obs), .next_f(ref_nf));

  function automatic logic [15:0] misr_step(logic [15:0] s, logic in0);
    logic [15:0] n;
    for (int j = 0; j < 16; j++) begin
      n[j] = (j == 0) ? 1'b0 : s[j-1];
      if (j == 0 || j == 5 || j == 12) n[j] ^= s[15];
    end
    n[0] ^= in0;
    return n;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0t)", what, $time);
    end
  endtask

  initial begin
    repeat (3 * TL) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_reset, n_bist, n_shift, n_normal, n_skip, n_misr_change, n_escape;
  logic [15:0] first_sig_q, first_misr;

  task automatic run_session(int session);
    logic [15:0] ref_misr;
    logic [3:0]  sig_f, out_bits;
    bit          seen [16];
    int          distinct, c_reset, c_bist, c_shift;
    logic [15:0] prev_misr;

    foreach (seen[i]) seen[i] = 1'b0;
    distinct = 0;
    c_reset = 0; c_bist = 0; c_shift = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (mode == MODE_RESET) begin
      c_reset++;
      @(negedge clk);
    end
    ref_f    = 4'b0000;
    ref_misr = '0;
    #1;  // let the reference model settle
    check("MISR cleared by Reset mode", misr_sig == 16'h0);
    while (mode == MODE_BIST) begin
      c_bist++;
      check("chain state matches reference",
            {q[0], q[1], q[2], q[3]} == ref_f);
      check("skip decode", skip_hit[0] == (ref_f ==? 4'b??01));
      if (!seen[ref_f]) begin
        seen[ref_f] = 1'b1;
        distinct++;
      end
      n_skip   += skip_hit[0];
      prev_misr = misr_sig;
      ref_misr  = misr_step(ref_misr, ref_obs);
      ref_f     = ref_nf ^ ((ref_f ==? 4'b??01) ? 4'b0110 : 4'b0000);
      @(negedge clk);
      check("MISR matches reference", misr_sig == ref_misr);
      if (misr_sig != prev_misr) n_misr_change++;
    end
    sig_f = ref_f;
    check("chain holds signature at end of BIST",
          {q[0], q[1], q[2], q[3]} == sig_f);
    while (mode == MODE_SHIFT) begin
      check("unloading flag", unloading);
      out_bits = {out_bits[2:0], scan_out};
      c_shift++;
      @(negedge clk);
    end
    check("scan_out gives Q4 Q3 Q2 Q1",
          out_bits == {sig_f[0], sig_f[1], sig_f[2], sig_f[3]});
    check("chain restored after unload", {q[0], q[1], q[2], q[3]} == sig_f);
    check("done raised", done && !busy && mode == MODE_NORMAL);
    check("MISR holds after BIST", misr_sig == ref_misr);
    check("one Reset cycle", c_reset == 1);
    check("TEST_LEN BIST cycles", c_bist == TL);
    check("N Shift cycles", c_shift == N);
    check("more states than the plain chain's 9", distinct > 9);
    if (distinct > 9) n_escape++;
    n_reset += c_reset;
    n_bist  += c_bist;
    n_shift += c_shift;
    if (session == 0) begin
      first_sig_q = {12'h0, sig_f};
      first_misr  = misr_sig;
    end else begin
      check("repeatable signature", first_sig_q == {12'h0, sig_f});
      check("repeatable MISR signature", first_misr == misr_sig);
    end
    $display("session %0d: signature Q1..Q4=%b, MISR=%h, %0d distinct states",
             session, sig_f, misr_sig, distinct);
  endtask

  initial begin
    n_reset = 0; n_bist = 0; n_shift = 0; n_normal = 0; n_skip = 0;
    n_misr_change = 0; n_escape = 0;
    rst_n = 1'b0;
    start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // System operation: the chain is the circuit's state register.
    for (int i = 0; i < 5; i++) begin
      logic [3:0] z_now;
      z_now = z;
      check("Normal mode before test", mode == MODE_NORMAL && !busy);
      @(negedge clk);
      check("Normal mode loads Z", q == z_now);
      n_normal++;
    end
    run_session(0);
    repeat (3) @(negedge clk);
    run_session(1);

    check("Reset mode seen", n_reset > 0);
    check("BIST mode seen", n_bist > 0);
    check("state skip seen", n_skip > 0);
    check("limit cycle escaped", n_escape > 0);
    check("Shift unload seen", n_shift > 0);
    check("Normal operation seen", n_normal > 0);
    check("MISR compaction seen", n_misr_change > 0);
    $display("mechanisms: reset=%0d bist=%0d skips=%0d escapes=%0d shift=%0d normal=%0d misr=%0d",
             n_reset, n_bist, n_skip, n_escape, n_shift, n_normal, n_misr_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
