// tb_circular_chain: runs the 4-bit example chain with and without its
// state skip and compares the visited states with the example sequence.
//
// Both chains are driven by example_cut_model. u_ss carries the default skip
// (cube d = XX01 decodes p = 1101, complement Q2 and Q3), so after 1101 it
// must go to 0011 instead of 0101 and leave the model's limit cycle behind;
// u_plain has no skip (FLIP = 0) and must follow the normal column and end
// in the limit cycle {0110, 1001}. States are listed as Q1 Q2 Q3 Q4. The
// test then loads a value in Normal mode, rotates it with Shift mode, and
// checks that Reset mode clears the chain. A third chain, u_and, carries the
// single-AND skip (decode Q3 & Q4, complement Q2): from 1011, with Z chosen
// so that the normal successor is 1000, it must go to 1100.
module tb_circular_chain;

  logic clk = 1'b0;
  logic t1, t2;
  logic [3:0] q_ss, q_pl, z_ss, z_pl, zm_ss, zm_pl, z_force;
  logic [3:0] nf_ss, nf_pl;
  logic       obs_ss, obs_pl, force_z;
  logic [0:0] hit_ss, hit_pl, hit_and;
  logic [3:0] q_and;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  example_cut_model m_ss (.q(q_ss), .z(zm_ss), .obs(obs_ss), .next_f(nf_ss));
  example_cut_model m_pl (.q(q_pl), .z(zm_pl), .obs(obs_pl), .next_f(nf_pl));

  assign z_ss = force_z ? z_force : zm_ss;
  assign z_pl = force_z ? z_force : zm_pl;

  circular_chain u_ss (.clk, .t1, .t2, .z(z_ss), .q(q_ss), .skip_hit(hit_ss));
  circular_chain #(.FLIP({4'b0000})) u_plain
    (.clk, .t1, .t2, .z(z_pl), .q(q_pl), .skip_hit(hit_pl));

  circular_chain #(.CARE({4'b1100}), .VALUE({4'b1100}), .FLIP({4'b0010}))
    u_and (.clk, .t1, .t2, .z(z_force), .q(q_and), .skip_hit(hit_and));

  // Expected sequences in written order (Q1 in bit 3).
  localparam logic [3:0] SEQ_SS [14] = '{
    4'b0000, 4'b1011, 4'b1100, 4'b0111, 4'b1010, 4'b1101, 4'b0011,
    4'b1110, 4'b0100, 4'b1111, 4'b1000, 4'b0010, 4'b0000, 4'b1011};
  localparam logic [3:0] SEQ_PL [14] = '{
    4'b0000, 4'b1011, 4'b1100, 4'b0111, 4'b1010, 4'b1101, 4'b0101,
    4'b0110, 4'b1001, 4'b0110, 4'b1001, 4'b0110, 4'b1001, 4'b0110};

  function automatic logic [3:0] wr(logic [3:0] v);
    return {v[0], v[1], v[2], v[3]};
  endfunction

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int skips = 0;
    force_z = 1'b0;
    z_force = '0;
    // Reset mode: all-zero initial state.
    @(negedge clk); {t1, t2} = 2'b00;
    @(negedge clk); {t1, t2} = 2'b11;
    for (int i = 0; i < 14; i++) begin
      check($sformatf("state-skip chain step %0d", i), wr(q_ss), SEQ_SS[i]);
      check($sformatf("plain chain step %0d", i), wr(q_pl), SEQ_PL[i]);
      check($sformatf("skip decode step %0d", i), {3'b0, hit_ss},
            {3'b0, wr(q_ss) == 4'b1101});
      check($sformatf("no-skip decode step %0d", i), {3'b0, hit_pl},
            {3'b0, wr(q_pl) ==? 4'b??01});
      skips += hit_ss;
      @(negedge clk);
    end
    check("one skip taken", 4'(skips), 4'd1);

    // Normal mode loads Z; Shift mode rotates Q_N into Q_1.
    force_z = 1'b1;
    z_force = 4'b0110;          // Q1=0 Q2=1 Q3=1 Q4=0 in bit order i=Q_{i+1}
    {t1, t2} = 2'b10;
    @(negedge clk);
    check("normal load", q_ss, 4'b0110);
    {t1, t2} = 2'b01;
    for (int r = 1; r <= 4; r++) begin
      logic [3:0] exp_rot;
      @(negedge clk);
      exp_rot = 4'(({4'b0110, 4'b0110} << r) >> 4);
      check($sformatf("shift %0d", r), q_ss, exp_rot);
      check($sformatf("shift %0d plain", r), q_pl, exp_rot);
    end
    // Shift must not see the skip: load p = 1101 and shift once.
    z_force = 4'b1011;          // Q1..Q4 = 1101
    {t1, t2} = 2'b10;
    @(negedge clk);
    {t1, t2} = 2'b01;
    @(negedge clk);
    check("shift ignores skip", wr(q_ss), 4'b1110);
    // Single-AND skip: load 1011, then one BIST step whose normal
    // successor is 1000; Z = 1000 ^ {Q4,Q1,Q2,Q3} = 1000 ^ 1101 = 0101.
    z_force = wr(4'b1011);
    {t1, t2} = 2'b10;
    @(negedge clk);
    check("and-skip load", wr(q_and), 4'b1011);
    check("and-skip decodes 1011", {3'b0, hit_and}, 4'b0001);
    z_force = wr(4'b0101);
    {t1, t2} = 2'b11;
    @(negedge clk);
    check("1011 skips to 1100", wr(q_and), 4'b1100);
    {t1, t2} = 2'b00;
    @(negedge clk);
    check("reset clears", q_ss | q_pl | q_and, 4'b0000);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
