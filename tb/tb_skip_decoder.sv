// tb_skip_decoder: checks the state-skipping decode logic on all states.
//
// Instance u_default has the default masks (cube d = XX01, complement Q2, Q3);
// instance u_and is the single-AND example (decode Q3 & Q4, complement Q2);
// instance u_two holds two skips that both complement Q1, to show that
// overlapping skips combine by XOR. Expected outputs are written out by hand
// from the cube literals, not from the masks.
module tb_skip_decoder;

  logic [3:0] state;
  logic [0:0] hit_d, hit_a;
  logic [1:0] hit_two;
  logic [3:0] skip_d, skip_a, skip_two;
  int checks = 0, failures = 0;

  skip_decoder u_default (.state, .hit(hit_d), .skip(skip_d));

  skip_decoder #(.N(4), .K(1), .CARE({4'b1100}), .VALUE({4'b1100}),
                 .FLIP({4'b0010})) u_and (.state, .hit(hit_a), .skip(skip_a));

  // skip 0: Q1 = 1 -> flip Q1, Q2.  skip 1: Q2 = 1 -> flip Q1.
  skip_decoder #(.N(4), .K(2), .CARE({4'b0010, 4'b0001}),
                 .VALUE({4'b0010, 4'b0001}), .FLIP({4'b0001, 4'b0011}))
    u_two (.state, .hit(hit_two), .skip(skip_two));

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s state=%b got=%b exp=%b", what, state, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      logic q1, q2, q3, q4, dd, da, a, b;
      state = s[3:0];
      #1;
      {q4, q3, q2, q1} = state;
      dd = ~q3 & q4;
      da = q3 & q4;
      a  = q1;
      b  = q2;
      check("default hit",  {3'b0, hit_d},  {3'b0, dd});
      check("default skip", skip_d, {1'b0, dd, dd, 1'b0});
      check("and hit",  {3'b0, hit_a},  {3'b0, da});
      check("and skip", skip_a, {2'b0, da, 1'b0});
      check("two hit",   {2'b0, hit_two}, {2'b0, b, a});
      check("two skip",  skip_two, {2'b0, a, a ^ b});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
