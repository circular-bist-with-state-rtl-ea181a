// tb_cbist_cell: exhaustive check of the circular BIST cell.
//
// For every combination of T1, T2, Z, Q_{i-1} and skip the cell is clocked
// once and its new Q compared with the mode table: Reset 0, Shift Q_{i-1},
// Normal Z, BIST Z ^ Q_{i-1} ^ skip. Each combination is applied twice, from
// Q = 0 and from Q = 1, to show the old value never leaks through.
module tb_cbist_cell;

  logic clk = 1'b0;
  logic t1, t2, z, q_prev, skip, q;
  int   checks = 0, failures = 0;

  cbist_cell dut (.clk, .t1, .t2, .z, .q_prev, .skip, .q);

  always #5 clk = ~clk;

  function automatic logic expected(logic t1_i, logic t2_i, logic z_i,
                                    logic qp_i, logic sk_i);
    case ({t1_i, t2_i})
      2'b00:   return 1'b0;
      2'b01:   return qp_i;
      2'b10:   return z_i;
      default: return z_i ^ qp_i ^ sk_i;
    endcase
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int old = 0; old < 2; old++) begin
      for (int v = 0; v < 32; v++) begin
        // Put the flip-flop in a known old state with Normal mode.
        @(negedge clk);
        {t1, t2, z, q_prev, skip} = {2'b10, old[0], 2'b00};
        @(negedge clk);
        {t1, t2, z, q_prev, skip} = v[4:0];
        @(negedge clk);
        checks++;
        if (q !== expected(t1, t2, z, q_prev, skip)) begin
          failures++;
          $display("FAIL T1T2=%b%b Z=%b Qprev=%b skip=%b old=%0d: Q=%b",
                   t1, t2, z, q_prev, skip, old, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
