// tb_bist_controller: checks the mode sequence and its cycle counts.
//
// With N = 4 and TEST_LEN = 7 a start pulse must give exactly one Reset
// cycle, 7 BIST cycles and 4 Shift cycles, then Normal mode with done set.
// The test is run twice (done must clear as the second test starts), and a start
// pulse during a test must be ignored. Mode, T1/T2, busy and unloading are
// compared with the expected phase on every cycle.
module tb_bist_controller;
  import cbist_pkg::*;

  localparam int unsigned N = 4;
  localparam int unsigned TL = 7;

  logic clk = 1'b0, rst_n, start;
  bist_mode_e mode;
  logic t1, t2, busy, unloading, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_controller #(.N(N), .TEST_LEN(TL)) dut (.clk, .rst_n, .start, .mode,
    .t1, .t2, .busy, .unloading, .done);

  task automatic expect_cycle(string what, bist_mode_e m, logic b, logic u,
                              logic d);
    checks++;
    if (mode !== m || {t1, t2} !== 2'(m) || busy !== b || unloading !== u ||
        done !== d) begin
      failures++;
      $display("FAIL %s: mode=%s T1T2=%b%b busy=%b unl=%b done=%b", what,
               mode.name(), t1, t2, busy, unloading, done);
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    expect_cycle("idle after reset", MODE_NORMAL, 0, 0, 0);
    for (int run = 0; run < 2; run++) begin
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      expect_cycle("reset phase", MODE_RESET, 1, 0, 0);
      @(negedge clk);
      for (int i = 0; i < TL; i++) begin
        expect_cycle($sformatf("bist cycle %0d", i), MODE_BIST, 1, 0, 0);
        start = (i == 2);  // ignored while busy
        @(negedge clk);
      end
      start = 1'b0;
      for (int i = 0; i < N; i++) begin
        expect_cycle($sformatf("shift cycle %0d", i), MODE_SHIFT, 1, 1, 0);
        @(negedge clk);
      end
      expect_cycle("done", MODE_NORMAL, 0, 0, 1);
      repeat (3) @(negedge clk);
      expect_cycle("done held", MODE_NORMAL, 0, 0, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
