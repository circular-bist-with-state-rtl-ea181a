// tb_workloads: the chain sizes and observation-point counts of the
// evaluated benchmark circuits, each run through one 50 000-pattern session.
//
// Chain sizes 18, 17, 24, 34, 25, 54, 32, 91, 199, 247 and 700 flip-flops
// and 1 to 6 observation points are the published configurations; the
// benchmark netlists and their skip cubes are not part of this design, so a synthetic
// circuit stands in, and two skips are designed for it at elaboration with
// the conflict-matrix rule (see workload_run). Each size must match its
// reference on every cycle, leave the sequence before the first skip
// untouched, fire each skip first at its designed state p, and so take at
// least one state skip.
module tb_workloads;

  localparam int unsigned NW = 11;
  localparam int unsigned TL = 50000;
  localparam int unsigned SIZES [NW] = '{18, 17, 24, 34, 25, 54, 32, 91, 199,
                                         247, 700};
  localparam int unsigned OBS   [NW] = '{1, 1, 1, 1, 1, 2, 2, 1, 4, 6, 5};

  logic clk = 1'b0, rst_n, start;
  int   c [NW];
  int   f [NW];
  int   s [NW];
  logic [NW-1:0] fin;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar w = 0; w < NW; w++) begin : g_w
    workload_run #(.N(SIZES[w]), .NUM_OBS(OBS[w]), .TL(TL)) u_run (
      .clk, .rst_n, .start, .checks(c[w]), .failures(f[w]), .skips(s[w]),
      .finished(fin[w]));
  end

  initial begin
    repeat (TL + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    wait (&fin);
    @(negedge clk);
    for (int w = 0; w < NW; w++) begin
      $display("chain %0d, %0d obs: checks=%0d failures=%0d skips=%0d",
               SIZES[w], OBS[w], c[w], f[w], s[w]);
      checks   += c[w] + 1;
      failures += f[w];
      if (s[w] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
