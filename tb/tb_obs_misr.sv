// tb_obs_misr: compares the observation-point MISR with a bit-level model.
//
// The reference treats the register as W separate flip-flops: bit 0 takes
// the top bit times the x^0 coefficient plus input 0, bit j takes bit j-1
// plus the top bit times the x^j coefficient plus input j. Random
// observation values are applied in BIST mode; Shift and Normal mode must
// hold the signature and Reset mode must clear it. A 3-input instance with
// a different polynomial (x^8 + x^4 + x^3 + x^2 + 1) is checked the same way.
module tb_obs_misr;
  import cbist_pkg::*;

  logic clk = 1'b0;
  bist_mode_e mode;
  logic [0:0]  obs1;
  logic [2:0]  obs3;
  logic [15:0] sig16, ref16;
  logic [7:0]  sig8, ref8;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  obs_misr u16 (.clk, .mode, .obs(obs1), .sig(sig16));
  obs_misr #(.W(8), .NUM_OBS(3), .POLY(8'h1D)) u8 (.clk, .mode, .obs(obs3),
                                                    .sig(sig8));

  function automatic logic [15:0] step16(logic [15:0] s, logic in0);
    logic [15:0] n;
    // x^16 + x^12 + x^5 + 1: coefficients at bits 0, 5, 12
    for (int j = 0; j < 16; j++) begin
      n[j] = (j == 0) ? 1'b0 : s[j-1];
      if (j == 0 || j == 5 || j == 12) n[j] ^= s[15];
    end
    n[0] ^= in0;
    return n;
  endfunction

  function automatic logic [7:0] step8(logic [7:0] s, logic [2:0] in);
    logic [7:0] n;
    for (int j = 0; j < 8; j++) begin
      n[j] = (j == 0) ? 1'b0 : s[j-1];
      if (j == 0 || j == 2 || j == 3 || j == 4) n[j] ^= s[7];
      if (j < 3) n[j] ^= in[j];
    end
    return n;
  endfunction

  task automatic check;
    checks++;
    if (sig16 !== ref16 || sig8 !== ref8) begin
      failures++;
      $display("FAIL mode=%s sig16=%h ref16=%h sig8=%h ref8=%h", mode.name(),
               sig16, ref16, sig8, ref8);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    obs1 = '0;
    obs3 = '0;
    mode = MODE_RESET;
    @(negedge clk);
    ref16 = '0;
    ref8  = '0;
    check();
    for (int i = 0; i < 400; i++) begin
      case (i % 100)
        60, 61, 62: mode = MODE_SHIFT;
        70, 71:     mode = MODE_NORMAL;
        default:    mode = MODE_BIST;
      endcase
      obs1 = 1'($urandom);
      obs3 = 3'($urandom);
      if (mode == MODE_BIST) begin
        ref16 = step16(ref16, obs1[0]);
        ref8  = step8(ref8, obs3);
      end
      @(negedge clk);
      check();
    end
    mode = MODE_RESET;
    @(negedge clk);
    ref16 = '0;
    ref8  = '0;
    check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
