// obs_misr: multiple-input signature register for observation points.
//
// Observation points added to hard-to-observe nodes of the circuit are not
// fed into the circular chain (that would change the chain's state sequence
// and undo the state-skipping design); their values are compacted in this
// separate MISR instead. The register is an internal-XOR (Galois) LFSR of
// width W with feedback polynomial POLY (bit j = coefficient of x^j, x^W
// implied); observation point j is XORed into bit j each BIST cycle:
//   sig' = ({sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : 0)) ^ obs
// It follows the test modes of cbist_pkg: Reset mode clears it, BIST mode
// compacts, Shift and Normal hold the signature. The separate MISR is what
// the design calls for; width, polynomial and mode behaviour are this
// design's choices (default x^16 + x^12 + x^5 + 1, CCITT).
//
// Timing: one rising-edge register, no reset pin.
module obs_misr
  import cbist_pkg::*;
#(
  parameter int unsigned W       = 16,
  parameter int unsigned NUM_OBS = 1,
  parameter logic [W-1:0] POLY   = 16'h1021
) (
  input  logic               clk,
  input  bist_mode_e         mode,
  input  logic [NUM_OBS-1:0] obs,
  output logic [W-1:0]       sig
);

  logic [W-1:0] obs_w;
  logic [W-1:0] next_sig;

  always_comb begin
    obs_w    = W'(obs);
    next_sig = {sig[W-2:0], 1'b0} ^ (sig[W-1] ? POLY : '0) ^ obs_w;
  end

  always_ff @(posedge clk) begin
    unique case (mode)
      MODE_RESET: sig <= '0;
      MODE_BIST:  sig <= next_sig;
      default:    sig <= sig;
    endcase
  end

  initial begin
    assert (NUM_OBS >= 1 && NUM_OBS <= W)
      else $error("obs_misr: NUM_OBS must be between 1 and W");
  end

endmodule
