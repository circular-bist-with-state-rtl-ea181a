// cbist_ss_top: circular BIST with state skipping around one circuit.
//
// The circuit's flip-flops are the N cells of circular_chain; its
// combinational next-state logic stays outside this module and connects
// through z (next-state values Z_1..Z_N, in) and q (present state Q_1..Q_N,
// out). In system operation the chain is the circuit's state register
// (Normal mode). On a start pulse bist_controller runs one test session:
// a Reset cycle loads the all-zero seed, TEST_LEN BIST cycles apply one
// pattern per clock while the chain compacts the responses, and N Shift
// cycles rotate the signature out on scan_out (Q_N first). The state-
// skipping decode logic inside the chain alters the state sequence where the
// CARE/VALUE/FLIP masks say so (see skip_decoder); skip_hit shows each firing.
// The NUM_OBS observation points of the circuit go to a separate MISR
// (obs_misr) whose signature is held on misr_sig after the test.
//
// Defaults: the 4-bit example chain with one skip (cube d = XX01, complement
// Q2 and Q3), a 50 000-pattern test and one observation point. The functional
// circuit, the controller's handshake and the MISR's width and polynomial are
// not fixed by the method and are chosen here.
module cbist_ss_top
  import cbist_pkg::*;
#(
  parameter int unsigned N        = 4,
  parameter int unsigned K        = 1,
  parameter logic [K-1:0][N-1:0] CARE  = {4'b1100},
  parameter logic [K-1:0][N-1:0] VALUE = {4'b1000},
  parameter logic [K-1:0][N-1:0] FLIP  = {4'b0110},
  parameter int unsigned TEST_LEN = 50000,
  parameter int unsigned NUM_OBS  = 1,
  parameter int unsigned MISR_W   = 16,
  parameter logic [MISR_W-1:0] MISR_POLY = 16'h1021
) (
  input  logic               clk,
  input  logic               rst_n,      // resets the controller only
  input  logic               start,      // pulse: run one self-test
  input  logic [N-1:0]       z,          // functional next state Z_1..Z_N
  input  logic [NUM_OBS-1:0] obs,        // observation points of the circuit
  output logic [N-1:0]       q,          // state Q_1..Q_N to the circuit
  output bist_mode_e         mode,       // current T1/T2 mode
  output logic               busy,
  output logic               done,
  output logic               scan_out,   // Q_N, valid while unloading
  output logic               unloading,
  output logic [K-1:0]       skip_hit,   // state skip k fires this cycle
  output logic [MISR_W-1:0]  misr_sig
);

  logic t1, t2;

  bist_controller #(.N(N), .TEST_LEN(TEST_LEN)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .mode      (mode),
    .t1        (t1),
    .t2        (t2),
    .busy      (busy),
    .unloading (unloading),
    .done      (done)
  );

  circular_chain #(
    .N(N), .K(K), .CARE(CARE), .VALUE(VALUE), .FLIP(FLIP)
  ) u_chain (
    .clk      (clk),
    .t1       (t1),
    .t2       (t2),
    .z        (z),
    .q        (q),
    .skip_hit (skip_hit)
  );

  obs_misr #(.W(MISR_W), .NUM_OBS(NUM_OBS), .POLY(MISR_POLY)) u_misr (
    .clk  (clk),
    .mode (mode),
    .obs  (obs),
    .sig  (misr_sig)
  );

  assign scan_out = q[N-1];

endmodule
