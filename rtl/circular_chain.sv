// circular_chain: the circular BIST chain with state-skipping logic.
//
// N BIST cells (cbist_cell) replace the circuit's N flip-flops and are
// connected into one ring: cell i takes Q_{i-1} on its chain input and cell 1
// takes Q_N. In BIST mode the ring compacts the circuit's response Z into the
// state and that state is the next test pattern (test per clock). The state-
// skipping decode logic (skip_decoder) watches the ring state and, when one
// of its cubes decodes state p, complements selected bits of the next state
// so the sequence jumps from s to a state matching the wanted test cube c.
// The skip signals are XORed on the chain interconnect inside each cell, not
// on the functional Z path.
//
// Interface: t1/t2 pick the mode for all cells (see cbist_pkg); z is the
// functional next-state vector; q is the state (bit i = Q_{i+1}) that drives
// the functional logic; skip_hit tells which state skips fire this cycle.
// Timing: q changes on the rising edge; skip_hit is combinational from q.
module circular_chain #(
  parameter int unsigned N = 4,
  parameter int unsigned K = 1,
  parameter logic [K-1:0][N-1:0] CARE  = {4'b1100},
  parameter logic [K-1:0][N-1:0] VALUE = {4'b1000},
  parameter logic [K-1:0][N-1:0] FLIP  = {4'b0110}
) (
  input  logic         clk,
  input  logic         t1,
  input  logic         t2,
  input  logic [N-1:0] z,
  output logic [N-1:0] q,
  output logic [K-1:0] skip_hit
);

  logic [N-1:0] skip;

  skip_decoder #(
    .N(N), .K(K), .CARE(CARE), .VALUE(VALUE), .FLIP(FLIP)
  ) u_skip (
    .state (q),
    .hit   (skip_hit),
    .skip  (skip)
  );

  for (genvar i = 0; i < N; i++) begin : g_cell
    // Ring connection: the first cell is fed by the last one.
    localparam int unsigned PREV = (i == 0) ? N - 1 : i - 1;
    cbist_cell u_cell (
      .clk    (clk),
      .t1     (t1),
      .t2     (t2),
      .z      (z[i]),
      .q_prev (q[PREV]),
      .skip   (skip[i]),
      .q      (q[i])
    );
  end

endmodule
