// bist_controller: test control for circular BIST with state skipping.
//
// Circular BIST needs a single test session, so its control is one short
// sequence of the cell modes (cbist_pkg):
//   IDLE   - Normal mode (T1 T2 = 10): the chain works as the circuit's
//            ordinary state register. A pulse on start begins a test.
//   INIT   - one cycle of Reset mode (00): the chain loads the all-zero
//            initial state.
//   RUN    - TEST_LEN cycles of BIST mode (11): one test pattern per clock.
//   UNLOAD - N cycles of Shift mode (01): the ring rotates once, so the
//            signature leaves serially at Q_N (Q_N first, Q_1 last) and is
//            back in place when the controller returns to IDLE.
// done rises when UNLOAD ends and stays high until the next start.
// The mode encoding comes from the published cell; the sequence, the all-
// zero seed by Reset mode, the unload by rotation and the start/done
// handshake are this design's choices.
//
// Timing: synchronous, active-low synchronous reset rst_n. The mode output
// is registered state decoded combinationally; start is sampled in IDLE only.
module bist_controller
  import cbist_pkg::*;
#(
  parameter int unsigned N        = 4,
  parameter int unsigned TEST_LEN = 50000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output bist_mode_e mode,
  output logic       t1,
  output logic       t2,
  output logic       busy,
  output logic       unloading,
  output logic       done
);

  typedef enum logic [1:0] {IDLE, INIT, RUN, UNLOAD} ctrl_state_e;

  localparam int unsigned CW = $clog2((TEST_LEN > N ? TEST_LEN : N) + 1);

  ctrl_state_e       state;
  logic [CW-1:0]     count;  // cycles left in RUN or UNLOAD, minus one

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      count <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          state <= INIT;
          done  <= 1'b0;
        end
        INIT: begin
          state <= RUN;
          count <= CW'(TEST_LEN - 1);
        end
        RUN: if (count == '0) begin
          state <= UNLOAD;
          count <= CW'(N - 1);
        end else begin
          count <= count - 1'b1;
        end
        UNLOAD: if (count == '0) begin
          state <= IDLE;
          done  <= 1'b1;
        end else begin
          count <= count - 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    unique case (state)
      INIT:    mode = MODE_RESET;
      RUN:     mode = MODE_BIST;
      UNLOAD:  mode = MODE_SHIFT;
      default: mode = MODE_NORMAL;
    endcase
    {t1, t2}  = mode;  // T1 is the upper bit
    busy      = (state != IDLE);
    unloading = (state == UNLOAD);
  end

  // A test always begins with exactly one Reset cycle followed by BIST.
  a_init_then_run : assert property (@(posedge clk) disable iff (!rst_n)
    (state == INIT) |=> (state == RUN));
  a_start_inits : assert property (@(posedge clk) disable iff (!rst_n)
    (state == IDLE && start) |=> (state == INIT));

endmodule
