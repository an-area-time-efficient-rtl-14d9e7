// enable_counter: the central sequencer. A free-running counter divides
// the clock into update periods of PERIOD cycles (5000 at 100 MHz for a
// 20 kHz update rate) and pulses the enable of each block at a fixed cycle
// of the period, so the blocks need no handshakes with each other.
//
// Default schedule (cycle within the period): measurement and reference
// generation at 0 (500-cycle window), estimation at 500 (12 cycles),
// prediction at 512 (533 cycles), optimization at 533, when the first
// prediction leaves the 21-stage pipeline (514 cycles), output at
// PERIOD-2 so that the new switch state is applied at the period boundary.
// The window lengths are the published ones; their placement back to back
// is a choice of this design. `cnt` is brought out for observation.
module enable_counter #(
  parameter int unsigned PERIOD = 5000,
  parameter int unsigned T_MEAS = 0,
  parameter int unsigned T_EST  = 500,
  parameter int unsigned T_PRED = 512,
  parameter int unsigned T_OPT  = 533,
  parameter int unsigned T_OUT  = PERIOD - 2,
  localparam int unsigned CNTW  = $clog2(PERIOD)
) (
  input  logic            clk,
  input  logic            rst_n,
  output logic [CNTW-1:0] cnt,
  output logic            en_meas,
  output logic            en_est,
  output logic            en_pred,
  output logic            en_opt,
  output logic            en_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       cnt <= '0;
    else if (cnt == CNTW'(PERIOD - 1)) cnt <= '0;
    else                              cnt <= cnt + 1'b1;
  end

  assign en_meas = (cnt == CNTW'(T_MEAS));
  assign en_est  = (cnt == CNTW'(T_EST));
  assign en_pred = (cnt == CNTW'(T_PRED));
  assign en_opt  = (cnt == CNTW'(T_OPT));
  assign en_out  = (cnt == CNTW'(T_OUT));

  initial begin
    assert (T_MEAS < T_EST && T_EST < T_PRED && T_PRED <= T_OPT && T_OPT < T_OUT && T_OUT < PERIOD)
      else $error("enable_counter: schedule out of order");
  end
endmodule
