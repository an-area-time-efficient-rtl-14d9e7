// fcc_mbpc_top: online finite-set model predictive controller for a
// three-phase n-level flying-capacitor inverter (n = 4 by default).
//
// Once per update period (PERIOD = 5000 cycles: 20 kHz at 100 MHz) the
// controller
//   1. reads the phase currents and flying-capacitor voltages from serial
//      ADCs and scales them (adc_measure), while the references for k+2
//      are generated (ref_gen);
//   2. estimates the state at k+1 from the measurements and the switch
//      state asserted now (estimation, 12 cycles);
//   3. predicts the state at k+2 for all 2^(3(n-1)) switch combinations of
//      the three coupled phases, one per cycle through a 21-stage pipeline
//      (prediction), and scores each with the quadratic cost while keeping
//      the cheapest (optimization, 2 cycles): 535 cycles for n = 4;
//   4. applies the winner at the start of the next period, with dead time
//      on every complementary switch pair (gate_output).
// A central counter (enable_counter) starts each block at a fixed cycle;
// the blocks do not handshake. The block split, the counter-based enabling,
// the coupled model, the latencies and the period follow the published
// design; number formats, the ADC framing, the dead time and the placement
// of the windows within the period are choices of this design.
//
// Channel c of the ADC bus is phase x = c / (n-1): slot 0 is the phase
// current, slot 1+j the voltage of flying capacitor j+1. The bus voltage
// vdc, the model coefficients, the weights and the ADC calibration are
// inputs that must be held stable.
module fcc_mbpc_top
  import fcc_pkg::*;
#(
  parameter int unsigned NLEV        = 4,
  parameter int unsigned PERIOD      = 5000,
  parameter int unsigned ADC_HALF    = 15,
  parameter int unsigned DEAD_CYCLES = 100,
  localparam int unsigned NSW  = NLEV - 1,
  localparam int unsigned NCAP = NLEV - 2,
  localparam int unsigned NCH  = NPH * (NCAP + 1),
  localparam int unsigned EST_MULT_LAT  = 2,
  localparam int unsigned PRED_MULT_LAT = 5,
  localparam int unsigned T_EST  = 500,
  localparam int unsigned T_PRED = T_EST + 6 + 3 * EST_MULT_LAT,
  localparam int unsigned T_OPT  = T_PRED + 6 + 3 * PRED_MULT_LAT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  val_t                    vdc,
  input  model_coef_t             coef,
  input  weight_t [NCAP-1:0]      w_vc,
  input  logic [NCH-1:0][11:0]    adc_offset,
  input  coef_t [NCH-1:0]         adc_gain,
  // ADC serial bus
  output logic                    adc_cs_n,
  output logic                    adc_sclk,
  input  logic [NCH-1:0]          adc_sdata,
  // gate drive
  output logic [NPH-1:0][NSW-1:0] gate_hi,
  output logic [NPH-1:0][NSW-1:0] gate_lo,
  // status
  output logic [NPH-1:0][NSW-1:0] sw_now,
  output logic                    opt_done,
  output cost_t                   best_cost
);
  logic en_meas, en_est, en_pred, en_opt, en_out;
  logic [$clog2(PERIOD)-1:0] cnt;

  enable_counter #(
    .PERIOD(PERIOD), .T_MEAS(0), .T_EST(T_EST), .T_PRED(T_PRED),
    .T_OPT(T_OPT), .T_OUT(PERIOD - 2)
  ) u_cnt (
    .clk(clk), .rst_n(rst_n), .cnt(cnt), .en_meas(en_meas), .en_est(en_est),
    .en_pred(en_pred), .en_opt(en_opt), .en_out(en_out));

  // ------------------------------------------------------- measurements
  val_t [NCH-1:0] meas;
  logic           meas_done;
  adc_measure #(.NCH(NCH), .HALF(ADC_HALF)) u_meas (
    .clk(clk), .rst_n(rst_n), .start(en_meas), .offset(adc_offset),
    .gain(adc_gain), .adc_cs_n(adc_cs_n), .adc_sclk(adc_sclk),
    .adc_sdata(adc_sdata), .done(meas_done), .meas(meas));

  val_t [NPH-1:0]           meas_i;
  val_t [NPH-1:0][NCAP-1:0] meas_vc;
  always_comb begin
    for (int unsigned x = 0; x < NPH; x++) begin
      meas_i[x] = meas[x * (NCAP + 1)];
      for (int unsigned j = 0; j < NCAP; j++)
        meas_vc[x][j] = meas[x * (NCAP + 1) + 1 + j];
    end
  end

  // ------------------------------------------------------- references
  val_t [NPH-1:0]           i_ref;
  val_t [NPH-1:0][NCAP-1:0] vc_ref;
  ref_gen #(.NLEV(NLEV)) u_ref (
    .clk(clk), .rst_n(rst_n), .start(en_meas), .vdc(vdc),
    .i_ref(i_ref), .vc_ref(vc_ref));

  // ------------------------------------------------------- estimation
  val_t [NPH-1:0]           est_i;
  val_t [NPH-1:0][NCAP-1:0] est_vc;
  logic                     est_done;
  estimation #(.NLEV(NLEV), .MULT_LAT(EST_MULT_LAT)) u_est (
    .clk(clk), .rst_n(rst_n), .start(en_est), .vdc(vdc), .coef(coef),
    .sw_now(sw_now), .meas_i(meas_i), .meas_vc(meas_vc),
    .done(est_done), .est_i(est_i), .est_vc(est_vc));

  // ------------------------------------------------------- prediction
  logic                     p_busy, p_valid, p_last;
  logic [NPH-1:0][NSW-1:0]  p_sw;
  val_t [NPH-1:0]           p_i;
  val_t [NPH-1:0][NCAP-1:0] p_vc;
  prediction #(.NLEV(NLEV), .MULT_LAT(PRED_MULT_LAT)) u_pred (
    .clk(clk), .rst_n(rst_n), .start(en_pred), .vdc(vdc), .coef(coef),
    .est_i(est_i), .est_vc(est_vc), .busy(p_busy), .out_valid(p_valid),
    .out_last(p_last), .out_sw(p_sw), .out_i(p_i), .out_vc(p_vc));

  // ------------------------------------------------------- optimization
  logic [NPH-1:0][NSW-1:0] best_sw;
  optimization #(.NLEV(NLEV)) u_opt (
    .clk(clk), .rst_n(rst_n), .start(en_opt), .w_vc(w_vc),
    .i_ref(i_ref), .vc_ref(vc_ref), .in_valid(p_valid), .in_last(p_last),
    .in_sw(p_sw), .in_i(p_i), .in_vc(p_vc), .done(opt_done),
    .best_sw(best_sw), .best_cost(best_cost));

  // ------------------------------------------------------- output
  gate_output #(.NLEV(NLEV), .DEAD_CYCLES(DEAD_CYCLES)) u_out (
    .clk(clk), .rst_n(rst_n), .update(en_out), .new_sw(best_sw),
    .sw_now(sw_now), .gate_hi(gate_hi), .gate_lo(gate_lo));

  // The schedule must leave the prediction pass enough time.
  a_pred_in_time: assert property (@(posedge clk)
    en_out |-> !p_busy && !p_valid)
    else $error("prediction still running at output update");

  logic unused_status;
  assign unused_status = ^{cnt, meas_done, est_done};
endmodule
