// estimation: computes the converter state at k+1 (phase currents and
// flying-capacitor voltages) from the measurements taken at k and the
// switch state asserted during [k, k+1], using the coupled model of
// eqs. (1)-(5). It sends one sample through an fcc_model_step pipeline with
// 2-cycle multipliers, so the result is ready 12 clock cycles after `start`,
// the published estimation time.
//
// Interface: a one-cycle `start` pulse samples meas_i, meas_vc and sw_now.
// `done` pulses 12 cycles later; est_i / est_vc are valid from that cycle
// and held until the next result. Reset clears the held state to zero.
module estimation
  import fcc_pkg::*;
#(
  parameter int unsigned NLEV     = 4,
  parameter int unsigned MULT_LAT = 2,
  localparam int unsigned NSW  = NLEV - 1,
  localparam int unsigned NCAP = NLEV - 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  val_t                     vdc,
  input  model_coef_t              coef,
  input  logic [NPH-1:0][NSW-1:0]  sw_now,
  input  val_t [NPH-1:0]           meas_i,
  input  val_t [NPH-1:0][NCAP-1:0] meas_vc,
  output logic                     done,
  output val_t [NPH-1:0]           est_i,
  output val_t [NPH-1:0][NCAP-1:0] est_vc
);
  logic                     m_valid;
  logic [NPH-1:0][NSW-1:0]  m_sw;
  val_t [NPH-1:0]           m_i, hold_i;
  val_t [NPH-1:0][NCAP-1:0] m_vc, hold_vc;

  fcc_model_step #(.NLEV(NLEV), .MULT_LAT(MULT_LAT)) u_model (
    .clk(clk), .rst_n(rst_n), .vdc(vdc), .coef(coef),
    .in_valid(start), .in_sw(sw_now), .in_i(meas_i), .in_vc(meas_vc),
    .out_valid(m_valid), .out_sw(m_sw), .out_i(m_i), .out_vc(m_vc));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_i  <= '0;
      hold_vc <= '0;
    end else if (m_valid) begin
      hold_i  <= m_i;
      hold_vc <= m_vc;
    end
  end

  assign done   = m_valid;
  assign est_i  = m_valid ? m_i  : hold_i;
  assign est_vc = m_valid ? m_vc : hold_vc;

  // The switch state travels with the sample but is not needed here.
  logic unused_sw;
  assign unused_sw = ^m_sw;
endmodule
