// prediction: evaluates the coupled model (eqs. 6-10) one step ahead, from
// the estimated state at k+1 to k+2, for every one of the 2^(3(n-1))
// switch combinations of the three phases (512 for n = 4). A counter
// generates one combination per clock cycle and feeds it into a fully
// pipelined fcc_model_step with 5-cycle multipliers (latency 21, the
// published figure), so a new combination enters and, once the pipeline is
// full, a finished prediction leaves every cycle: the whole set takes
// NCOMB + 21 cycles (533 for n = 4).
//
// Interface: a one-cycle `start` pulse launches a pass; est_i, est_vc, vdc
// and coef must be stable until the pass ends. The results stream out on
// out_valid with their switch state; out_last marks the final combination
// (all switches on, since combinations are counted upward from 0). The
// first combination enters in the `start` cycle and the first result
// leaves 21 cycles later; `busy` is high while the remaining combinations
// are being issued. Combination index bits
// [x*NSW +: NSW] are the switch state of phase x (own choice of order).
module prediction
  import fcc_pkg::*;
#(
  parameter int unsigned NLEV     = 4,
  parameter int unsigned MULT_LAT = 5,
  localparam int unsigned NSW   = NLEV - 1,
  localparam int unsigned NCAP  = NLEV - 2,
  localparam int unsigned SWB   = NPH * NSW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  val_t                     vdc,
  input  model_coef_t              coef,
  input  val_t [NPH-1:0]           est_i,
  input  val_t [NPH-1:0][NCAP-1:0] est_vc,
  output logic                     busy,
  output logic                     out_valid,
  output logic                     out_last,
  output logic [NPH-1:0][NSW-1:0]  out_sw,
  output val_t [NPH-1:0]           out_i,
  output val_t [NPH-1:0][NCAP-1:0] out_vc
);
  // Combination 0 is issued in the `start` cycle itself, the rest on the
  // following NCOMB-1 cycles.
  logic [SWB-1:0] comb, issue_sw;
  logic           issue;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      comb <= '0;
    end else if (start) begin
      busy <= 1'b1;
      comb <= SWB'(1);
    end else if (busy) begin
      comb <= comb + 1'b1;
      if (&comb) busy <= 1'b0;
    end
  end

  assign issue    = start || busy;
  assign issue_sw = start ? '0 : comb;

  fcc_model_step #(.NLEV(NLEV), .MULT_LAT(MULT_LAT)) u_model (
    .clk(clk), .rst_n(rst_n), .vdc(vdc), .coef(coef),
    .in_valid(issue), .in_sw(issue_sw), .in_i(est_i), .in_vc(est_vc),
    .out_valid(out_valid), .out_sw(out_sw), .out_i(out_i), .out_vc(out_vc));

  assign out_last = out_valid && (&out_sw);
endmodule
