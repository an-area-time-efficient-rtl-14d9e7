// fcc_model_step: one discrete-time step of the coupled three-phase model of
// an n-level flying-capacitor inverter with an RL load, as a fully pipelined
// datapath that accepts a new (switch state, phase currents, capacitor
// voltages) sample every clock cycle.
//
// For each phase x, with d_j = S_(j+1) - S_j (j = 1 .. n-2):
//   v_xn  = S_(n-1) * V_DC - sum_j d_j * v_cj                (eq. 1 / 6)
//   v_on  = (v_an + v_bn + v_cn) / 3                         (eq. 2 / 7)
//   v_xo  = v_xn - v_on                                      (eq. 3 / 8)
//   i'    = a * i + b * v_xo                                 (eq. 4 / 9)
//   v_cj' = v_cj + c * (i + i') * d_j                        (eq. 5 / 10)
// with a = exp(-d R/L), b = (1 - a)/R and c = d/(2C) given as coefficients.
// The equations and the coupling of the phases through the load star point
// are the published model; the extension from one capacitor to n-2
// capacitors follows the published rule that each extra level adds one term
// to eq. (1) and one equation like eq. (5). The star-point voltage is
// subtracted (load phase voltage = pole voltage minus star-point voltage);
// the published eq. (3) prints a plus sign, which would not cancel the
// common-mode part, so the physical sign is used here.
//
// Pipeline (own choice): 6 single-cycle add/select stages and three
// multiplier stages of MULT_LAT cycles each, so the latency is
// LAT = 6 + 3*MULT_LAT clock cycles: 21 for MULT_LAT = 5 (the published
// prediction latency) and 12 for MULT_LAT = 2 (the published estimation
// time). The coefficients and V_DC must be stable while samples are in
// flight. Values are saturated to the quantity format after every stage.
// The carried input currents are no longer read after stage 7; lint reports
// their last delay bits unused and synthesis removes them.
module fcc_model_step
  import fcc_pkg::*;
#(
  parameter int unsigned NLEV     = 4,
  parameter int unsigned MULT_LAT = 5,
  localparam int unsigned NSW  = NLEV - 1,
  localparam int unsigned NCAP = NLEV - 2,
  localparam int unsigned LAT  = 6 + 3 * MULT_LAT
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  val_t                              vdc,
  input  model_coef_t                       coef,
  input  logic                              in_valid,
  input  logic [NPH-1:0][NSW-1:0]           in_sw,
  input  val_t [NPH-1:0]                    in_i,
  input  val_t [NPH-1:0][NCAP-1:0]          in_vc,
  output logic                              out_valid,
  output logic [NPH-1:0][NSW-1:0]           out_sw,
  output val_t [NPH-1:0]                    out_i,
  output val_t [NPH-1:0][NCAP-1:0]          out_vc
);
  typedef logic signed [31:0] wide_t;

  // State carried alongside the arithmetic.
  typedef struct packed {
    logic [NPH-1:0][NSW-1:0]  sw;
    val_t [NPH-1:0]           i;
    val_t [NPH-1:0][NCAP-1:0] vc;
  } carry_t;

  // d_j = S_(j+1) - S_j as -1, 0 or +1.
  function automatic logic signed [1:0] dsw(input logic [NSW-1:0] s, input int unsigned j);
    return $signed({1'b0, s[j+1]}) - $signed({1'b0, s[j]});
  endfunction

  // ---------------------------------------------------------------- valid
  logic [LAT-1:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-2:0], in_valid};
  end
  assign out_valid = vpipe[LAT-1];

  // ---------------------------------------------- stage 1: pole voltages
  carry_t c0, c1, c2, c3, c4, c5, c6, c7, c8;
  assign c0 = '{sw: in_sw, i: in_i, vc: in_vc};

  wide_t [NPH-1:0] vxn1, vxn2, vxn3;
  always_ff @(posedge clk) begin
    for (int unsigned x = 0; x < NPH; x++) begin
      wide_t acc;
      acc = in_sw[x][NSW-1] ? wide_t'(vdc) : '0;
      for (int unsigned j = 0; j < NCAP; j++) begin
        case (dsw(in_sw[x], j))
          2'sb01:  acc = acc - wide_t'(in_vc[x][j]);
          2'sb11:  acc = acc + wide_t'(in_vc[x][j]);
          default: ;
        endcase
      end
      vxn1[x] <= acc;
    end
    c1 <= c0;
  end

  // ------------------------------------------ stage 2: sum of the phases
  wide_t vsum2;
  always_ff @(posedge clk) begin
    vsum2 <= vxn1[0] + vxn1[1] + vxn1[2];
    vxn2  <= vxn1;
    c2    <= c1;
  end

  // ---------------------------------- stage 3: star-point voltage (mult)
  val_t von3;
  pipe_delay #(.WIDTH(DW), .DEPTH(MULT_LAT)) u_von (
    .clk(clk), .d(cmul(vsum2, ONE_THIRD)), .q(von3));
  pipe_delay #(.WIDTH($bits(vxn2)), .DEPTH(MULT_LAT)) u_vxn (
    .clk(clk), .d(vxn2), .q(vxn3));
  pipe_delay #(.WIDTH($bits(carry_t)), .DEPTH(MULT_LAT)) u_c3 (
    .clk(clk), .d(c2), .q(c3));

  // ------------------------------------- stage 4: load phase voltages
  val_t [NPH-1:0] vxo4, vxo_d;
  always_comb begin
    for (int unsigned x = 0; x < NPH; x++) vxo_d[x] = sat(64'(vxn3[x]) - 64'(von3));
  end
  always_ff @(posedge clk) begin
    vxo4 <= vxo_d;
    c4   <= c3;
  end

  // ------------------------- stage 5: free and forced current response
  val_t [NPH-1:0] ai5, bv5, ai_d, bv_d;
  always_comb begin
    for (int unsigned x = 0; x < NPH; x++) begin
      ai_d[x] = cmul(wide_t'(c4.i[x]), coef.a);
      bv_d[x] = cmul(wide_t'(vxo4[x]), coef.b);
    end
  end
  pipe_delay #(.WIDTH($bits(ai5)), .DEPTH(MULT_LAT)) u_ai (
    .clk(clk), .d(ai_d), .q(ai5));
  pipe_delay #(.WIDTH($bits(bv5)), .DEPTH(MULT_LAT)) u_bv (
    .clk(clk), .d(bv_d), .q(bv5));
  pipe_delay #(.WIDTH($bits(carry_t)), .DEPTH(MULT_LAT)) u_c5 (
    .clk(clk), .d(c4), .q(c5));

  // ---------------------------------------------- stage 6: new current
  val_t [NPH-1:0] inew6, inew7, inew8, inew_d;
  always_comb begin
    for (int unsigned x = 0; x < NPH; x++) inew_d[x] = sat(64'(ai5[x]) + 64'(bv5[x]));
  end
  always_ff @(posedge clk) begin
    inew6 <= inew_d;
    c6    <= c5;
  end

  // ------------------------- stage 7: trapezoidal sum of the currents
  wide_t [NPH-1:0] isum7;
  always_ff @(posedge clk) begin
    for (int unsigned x = 0; x < NPH; x++)
      isum7[x] <= wide_t'(c6.i[x]) + wide_t'(inew6[x]);
    inew7 <= inew6;
    c7    <= c6;
  end

  // --------------------------------- stage 8: capacitor charge (mult)
  val_t [NPH-1:0] ci8, ci_d;
  always_comb begin
    for (int unsigned x = 0; x < NPH; x++) ci_d[x] = cmul(isum7[x], coef.c);
  end
  pipe_delay #(.WIDTH($bits(ci8)), .DEPTH(MULT_LAT)) u_ci (
    .clk(clk), .d(ci_d), .q(ci8));
  pipe_delay #(.WIDTH($bits(inew7)), .DEPTH(MULT_LAT)) u_inew (
    .clk(clk), .d(inew7), .q(inew8));
  pipe_delay #(.WIDTH($bits(carry_t)), .DEPTH(MULT_LAT)) u_c8 (
    .clk(clk), .d(c7), .q(c8));

  // --------------------------- stage 9: new flying-capacitor voltages
  val_t [NPH-1:0][NCAP-1:0] vc_d;
  always_comb begin
    for (int unsigned x = 0; x < NPH; x++) begin
      for (int unsigned j = 0; j < NCAP; j++) begin
        case (dsw(c8.sw[x], j))
          2'sb01:  vc_d[x][j] = sat(64'(c8.vc[x][j]) + 64'(ci8[x]));
          2'sb11:  vc_d[x][j] = sat(64'(c8.vc[x][j]) - 64'(ci8[x]));
          default: vc_d[x][j] = c8.vc[x][j];
        endcase
      end
    end
  end
  always_ff @(posedge clk) begin
    out_vc <= vc_d;
    out_i  <= inew8;
    out_sw <= c8.sw;
  end

endmodule
