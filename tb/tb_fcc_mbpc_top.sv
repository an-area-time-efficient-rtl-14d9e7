// tb_fcc_mbpc_top: closed-loop, end-to-end test of the complete controller
// at its default size (4 levels, 512 combinations, 5000-cycle period).
//
// A floating-point model of the three-phase 4-level flying-capacitor
// inverter with a star-connected RL load (R = 10 ohm, L = 10 mH,
// C = 220 uF, V_DC = 60 V) is integrated with 50 sub-steps per 50 us
// update period, using the switch state the controller asserts (dead time
// neglected; before the first update the state is taken as all-off-high,
// i.e. S = 0). Its currents and capacitor voltages are converted to 12-bit
// codes and served by nine serial ADC models. The capacitors start at 80 %
// of their setpoints.
//
// Every period the testbench recomputes the controller's decision bit for
// bit: scaling of the codes, estimation with the asserted state, the
// prediction of all 512 combinations, the cost with weights 10 and 2.16 and
// the first minimum, and checks the cost and the state asserted at the next
// period boundary. It checks the published timing (optimization finished
// at cycle 512 + 535 - 1 of the period) and, after one 50 Hz cycle of
// settling, that the currents follow the 2 A reference and the capacitor
// voltages stay near V_DC/3 and 2 V_DC/3. It counts ADC frames, estimation
// results, prediction passes, optimizer results, state changes with dead
// time, and capacitor charge and discharge events, and fails if any never
// happens. The current reference is read from the reference generator,
// which has its own test.
module tb_fcc_mbpc_top;
  import fcc_pkg::*;
  `include "fcc_ref.svh"

  localparam int  NLEV = 4, NSW = 3, NCAP = 2, NCH = 9, NCOMB = 512;
  localparam int  NPER = 800;                 // 40 ms: two 50 Hz cycles
  localparam real R = 10.0, L = 10.0e-3, C = 220.0e-6, DT = 50.0e-6, VDC = 60.0;
  localparam real ILSB = 0.01, VLSB = 0.025;  // ADC scaling, A and V per code

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  val_t                    vdc;
  model_coef_t             coef;
  weight_t [NCAP-1:0]      w_vc;
  logic [NCH-1:0][11:0]    adc_offset, code;
  coef_t [NCH-1:0]         adc_gain;
  logic                    adc_cs_n, adc_sclk, opt_done;
  logic [NCH-1:0]          adc_sdata;
  logic [NPH-1:0][NSW-1:0] gate_hi, gate_lo, sw_now;
  cost_t                   best_cost;

  fcc_mbpc_top dut (.*);

  for (genvar c = 0; c < NCH; c++) begin : g_adc
    adc_model u_adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .code(code[c]), .sdata(adc_sdata[c]));
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------------- plant
  real pi_[3], pv[3][2];
  int unsigned applied;

  function automatic int bitof(input int unsigned sw, input int x, input int s);
    return (sw >> (x * NSW + s)) & 1;
  endfunction

  task automatic plant_step(input int unsigned sw);
    real h, vxn[3], von, di, dv;
    int  d;
    h = DT / 50.0;
    for (int k = 0; k < 50; k++) begin
      von = 0.0;
      for (int x = 0; x < 3; x++) begin
        vxn[x] = bitof(sw, x, 2) ? VDC : 0.0;
        for (int j = 0; j < NCAP; j++) begin
          d = bitof(sw, x, j + 1) - bitof(sw, x, j);
          vxn[x] = vxn[x] - d * pv[x][j];
        end
        von = von + vxn[x] / 3.0;
      end
      for (int x = 0; x < 3; x++) begin
        di = (vxn[x] - von - R * pi_[x]) / L * h;
        for (int j = 0; j < NCAP; j++) begin
          d = bitof(sw, x, j + 1) - bitof(sw, x, j);
          pv[x][j] = pv[x][j] + d * pi_[x] / C * h;
        end
        pi_[x] = pi_[x] + di;
      end
    end
  endtask

  function automatic logic [11:0] to_code(input real v);
    int c;
    c = int'(v);                      // rounds to nearest
    if (c < 0) c = 0;
    if (c > 4095) c = 4095;
    return 12'(c);
  endfunction

  task automatic sample_codes();
    for (int x = 0; x < 3; x++) begin
      code[x * 3] = to_code(2048.0 + pi_[x] / ILSB);
      for (int j = 0; j < NCAP; j++) code[x * 3 + 1 + j] = to_code(pv[x][j] / VLSB);
    end
  endtask

  // ------------------------------------------------ bit-exact reference
  longint w[3];
  int unsigned exp_sw;
  longint      exp_cost;

  task automatic decide(input logic [NCH*12-1:0] codes, input int unsigned sw_app,
                        input logic [53:0] iref_flat);
    ph_t mi, ei, pi2, ri; cap_t mv, ev, pv2, rv;
    longint m[NCH], g;
    for (int c = 0; c < NCH; c++)
      m[c] = rsat(((longint'(codes[c*12 +: 12]) - longint'(adc_offset[c])) *
                   longint'(adc_gain[c])) >>> 10);
    for (int x = 0; x < 3; x++) begin
      mi[x] = m[x * 3];
      ri[x] = sx(iref_flat[x*18 +: 18]);
      for (int j = 0; j < 3; j++) begin
        mv[x][j] = (j < NCAP) ? m[x * 3 + 1 + j] : 0;
        rv[x][j] = (j < NCAP) ? (longint'(vdc) * (j + 1)) / 3 : 0;
      end
    end
    model(sw_app, NLEV, longint'(vdc), longint'(coef.a), longint'(coef.b),
          longint'(coef.c), mi, mv, ei, ev);
    exp_cost = -1;
    for (int n = 0; n < NCOMB; n++) begin
      model(n, NLEV, longint'(vdc), longint'(coef.a), longint'(coef.b),
            longint'(coef.c), ei, ev, pi2, pv2);
      g = cost(NLEV, ri, rv, w, pi2, pv2);
      if (exp_cost < 0 || g < exp_cost) begin
        exp_cost = g; exp_sw = n;
      end
    end
  endtask

  // ------------------------------------------------------- event counters
  int n_frames = 0, n_est = 0, n_pred = 0, n_opt = 0, n_change = 0, n_dead = 0;
  int n_charge = 0, n_discharge = 0, opt_cycle = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_meas.done)        n_frames++;
    if (dut.u_est.done)         n_est++;
    if (dut.u_pred.out_last)    n_pred++;
    if (opt_done) begin
      n_opt++;
      opt_cycle = int'(dut.u_cnt.cnt);
    end
    if (dut.u_out.armed && ((gate_hi | gate_lo) != '1)) n_dead++;
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    logic [NCH*12-1:0] codes_k;
    int unsigned       sw_k;
    real ierr2, iref2, vmaxerr, ph;
    int  nerr;
    vdc    = val_t'(60 * 256);
    coef.a = coef_t'(62340);     // exp(-DT R / L) = 0.95123 in Q16
    coef.b = coef_t'(320);       // (1 - 0.95123) / 10
    coef.c = coef_t'(7447);      // DT / (2 C)
    w[0] = 2560; w[1] = 553; w[2] = 0;   // 10 and 2.16 with 8 fractional bits
    w_vc = {16'(553), 16'(2560)};
    for (int x = 0; x < 3; x++) begin
      adc_offset[x * 3] = 12'd2048;
      adc_gain[x * 3]   = coef_t'(2621);     // 0.01 A/code, Q8 result, Q10 gain
      for (int j = 0; j < NCAP; j++) begin
        adc_offset[x * 3 + 1 + j] = 12'd0;
        adc_gain[x * 3 + 1 + j]   = coef_t'(6554);   // 0.025 V/code
      end
      pi_[x] = 0.0;
      pv[x][0] = 0.8 * VDC / 3.0;
      pv[x][1] = 0.8 * 2.0 * VDC / 3.0;
    end
    applied = 0;
    sample_codes();
    ierr2 = 0; iref2 = 0; vmaxerr = 0; nerr = 0;

    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NPER; k++) begin
      // cycle 0 of period k: codes are taken at the chip-select edge
      codes_k = code;
      sw_k    = applied;
      // after the optimizer has finished
      while (int'(dut.u_cnt.cnt) != 1100) @(negedge clk);
      decide(codes_k, sw_k, dut.u_ref.i_ref);
      check(longint'(best_cost) == exp_cost, $sformatf("period %0d: minimum cost", k));
      check(opt_cycle == 512 + 535 - 1, $sformatf("optimizer finished at cycle %0d", opt_cycle));
      // next period boundary
      while (int'(dut.u_cnt.cnt) != 0) @(negedge clk);
      check(int'(sw_now) == exp_sw, $sformatf("period %0d: asserted state", k));
      if (int'(sw_now) != sw_k) n_change++;
      // the plant runs period k with the state applied in it
      plant_step(sw_k);
      applied = int'(sw_now);
      for (int x = 0; x < 3; x++)
        for (int j = 0; j < NCAP; j++) begin
          int d;
          d = bitof(applied, x, j + 1) - bitof(applied, x, j);
          if (d * pi_[x] > 0.05) n_charge++;
          if (d * pi_[x] < -0.05) n_discharge++;
        end
      sample_codes();
      // tracking quality over the second 50 Hz cycle
      if (k >= NPER / 2) begin
        for (int x = 0; x < 3; x++) begin
          real e;
          ph = 2.0 * 3.14159265358979 * ((real'(k + 1) * 10737418.0 - real'(x) * 1431655765.0)
               / 4294967296.0);
          e = pi_[x] - 2.0 * $sin(ph);
          ierr2 += e * e;
          iref2 += 4.0 * $sin(ph) * $sin(ph);
          for (int j = 0; j < NCAP; j++) begin
            real ev;
            ev = pv[x][j] - (j + 1) * VDC / 3.0;
            if (ev < 0) ev = -ev;
            if (ev > vmaxerr) vmaxerr = ev;
          end
          nerr++;
        end
      end
    end
    $display("rms current error %f A (rms reference %f A), largest capacitor error %f V",
             $sqrt(ierr2 / nerr), $sqrt(iref2 / nerr), vmaxerr);
    $display("frames %0d estimations %0d prediction passes %0d optimizer results %0d",
             n_frames, n_est, n_pred, n_opt);
    $display("state changes %0d dead-time cycles %0d capacitor charge %0d discharge %0d",
             n_change, n_dead, n_charge, n_discharge);
    check($sqrt(ierr2 / nerr) < 0.15, "current follows the reference");
    check(vmaxerr < 1.0, "capacitor voltages balanced");
    check(n_frames >= NPER && n_est >= NPER && n_pred >= NPER && n_opt >= NPER,
          "every stage ran every period");
    check(n_change > 0, "switch state changed");
    check(n_dead > 0, "dead time inserted");
    check(n_charge > 0 && n_discharge > 0, "capacitors charged and discharged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NPER + 2) * 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
