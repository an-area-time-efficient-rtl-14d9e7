// tb_fcc_mbpc_sizes: open-loop test of the complete controller built for
// the other two converter sizes of the design family: 3 levels
// (2 switch pairs per phase, 64 combinations) and 5 levels (4 switch pairs,
// 3 flying capacitors, 4096 combinations). Both controllers run side by
// side at the default period of 5000 cycles and the default dead time.
//
// For each size, every period the nine or twelve serial ADC models get new
// random codes: currents within +-2 A, capacitor voltages within +-10 % of
// their setpoints j*V_DC/(n-1) with V_DC = 60 V. The testbench recomputes
// the whole decision bit for bit: scaling, estimation with the asserted
// state, prediction of every combination, weighted cost and first minimum.
// It checks the minimum cost, the state asserted at the next period
// boundary, and the cycle at which the optimizer finishes: 533 + N + 1
// for N combinations (optimization starts at cycle 533 and ends 2 cycles
// after the last of N results), so 598 for 3 levels and 4630 for 5 levels,
// the latter still before the output update at cycle 4998. It also checks
// that no switch pair ever drives both gates, and counts dead-time cycles.
// The plant is not simulated; the closed-loop behaviour is covered at the
// default size by tb_fcc_mbpc_top.
module tb_fcc_mbpc_sizes;
  import fcc_pkg::*;
  `include "fcc_ref.svh"

  localparam int NPER = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_done = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  for (genvar g = 0; g < 2; g++) begin : g_size
    localparam int NL    = (g == 0) ? 3 : 5;
    localparam int NSW   = NL - 1;
    localparam int NCAP  = NL - 2;
    localparam int NCH   = 3 * (NCAP + 1);
    localparam int NCOMB = 1 << (3 * NSW);
    localparam int T_DONE = 533 + NCOMB + 1;

    val_t                    vdc;
    model_coef_t             coef;
    weight_t [NCAP-1:0]      w_vc;
    logic [NCH-1:0][11:0]    adc_offset, code;
    coef_t [NCH-1:0]         adc_gain;
    logic                    adc_cs_n, adc_sclk, opt_done;
    logic [NCH-1:0]          adc_sdata;
    logic [2:0][NSW-1:0]     gate_hi, gate_lo, sw_now;
    cost_t                   best_cost;

    fcc_mbpc_top #(.NLEV(NL)) dut (.*);

    for (genvar c = 0; c < NCH; c++) begin : g_adc
      adc_model u_adc (.cs_n(adc_cs_n), .sclk(adc_sclk), .code(code[c]),
                       .sdata(adc_sdata[c]));
    end

    int opt_cycle = -1, n_dead = 0, n_overlap = 0;
    always @(posedge clk) if (rst_n) begin
      if (opt_done) opt_cycle = int'(dut.u_cnt.cnt);
      if ((gate_hi & gate_lo) != '0) n_overlap++;
      if (dut.u_out.armed && ((gate_hi | gate_lo) != '1)) n_dead++;
    end

    initial begin
      longint w[3];
      logic [NCH*12-1:0] codes_k;
      int unsigned sw_k, applied, exp_sw;
      longint exp_cost, g_c, m[12];
      ph_t mi, ei, pi2, ri;
      cap_t mv, ev, pv2, rv;
      int n_change;

      vdc    = val_t'(60 * 256);
      coef.a = coef_t'(62340);
      coef.b = coef_t'(320);
      coef.c = coef_t'(7447);
      w[0] = 2560; w[1] = 553; w[2] = 1000;
      for (int j = 0; j < NCAP; j++) w_vc[j] = weight_t'(w[j]);
      for (int x = 0; x < 3; x++) begin
        adc_offset[x * (NCAP + 1)] = 12'd2048;
        adc_gain[x * (NCAP + 1)]   = coef_t'(2621);   // 0.01 A per code
        for (int j = 0; j < NCAP; j++) begin
          adc_offset[x * (NCAP + 1) + 1 + j] = 12'd0;
          adc_gain[x * (NCAP + 1) + 1 + j]   = coef_t'(6554);   // 0.025 V per code
        end
      end
      code = '0;
      applied  = 0;
      n_change = 0;

      wait (rst_n);
      for (int k = 0; k < NPER; k++) begin
        // new codes, taken by the ADC models at the chip-select edge
        for (int x = 0; x < 3; x++) begin
          code[x * (NCAP + 1)] = 12'(2048 - 200 + $urandom_range(400));
          for (int j = 0; j < NCAP; j++) begin
            int sp;
            sp = (2400 * (j + 1)) / (NL - 1);       // setpoint in codes
            code[x * (NCAP + 1) + 1 + j] = 12'(sp - sp / 10 + $urandom_range(sp / 5));
          end
        end
        codes_k = code;
        sw_k    = applied;
        while (int'(dut.u_cnt.cnt) != T_DONE + 20) @(negedge clk);

        // bit-exact decision
        for (int c = 0; c < NCH; c++)
          m[c] = rsat(((longint'(codes_k[c*12 +: 12]) - longint'(adc_offset[c])) *
                       longint'(adc_gain[c])) >>> 10);
        for (int x = 0; x < 3; x++) begin
          logic [53:0] iref_flat;
          iref_flat = dut.u_ref.i_ref;
          mi[x] = m[x * (NCAP + 1)];
          ri[x] = sx(iref_flat[x*18 +: 18]);
          for (int j = 0; j < 3; j++) begin
            mv[x][j] = (j < NCAP) ? m[x * (NCAP + 1) + 1 + j] : 0;
            rv[x][j] = (j < NCAP) ? (longint'(vdc) * (j + 1)) / (NL - 1) : 0;
          end
        end
        model(sw_k, NL, longint'(vdc), longint'(coef.a), longint'(coef.b),
              longint'(coef.c), mi, mv, ei, ev);
        exp_cost = -1;
        exp_sw   = 0;
        for (int n = 0; n < NCOMB; n++) begin
          model(n, NL, longint'(vdc), longint'(coef.a), longint'(coef.b),
                longint'(coef.c), ei, ev, pi2, pv2);
          g_c = cost(NL, ri, rv, w, pi2, pv2);
          if (exp_cost < 0 || g_c < exp_cost) begin
            exp_cost = g_c; exp_sw = n;
          end
        end
        check(longint'(best_cost) == exp_cost,
              $sformatf("%0d levels, period %0d: minimum cost", NL, k));
        check(opt_cycle == T_DONE,
              $sformatf("%0d levels: optimizer finished at cycle %0d", NL, opt_cycle));

        while (int'(dut.u_cnt.cnt) != 0) @(negedge clk);
        check(int'(sw_now) == exp_sw,
              $sformatf("%0d levels, period %0d: asserted state %0h, expected %0h",
                        NL, k, sw_now, exp_sw));
        if (int'(sw_now) != sw_k) n_change++;
        applied = int'(sw_now);
      end
      $display("%0d levels: %0d combinations, optimizer done at cycle %0d, %0d state changes, %0d dead-time cycles",
               NL, NCOMB, opt_cycle, n_change, n_dead);
      check(n_overlap == 0, $sformatf("%0d levels: no pair drives both gates", NL));
      check(n_change > 0 && n_dead > 0, $sformatf("%0d levels: state changes with dead time", NL));
      n_done++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (n_done == 2);
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
