// tb_fcc_model_step: streams random samples (switch state, currents,
// capacitor voltages) into the 4-level model pipeline, one per cycle with
// random gaps, and compares every output with the scalar reference model.
// Also checks that each result appears exactly 21 cycles after its sample
// (6 + 3 * MULT_LAT with MULT_LAT = 5).
module tb_fcc_model_step;
  import fcc_pkg::*;
  `include "fcc_ref.svh"

  localparam int NLEV = 4, NSW = 3, NCAP = 2, LAT = 21, NS = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  val_t vdc;
  model_coef_t coef;
  logic in_valid, out_valid;
  logic [NPH-1:0][NSW-1:0]  in_sw, out_sw;
  val_t [NPH-1:0]           in_i, out_i;
  val_t [NPH-1:0][NCAP-1:0] in_vc, out_vc;

  fcc_model_step #(.NLEV(NLEV), .MULT_LAT(5)) dut (.*);

  int checks = 0, failures = 0;
  int unsigned q_sw [$];
  logic [53:0]  q_i [$];
  logic [107:0] q_vc [$];
  int   q_t [$];
  int   cyc = 0;
  int   sent = 0, got = 0;
  ph_t  gi;
  cap_t gv;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // Compare outputs.
  always @(posedge clk) if (rst_n && out_valid) begin
    ph_t ei; cap_t ev; int t0; int unsigned s;
    ph_t ii; cap_t iv;
    logic [53:0] pi; logic [107:0] pv;
    s  = q_sw.pop_front(); pi = q_i.pop_front(); pv = q_vc.pop_front();
    for (int x = 0; x < 3; x++) begin
      ii[x] = longint'($signed(pi[x*18 +: 18]));
      for (int j = 0; j < 3; j++)
        iv[x][j] = (j < NCAP) ? longint'($signed(pv[(x*NCAP + j)*18 +: 18])) : 0;
    end
    t0 = q_t.pop_front();
    model(s, NLEV, longint'(vdc), longint'(coef.a), longint'(coef.b),
          longint'(coef.c), ii, iv, ei, ev);
    check(cyc - t0 == LAT, "latency");
    check(out_sw == 9'(s), "switch state carried");
    for (int x = 0; x < 3; x++) begin
      check(longint'(out_i[x]) == ei[x], "current");
      for (int j = 0; j < NCAP; j++)
        check(longint'(out_vc[x][j]) == ev[x][j], "capacitor voltage");
    end
    got++;
  end

  initial begin
    vdc    = val_t'(60 * 256);
    coef.a = coef_t'(62285);        // exp(-0.05) in Q16
    coef.b = coef_t'(319);          // (1 - exp(-0.05)) / 10
    coef.c = coef_t'(7447);         // 50e-6 / (2 * 220e-6)
    in_valid = 0; in_sw = '0; in_i = '0; in_vc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Saturation corner: large voltages, then random traffic.
    while (sent < NS) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_sw    = ($urandom & 9'h1ff);
      for (int x = 0; x < 3; x++) begin
        gi[x] = longint'($urandom_range(0, 2048)) - 1024;
        for (int j = 0; j < 3; j++)
          gv[x][j] = (j >= NCAP) ? 0 :
                     (sent < 20) ? longint'($urandom_range(100000, 131071))
                                 : longint'($urandom_range(0, 60 * 256));
      end
      // whole-vector assignments of the packed inputs
      in_i  = {18'(gi[2]), 18'(gi[1]), 18'(gi[0])};
      in_vc = {18'(gv[2][1]), 18'(gv[2][0]), 18'(gv[1][1]), 18'(gv[1][0]),
               18'(gv[0][1]), 18'(gv[0][0])};
      if (sent < 20) vdc = val_t'(131071);
      else           vdc = val_t'(60 * 256);
      if (in_valid) begin
        q_sw.push_back(int'(in_sw)); q_i.push_back(in_i); q_vc.push_back(in_vc);
        q_t.push_back(cyc);
        sent++;
      end
      // hold V_DC constant while the corner samples are in flight
      if (sent == 20 && in_valid) begin
        @(negedge clk); in_valid = 0;
        repeat (LAT + 2) @(negedge clk);
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 5) @(posedge clk);
    check(got == NS && q_sw.size() == 0, "all samples returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
