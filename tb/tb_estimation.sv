// tb_estimation: pulses `start` with random measurements and asserted
// switch states and checks that `done` comes exactly 12 cycles later with
// the state at k+1 given by the scalar reference model, and that the
// result is held afterwards while the inputs change.
module tb_estimation;
  import fcc_pkg::*;
  `include "fcc_ref.svh"

  localparam int NLEV = 4, NSW = 3, NCAP = 2, LAT = 12, NRUN = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  val_t vdc;
  model_coef_t coef;
  logic start, done;
  logic [NPH-1:0][NSW-1:0]  sw_now;
  val_t [NPH-1:0]           meas_i, est_i;
  val_t [NPH-1:0][NCAP-1:0] meas_vc, est_vc;

  estimation #(.NLEV(NLEV)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    ph_t ii, ei; cap_t iv, ev;
    int unsigned s;
    int wait_cyc;
    logic [53:0] fi;
    logic [107:0] fv;
    vdc = val_t'(60 * 256);
    coef.a = coef_t'(62285); coef.b = coef_t'(319); coef.c = coef_t'(7447);
    start = 0; sw_now = '0; meas_i = '0; meas_vc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < NRUN; r++) begin
      @(negedge clk);
      s = $urandom & 9'h1ff;
      sw_now = 9'(s);
      meas_i  = {$urandom, $urandom};
      meas_vc = {$urandom, $urandom, $urandom, $urandom};
      fi = meas_i;
      fv = meas_vc;
      for (int x = 0; x < 3; x++) begin
        ii[x] = sx(fi[x*18 +: 18]);
        for (int j = 0; j < 3; j++)
          iv[x][j] = (j < NCAP) ? sx(fv[(x*NCAP + j)*18 +: 18]) : 0;
      end
      model(s, NLEV, longint'(vdc), longint'(coef.a), longint'(coef.b),
            longint'(coef.c), ii, iv, ei, ev);
      start = 1;
      @(negedge clk);
      start = 0;
      // scramble the inputs: the block must have sampled them at start
      meas_i = {$urandom, $urandom}; sw_now = 9'($urandom);
      wait_cyc = 1;
      while (!done && wait_cyc < 40) begin
        @(negedge clk); wait_cyc++;
      end
      check(wait_cyc == LAT, $sformatf("latency %0d", wait_cyc));
      for (int k = 0; k < 2; k++) begin
        for (int x = 0; x < 3; x++) begin
          check(sx(est_i[x]) == ei[x], "estimated current");
          for (int j = 0; j < NCAP; j++)
            check(sx(est_vc[x][j]) == ev[x][j], "estimated capacitor voltage");
        end
        repeat (3) @(negedge clk);   // held after done
      end
    end
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
