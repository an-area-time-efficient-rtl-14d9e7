// tb_ref_gen: steps the reference generator through one full 50 Hz
// period (400 update periods of 20 kHz) and compares the three current
// references with 2 A * sin(2 pi (k + 2) 50 / 20000 - phase lag) computed
// in floating point, k = n - 1 counting the start pulses n from 1
// (tolerance 3 LSB of 1/256 A), checks the 120 degree
// lags, the capacitor setpoints j * V_DC / 3, and that the outputs change
// 2 cycles after `start` and hold in between.
module tb_ref_gen;
  import fcc_pkg::*;
  `include "fcc_ref.svh"

  localparam int NLEV = 4, NCAP = 2, NSTEP = 420;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start;
  val_t vdc;
  val_t [NPH-1:0]           i_ref;
  val_t [NPH-1:0][NCAP-1:0] vc_ref;

  ref_gen #(.NLEV(NLEV)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [53:0] fi, fi0; logic [107:0] fv;
    real th, ex, er, maxerr;
    longint v;
    maxerr = 0;
    start = 0; vdc = val_t'(60 * 256);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 1; n <= NSTEP; n++) begin
      @(negedge clk);
      vdc = val_t'($urandom_range(1000, 100000));
      fi0 = i_ref;
      start = 1;
      @(negedge clk);
      start = 0;
      check(i_ref == fi0, "held 1 cycle after start");
      @(negedge clk);
      fi = i_ref; fv = vc_ref;
      for (int x = 0; x < 3; x++) begin
        th = 2.0 * 3.14159265358979 * ((real'(n + 1) * 10737418.0 - real'(x) * 1431655765.0)
             / 4294967296.0);
        ex = 512.0 * $sin(th);
        v  = sx(fi[x*18 +: 18]);
        er = (real'(v) > ex) ? real'(v) - ex : ex - real'(v);
        if (er > maxerr) maxerr = er;
        check(er <= 3.0, $sformatf("current reference n=%0d x=%0d got %0d exp %f", n, x, v, ex));
        for (int j = 0; j < NCAP; j++)
          check(sx(fv[(x*NCAP + j)*18 +: 18]) == (longint'(vdc) * (j + 1)) / 3,
                "capacitor setpoint");
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      check(i_ref == fi, "held between updates");
    end
    $display("largest current reference error %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSTEP * 8 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
