// tb_prediction: launches prediction passes from random estimated states
// and checks that the 512 switch combinations of the 4-level converter
// come out in order, one per cycle, the first exactly 21 cycles after
// `start` and the last (flagged by out_last) 533 - 1 cycles after it, each
// with the next state given by the scalar reference model.
module tb_prediction;
  import fcc_pkg::*;
  `include "fcc_ref.svh"

  localparam int NLEV = 4, NSW = 3, NCAP = 2, LAT = 21, NCOMB = 512, NPASS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  val_t vdc;
  model_coef_t coef;
  logic start, busy, out_valid, out_last;
  logic [NPH-1:0][NSW-1:0]  out_sw;
  val_t [NPH-1:0]           est_i, out_i;
  val_t [NPH-1:0][NCAP-1:0] est_vc, out_vc;

  prediction #(.NLEV(NLEV)) dut (.*);

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
    logic [53:0] fi; logic [107:0] fv;
    int cyc, n;
    vdc = val_t'(60 * 256);
    coef.a = coef_t'(62285); coef.b = coef_t'(319); coef.c = coef_t'(7447);
    start = 0; est_i = '0; est_vc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < NPASS; p++) begin
      @(negedge clk);
      for (int x = 0; x < 3; x++) begin
        ii[x] = longint'($urandom_range(0, 1536)) - 768;
        for (int j = 0; j < 3; j++)
          iv[x][j] = (j < NCAP) ? longint'($urandom_range(0, 60 * 256)) : 0;
      end
      est_i  = {18'(ii[2]), 18'(ii[1]), 18'(ii[0])};
      est_vc = {18'(iv[2][1]), 18'(iv[2][0]), 18'(iv[1][1]), 18'(iv[1][0]),
                18'(iv[0][1]), 18'(iv[0][0])};
      start = 1;
      cyc = 0; n = 0;
      @(negedge clk);
      start = 0;
      while (n < NCOMB && cyc < LAT + NCOMB + 20) begin
        cyc++;
        if (out_valid) begin
          if (n == 0) check(cyc == LAT, $sformatf("first result after %0d cycles", cyc));
          check(int'(out_sw) == n, "combination order");
          check(out_last == (n == NCOMB - 1), "last flag");
          model(n, NLEV, longint'(vdc), longint'(coef.a), longint'(coef.b),
                longint'(coef.c), ii, iv, ei, ev);
          fi = out_i; fv = out_vc;
          for (int x = 0; x < 3; x++) begin
            check(sx(fi[x*18 +: 18]) == ei[x], "predicted current");
            for (int j = 0; j < NCAP; j++)
              check(sx(fv[(x*NCAP + j)*18 +: 18]) == ev[x][j], "predicted capacitor voltage");
          end
          n++;
        end
        @(negedge clk);
      end
      check(n == NCOMB, "all combinations evaluated");
      check(cyc == LAT + NCOMB - 1, $sformatf("pass length %0d", cyc + 1));
      check(!out_valid && !busy, "pipeline empty after the pass");
      repeat ($urandom_range(0, 5)) @(negedge clk);
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
