// tb_optimization: streams sets of 512 random predicted states (with random
// gaps) through the cost-and-minimum block and checks the selected switch
// state and its cost against a direct evaluation of the quadratic cost,
// and that `done` arrives exactly 2 cycles after the last sample. In one set
// a later sample repeats an earlier state under another switch state; the
// reference keeps the earlier of equal costs, as the block must.
module tb_optimization;
  import fcc_pkg::*;
  `include "fcc_ref.svh"

  localparam int NLEV = 4, NSW = 3, NCAP = 2, NCOMB = 512, NSET = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, in_valid, in_last, done;
  weight_t [NCAP-1:0]       w_vc;
  val_t [NPH-1:0]           i_ref, in_i;
  val_t [NPH-1:0][NCAP-1:0] vc_ref, in_vc;
  logic [NPH-1:0][NSW-1:0]  in_sw, best_sw;
  cost_t                    best_cost;

  optimization #(.NLEV(NLEV)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    ph_t ri, pi; cap_t rv, pv;
    longint w [3];
    longint g, gmin, tie_g;
    int     smin, cyc;
    logic [53:0] t_i; logic [107:0] t_v;
    start = 0; in_valid = 0; in_last = 0; in_sw = '0; in_i = '0; in_vc = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int set = 0; set < NSET; set++) begin
      // weights 10 and 2.16 (published experiment) then random ones
      w[0] = (set == 0) ? 2560 : $urandom_range(0, 4000);
      w[1] = (set == 0) ? 553  : $urandom_range(0, 4000);
      w[2] = 0;
      w_vc = {16'(w[1]), 16'(w[0])};
      for (int x = 0; x < 3; x++) begin
        ri[x] = longint'($urandom_range(0, 1024)) - 512;
        for (int j = 0; j < 3; j++) rv[x][j] = (j < NCAP) ? 5120 * (j + 1) : 0;
      end
      i_ref  = {18'(ri[2]), 18'(ri[1]), 18'(ri[0])};
      vc_ref = {18'(rv[2][1]), 18'(rv[2][0]), 18'(rv[1][1]), 18'(rv[1][0]),
                18'(rv[0][1]), 18'(rv[0][0])};
      @(negedge clk);
      start = 1;
      gmin = -1; smin = -1; tie_g = -1;
      for (int n = 0; n < NCOMB; n++) begin
        if (n > 0) begin
          @(negedge clk);
          start = 0;
          if ($urandom_range(0, 7) == 0) begin
            in_valid = 0;
            @(negedge clk);
          end
        end
        for (int x = 0; x < 3; x++) begin
          pi[x] = ri[x] + longint'($urandom_range(0, 600)) - 300;
          for (int j = 0; j < 3; j++)
            pv[x][j] = (j < NCAP) ? rv[x][j] + longint'($urandom_range(0, 600)) - 300 : 0;
        end
        in_valid = 1;
        in_last  = (n == NCOMB - 1);
        in_sw    = 9'($urandom);
        in_i     = {18'(pi[2]), 18'(pi[1]), 18'(pi[0])};
        in_vc    = {18'(pv[2][1]), 18'(pv[2][0]), 18'(pv[1][1]), 18'(pv[1][0]),
                    18'(pv[0][1]), 18'(pv[0][0])};
        if (set == 1 && n == 100) begin
          t_i = in_i; t_v = in_vc;
        end
        if (set == 1 && n == 400) begin
          in_i = t_i; in_vc = t_v;   // same state as sample 100
          for (int x = 0; x < 3; x++) begin
            pi[x] = sx(t_i[x*18 +: 18]);
            for (int j = 0; j < NCAP; j++) pv[x][j] = sx(t_v[(x*NCAP + j)*18 +: 18]);
          end
        end
        g = cost(NLEV, ri, rv, w, pi, pv);
        if (set == 1 && n == 100) tie_g = g;
        if (smin < 0 || g < gmin) begin
          gmin = g; smin = int'(in_sw);
        end
      end
      @(negedge clk);
      in_valid = 0; in_last = 0; in_sw = '1;
      cyc = 1;
      while (!done && cyc < 10) begin
        @(negedge clk); cyc++;
      end
      check(cyc == 2, $sformatf("done %0d cycles after the last sample", cyc));
      check(int'(best_sw) == smin, "selected switch state");
      check(longint'(best_cost) == gmin, "minimum cost");
      if (set == 1) check(tie_g >= gmin, "tie sample consistent");
      repeat (2) @(negedge clk);
      check(int'(best_sw) == smin, "selection held");
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
