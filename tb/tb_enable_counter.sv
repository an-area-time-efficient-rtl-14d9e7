// tb_enable_counter: runs the central counter with its default 5000-cycle
// period for three periods and checks that each enable pulses exactly once
// per period, at cycles 0 (measurement), 500 (estimation), 512
// (prediction), 533 (optimization) and 4998 (output), and that the count
// wraps after 4999.
module tb_enable_counter;
  localparam int PERIOD = 5000, NPER = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [12:0] cnt;
  logic en_meas, en_est, en_pred, en_opt, en_out;

  enable_counter dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int t_meas[$], t_est[$], t_pred[$], t_opt[$], t_out[$];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NPER * PERIOD; t++) begin
      check(int'(cnt) == t % PERIOD, "count");
      if (en_meas) t_meas.push_back(t);
      if (en_est)  t_est.push_back(t);
      if (en_pred) t_pred.push_back(t);
      if (en_opt)  t_opt.push_back(t);
      if (en_out)  t_out.push_back(t);
      @(negedge clk);
    end
    check(t_meas.size() == NPER && t_est.size() == NPER && t_pred.size() == NPER &&
          t_opt.size() == NPER && t_out.size() == NPER, "one pulse per period");
    for (int p = 0; p < NPER && p < t_out.size(); p++) begin
      check(t_meas[p] == p * PERIOD,        "measurement enable at 0");
      check(t_est[p]  == p * PERIOD + 500,  "estimation enable at 500");
      check(t_pred[p] == p * PERIOD + 512,  "prediction enable at 512");
      check(t_opt[p]  == p * PERIOD + 533,  "optimization enable at 533");
      check(t_out[p]  == p * PERIOD + 4998, "output enable at 4998");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPER * PERIOD + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
