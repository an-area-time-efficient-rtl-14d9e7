// tb_gate_output: drives update pulses with random switch states and checks
// (with DEAD_CYCLES reduced to 7) that the new state becomes the asserted
// state exactly 2 cycles after `update`, that every switch pair whose
// state changed has both gates off for exactly DEAD_CYCLES cycles before
// the new gate turns on, that unchanged pairs keep conducting, and that
// the two gates of a pair are never on together. All gates stay off until
// the first update after reset.
module tb_gate_output;
  import fcc_pkg::*;

  localparam int NLEV = 4, NSW = 3, DEAD = 7, NUPD = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic update;
  logic [NPH-1:0][NSW-1:0] new_sw, sw_now, gate_hi, gate_lo;

  gate_output #(.NLEV(NLEV), .DEAD_CYCLES(DEAD)) dut (.*);

  int checks = 0, failures = 0, dead_events = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // never shoot-through
  always @(negedge clk) if (rst_n) check((gate_hi & gate_lo) == '0, "both gates of a pair on");

  initial begin
    logic [8:0] prev, nxt;
    update = 0; new_sw = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    check(gate_hi == '0 && gate_lo == '0, "gates off before the first update");
    prev = '0;
    for (int u = 0; u < NUPD; u++) begin
      nxt = (u == 0) ? 9'h000 : 9'($urandom);
      if (u == 5) nxt = prev;                 // no change at all
      new_sw = nxt;
      update = 1;
      @(negedge clk);
      update = 0;
      new_sw = 9'($urandom);                  // must have been latched
      check(sw_now == prev || u == 0, "asserted state kept 1 cycle after update");
      @(negedge clk);
      check(sw_now == nxt, "asserted state 2 cycles after update");
      // dead time: changed pairs are off for DEAD cycles
      for (int k = 0; k < DEAD + 2; k++) begin
        for (int b = 0; b < 9; b++) begin
          bit changed, on_hi, on_lo;
          changed = (u == 0) ? 1'b0 : (prev[b] != nxt[b]);
          on_hi = gate_hi[b / NSW][b % NSW];
          on_lo = gate_lo[b / NSW][b % NSW];
          if (changed && k < DEAD) check(!on_hi && !on_lo, "dead time");
          else if (!changed || k >= DEAD) begin
            check(on_hi == nxt[b] && on_lo == !nxt[b], "gate follows the state");
          end
          if (changed && k == 0) dead_events++;
        end
        @(negedge clk);
      end
      prev = nxt;
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    check(dead_events > 100, "dead time inserted");
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
