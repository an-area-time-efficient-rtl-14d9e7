// tb_adc_measure: connects nine serial ADC models to the measurement block
// and runs frames with random codes, offsets and gains. Checks the scaled
// values against ((code - offset) * gain) >>> 10, that each frame has 16
// serial-clock periods of 30 system clocks, and that `done` comes within
// the 500-cycle measurement window.
module tb_adc_measure;
  import fcc_pkg::*;
  `include "fcc_ref.svh"

  localparam int NCH = 9, NFRAME = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 start, done, adc_cs_n, adc_sclk;
  logic [NCH-1:0][11:0] offset, code;
  coef_t [NCH-1:0]      gain;
  logic [NCH-1:0]       adc_sdata;
  val_t [NCH-1:0]       meas;

  adc_measure #(.NCH(NCH)) dut (.*);

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

  int falls = 0, last_fall = -1, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge adc_sclk) begin
    if (last_fall >= 0 && falls > 0) check(cyc - last_fall == 30, "serial clock period");
    falls++;
    last_fall = cyc;
  end

  initial begin
    logic [NCH*12-1:0] fc, fo; logic [NCH*18-1:0] fg, fm;
    int t;
    start = 0; offset = '0; gain = '0; code = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFRAME; f++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        code[c]   = (f == 0) ? 12'hfff : 12'($urandom);
        offset[c] = (f == 0) ? 12'h000 : 12'($urandom_range(1900, 2200));
        gain[c]   = (f == 0) ? coef_t'(131071) : coef_t'($urandom_range(0, 16000));
      end
      falls = 0; last_fall = -1;
      start = 1;
      @(negedge clk);
      start = 0;
      t = 1;
      repeat (100) @(negedge clk);
      start = 1;                          // ignored while a frame runs
      @(negedge clk);
      start = 0;
      t += 101;
      while (!done && t < 2000) begin
        @(negedge clk); t++;
      end
      check(t <= 500, $sformatf("frame took %0d cycles", t));
      check(falls == 16, "16 serial clocks per frame");
      fc = code; fo = offset; fg = gain; fm = meas;
      for (int c = 0; c < NCH; c++) begin
        longint d, e;
        d = longint'(fc[c*12 +: 12]) - longint'(fo[c*12 +: 12]);
        e = rsat((d * sx(fg[c*18 +: 18])) >>> 10);
        check(sx(fm[c*18 +: 18]) == e, "scaled value");
      end
      repeat (20) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NFRAME * 700 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
