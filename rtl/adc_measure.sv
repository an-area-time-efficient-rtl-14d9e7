// adc_measure: measurement block. Reads NCH 12-bit serial ADCs (one per
// phase current and per flying-capacitor voltage, ADCS7476-style framing)
// that share one chip select and one serial clock, each with its own data
// line, and scales the codes to the fixed-point quantity format.
//
// Serial frame (from the converter's usual framing, not from the design
// description): chip select low starts the conversion and presents the
// first of 16 bits; every falling serial-clock edge presents the next. The
// frame is 4 leading zeros and the 12-bit code, MSB first. This block
// samples each data line on the clock cycle in which it drives the serial
// clock low, i.e. just before the converter changes the bit. The serial
// clock has a half period of HALF system clocks (15: 3.3 MHz at 100 MHz,
// a frame of about 495 cycles, inside the published 500-cycle measurement
// window).
//
// Scaling: value = ((code - offset) * gain) >>> GF, with a per-channel
// offset (in codes) and signed gain (output LSBs per code, GF fractional
// bits). `done` pulses when all values are updated; they are held until the
// next frame. `start` is ignored while a frame is in progress.
module adc_measure
  import fcc_pkg::*;
#(
  parameter int unsigned NCH  = 9,
  parameter int unsigned HALF = 15,
  parameter int unsigned GF   = 10,
  localparam int unsigned HW  = $clog2(HALF + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [NCH-1:0][11:0]    offset,
  input  coef_t [NCH-1:0]         gain,
  output logic                    adc_cs_n,
  output logic                    adc_sclk,
  input  logic [NCH-1:0]          adc_sdata,
  output logic                    done,
  output val_t [NCH-1:0]          meas
);
  typedef enum logic [1:0] {IDLE, SETUP, SHIFT, SCALE} state_t;
  state_t state;

  logic [HW-1:0]          hcnt;
  logic [4:0]             bits;     // falling edges issued so far
  logic [NCH-1:0][15:0]   shreg;
  val_t [NCH-1:0]         scaled;

  always_comb begin
    for (int unsigned c = 0; c < NCH; c++) begin
      logic signed [13:0]      d;
      logic signed [14+CW-1:0] p;
      d = $signed({2'b00, shreg[c][11:0]}) - $signed({2'b00, offset[c]});
      p = d * gain[c];
      scaled[c] = sat(64'(p >>> GF));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      adc_cs_n <= 1'b1;
      adc_sclk <= 1'b1;
      hcnt     <= '0;
      bits     <= '0;
      done     <= 1'b0;
      meas     <= '0;
      shreg    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          adc_cs_n <= 1'b0;
          hcnt     <= HW'(HALF - 1);
          bits     <= '0;
          state    <= SETUP;
        end
        SETUP, SHIFT: begin
          if (hcnt != '0) begin
            hcnt <= hcnt - 1'b1;
          end else begin
            hcnt <= HW'(HALF - 1);
            state <= SHIFT;
            if (adc_sclk) begin
              if (bits == 5'd16) begin
                adc_cs_n <= 1'b1;
                state    <= SCALE;
              end else begin
                adc_sclk <= 1'b0;
                bits     <= bits + 1'b1;
                for (int unsigned c = 0; c < NCH; c++)
                  shreg[c] <= {shreg[c][14:0], adc_sdata[c]};
              end
            end else begin
              adc_sclk <= 1'b1;
            end
          end
        end
        SCALE: begin
          meas  <= scaled;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The four leading bits of a frame are zeros and carry no data.
  logic unused_lead;
  assign unused_lead = ^{shreg[0][15:12]};
endmodule
