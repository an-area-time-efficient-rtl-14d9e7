// ref_gen: reference generation. Produces the sinusoidal three-phase current
// reference and the flying-capacitor voltage setpoints used by the cost
// function.
//
// A 32-bit phase accumulator advances by PHASE_STEP once per update period
// (on `start`); the default step gives 50 Hz at a 20 kHz update rate. The
// reference is taken LOOKAHEAD periods ahead of the accumulator (2: the
// cost compares with the reference at k+2). Phase b and c lag by 1/3 and
// 2/3 of a turn. The sine comes from a quarter-wave table of 2^QB entries
// computed at elaboration time with a fixed-point Taylor series; the top
// QB+2 phase bits select quadrant and entry; the lower phase bits are
// dropped without interpolation (lint reports them unused), and the table
// holds the sine at the middle of each interval so that dropping them costs
// at most half an interval of phase. Capacitor j (1-based, j = 1
// the innermost) gets the setpoint j * V_DC / (n-1), the classical ratio
// (1:2:3 with V_DC for n = 4). The amplitude AMPL defaults to 2 A.
//
// Timing: outputs are registered; they change 2 cycles after `start`
// (one cycle to read the table, one to scale) and are held otherwise.
module ref_gen
  import fcc_pkg::*;
#(
  parameter int unsigned NLEV       = 4,
  parameter logic [31:0] PHASE_STEP = 32'd10737418,     // 2^32 * 50 / 20000
  parameter val_t        AMPL       = val_t'(2 << DF),  // 2 A peak
  parameter int unsigned LOOKAHEAD  = 2,
  parameter int unsigned QB         = 8,
  localparam int unsigned NCAP = NLEV - 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  val_t                     vdc,
  output val_t [NPH-1:0]           i_ref,
  output val_t [NPH-1:0][NCAP-1:0] vc_ref
);
  localparam int unsigned NQ = 1 << QB;
  typedef logic [16:0] sin_t;           // unsigned, 16 fractional bits
  typedef sin_t lut_t [NQ];

  // sin(pi/2 * (k + 0.5) / NQ) for k = 0 .. NQ-1, in Q16, from the Taylor
  // series to the x^11 term evaluated with 30 fractional bits.
  function automatic lut_t make_lut();
    lut_t t;
    for (int k = 0; k < NQ; k++) begin
      longint x, x2, term, s;
      // x = pi/2 * (2k+1) / (2 NQ) in Q30; pi/2 in Q30 = 1686629713
      x    = (64'sd1686629713 * (2 * k + 1)) / (2 * NQ);
      x2   = (x * x) >>> 30;
      term = x;
      s    = x;
      for (int n = 1; n <= 5; n++) begin
        term = -(((term * x2) >>> 30) / ((2 * n) * (2 * n + 1)));
        s    = s + term;
      end
      t[k] = sin_t'((s + (64'sd1 <<< 13)) >>> 14);
    end
    return t;
  endfunction

  localparam lut_t LUT = make_lut();

  logic [31:0] acc;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (start) acc <= acc + PHASE_STEP;
  end

  // Phase offsets of 0, 1/3 and 2/3 of a turn (lagging).
  localparam logic [31:0] THIRD = 32'd1431655765;

  logic        rd;
  logic [NPH-1:0]        neg1;
  sin_t [NPH-1:0]        mag1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd <= 1'b0;
    else        rd <= start;
  end

  always_ff @(posedge clk) begin
    if (start) begin
      for (int unsigned x = 0; x < NPH; x++) begin
        logic [31:0]   th;
        logic [QB-1:0] idx;
        th  = acc + PHASE_STEP * LOOKAHEAD - THIRD * x;
        idx = th[29 -: QB];
        if (th[30]) idx = ~idx;           // falling quarter: mirror
        mag1[x] <= LUT[idx];
        neg1[x] <= th[31];                // second half turn: negative
      end
    end
  end

  val_t [NPH-1:0]           i_nxt;
  val_t [NPH-1:0][NCAP-1:0] vc_nxt;
  always_comb begin
    for (int unsigned x = 0; x < NPH; x++) begin
      logic signed [DW+17:0] p;
      p = AMPL * $signed({1'b0, mag1[x]});
      i_nxt[x] = neg1[x] ? val_t'(-(p >>> 16)) : val_t'(p >>> 16);
      for (int unsigned j = 0; j < NCAP; j++)
        vc_nxt[x][j] = val_t'((longint'(vdc) * (longint'(j) + 1)) / (longint'(NLEV) - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_ref  <= '0;
      vc_ref <= '0;
    end else if (rd) begin
      i_ref  <= i_nxt;
      vc_ref <= vc_nxt;
    end
  end
endmodule
