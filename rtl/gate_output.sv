// gate_output: applies the switch state chosen by the optimizer at the
// start of the next update period and turns it into gate signals. Every
// switch pair (S_ix, its complement) of every phase gets its own dead-time
// generator: when the commanded state of the pair changes, both gates are
// off for DEAD_CYCLES clock cycles (from the cycle in which the new state
// is asserted) before the new gate turns on. DEAD_CYCLES must be at least 1.
//
// Timing: `update` is pulsed two cycles before the period boundary (the
// published output time is 2 cycles). Cycle 1 latches new_sw; cycle 2
// makes it the asserted state sw_now, which is also fed back to the
// estimator as the state applied during the coming period. The dead-time
// length and the all-off state until the first update after reset are
// choices of this design.
module gate_output
  import fcc_pkg::*;
#(
  parameter int unsigned NLEV        = 4,
  parameter int unsigned DEAD_CYCLES = 100,
  localparam int unsigned NSW = NLEV - 1,
  localparam int unsigned DCW = $clog2(DEAD_CYCLES + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     update,
  input  logic [NPH-1:0][NSW-1:0]  new_sw,
  output logic [NPH-1:0][NSW-1:0]  sw_now,
  output logic [NPH-1:0][NSW-1:0]  gate_hi,
  output logic [NPH-1:0][NSW-1:0]  gate_lo
);
  logic                    pend, armed;
  logic [NPH-1:0][NSW-1:0] sw_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend    <= 1'b0;
      armed   <= 1'b0;
      sw_next <= '0;
      sw_now  <= '0;
    end else begin
      pend <= update;
      if (update) sw_next <= new_sw;
      if (pend) begin
        sw_now <= sw_next;
        armed  <= 1'b1;
      end
    end
  end

  for (genvar x = 0; x < NPH; x++) begin : g_ph
    for (genvar s = 0; s < NSW; s++) begin : g_sw
      logic           cur;
      logic [DCW-1:0] dt;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          cur <= 1'b0;
          dt  <= DCW'(DEAD_CYCLES);
        end else if (armed && sw_now[x][s] != cur) begin
          cur <= sw_now[x][s];
          dt  <= DCW'(DEAD_CYCLES - 1);
        end else if (dt != '0) begin
          dt  <= dt - 1'b1;
        end
      end
      // A pair whose commanded state differs from its present state is
      // off from the first cycle on, then for DEAD_CYCLES - 1 more.
      logic idle;
      assign idle = !armed || (dt != '0) || (sw_now[x][s] != cur);
      assign gate_hi[x][s] = !idle &&  cur;
      assign gate_lo[x][s] = !idle && !cur;
    end
  end
endmodule
