// optimization: scores every predicted state with the quadratic cost of
// eq. (12), summed over the three phases, and keeps the switch state with
// the lowest cost. For phase x:
//   g_x = (i_ref,x - i_x)^2 + sum_j W_vcj * (v_ref,xj - v_cxj)^2
// (the current term has unit weight, one weight per flying capacitor, as in
// the published 4-level experiment with W_vc1 and W_vc2). It is fully
// pipelined with a latency of 2 cycles, the published figure: cycle 1
// forms the errors and their squares, cycle 2 applies the weights, sums the
// terms and compares with the running minimum. Ties keep the earlier
// combination (own choice).
//
// Interface: `start` (one cycle, before or together with the first
// sample) clears the running minimum. Samples arrive on in_valid with
// in_last on the final one; `done` pulses 2 cycles after in_last, with
// best_sw / best_cost valid from then until the next start. Weights are
// unsigned with WF fractional bits.
module optimization
  import fcc_pkg::*;
#(
  parameter int unsigned NLEV = 4,
  localparam int unsigned NSW  = NLEV - 1,
  localparam int unsigned NCAP = NLEV - 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  weight_t [NCAP-1:0]       w_vc,
  input  val_t [NPH-1:0]           i_ref,
  input  val_t [NPH-1:0][NCAP-1:0] vc_ref,
  input  logic                     in_valid,
  input  logic                     in_last,
  input  logic [NPH-1:0][NSW-1:0]  in_sw,
  input  val_t [NPH-1:0]           in_i,
  input  val_t [NPH-1:0][NCAP-1:0] in_vc,
  output logic                     done,
  output logic [NPH-1:0][NSW-1:0]  best_sw,
  output cost_t                    best_cost
);
  localparam int unsigned SQW = 2 * (DW + 1);
  typedef logic [SQW-1:0] sq_t;

  function automatic sq_t sqerr(input val_t r, input val_t v);
    logic signed [DW:0] e;
    e = (DW+1)'(r) - (DW+1)'(v);
    return sq_t'(e * e);
  endfunction

  // ------------------------------------------------- cycle 1: squares
  logic                          v1, l1;
  logic [NPH-1:0][NSW-1:0]       sw1;
  sq_t  [NPH-1:0]                sqi1;
  sq_t  [NPH-1:0][NCAP-1:0]      sqv1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      l1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      l1 <= in_valid && in_last;
    end
  end

  always_ff @(posedge clk) begin
    sw1 <= in_sw;
    for (int unsigned x = 0; x < NPH; x++) begin
      sqi1[x] <= sqerr(i_ref[x], in_i[x]);
      for (int unsigned j = 0; j < NCAP; j++)
        sqv1[x][j] <= sqerr(vc_ref[x][j], in_vc[x][j]);
    end
  end

  // ------------------------------ cycle 2: weighted sum and minimum
  cost_t cost2;
  always_comb begin
    cost2 = '0;
    for (int unsigned x = 0; x < NPH; x++) begin
      cost2 = cost2 + cost_t'(sqi1[x]);
      for (int unsigned j = 0; j < NCAP; j++)
        cost2 = cost2 + cost_t'((cost_t'(sqv1[x][j]) * cost_t'(w_vc[j])) >> WF);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_cost <= '1;
      best_sw   <= '0;
      done      <= 1'b0;
    end else begin
      done <= l1;
      if (start) begin
        best_cost <= '1;
      end else if (v1 && cost2 < best_cost) begin
        best_cost <= cost2;
        best_sw   <= sw1;
      end
    end
  end
endmodule
