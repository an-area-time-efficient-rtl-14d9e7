// pipe_delay: a chain of DEPTH registers for a WIDTH-bit word. It aligns
// side signals with the multiplier pipelines of the model datapath, and
// models the register stages of a pipelined multiplier when the product is
// fed through it (synthesis may retime these registers into the multiplier).
// DEPTH = 0 is a plain wire. No reset: every consumer qualifies the data
// with a valid bit that travels through a reset copy of this chain.
module pipe_delay #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] r [DEPTH];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int unsigned k = 1; k < DEPTH; k++) r[k] <= r[k-1];
    end
    assign q = r[DEPTH-1];
  end
endmodule
