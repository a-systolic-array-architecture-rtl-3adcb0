// S-MUL: the single multiplier that forms Y = U_n^T D_n.
//
// Multiplying U_n^T by the diagonal matrix D_n scales column k of U_n^T by
// d_n(k,k). Because both operands arrive as serial streams (U_n^T in
// column-major order, each diagonal element of D_n repeated once per element
// of its column), one multiplier per clock is all it takes, and its output is
// Y in column-major order, the order in which M-MUL takes its A operand.
// This is the document's own structure. The output register (one clock of
// latency) and the reset are this design's choices.
//
// Timing: y shows u * d one clock after u and d are presented.
module smul #(
  parameter int unsigned IN_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [IN_W-1:0]   u,
  input  logic signed [IN_W-1:0]   d,
  output logic signed [2*IN_W-1:0] y
);

  always_ff @(posedge clk) begin
    if (!rst_n) y <= '0;
    else        y <= u * d;
  end

endmodule
