// Linear systolic system for the time-varying third-order cumulant matrix
//   C_n = U_n^T D_n U_n
// of a windowed data record of N samples (scaling constant left out).
//
// Three parts in series, as in the document's block diagram:
//   tvc_feeder  forms w_n(I)x(I), streams U_n^T and D_n to S-MUL and U_n to
//               M-MUL, drives the array's control lines and frames the
//               unloaded C_n;
//   smul        S-MUL, one multiplier: Y = U_n^T D_n in column-major order;
//   mmul_array  M-MUL, N*N PEs in N blocks: C_n = Y U_n; its unload chain
//               drives c_o directly.
// One operation computes one C_n; the matrices for n = 0..N-1 are computed
// one after another on the same hardware (the document's single linear
// system option), with a new window w_n loaded for each n.
//
// Interface: give N pairs (x(I), w_n(I)), I = 0..N-1, with in_valid while
// in_ready is 1; N*N results then come out on c_o with c_valid, in row-major
// order, c_last marking C_n(N-1,N-1). psi_o shows which PEs end a block.
// Timing per operation: N load clocks, 3N^2 - N + 4 run clocks (the
// array's 3N^2 - N - 1 plus the feeder and S-MUL stages) and N^2 unload
// clocks.
module tvc_top
  import tvc_pkg::*;
#(
  parameter int unsigned N   = 4,
  parameter int unsigned C_W = tvc_pkg::c_width(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [X_W-1:0] x_i,
  input  logic signed [W_W-1:0] w_i,
  output logic signed [C_W-1:0] c_o,
  output logic                  c_valid,
  output logic                  c_last,
  output logic                  busy,
  output logic [N*N-1:0]        psi_o
);

  logic signed [V_W-1:0] u, d, b;
  logic signed [Y_W-1:0] y;
  logic                  ct, ii, jj, cap, shift;
  logic [N*N-1:0]        act_unused;

  tvc_feeder #(.N(N)) u_feeder (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_ready (in_ready),
    .x_i      (x_i),
    .w_i      (w_i),
    .u_o      (u),
    .d_o      (d),
    .b_o      (b),
    .ct_o     (ct),
    .i_o      (ii),
    .j_o      (jj),
    .cap_o    (cap),
    .shift_o  (shift),
    .c_valid  (c_valid),
    .c_last   (c_last),
    .busy     (busy)
  );

  smul #(.IN_W(V_W)) u_smul (
    .clk   (clk),
    .rst_n (rst_n),
    .u     (u),
    .d     (d),
    .y     (y)
  );

  mmul_array #(.M(N), .A_W(Y_W), .B_W(V_W), .C_W(C_W)) u_mmul (
    .clk   (clk),
    .rst_n (rst_n),
    .a     (y),
    .b     (b),
    .ct    (ct),
    .i     (ii),
    .j     (jj),
    .cap   (cap),
    .shift (shift),
    .r_o   (c_o),
    .act   (act_unused),
    .psi   (psi_o)
  );

endmodule
