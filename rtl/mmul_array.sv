// M-MUL: linear systolic array that multiplies two M x M matrices, C = A * B.
//
// M*M processing elements (mmul_pe) are chained left to right and grouped in
// M blocks of M PEs; block i does the work of row i of the equivalent
// two-dimensional array, and PE (i-1)*M+j accumulates C(i,j). Every element
// enters through the leftmost PE, one per clock, with no gaps:
//   a   A in column-major order, a(1,1), a(2,1), ..., a(M,1), a(1,2), ...
//   b   B in row-major order,    b(1,1), b(1,2), ..., b(1,M), b(2,1), ...
//       b drives both the fast (BF) and the slow (BS) channel of PE 1
//   ct  1 together with a(1,k), the first element of each column of A
//   i,j channel-switch setup: one J pulse one clock before a(1,1), and an
//       I pulse one clock before a(1,k+1) for k = 1..M (the last one during
//       a(M,M)); I and J meet, and set psi, in PEs M, 2M, ..., M*M
// A moves two stages per PE, B one stage per PE in the fast channel, so that
// b(k,j) catches up with a(1,k) in PE j. At the end of each block the PE with
// psi set hands the slow copy of B to the next block's fast channel and
// advances A by one clock, which moves the activation token on to the next row
// of A (see mmul_pe). The last product is added 3*M*M - M - 1 clocks after
// the clock edge that takes in a(1,1); the document gives this figure for
// the array with one word of storage per PE. After that, cap moves all
// results into the unload chain and clears the accumulators, and each shift
// moves the chain one PE to the left: r_o shows C(1,1) after cap and the
// next element in row-major order after every shift.
//
// The array structure, stage counts and data orders follow the document; the
// exact pulse timing of ct, i and j, and the unload chain, are this design's
// own. Two assertions guard the unload protocol: cap only while no PE is
// accumulating, and never together with shift.
module mmul_array #(
  parameter int unsigned M   = 4,
  parameter int unsigned A_W = 32,
  parameter int unsigned B_W = 16,
  parameter int unsigned C_W = 50
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [A_W-1:0] a,
  input  logic signed [B_W-1:0] b,
  input  logic                  ct,
  input  logic                  i,
  input  logic                  j,
  input  logic                  cap,
  input  logic                  shift,
  output logic signed [C_W-1:0] r_o,
  output logic [M*M-1:0]        act,
  output logic [M*M-1:0]        psi
);

  localparam int unsigned P = M * M;

  // Channel nets: index k is the input of PE k (0-based), index P the output
  // of the last PE.
  logic signed [A_W-1:0] as_n [P+1];
  logic signed [B_W-1:0] bf_n [P+1];
  logic signed [B_W-1:0] bs_n [P+1];
  logic                  ct_n [P+1];
  logic                  i_n  [P+1];
  logic                  j_n  [P+1];
  // Unload chain: index k is the unload register output of PE k, index P is
  // the zero fed in at the right end.
  logic signed [C_W-1:0] r_n  [P+1];

  assign as_n[0] = a;
  assign bf_n[0] = b;
  assign bs_n[0] = b;
  assign ct_n[0] = ct;
  assign i_n[0]  = i;
  assign j_n[0]  = j;
  assign r_n[P]  = '0;
  assign r_o     = r_n[0];

  // Protocol rules: the results may only be captured when no PE is about
  // to accumulate, and capture and shift are never given together.
  a_cap_when_idle : assert property (@(posedge clk) disable iff (!rst_n) cap |-> (act == '0))
    else $error("cap while a PE is accumulating: a product would be lost");
  a_cap_xor_shift : assert property (@(posedge clk) disable iff (!rst_n) !(cap && shift))
    else $error("cap and shift in the same clock");

  for (genvar k = 0; k < P; k++) begin : g_pe
    logic signed [C_W-1:0] c_unused;
    mmul_pe #(.A_W(A_W), .B_W(B_W), .C_W(C_W)) u_pe (
      .clk   (clk),
      .rst_n (rst_n),
      .as_i  (as_n[k]),
      .as_o  (as_n[k+1]),
      .bf_i  (bf_n[k]),
      .bf_o  (bf_n[k+1]),
      .bs_i  (bs_n[k]),
      .bs_o  (bs_n[k+1]),
      .ct_i  (ct_n[k]),
      .ct_o  (ct_n[k+1]),
      .i_i   (i_n[k]),
      .i_o   (i_n[k+1]),
      .j_i   (j_n[k]),
      .j_o   (j_n[k+1]),
      .cap   (cap),
      .shift (shift),
      .r_i   (r_n[k+1]),
      .r_o   (r_n[k]),
      .c_o   (c_unused),
      .act_o (act[k]),
      .psi_o (psi[k])
    );
  end

endmodule
