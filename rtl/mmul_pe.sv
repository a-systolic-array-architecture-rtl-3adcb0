// Processing element of the M-MUL linear systolic array.
//
// Each PE holds one multiply-and-accumulate unit and the register stages of
// five channels that run from left to right through the array:
//   AS  slow A channel, two stages (AS.LR then AS.RR)
//   BF  fast B channel, one stage  (BF.R)
//   BS  slow B channel, two stages (BS.LR then BS.RR)
//   CT  activation token, two stages; the first stage is the ACT flag
//   I   one stage (fast), J two stages (slow)
// When ACT is 1 the PE adds AS.LR * BF.R to its accumulator C.
// psi is set (and stays set until reset) in the clock cycle in which a pulse
// on I and a pulse on J are in this PE's I stage and second J stage at the
// same time. A PE with psi set ends a block of the array:
//   M_A passes AS.LR on instead of AS.RR, so the A stream gains one clock and
//       the ACT token, which keeps its two stages, falls onto the next A
//       element;
//   M_B passes BS.RR into the fast channel of the next block, replacing the
//       fast-channel data of this block, which are dropped.
// The register names, the two multiplexers, psi and the stage counts follow
// the document's PE diagram. The multiplexer polarity, the sticky psi, the
// reset and the result unload chain are this design's own choices.
//
// Result unload (own addition, the document does not say how C leaves the
// array): on cap the PE copies C into its unload register R and clears C; on
// shift R takes the value of the right-hand neighbour (r_i), so the results
// leave the array through the leftmost PE.
//
// All registers are updated on the rising clock edge; rst_n is synchronous
// and active low.
module mmul_pe #(
  parameter int unsigned A_W = 32,
  parameter int unsigned B_W = 16,
  parameter int unsigned C_W = 50
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [A_W-1:0] as_i,
  output logic signed [A_W-1:0] as_o,
  input  logic signed [B_W-1:0] bf_i,
  output logic signed [B_W-1:0] bf_o,
  input  logic signed [B_W-1:0] bs_i,
  output logic signed [B_W-1:0] bs_o,
  input  logic                  ct_i,
  output logic                  ct_o,
  input  logic                  i_i,
  output logic                  i_o,
  input  logic                  j_i,
  output logic                  j_o,
  input  logic                  cap,
  input  logic                  shift,
  input  logic signed [C_W-1:0] r_i,
  output logic signed [C_W-1:0] r_o,
  output logic signed [C_W-1:0] c_o,
  output logic                  act_o,
  output logic                  psi_o
);

  logic signed [A_W-1:0] as_lr, as_rr;
  logic signed [B_W-1:0] bf_r;
  logic signed [B_W-1:0] bs_lr, bs_rr;
  logic                  ct_d1, ct_d2;
  logic                  i_d;
  logic                  j_d1, j_d2;
  logic                  psi;
  logic signed [C_W-1:0] c_acc, r_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      as_lr <= '0;
      as_rr <= '0;
      bf_r  <= '0;
      bs_lr <= '0;
      bs_rr <= '0;
      ct_d1 <= 1'b0;
      ct_d2 <= 1'b0;
      i_d   <= 1'b0;
      j_d1  <= 1'b0;
      j_d2  <= 1'b0;
      psi   <= 1'b0;
    end else begin
      as_lr <= as_i;
      as_rr <= as_lr;
      bf_r  <= bf_i;
      bs_lr <= bs_i;
      bs_rr <= bs_lr;
      ct_d1 <= ct_i;
      ct_d2 <= ct_d1;
      i_d   <= i_i;
      j_d1  <= j_i;
      j_d2  <= j_d1;
      if (i_d && j_d2) psi <= 1'b1;
    end
  end

  // Multiply-and-accumulate and the unload register.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c_acc <= '0;
      r_q   <= '0;
    end else if (cap) begin
      c_acc <= '0;
      r_q   <= c_acc;
    end else begin
      if (ct_d1) c_acc <= c_acc + C_W'(as_lr * bf_r);
      if (shift) r_q <= r_i;
    end
  end

  // Channel switching multiplexers M_A and M_B.
  assign as_o  = psi ? as_lr : as_rr;
  assign bf_o  = psi ? bs_rr : bf_r;
  assign bs_o  = bs_rr;
  assign ct_o  = ct_d2;
  assign i_o   = i_d;
  assign j_o   = j_d2;
  assign r_o   = r_q;
  assign c_o   = c_acc;
  assign act_o = ct_d1;
  assign psi_o = psi;

endmodule
