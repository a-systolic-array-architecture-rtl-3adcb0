// Feeder and sequencer of the TVC linear system.
//
// It runs one operation per time instant n, in three phases:
//   LOAD    takes N pairs (x(I), w_n(I)), I = 0..N-1, one per accepted
//           handshake (in_valid && in_ready), and stores the windowed samples
//           v(I) = w_n(I) x(I) with one multiplier.
//   RUN     streams the operands of C_n = U_n^T D_n U_n, one element per
//           clock, in the orders of the document's data-flow figure:
//             u_o, d_o  to S-MUL: U_n^T in column-major order, which is the
//                       same sequence as U_n in row-major order, and the
//                       diagonal element d_n(k,k) = v(k) repeated N times;
//             b_o       to M-MUL: U_n in row-major order, one clock later,
//                       in step with S-MUL's output;
//             ct_o      1 with the first element of each column of Y;
//             j_o, i_o  the channel-switch setup pulses of the array;
//           then waits for the last product and pulses cap_o.
//   UNLOAD  asserts shift_o and c_valid for N*N clocks while the array's
//           unload chain presents C_n(1,1) first, in row-major order;
//           c_last marks the last element.
// U_n is upper triangular and Toeplitz: U_n(r,c) = v(N-1-(c-r)) for c >= r,
// else 0 (rows and columns counted from 0). The document says all elements
// of U_n may be precomputed and D_n formed on the fly; here both are read
// from the same N stored products.
//
// Timing, with RUN entered at clock 0: u_o/d_o carry element e during clock
// e+2, b_o and ct_o during clock e+3, j_o is 1 during clock 2, i_o is 1 with
// the last element of every column of Y, and cap_o is 1 during clock
// 3N^2 - N + 3. The phase sequencing, the handshake and the unload order are
// this design's own; the operand formats and the S-MUL -> M-MUL order come
// from the document.
module tvc_feeder
  import tvc_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // sample input
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic signed [X_W-1:0] x_i,
  input  logic signed [W_W-1:0] w_i,
  // to S-MUL
  output logic signed [V_W-1:0] u_o,
  output logic signed [V_W-1:0] d_o,
  // to M-MUL
  output logic signed [V_W-1:0] b_o,
  output logic                  ct_o,
  output logic                  i_o,
  output logic                  j_o,
  output logic                  cap_o,
  output logic                  shift_o,
  // result framing
  output logic                  c_valid,
  output logic                  c_last,
  output logic                  busy
);

  localparam int unsigned P     = N * N;
  localparam int unsigned CAP_Q = 3 * P - N + 2;
  localparam int unsigned QW    = $clog2(3 * P + 4);
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned SW    = $clog2(P + 1);

  typedef enum logic [1:0] {S_LOAD, S_RUN, S_CAP, S_UNLOAD} state_t;

  state_t                state;
  logic signed [V_W-1:0] v [N];
  logic [IW-1:0]         ld;
  logic [QW-1:0]         q;
  logic [IW-1:0]         row, col;
  logic [SW-1:0]         s;

  // first-stage registers of the M-MUL side
  logic signed [V_W-1:0] b1;
  logic                  ct1, i1, j1;

  logic                  elem_valid;
  logic signed [V_W-1:0] u_next;

  assign elem_valid = (state == S_RUN) && (q >= QW'(1)) && (q <= QW'(P));

  always_comb begin
    u_next = '0;
    if (col >= row) u_next = v[IW'(N - 1) - (col - row)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD;
      ld    <= '0;
      q     <= '0;
      row   <= '0;
      col   <= '0;
      s     <= '0;
      u_o   <= '0;
      d_o   <= '0;
      b1    <= '0;
      ct1   <= 1'b0;
      i1    <= 1'b0;
      j1    <= 1'b0;
      b_o   <= '0;
      ct_o  <= 1'b0;
      i_o   <= 1'b0;
      j_o   <= 1'b0;
      cap_o <= 1'b0;
      for (int k = 0; k < N; k++) v[k] <= '0;
    end else begin
      // stage 1: S-MUL operands and M-MUL side signals
      u_o   <= elem_valid ? u_next : '0;
      d_o   <= elem_valid ? v[row] : '0;
      b1    <= elem_valid ? u_next : '0;
      ct1   <= elem_valid && (col == '0);
      i1    <= elem_valid && (col == IW'(N - 1));
      j1    <= (state == S_RUN) && (q == '0);
      cap_o <= (state == S_RUN) && (q == QW'(CAP_Q));
      // stage 2: in step with the S-MUL output
      b_o   <= b1;
      ct_o  <= ct1;
      i_o   <= i1;
      j_o   <= j1;

      unique case (state)
        S_LOAD: begin
          if (in_valid) begin
            v[ld] <= V_W'(x_i * w_i);
            if (ld == IW'(N - 1)) begin
              ld    <= '0;
              q     <= '0;
              row   <= '0;
              col   <= '0;
              state <= S_RUN;
            end else begin
              ld <= ld + 1'b1;
            end
          end
        end
        S_RUN: begin
          q <= q + 1'b1;
          if (elem_valid) begin
            if (col == IW'(N - 1)) begin
              col <= '0;
              row <= row + 1'b1;
            end else begin
              col <= col + 1'b1;
            end
          end
          if (q == QW'(CAP_Q)) state <= S_CAP;
        end
        S_CAP: begin
          s     <= '0;
          state <= S_UNLOAD;
        end
        S_UNLOAD: begin
          s <= s + 1'b1;
          if (s == SW'(P - 1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  assign in_ready = (state == S_LOAD);
  assign busy     = (state != S_LOAD);
  assign shift_o  = (state == S_UNLOAD);
  assign c_valid  = (state == S_UNLOAD);
  assign c_last   = (state == S_UNLOAD) && (s == SW'(P - 1));

endmodule
