// Checker used by tb_tvc_feeder: one tvc_feeder of size N, driven and
// compared clock by clock with the schedule described there.
module feeder_check
  import tvc_pkg::*;
#(
  parameter int N = 4
) (
  input logic clk
);

  localparam int P   = N * N;

  logic rst_n;
  logic in_valid, in_ready;
  logic signed [X_W-1:0] x_i;
  logic signed [W_W-1:0] w_i;
  logic signed [V_W-1:0] u_o, d_o, b_o;
  logic ct_o, i_o, j_o, cap_o, shift_o;
  logic c_valid, c_last, busy;

  int checks = 0;
  int failures = 0;
  bit done = 1'b0;

  tvc_feeder #(.N(N)) dut (.*);

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL N=%0d %s: got %0d expected %0d", N, what, got, exp);
    end
  endtask

  longint v [N];

  function automatic longint u_ref(input int k, input int c);
    return (c >= k) ? v[N-1-(c-k)] : 0;
  endfunction

  task automatic operation();
    int t;
    for (int k = 0; k < N; k++) begin
      in_valid = 1'b1;
      x_i = X_W'($urandom);
      w_i = W_W'($urandom);
      v[k] = longint'(x_i) * longint'(w_i);
      check("in_ready while loading", in_ready, 1);
      @(negedge clk);
    end
    in_valid = 1'b0;
    // clock 0 of RUN is the clock after the last sample was taken
    for (t = 0; t < 3 * P - N + 4; t++) begin
      int e_u = t - 2;
      int e_b = t - 3;
      check("busy", busy, 1);
      check("in_ready low", in_ready, 0);
      if (e_u >= 0 && e_u < P) begin
        check($sformatf("u_o e=%0d", e_u), u_o, u_ref(e_u / N, e_u % N));
        check($sformatf("d_o e=%0d", e_u), d_o, v[e_u / N]);
      end else begin
        check("u_o idle", u_o, 0);
      end
      if (e_b >= 0 && e_b < P) begin
        check($sformatf("b_o e=%0d", e_b), b_o, u_ref(e_b / N, e_b % N));
        check("ct_o", ct_o, (e_b % N) == 0);
        check("i_o", i_o, (e_b % N) == N - 1);
      end else begin
        check("ct_o idle", ct_o, 0);
        check("i_o idle", i_o, 0);
      end
      check("j_o", j_o, t == 2);
      check("cap_o", cap_o, t == 3 * P - N + 3);
      check("no shift in RUN", shift_o, 0);
      @(negedge clk);
    end
    for (int s = 0; s < P; s++) begin
      check("shift_o", shift_o, 1);
      check("c_valid", c_valid, 1);
      check("c_last", c_last, s == P - 1);
      @(negedge clk);
    end
    check("back to load", in_ready, 1);
    check("not busy", busy, 0);
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    x_i = '0;
    w_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    repeat (4) operation();
    done = 1'b1;
  end

endmodule
