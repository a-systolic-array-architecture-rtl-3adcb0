// End-to-end testbench of the TVC linear system at its default size
// (N = 4: 16 PEs in M-MUL plus the S-MUL multiplier).
//
// For every time instant n = 0..N-1 it loads a record x(0..N-1) with a
// window w_n centred on sample n, reads back the N x N matrix, and compares
// it with C_n = U_n^T D_n U_n computed here directly from the definitions
//   v(I) = w_n(I) x(I),  D_n = diag(v),  U_n(r,c) = v(N-1-(c-r)) for c >= r.
// Further operations use random and extreme samples and random windows.
// It also checks the clocks each operation takes and counts each mechanism
// of the design, failing if one never happens:
//   - the host offering a sample while the system is busy (held off);
//   - psi set in exactly the last PE of every block;
//   - a block-end PE switching slow-channel B data into the next block;
//   - N^3 activated multiply-accumulate steps per operation.
module tb_tvc_top;

  import tvc_pkg::*;

  localparam int N   = 4;
  localparam int P   = N * N;
  localparam int C_W = c_width(N);
  localparam int NOPS = 12;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid, in_ready;
  logic signed [X_W-1:0] x_i;
  logic signed [W_W-1:0] w_i;
  logic signed [C_W-1:0] c_o;
  logic c_valid, c_last, busy;
  logic [P-1:0] psi_o;

  tvc_top dut (
    .clk, .rst_n, .in_valid, .in_ready, .x_i, .w_i,
    .c_o, .c_valid, .c_last, .busy, .psi_o
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // mechanism counters
  logic [P-2:0] sw_vec;
  for (genvar k = 0; k < P - 1; k++) begin : g_sw
    assign sw_vec[k] = psi_o[k] && (dut.u_mmul.g_pe[k].u_pe.bs_rr != 0);
  end
  int held_off = 0;
  int switches = 0;
  int mac_steps = 0;
  int run_clocks = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) held_off++;
      mac_steps += $countones(dut.u_mmul.act);
      if (busy && !c_valid) run_clocks++;
      switches += $countones(sw_vec);
    end
  end

  logic signed [X_W-1:0] xs [N];
  logic signed [W_W-1:0] ws [N];
  longint cref [N][N];

  task automatic reference();
    longint v [N];
    longint u [N][N];
    for (int k = 0; k < N; k++) v[k] = longint'(xs[k]) * longint'(ws[k]);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) u[r][c] = (c >= r) ? v[N-1-(c-r)] : 0;
    // C = U^T D U: C(i,j) = sum_k U(k,i) v(k) U(k,j)
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        cref[i][j] = 0;
        for (int k = 0; k < N; k++) cref[i][j] += u[k][i] * v[k] * u[k][j];
      end
  endtask

  task automatic operation(input int op);
    int got = 0;
    int macs0;
    bit saw_last = 1'b0;
    reference();
    macs0 = mac_steps;
    run_clocks = 0;
    for (int k = 0; k < N; k++) begin
      in_valid = 1'b1;
      x_i = xs[k];
      w_i = ws[k];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 1'b0;
    // offer the first sample of the next record early, while busy
    if (op % 2 == 1) begin
      in_valid = 1'b1;
      x_i = '0;
      w_i = '0;
      repeat (3) @(negedge clk);
      in_valid = 1'b0;
    end
    while (got < P) begin
      @(negedge clk);
      if (c_valid) begin
        check($sformatf("op %0d C(%0d,%0d)", op, got / N, got % N), c_o, cref[got / N][got % N]);
        if (c_last) begin
          saw_last = 1'b1;
          check("c_last position", got, P - 1);
        end
        got++;
      end
    end
    @(negedge clk);
    check("c_last seen", saw_last, 1);
    check("idle after unload", busy, 0);
    check("run clocks", run_clocks, 3 * P - N + 4);
    check("MAC steps", mac_steps - macs0, N * N * N);
  endtask

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    x_i = '0;
    w_i = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < N; k++) xs[k] = X_W'($urandom);
    // time-varying window: triangle centred on sample n
    for (int n = 0; n < N; n++) begin
      for (int k = 0; k < N; k++) begin
        automatic int gap = (k > n) ? k - n : n - k;
        ws[k] = W_W'((127 - 40 * gap) > 0 ? (127 - 40 * gap) : 0);
      end
      operation(n);
    end
    // extreme values
    for (int k = 0; k < N; k++) begin
      xs[k] = {1'b1, {(X_W-1){1'b0}}};
      ws[k] = {1'b1, {(W_W-1){1'b0}}};
    end
    operation(N);
    for (int op = N + 1; op < NOPS; op++) begin
      for (int k = 0; k < N; k++) begin
        xs[k] = X_W'($urandom);
        ws[k] = W_W'($urandom);
      end
      operation(op);
    end
    for (int k = 0; k < P; k++) check($sformatf("psi[%0d]", k), psi_o[k], (k % N == N - 1));
    $display("mechanisms: held_off=%0d block_switches=%0d mac_steps=%0d", held_off, switches, mac_steps);
    check("host held off at least once", held_off > 0, 1);
    check("block-end channel switch happened", switches > 0, 1);
    check("total MAC steps", mac_steps, NOPS * N * N * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
