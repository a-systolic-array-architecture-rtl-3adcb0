// Self-checking testbench of the M-MUL linear array at its default size
// (M = 4, 16 PEs, 32-bit A, 16-bit B, 50-bit results).
//
// Multiplies several random signed M x M matrices. Each run streams A in
// column-major and B in row-major order through the leftmost PE together
// with the ct, i and j control pulses, then checks:
//   - every element of the unloaded product against a reference product
//     computed here;
//   - that psi ends up set in exactly the last PE of each block;
//   - that the array performs exactly M^3 multiply-accumulate steps;
//   - that the last one falls 3M^2 - M - 1 clocks after the clock edge
//     that takes in a(1,1).
module tb_mmul_array;

  localparam int M   = 4;
  localparam int P   = M * M;
  localparam int A_W = 32;
  localparam int B_W = 16;
  localparam int C_W = 50;

  logic clk = 1'b0;
  logic rst_n;
  logic signed [A_W-1:0] a;
  logic signed [B_W-1:0] b;
  logic ct, i, j, cap, shift;
  logic signed [C_W-1:0] r_o;
  logic [P-1:0] act, psi;

  int checks = 0;
  int failures = 0;
  int cyc = 0;

  mmul_array dut (
    .clk, .rst_n, .a, .b, .ct, .i, .j, .cap, .shift, .r_o, .act, .psi
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int act_steps;
  int last_act;
  int t0;
  always @(posedge clk) begin
    if (rst_n) begin
      act_steps <= act_steps + $countones(act);
      if (act[P-1]) last_act <= cyc;
    end
  end

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_one(input int seed_mode);
    logic signed [A_W-1:0] am [M][M];
    logic signed [B_W-1:0] bm [M][M];
    longint cref [M][M];
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        am[r][c] = (seed_mode == 0) ? A_W'(r * M + c + 1) : A_W'($urandom);
        bm[r][c] = (seed_mode == 0) ? B_W'((r == c) ? 1 : 0) : B_W'($urandom);
        if (seed_mode == 2) begin
          am[r][c] = {1'b1, {(A_W-1){1'b0}}};
          bm[r][c] = {1'b1, {(B_W-1){1'b0}}};
        end
      end
    for (int r = 0; r < M; r++)
      for (int c = 0; c < M; c++) begin
        cref[r][c] = 0;
        for (int k = 0; k < M; k++) cref[r][c] += longint'(am[r][k]) * longint'(bm[k][c]);
      end
    act_steps = 0;
    // one clock with the J pulse ahead of the data
    @(negedge clk);
    j = 1'b1;
    @(negedge clk);
    j = 1'b0;
    t0 = cyc;
    for (int t = 0; t < P; t++) begin
      a  = am[t % M][t / M];          // column major
      b  = bm[t / M][t % M];          // row major
      ct = (t % M == 0);
      i  = (t % M == M - 1);
      @(negedge clk);
    end
    a = '0; b = '0; ct = 1'b0; i = 1'b0;
    repeat (3 * P) @(negedge clk);
    check("last MAC clock", last_act - t0, 3 * P - M - 1);
    check("MAC steps", act_steps, M * M * M);
    for (int k = 0; k < P; k++) check($sformatf("psi[%0d]", k), psi[k], (k % M == M - 1));
    cap = 1'b1;
    @(negedge clk);
    cap = 1'b0;
    for (int k = 0; k < P; k++) begin
      check($sformatf("C(%0d,%0d)", k / M, k % M), r_o, cref[k / M][k % M]);
      shift = 1'b1;
      @(negedge clk);
    end
    shift = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0;
    a = '0; b = '0; ct = 1'b0; i = 1'b0; j = 1'b0; cap = 1'b0; shift = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_one(0);
    run_one(2);
    repeat (5) run_one(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
